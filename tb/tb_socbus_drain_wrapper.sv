// tb_socbus_drain_wrapper -- checks the drain wrapper: a request is
// acknowledged one cycle after it arrives, payload bytes are handed to the
// IP side in order one cycle later, idle words are not delivered, the
// cancel ends the transfer with rx_end; with rx_accept low a request is
// refused with a negative acknowledgment.
module tb_socbus_drain_wrapper;
  import socbus_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fwd_t net_fwd;
  rev_t net_rev;
  logic rx_accept, rx_start, rx_valid, rx_end;
  logic [DATA_W-1:0] rx_data;

  socbus_drain_wrapper dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(); @(posedge clk); #1; endtask

  int n_rx;
  logic [7:0] want;

  initial begin
    net_fwd = FWD_IDLE; rx_accept = 1;
    step(); rst_n = 1; step();
    check(net_rev == REV_NONE, "quiet after reset");
    net_fwd = '{ctrl: 1'b1, data: 8'd12};
    step(); net_fwd = FWD_IDLE;
    check(net_rev == REV_ACK, "ack one cycle after request");
    step();
    check(net_rev == REV_NONE && rx_start, "ack is a single pulse, rx_start");
    n_rx = 0; want = 8'h30;
    for (int k = 0; k < 12; k++) begin
      net_fwd = (k % 4 == 3) ? FWD_IDLE : fwd_t'({1'b1, 8'(8'h30 + k)});
      step();
      if (k % 4 == 3) check(!rx_valid, "idle not delivered");
      else begin
        check(rx_valid && rx_data == 8'(8'h30 + k), "byte delivered next cycle");
        n_rx++;
      end
    end
    net_fwd = FWD_CANCEL_WORD; step(); net_fwd = FWD_IDLE;
    check(rx_end && !rx_valid, "cancel ends transfer");
    check(n_rx == 9, "nine bytes");
    // refusal
    rx_accept = 0;
    net_fwd = '{ctrl: 1'b1, data: 8'd12}; step(); net_fwd = FWD_IDLE;
    check(net_rev == REV_NACK, "nAck when not accepting");
    step();
    check(net_rev == REV_NONE && !rx_start, "back to idle after refusal");
    rx_accept = 1;
    net_fwd = '{ctrl: 1'b1, data: 8'd12}; step(); net_fwd = FWD_IDLE;
    check(net_rev == REV_ACK, "accepts again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
