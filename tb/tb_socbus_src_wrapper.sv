// tb_socbus_src_wrapper -- checks the source wrapper's transaction:
// request word with the destination, retry after a negative
// acknowledgment exactly RETRY_DELAY+1 cycles after the nAck, payload in
// order with IP-side gaps passed as idle words, cancel after the last
// word, done pulse, and a zero-length transfer.
module tb_socbus_src_wrapper;
  import socbus_pkg::*;

  localparam int unsigned RD = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, tx_valid, tx_ready, done, retry;
  logic [DATA_W-1:0] cmd_dest, tx_data;
  logic [15:0] cmd_len;
  fwd_t net_fwd;
  rev_t net_rev;

  socbus_src_wrapper #(.LEN_W(16), .RETRY_DELAY(RD)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(); @(posedge clk); #1; endtask

  int sent, got, cyc_nack, cyc_req;
  logic [7:0] next_byte;

  initial begin
    cmd_valid = 0; cmd_dest = 0; cmd_len = 0; tx_valid = 0; tx_data = 0; net_rev = REV_NONE;
    step(); rst_n = 1; step();
    check(cmd_ready && net_fwd == FWD_IDLE, "idle");
    cmd_valid = 1; cmd_dest = 8'd37; cmd_len = 16'd10;
    step(); cmd_valid = 0;
    check(net_fwd == fwd_t'({1'b1, 8'd37}), "request word carries destination");
    step();
    check(net_fwd == FWD_IDLE && !cmd_ready, "quiet while waiting");
    step();
    net_rev = REV_NACK; #1 check(retry, "retry pulse on nAck");
    step(); net_rev = REV_NONE;
    cyc_nack = 0;
    while (net_fwd.ctrl == 0 && cyc_nack < 50) begin step(); cyc_nack++; end
    check(cyc_nack == RD, "retry after RETRY_DELAY cycles of backoff");
    check(net_fwd == fwd_t'({1'b1, 8'd37}), "same request again");
    step(); step();
    net_rev = REV_ACK; step(); net_rev = REV_NONE;
    // payload, IP gives a byte on 2 cycles out of 3
    sent = 0; got = 0; next_byte = 8'h90;
    for (int c = 0; c < 40 && got < 10; c++) begin
      tx_valid = (c % 3) != 2;
      tx_data  = next_byte;
      #1;
      if (tx_valid) begin
        check(tx_ready && net_fwd == fwd_t'({1'b1, next_byte}), "payload word");
        got++; next_byte++;
      end else begin
        check(net_fwd == FWD_IDLE, "gap as idle word");
      end
      step();
    end
    tx_valid = 0;
    check(got == 10, "ten bytes sent");
    check(net_fwd == FWD_CANCEL_WORD && done, "cancel right after the last word");
    step();
    check(net_fwd == FWD_IDLE && cmd_ready && !tx_ready, "idle after cancel");
    // zero-length transfer
    cmd_valid = 1; cmd_dest = 8'd5; cmd_len = 0; step(); cmd_valid = 0;
    check(net_fwd == fwd_t'({1'b1, 8'd5}), "request for empty transfer");
    step(); net_rev = REV_ACK; step(); net_rev = REV_NONE;
    check(net_fwd == FWD_CANCEL_WORD, "empty transfer cancels at once");
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
