// tb_socbus_switch -- checks one switch, at (1,1) of a 3x3 mesh, with the
// neighbours played by the testbench. Checked: the request leaves on the
// right output 4 cycles after it arrives (the minimum per switch), the
// acknowledgment goes back 1 cycle after it arrives, payload passes with 1
// cycle of latency, the cancel passes and frees the output; two requests
// colliding on the only useful output: one wins, the other is refused
// with nAck; a request that has two useful outputs takes the second when
// the first is locked; a request for this switch's own address goes to
// the local port; a negative acknowledgment from downstream is passed
// back and frees the output.
module tb_socbus_switch;
  import socbus_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fwd_t [NPORTS-1:0] rx_fwd, tx_fwd;
  rev_t [NPORTS-1:0] rx_rev, tx_rev;
  in_state_t [NPORTS-1:0] in_state;

  socbus_switch #(.MESH_X(3), .MESH_Y(3), .MY_X(1), .MY_Y(1)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(); @(posedge clk); #1; endtask

  // Send a request on input p; return the cycles until it shows on output o.
  task automatic request(input int p, input logic [7:0] dest, input int o, output int lat);
    rx_fwd[p] = '{ctrl: 1'b1, data: dest};
    step(); rx_fwd[p] = FWD_IDLE;
    lat = 1;
    while (!(tx_fwd[o].ctrl && tx_fwd[o].data == dest) && lat < 30) begin step(); lat++; end
  endtask

  int lat;

  initial begin
    rx_fwd = '0; tx_rev = '0;
    step(); rst_n = 1; step();

    // West input to (2,1) = address 5: only east leads there.
    request(3, 8'd5, 1, lat);
    check(lat == 4, "request latency 4 cycles per switch");
    step();
    check(tx_fwd[1] == FWD_IDLE, "request is one word");
    tx_rev[1] = REV_ACK; step(); tx_rev[1] = REV_NONE;
    check(rx_rev[3] == REV_ACK, "ack passed back after 1 cycle");
    step();
    for (int k = 0; k < 5; k++) begin
      rx_fwd[3] = '{ctrl: 1'b1, data: 8'(8'hA0 + k)};
      step();
      check(tx_fwd[1] == fwd_t'({1'b1, 8'(8'hA0 + k)}), "payload 1 cycle per switch");
    end
    rx_fwd[3] = FWD_CANCEL_WORD; step(); rx_fwd[3] = FWD_IDLE;
    check(tx_fwd[1] == FWD_CANCEL_WORD, "cancel passed on");
    step(); step();
    check(dut.out_locked == 0, "output freed by cancel");

    // Collision: west and south inputs both want address 5 (east only).
    rx_fwd[3] = '{ctrl: 1'b1, data: 8'd5};
    rx_fwd[2] = '{ctrl: 1'b1, data: 8'd5};
    step(); rx_fwd[3] = FWD_IDLE; rx_fwd[2] = FWD_IDLE;
    begin
      int nacks = 0, reqs = 0;
      for (int c = 0; c < 10; c++) begin
        step();
        if (rx_rev[2] == REV_NACK || rx_rev[3] == REV_NACK) nacks++;
        if (tx_fwd[1].ctrl) reqs++;
      end
      check(nacks == 1 && reqs == 1, "collision: one passes, one gets nAck");
    end
    check(dut.out_locked == 5'b00010, "east locked by the winner");

    // North input to (2,2) = address 8: east or south. East is locked,
    // so the second choice, south, is used.
    request(0, 8'd8, 2, lat);
    check(lat == 4, "second choice south taken");
    // Local delivery: east input to own address 4.
    request(1, 8'd4, 4, lat);
    check(lat == 4, "own address goes to local port");
    // Downstream refuses the south route.
    tx_rev[2] = REV_NACK; step(); tx_rev[2] = REV_NONE;
    check(rx_rev[0] == REV_NACK, "nAck passed back");
    step();
    check(!dut.out_locked[2], "refused route freed");
    // Request towards a full south output fails at once: address 7 is (1,2).
    tx_rev[4] = REV_ACK; step(); tx_rev[4] = REV_NONE;   // open local route
    request(4, 8'd7, 2, lat);                            // local input to south
    check(lat == 4, "local input routed south");
    rx_fwd[3] = '{ctrl: 1'b1, data: 8'd7}; step(); rx_fwd[3] = FWD_IDLE;
    step(); step();
    check(rx_rev[3] == REV_NACK, "blocked request refused quickly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
