// tb_socbus_input_fsm -- walks one input FSM through the transaction
// phases with the arbiter's answers driven by the testbench: request
// buffered in IDLE, waiting in TRY_ROUTE while not served, refusal (nAck),
// grant, lock, request passed on, positive acknowledgment passed back,
// payload passed through, cancel, unlock; then a negative acknowledgment
// from downstream. Every cycle's state, outputs and cycle counts are
// checked against the expected sequence.
module tb_socbus_input_fsm;
  import socbus_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fwd_t in_q, xbar_fwd;
  logic try_req, grant, fail, release_req;
  logic [DATA_W-1:0] req_addr;
  rev_t xbar_rev, rev_out;
  in_state_t state;

  socbus_input_fsm dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t (state %0d)", what, $time, state); end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  initial begin
    in_q = FWD_IDLE; grant = 0; fail = 0; xbar_rev = REV_NONE;
    step(); rst_n = 1; step();
    check(state == S_IDLE && !try_req && rev_out == REV_NONE, "reset idle");

    // request that is refused
    in_q = '{ctrl: 1'b1, data: 8'h2A};
    step(); in_q = FWD_IDLE;
    check(state == S_TRY_ROUTE && try_req && req_addr == 8'h2A, "try route, address buffered");
    step();
    check(state == S_TRY_ROUTE, "stays while not served");
    fail = 1; step(); fail = 0;
    check(state == S_NACK && rev_out == REV_NACK && release_req, "nAck sent");
    step();
    check(state == S_IDLE && rev_out == REV_NONE, "back to idle after nAck");

    // request that is granted and completes
    in_q = '{ctrl: 1'b1, data: 8'h15};
    step(); in_q = FWD_IDLE;
    grant = 1; #0; step(); grant = 0;
    check(state == S_LOCK && xbar_fwd == FWD_IDLE, "lock");
    step();
    check(state == S_PASS_REQ && xbar_fwd == fwd_t'({1'b1, 8'h15}), "request passed on");
    step();
    check(state == S_WAIT_ACK && xbar_fwd == FWD_IDLE, "wait ack");
    step(); step();
    check(state == S_WAIT_ACK, "keeps waiting");
    xbar_rev = REV_ACK; step(); xbar_rev = REV_NONE;
    check(state == S_SEND_ACK && rev_out == REV_ACK, "ack passed back one cycle later");
    step();
    check(state == S_TRANSFER && rev_out == REV_NONE, "transfer");
    for (int k = 0; k < 6; k++) begin
      in_q = '{ctrl: 1'b1, data: 8'(8'h40 + k)};
      #1 check(xbar_fwd == in_q, "payload straight through");
      step();
    end
    in_q = FWD_IDLE; #1 check(xbar_fwd == FWD_IDLE, "gap passed as idle");
    step();
    in_q = FWD_CANCEL_WORD; #1 check(xbar_fwd == FWD_CANCEL_WORD, "cancel passed on");
    step(); in_q = FWD_IDLE;
    check(state == S_UNLOCK && release_req, "unlock");
    step();
    check(state == S_IDLE && !release_req, "idle after unlock");

    // downstream refuses
    in_q = '{ctrl: 1'b1, data: 8'h07};
    step(); in_q = FWD_IDLE;
    grant = 1; #0; step(); grant = 0;
    step(); step();
    check(state == S_WAIT_ACK, "waiting again");
    xbar_rev = REV_NACK; step(); xbar_rev = REV_NONE;
    check(state == S_NACK && rev_out == REV_NACK && release_req, "downstream nAck passed back and unlocked");
    step();
    check(state == S_IDLE, "idle");
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
