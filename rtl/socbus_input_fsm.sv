// socbus_input_fsm -- state machine behind one input port of a switch.
//
// It runs the switch side of the packet connected circuit (PCC) setup,
// with the nine states of the document's state chart:
//   1 IDLE      wait for a request packet (forward ctrl=1); store its
//               destination address (the request buffer)
//   2 TRY_ROUTE ask the arbiter for a free output leading closer; stay
//               while another input is being served
//   3 NACK      no free output, or a negative acknowledgment came back:
//               free the output (if any) and send nAck upstream
//   4 LOCK      output locked, crossbar connected
//   5 PASS_REQ  send the request packet on through the locked output
//   6 WAIT_ACK  wait for the acknowledgment from downstream
//   7 SEND_ACK  pass the positive acknowledgment upstream
//   8 TRANSFER  payload flows straight through the crossbar until the
//               route cancel word passes
//   9 UNLOCK    free the output and return to IDLE
//
// Interface: in_q is the retimed forward word of this input; xbar_fwd is
// what this input puts into the crossbar and xbar_rev the reverse control
// of the output it owns; rev_out goes back upstream on this port.
//
// Timing: a request word seen in IDLE leaves the switch output four cycles
// after it entered the switch input (input register, IDLE, TRY_ROUTE,
// LOCK; driven in PASS_REQ) when the arbiter serves it at once, the
// document's minimum of four cycles per switch. An acknowledgment seen in
// WAIT_ACK is driven upstream in the next cycle, one cycle per switch. In
// TRANSFER payload goes through with no delay beyond the input register,
// one cycle per switch. The encodings of the words are the package's; the
// source must leave at least one idle cycle between a cancel and its next
// request on the same port, since UNLOCK does not look for requests.
module socbus_input_fsm
  import socbus_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fwd_t              in_q,
  output logic              try_req,
  output logic [DATA_W-1:0] req_addr,
  input  logic              grant,
  input  logic              fail,
  output logic              release_req,
  output fwd_t              xbar_fwd,
  input  rev_t              xbar_rev,
  output rev_t              rev_out,
  output in_state_t         state
);

  in_state_t         state_q, state_d;
  logic [DATA_W-1:0] req_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:      if (in_q.ctrl) state_d = S_TRY_ROUTE;
      S_TRY_ROUTE: if (grant) state_d = S_LOCK;
                   else if (fail) state_d = S_NACK;
      S_NACK:      state_d = S_IDLE;
      S_LOCK:      state_d = S_PASS_REQ;
      S_PASS_REQ:  state_d = S_WAIT_ACK;
      S_WAIT_ACK:  if (xbar_rev == REV_ACK) state_d = S_SEND_ACK;
                   else if (xbar_rev == REV_NACK) state_d = S_NACK;
      S_SEND_ACK:  state_d = S_TRANSFER;
      S_TRANSFER:  if (is_cancel(in_q)) state_d = S_UNLOCK;
      S_UNLOCK:    state_d = S_IDLE;
      default:     state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      req_q   <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE && in_q.ctrl) req_q <= in_q.data;
    end
  end

  assign try_req     = (state_q == S_TRY_ROUTE);
  assign req_addr    = req_q;
  assign release_req = (state_q == S_NACK) || (state_q == S_UNLOCK);
  assign state       = state_q;

  always_comb begin
    unique case (state_q)
      S_PASS_REQ: xbar_fwd = '{ctrl: 1'b1, data: req_q};
      S_TRANSFER: xbar_fwd = in_q;
      default:    xbar_fwd = FWD_IDLE;
    endcase
  end

  always_comb begin
    unique case (state_q)
      S_NACK:     rev_out = REV_NACK;
      S_SEND_ACK: rev_out = REV_ACK;
      default:    rev_out = REV_NONE;
    endcase
  end

  // The upstream side keeps quiet while its request is being handled.
  a_quiet_setup: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q inside {S_TRY_ROUTE, S_LOCK, S_PASS_REQ, S_WAIT_ACK, S_UNLOCK}) |-> !in_q.ctrl);

endmodule
