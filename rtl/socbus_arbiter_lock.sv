// socbus_arbiter_lock -- request arbitration and output locks of a switch.
//
// Input FSMs that hold a route request raise try_req. Each cycle the
// arbiter serves one of them, chosen round robin over the inputs, which is
// how colliding requests are arbitrated. It looks up the served input's
// destination in the switch's routing table (lookup_addr -> lookup_mask),
// removes the port the request came in on and every output that is
// already locked, and picks one of the remaining outputs round robin: the
// primary choice, or the second one if the first is taken. The picked
// output is locked for that input (grant); with no output left the request
// fails (fail), and the input FSM answers with a negative acknowledgment.
// An input that is not served this cycle keeps its request up and is served
// later. The locks drive the crossbar: out_locked[o] says output o is in
// use and out_owner[o] which input owns it. An owner frees its output by
// raising release.
//
// Timing: grant, fail and grant_port are combinational in the cycle the
// request is served; the lock is visible from the next cycle on. A release
// takes effect at the next clock edge. The two round-robin pointers and the
// single-request-per-cycle service are this design's choices; the document
// gives round robin for both decisions but not how it is built.
module socbus_arbiter_lock
  import socbus_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NPORTS-1:0]               try_req,
  input  logic [NPORTS-1:0][DATA_W-1:0]   req_addr,
  input  logic [NPORTS-1:0]               release_req,
  output logic [DATA_W-1:0]               lookup_addr,
  input  logic [NPORTS-1:0]               lookup_mask,
  output logic [NPORTS-1:0]               grant,
  output logic [NPORTS-1:0]               fail,
  output logic [PORT_W-1:0]               grant_port,
  output logic [NPORTS-1:0]               out_locked,
  output logic [NPORTS-1:0][PORT_W-1:0]   out_owner
);

  logic [PORT_W-1:0] in_ptr_q, out_ptr_q;
  logic [NPORTS-1:0] locked_q;
  logic [NPORTS-1:0][PORT_W-1:0] owner_q;

  logic              served;
  logic [PORT_W-1:0] pick;
  logic [NPORTS-1:0] cand;
  logic              found;
  logic [PORT_W-1:0] choice;

  // Round-robin pick of the input to serve, starting at in_ptr_q.
  always_comb begin
    served = 1'b0;
    pick   = '0;
    for (int unsigned k = 0; k < NPORTS; k++) begin
      logic [PORT_W-1:0] idx;
      idx = PORT_W'((int'(in_ptr_q) + k) % NPORTS);
      if (!served && try_req[idx]) begin
        served = 1'b1;
        pick   = idx;
      end
    end
  end

  assign lookup_addr = req_addr[pick];

  // Free outputs that lead closer, never back out of the arrival port.
  always_comb begin
    cand = lookup_mask & ~locked_q;
    cand[pick] = 1'b0;
  end

  // Round-robin choice among the candidate outputs, starting at out_ptr_q.
  always_comb begin
    found  = 1'b0;
    choice = '0;
    for (int unsigned k = 0; k < NPORTS; k++) begin
      logic [PORT_W-1:0] idx;
      idx = PORT_W'((int'(out_ptr_q) + k) % NPORTS);
      if (!found && cand[idx]) begin
        found  = 1'b1;
        choice = idx;
      end
    end
  end

  always_comb begin
    grant = '0;
    fail  = '0;
    if (served) begin
      if (found) grant[pick] = 1'b1;
      else       fail[pick]  = 1'b1;
    end
  end

  assign grant_port = choice;
  assign out_locked = locked_q;
  assign out_owner  = owner_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ptr_q  <= '0;
      out_ptr_q <= '0;
      locked_q  <= '0;
      owner_q   <= '0;
    end else begin
      for (int unsigned o = 0; o < NPORTS; o++) begin
        if (locked_q[o] && release_req[owner_q[o]]) locked_q[o] <= 1'b0;
      end
      if (served) begin
        in_ptr_q <= PORT_W'((int'(pick) + 1) % NPORTS);
        if (found) begin
          locked_q[choice] <= 1'b1;
          owner_q[choice]  <= pick;
          out_ptr_q        <= PORT_W'((int'(choice) + 1) % NPORTS);
        end
      end
    end
  end

  // A grant never hands out an output that is already locked.
  property p_grant_free;
    @(posedge clk) disable iff (!rst_n) (|grant) |-> !locked_q[grant_port];
  endproperty
  a_grant_free: assert property (p_grant_free);

  // At most one input is granted or refused per cycle.
  a_one_served: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(grant | fail));

endmodule
