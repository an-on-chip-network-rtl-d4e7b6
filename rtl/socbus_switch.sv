// socbus_switch -- five-port SoCBUS circuit switch.
//
// Structure as in the document's generalized switch: one register stage at
// each input (standing in for the per-link retiming circuit), one input FSM
// per input, a shared arbiter-and-lock unit with the static routing table,
// and a crossbar steered by the locks. All switching work is done at the
// inputs; outputs have no state of their own. There are no payload buffers:
// the only storage is the one-word request buffer in each input FSM.
//
// Ports are numbered 0 north, 1 east, 2 south, 3 west, 4 local. For each
// port p:
//   rx_fwd[p]  forward word arriving at input p     (8 data + 1 ctrl)
//   rx_rev[p]  reverse control sent back out of input p (ack / nAck)
//   tx_fwd[p]  forward word leaving output p
//   tx_rev[p]  reverse control arriving at output p
// MY_X/MY_Y give this switch's place in a MESH_X x MESH_Y mesh and select
// its routing table.
//
// Timing per switch (see socbus_input_fsm): request 4 cycles minimum,
// acknowledgment 1 cycle, payload 1 cycle.
//
// The arbiter's grant_port output (which output was just locked) is not
// needed here, since the input FSMs reach their output through the crossbar
// owner table. It is kept on the arbiter for its own assertion and for
// tests, so lint reports it unused in this module.
module socbus_switch
  import socbus_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fwd_t [NPORTS-1:0] rx_fwd,
  output rev_t [NPORTS-1:0] rx_rev,
  output fwd_t [NPORTS-1:0] tx_fwd,
  input  rev_t [NPORTS-1:0] tx_rev,
  output in_state_t [NPORTS-1:0] in_state
);

  fwd_t [NPORTS-1:0]             in_q;
  logic [NPORTS-1:0]             try_req, grant, fail, release_req;
  logic [NPORTS-1:0][DATA_W-1:0] req_addr;
  fwd_t [NPORTS-1:0]             xbar_in;
  rev_t [NPORTS-1:0]             xbar_rev;
  logic [DATA_W-1:0]             lookup_addr;
  logic [NPORTS-1:0]             lookup_mask;
  logic [PORT_W-1:0]             grant_port;
  logic [NPORTS-1:0]             out_locked;
  logic [NPORTS-1:0][PORT_W-1:0] out_owner;

  // Input register stage: one cycle of latency per switch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NPORTS; p++) in_q[p] <= FWD_IDLE;
    end else begin
      in_q <= rx_fwd;
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    socbus_input_fsm u_fsm (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_q        (in_q[p]),
      .try_req     (try_req[p]),
      .req_addr    (req_addr[p]),
      .grant       (grant[p]),
      .fail        (fail[p]),
      .release_req (release_req[p]),
      .xbar_fwd    (xbar_in[p]),
      .xbar_rev    (xbar_rev[p]),
      .rev_out     (rx_rev[p]),
      .state       (in_state[p])
    );
  end

  socbus_route_table #(
    .MESH_X (MESH_X),
    .MESH_Y (MESH_Y),
    .MY_X   (MY_X),
    .MY_Y   (MY_Y)
  ) u_table (
    .dest_addr  (lookup_addr),
    .route_mask (lookup_mask)
  );

  socbus_arbiter_lock u_arb (
    .clk         (clk),
    .rst_n       (rst_n),
    .try_req     (try_req),
    .req_addr    (req_addr),
    .release_req (release_req),
    .lookup_addr (lookup_addr),
    .lookup_mask (lookup_mask),
    .grant       (grant),
    .fail        (fail),
    .grant_port  (grant_port),
    .out_locked  (out_locked),
    .out_owner   (out_owner)
  );

  socbus_crossbar u_xbar (
    .in_fwd     (xbar_in),
    .out_locked (out_locked),
    .out_owner  (out_owner),
    .out_fwd    (tx_fwd),
    .out_rev    (tx_rev),
    .in_rev     (xbar_rev)
  );

endmodule
