// socbus_tile -- one network connected processing tile.
//
// A tile is one switch with the wrappers of its IP block on the switch's
// local port: a source wrapper drives the local input and a drain wrapper
// takes the local output. Its four link ports (0 north, 1 east, 2 south,
// 3 west) connect to the neighbouring tiles; each link has the forward
// word (8 data + 1 control) in one direction and 2 reverse control wires in
// the other, per direction of travel. The tile structure follows the
// document; splitting the IP port into a source and a drain wrapper follows
// its component list (switch nodes, source wrappers, drain wrappers).
//
// IP-side signals and their timing are those of socbus_src_wrapper and
// socbus_drain_wrapper. The switch's per-input state output (sw_state) is
// for observation in simulation and is left unused here, which lint
// reports as an unused signal.
module socbus_tile
  import socbus_pkg::*;
#(
  parameter int unsigned MESH_X      = 8,
  parameter int unsigned MESH_Y      = 8,
  parameter int unsigned MY_X        = 0,
  parameter int unsigned MY_Y        = 0,
  parameter int unsigned LEN_W       = 16,
  parameter int unsigned RETRY_DELAY = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // links to the neighbours
  input  fwd_t [3:0]        rx_fwd,
  output rev_t [3:0]        rx_rev,
  output fwd_t [3:0]        tx_fwd,
  input  rev_t [3:0]        tx_rev,
  // IP side, source
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [DATA_W-1:0] cmd_dest,
  input  logic [LEN_W-1:0]  cmd_len,
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic [DATA_W-1:0] tx_data,
  output logic              done,
  output logic              retry,
  // IP side, drain
  input  logic              rx_accept,
  output logic              rx_start,
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_end
);

  fwd_t [NPORTS-1:0]      sw_rx_fwd, sw_tx_fwd;
  rev_t [NPORTS-1:0]      sw_rx_rev, sw_tx_rev;
  in_state_t [NPORTS-1:0] sw_state;

  assign sw_rx_fwd[3:0] = rx_fwd;
  assign rx_rev         = sw_rx_rev[3:0];
  assign tx_fwd         = sw_tx_fwd[3:0];
  assign sw_tx_rev[3:0] = tx_rev;

  socbus_switch #(
    .MESH_X (MESH_X),
    .MESH_Y (MESH_Y),
    .MY_X   (MY_X),
    .MY_Y   (MY_Y)
  ) u_switch (
    .clk      (clk),
    .rst_n    (rst_n),
    .rx_fwd   (sw_rx_fwd),
    .rx_rev   (sw_rx_rev),
    .tx_fwd   (sw_tx_fwd),
    .tx_rev   (sw_tx_rev),
    .in_state (sw_state)
  );

  socbus_src_wrapper #(
    .LEN_W       (LEN_W),
    .RETRY_DELAY (RETRY_DELAY)
  ) u_src (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (cmd_valid),
    .cmd_ready (cmd_ready),
    .cmd_dest  (cmd_dest),
    .cmd_len   (cmd_len),
    .tx_valid  (tx_valid),
    .tx_ready  (tx_ready),
    .tx_data   (tx_data),
    .done      (done),
    .retry     (retry),
    .net_fwd   (sw_rx_fwd[P_LOCAL]),
    .net_rev   (sw_rx_rev[P_LOCAL])
  );

  socbus_drain_wrapper u_drain (
    .clk       (clk),
    .rst_n     (rst_n),
    .net_fwd   (sw_tx_fwd[P_LOCAL]),
    .net_rev   (sw_tx_rev[P_LOCAL]),
    .rx_accept (rx_accept),
    .rx_start  (rx_start),
    .rx_valid  (rx_valid),
    .rx_data   (rx_data),
    .rx_end    (rx_end)
  );

endmodule
