// socbus_mesh -- SoCBUS: a two-dimensional mesh of circuit-switched tiles.
//
// MESH_X x MESH_Y tiles, each a five-port switch with a source and a drain
// wrapper. Neighbouring switches are joined by a link in each direction
// (8 data wires and 1 forward control wire one way, 2 reverse control wires
// the other way). Tile (x, y) has wrapper address y*MESH_X + x, with (0,0)
// the upper left corner; north is towards y = 0. Link ports on the mesh
// boundary are tied off: their inputs see idle words and no
// acknowledgments, and since routing is minimal no request is ever sent
// towards them.
//
// A transfer from tile s to tile d: the IP block at s issues a command
// (cmd_dest = d, cmd_len bytes); a request packet travels through the mesh
// locking one output per switch (at least four cycles per switch), the
// acknowledgment comes back (one cycle per switch), the payload follows
// (one cycle per switch) and a cancel frees the route. Blocked requests are
// answered with a negative acknowledgment and retried by the source
// wrapper. Per-tile IP signals are arrays indexed by the wrapper address;
// their meaning is given in socbus_src_wrapper and socbus_drain_wrapper.
//
// Default size 8x8, the network size of the document's random-traffic
// study; the 8-bit request packet addresses up to 16x16.
module socbus_mesh
  import socbus_pkg::*;
#(
  parameter int unsigned MESH_X      = 8,
  parameter int unsigned MESH_Y      = 8,
  parameter int unsigned LEN_W       = 16,
  parameter int unsigned RETRY_DELAY = 4,
  localparam int unsigned NODES      = MESH_X * MESH_Y
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NODES-1:0]              cmd_valid,
  output logic [NODES-1:0]              cmd_ready,
  input  logic [NODES-1:0][DATA_W-1:0]  cmd_dest,
  input  logic [NODES-1:0][LEN_W-1:0]   cmd_len,
  input  logic [NODES-1:0]              tx_valid,
  output logic [NODES-1:0]              tx_ready,
  input  logic [NODES-1:0][DATA_W-1:0]  tx_data,
  output logic [NODES-1:0]              done,
  output logic [NODES-1:0]              retry,
  input  logic [NODES-1:0]              rx_accept,
  output logic [NODES-1:0]              rx_start,
  output logic [NODES-1:0]              rx_valid,
  output logic [NODES-1:0][DATA_W-1:0]  rx_data,
  output logic [NODES-1:0]              rx_end
);

  initial begin
    assert (NODES <= (1 << DATA_W))
      else $error("mesh of %0d nodes exceeds the 8-bit request address", NODES);
  end

  fwd_t [NODES-1:0][3:0] rx_fwd, tx_fwd;
  rev_t [NODES-1:0][3:0] rx_rev, tx_rev;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned T = y * MESH_X + x;

      // north neighbour (y-1) talks to this tile's port 0 via its port 2
      if (y > 0) begin : g_n
        assign rx_fwd[T][P_NORTH] = tx_fwd[T-MESH_X][P_SOUTH];
        assign tx_rev[T][P_NORTH] = rx_rev[T-MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign rx_fwd[T][P_NORTH] = FWD_IDLE;
        assign tx_rev[T][P_NORTH] = REV_NONE;
      end
      if (x < MESH_X - 1) begin : g_e
        assign rx_fwd[T][P_EAST] = tx_fwd[T+1][P_WEST];
        assign tx_rev[T][P_EAST] = rx_rev[T+1][P_WEST];
      end else begin : g_e_edge
        assign rx_fwd[T][P_EAST] = FWD_IDLE;
        assign tx_rev[T][P_EAST] = REV_NONE;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign rx_fwd[T][P_SOUTH] = tx_fwd[T+MESH_X][P_NORTH];
        assign tx_rev[T][P_SOUTH] = rx_rev[T+MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign rx_fwd[T][P_SOUTH] = FWD_IDLE;
        assign tx_rev[T][P_SOUTH] = REV_NONE;
      end
      if (x > 0) begin : g_w
        assign rx_fwd[T][P_WEST] = tx_fwd[T-1][P_EAST];
        assign tx_rev[T][P_WEST] = rx_rev[T-1][P_EAST];
      end else begin : g_w_edge
        assign rx_fwd[T][P_WEST] = FWD_IDLE;
        assign tx_rev[T][P_WEST] = REV_NONE;
      end

      socbus_tile #(
        .MESH_X      (MESH_X),
        .MESH_Y      (MESH_Y),
        .MY_X        (x),
        .MY_Y        (y),
        .LEN_W       (LEN_W),
        .RETRY_DELAY (RETRY_DELAY)
      ) u_tile (
        .clk       (clk),
        .rst_n     (rst_n),
        .rx_fwd    (rx_fwd[T]),
        .rx_rev    (rx_rev[T]),
        .tx_fwd    (tx_fwd[T]),
        .tx_rev    (tx_rev[T]),
        .cmd_valid (cmd_valid[T]),
        .cmd_ready (cmd_ready[T]),
        .cmd_dest  (cmd_dest[T]),
        .cmd_len   (cmd_len[T]),
        .tx_valid  (tx_valid[T]),
        .tx_ready  (tx_ready[T]),
        .tx_data   (tx_data[T]),
        .done      (done[T]),
        .retry     (retry[T]),
        .rx_accept (rx_accept[T]),
        .rx_start  (rx_start[T]),
        .rx_valid  (rx_valid[T]),
        .rx_data   (rx_data[T]),
        .rx_end    (rx_end[T])
      );
    end
  end

endmodule
