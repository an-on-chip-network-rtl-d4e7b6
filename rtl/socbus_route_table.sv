// socbus_route_table -- static routing knowledge of one switch.
//
// For each destination address the table holds five bits, one per switch
// output (north, east, south, west, local). A bit is set when that output
// takes a request closer to the destination, so at most two bits are set
// (e.g. north and west for a destination up to the left) and exactly the
// local bit is set when the destination is this switch's own wrapper. This
// is minimum-path routing on a mesh, as the document describes; with a
// 16x16 mesh the table is 256 x 5 = 1280 bits (8x8: 64 x 5 = 320 bits).
//
// Coordinates follow the document's convention: (0,0) is the upper left
// corner, x grows to the east and y to the south. The document allows any
// one-to-one mapping of wrapper addresses to switches; this design uses
// address = y*MESH_X + x. Addresses beyond the mesh give an all-zero entry,
// which makes the switch refuse the request.
//
// The table is fixed at elaboration from the parameters and read
// combinationally: route_mask follows dest_addr in the same cycle.
module socbus_route_table
  import socbus_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0
) (
  input  logic [DATA_W-1:0] dest_addr,
  output logic [NPORTS-1:0] route_mask
);

  localparam int unsigned NODES = MESH_X * MESH_Y;

  // One entry per wrapper address: NODES x 5 bits.
  function automatic logic [NODES-1:0][NPORTS-1:0] build_table();
    logic [NODES-1:0][NPORTS-1:0] t;
    int dx, dy;
    t = '0;
    for (int a = 0; a < int'(NODES); a++) begin
      dx = a % int'(MESH_X);
      dy = a / int'(MESH_X);
      if (dx > int'(MY_X)) t[a][P_EAST]  = 1'b1;
      if (dx < int'(MY_X)) t[a][P_WEST]  = 1'b1;
      if (dy > int'(MY_Y)) t[a][P_SOUTH] = 1'b1;
      if (dy < int'(MY_Y)) t[a][P_NORTH] = 1'b1;
      if (dx == int'(MY_X) && dy == int'(MY_Y)) t[a][P_LOCAL] = 1'b1;
    end
    return t;
  endfunction

  localparam logic [NODES-1:0][NPORTS-1:0] TABLE = build_table();

  assign route_mask = (32'(dest_addr) < NODES) ? TABLE[dest_addr] : '0;

endmodule
