// tb_socbus_route_table -- checks the static routing table of two switches
// of an 8x8 mesh, one inside and one in a corner, against directions
// computed here from the destination coordinates, for all 256 addresses
// (addresses 64..255 lie outside the mesh and must give an empty entry).
module tb_socbus_route_table;
  import socbus_pkg::*;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] addr;
  logic [NPORTS-1:0] mask_a, mask_b;

  socbus_route_table #(.MESH_X(8), .MESH_Y(8), .MY_X(3), .MY_Y(5)) dut_a (
    .dest_addr(addr), .route_mask(mask_a));
  socbus_route_table #(.MESH_X(8), .MESH_Y(8), .MY_X(0), .MY_Y(0)) dut_b (
    .dest_addr(addr), .route_mask(mask_b));

  // Expected entry: bit order {local, west, south, east, north}.
  function automatic logic [4:0] expect_mask(int a, int mx, int my);
    int x, y;
    logic [4:0] m;
    m = '0;
    if (a >= 64) return m;
    x = a % 8;
    y = a / 8;
    m[0] = (y < my);   // north is towards row 0
    m[1] = (x > mx);
    m[2] = (y > my);
    m[3] = (x < mx);
    m[4] = (x == mx) && (y == my);
    return m;
  endfunction

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = DATA_W'(a);
      #1;
      checks += 2;
      if (mask_a !== expect_mask(a, 3, 5)) begin
        failures++;
        $display("FAIL addr %0d at (3,5): got %b want %b", a, mask_a, expect_mask(a, 3, 5));
      end
      if (mask_b !== expect_mask(a, 0, 0)) begin
        failures++;
        $display("FAIL addr %0d at (0,0): got %b want %b", a, mask_b, expect_mask(a, 0, 0));
      end
    end
    // spot checks written out by hand
    addr = 8'd0;  #1; checks++; if (mask_a !== 5'b01001) failures++;  // up-left: north+west
    addr = 8'd47; #1; checks++; if (mask_a !== 5'b00010) failures++;  // (7,5): east only
    addr = 8'd43; #1; checks++; if (mask_a !== 5'b10000) failures++;  // own address
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
