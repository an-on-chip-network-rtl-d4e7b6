// tb_socbus_mesh_sizes -- the network at the other sizes it is meant for:
// 7x7 (a voice gateway), 10x10 (the size used to analyse routing density)
// and 16x16 (the largest mesh the 8-bit request address can reach).
//
// Each size is a socbus_mesh_probe, run one after another. On an empty
// network a corner-to-corner route must set up in 5H + 2 cycles and carry
// payload with H + 1 cycles of latency, where H is the number of switches
// on the path (13, 19 and 31). Then five transfers cross the mesh at once.
module tb_socbus_mesh_sizes;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] start = '0, finished;
  int c[3], f[3];

  socbus_mesh_probe #(.MESH_X(7),  .MESH_Y(7))  u_7  (.clk, .rst_n, .start(start[0]), .finished(finished[0]), .checks(c[0]), .failures(f[0]));
  socbus_mesh_probe #(.MESH_X(10), .MESH_Y(10)) u_10 (.clk, .rst_n, .start(start[1]), .finished(finished[1]), .checks(c[1]), .failures(f[1]));
  socbus_mesh_probe #(.MESH_X(16), .MESH_Y(16)) u_16 (.clk, .rst_n, .start(start[2]), .finished(finished[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      start[i] = 1;
      wait (finished[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
