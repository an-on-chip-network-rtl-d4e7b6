// tb_socbus_tile -- two tiles of a 2x1 mesh joined east to west by the
// testbench. Both send to each other at the same time, so the two
// directions of one link carry two circuits at once; each then sends a
// second transfer. Checked: setup time (2 switches), payload order and
// content, cancel, and that the open boundary ports stay idle.
module tb_socbus_tile;
  import socbus_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fwd_t [1:0][3:0] rx_fwd, tx_fwd;
  rev_t [1:0][3:0] rx_rev, tx_rev;
  logic [1:0] cmd_valid, cmd_ready, tx_valid, tx_ready, done, retry;
  logic [1:0] rx_accept, rx_start, rx_valid, rx_end;
  logic [1:0][7:0] cmd_dest, tx_data, rx_data;
  logic [1:0][15:0] cmd_len;

  for (genvar t = 0; t < 2; t++) begin : g_t
    socbus_tile #(.MESH_X(2), .MESH_Y(1), .MY_X(t), .MY_Y(0)) u (
      .clk(clk), .rst_n(rst_n),
      .rx_fwd(rx_fwd[t]), .rx_rev(rx_rev[t]), .tx_fwd(tx_fwd[t]), .tx_rev(tx_rev[t]),
      .cmd_valid(cmd_valid[t]), .cmd_ready(cmd_ready[t]), .cmd_dest(cmd_dest[t]),
      .cmd_len(cmd_len[t]), .tx_valid(tx_valid[t]), .tx_ready(tx_ready[t]),
      .tx_data(tx_data[t]), .done(done[t]), .retry(retry[t]),
      .rx_accept(rx_accept[t]), .rx_start(rx_start[t]), .rx_valid(rx_valid[t]),
      .rx_data(rx_data[t]), .rx_end(rx_end[t]));
  end

  always_comb begin
    rx_fwd = '0; tx_rev = '0;
    rx_fwd[1][P_WEST] = tx_fwd[0][P_EAST];
    tx_rev[0][P_EAST] = rx_rev[1][P_WEST];
    rx_fwd[0][P_EAST] = tx_fwd[1][P_WEST];
    tx_rev[1][P_WEST] = rx_rev[0][P_EAST];
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;
  int rcount[2], ready_at[2];
  always @(posedge clk) for (int t = 0; t < 2; t++) begin
    if (rx_valid[t]) begin
      check(rx_data[t] == 8'((1 - t) * 16 + rcount[t]), "payload content and order");
      rcount[t]++;
    end
    if (tx_ready[t] && ready_at[t] == 0) ready_at[t] = cyc;
    if (rst_n) check(tx_fwd[t][P_NORTH] == FWD_IDLE && tx_fwd[t][P_SOUTH] == FWD_IDLE, "boundary idle");
  end
  // payload source: byte index counted per tile
  int sidx[2];
  always_comb for (int t = 0; t < 2; t++) begin
    tx_valid[t] = 1'b1;
    tx_data[t]  = 8'(t * 16 + sidx[t]);
  end
  always @(posedge clk) if (rst_n) for (int t = 0; t < 2; t++) begin
    if (tx_ready[t]) sidx[t] <= sidx[t] + 1;
  end

  initial begin
    int start;
    cmd_valid = 0; cmd_dest = '0; cmd_len = '0; rx_accept = '1;
    rcount = '{0, 0}; sidx = '{0, 0}; ready_at = '{0, 0};
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    cmd_valid = 2'b11; cmd_dest[0] = 8'd1; cmd_dest[1] = 8'd0; cmd_len = '{16'd6, 16'd6};
    start = cyc;
    @(negedge clk); cmd_valid = 0;
    repeat (40) @(negedge clk);
    // edges until tx_ready rises: command accepted 1, request 2 switches x 4,
    // drain 1, ack 2 switches x 1, source wrapper 1; it is seen one edge later
    check(ready_at[0] - start == 1 + 8 + 1 + 2 + 1 + 1, "setup time east");
    check(ready_at[1] - start == 1 + 8 + 1 + 2 + 1 + 1, "setup time west");
    check(rcount[0] == 6 && rcount[1] == 6, "both transfers complete");
    // second round
    cmd_valid = 2'b11; cmd_len = '{16'd4, 16'd4};
    @(negedge clk); cmd_valid = 0;
    repeat (40) @(negedge clk);
    check(rcount[0] == 10 && rcount[1] == 10, "second transfers complete");
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
