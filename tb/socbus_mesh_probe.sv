// socbus_mesh_probe -- test harness for one mesh size, used by
// tb_socbus_mesh_sizes.
//
// It holds one socbus_mesh of MESH_X x MESH_Y tiles and, once start rises,
// runs two phases:
// 1. A transfer from the upper left to the lower right corner on the empty
//    network. Its route setup time must be 5H + 2 cycles and its payload
//    latency H + 1 cycles, where H = MESH_X + MESH_Y - 1 is the number of
//    switches on the path.
// 2. The four corners and the centre tile send to each other at the same
//    time, so circuits cross in the middle of the mesh. Each must be
//    delivered complete.
// It then raises finished and reports its counts on checks and failures.
module socbus_mesh_probe
  import socbus_pkg::*;
#(
  parameter int MESH_X = 8,
  parameter int MESH_Y = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int N = MESH_X * MESH_Y, LW = 16, H = MESH_X + MESH_Y - 1, LEN = 12;

  logic [N-1:0]         cmd_valid, cmd_ready, tx_valid, tx_ready, done, retry;
  logic [N-1:0]         rx_accept, rx_start, rx_valid, rx_end;
  logic [N-1:0][7:0]    cmd_dest, tx_data, rx_data;
  logic [N-1:0][LW-1:0] cmd_len;

  socbus_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) dut (.*);

  assign rx_accept = '1;

  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0dx%0d: %s at cycle %0d", MESH_X, MESH_Y, what, cycle);
    end
  endtask

  // senders: corners and centre; each sends to the opposite one
  localparam int NS = 5;
  int src[NS], dst[NS];
  initial begin
    src = '{0, N - 1, MESH_X - 1, N - MESH_X, (MESH_Y / 2) * MESH_X + MESH_X / 2};
    dst = '{N - 1, 0, N - MESH_X, MESH_X - 1, 0};
    dst[4] = MESH_X - 1 + (MESH_Y / 2) * MESH_X;   // centre sends to the east edge
  end

  function automatic logic [7:0] pay(int s, int k); return 8'(s * 9 + k * 5 + 1); endfunction

  // sources: a byte index per tile; data is offered whenever the circuit is open
  int sidx[N];
  bit armed[N];
  always_comb for (int t = 0; t < N; t++) begin
    tx_valid[t] = armed[t] && sidx[t] < LEN;
    tx_data[t]  = pay(t, sidx[t]);
  end
  always @(posedge clk)
    for (int t = 0; t < N; t++) if (tx_valid[t] && tx_ready[t]) sidx[t] <= sidx[t] + 1;

  // drains: count and check bytes per tile (the source is known per phase)
  int rcount[N], rfrom[N], ends = 0;
  always @(posedge clk) for (int t = 0; t < N; t++) begin
    if (rx_start[t]) rcount[t] = 0;
    if (rx_valid[t]) begin
      check(rfrom[t] >= 0 && rx_data[t] == pay(rfrom[t], rcount[t]), "payload byte");
      rcount[t]++;
    end
    if (rx_end[t]) begin
      check(rcount[t] == LEN, "transfer length");
      ends++;
    end
  end

  initial begin
    int t_req, t_ack, t_tx, t_rx;
    checks = 0; failures = 0; finished = 0;
    cmd_valid = '0; cmd_dest = '0; cmd_len = '0;
    for (int t = 0; t < N; t++) begin sidx[t] = 0; armed[t] = 0; rfrom[t] = -1; rcount[t] = 0; end
    wait (start && rst_n);
    @(negedge clk);

    // phase 1
    rfrom[N - 1] = 0;
    armed[0] = 1; cmd_valid[0] = 1; cmd_dest[0] = 8'(N - 1); cmd_len[0] = LW'(LEN);
    @(negedge clk);
    cmd_valid[0] = 0;
    t_req = int'(cycle);
    while (!tx_ready[0] && cycle < t_req + 2000) @(negedge clk);
    t_ack = int'(cycle);
    check(t_ack - t_req == 5 * H + 2, "route setup 4 + 1 cycles per switch");
    t_tx = int'(cycle);
    while (!rx_valid[N - 1] && cycle < t_tx + 2000) @(negedge clk);
    t_rx = int'(cycle);
    check(t_rx - t_tx == H + 1, "payload latency 1 cycle per switch");
    while (ends < 1 && cycle < t_req + 4000) @(negedge clk);
    check(ends == 1, "corner-to-corner transfer ended");
    $display("%0dx%0d: %0d switches, setup %0d cycles, payload latency %0d cycles",
             MESH_X, MESH_Y, H, t_ack - t_req, t_rx - t_tx);
    repeat (10) @(negedge clk);

    // phase 2
    for (int t = 0; t < N; t++) begin sidx[t] = 0; armed[t] = 0; end
    for (int i = 0; i < NS; i++) rfrom[dst[i]] = src[i];
    for (int i = 0; i < NS; i++) begin
      armed[src[i]] = 1;
      cmd_valid[src[i]] = 1; cmd_dest[src[i]] = 8'(dst[i]); cmd_len[src[i]] = LW'(LEN);
    end
    @(negedge clk);
    cmd_valid = '0;
    while (ends < 1 + NS && cycle < t_req + 20000) @(negedge clk);
    check(ends == 1 + NS, "crossing transfers all delivered");
    finished = 1;
  end

endmodule
