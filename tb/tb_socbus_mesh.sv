// tb_socbus_mesh -- end-to-end test of the whole network at its default
// size (8x8 tiles, no parameter overrides).
//
// 1. One transfer from the upper left to the lower right corner on an empty
//    network: route setup time and payload latency are checked against the
//    per-switch numbers (4 cycles per switch for the request, 1 for the
//    acknowledgment, 1 for the payload) over the 15 switches of the path.
// 2. Random traffic: every tile sends TRANSFERS transfers of random length
//    to random other tiles, all at once, while a few drains refuse for a
//    while. Every payload byte carries (source, sequence number, index), so
//    each drain checks what it gets; the testbench checks that each transfer
//    arrives exactly once, complete and in order.
// The mechanisms of the network are counted and each must occur: negative
// acknowledgments and retries, colliding requests in one switch, a second
// choice output taken because the first was locked, a request refused for
// lack of a free output, a refusal by a drain, several circuits open at
// once.
module tb_socbus_mesh;
  import socbus_pkg::*;

  localparam int MX = 8, MY = 8, N = MX * MY, LW = 16;
  localparam int TRANSFERS = 6;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  logic [N-1:0]            cmd_valid, cmd_ready, tx_valid, tx_ready, done, retry;
  logic [N-1:0]            rx_accept, rx_start, rx_valid, rx_end;
  logic [N-1:0][7:0]       cmd_dest, tx_data, rx_data;
  logic [N-1:0][LW-1:0]    cmd_len;

  socbus_mesh dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // ---------------- mechanism counters (observed inside the switches)
  int n_collide = 0, n_second = 0, n_fail = 0;
  for (genvar t = 0; t < N; t++) begin : g_mon
    wire [4:0] tr  = dut.g_row[t / MX].g_col[t % MX].u_tile.u_switch.u_arb.try_req;
    wire [4:0] gr  = dut.g_row[t / MX].g_col[t % MX].u_tile.u_switch.u_arb.grant;
    wire [4:0] fl  = dut.g_row[t / MX].g_col[t % MX].u_tile.u_switch.u_arb.fail;
    wire [4:0] msk = dut.g_row[t / MX].g_col[t % MX].u_tile.u_switch.u_arb.lookup_mask;
    wire [4:0] lk  = dut.g_row[t / MX].g_col[t % MX].u_tile.u_switch.u_arb.out_locked;
    always @(posedge clk) if (rst_n) begin
      if ($countones(tr) > 1) n_collide++;
      if (|fl) n_fail++;
      if ((|gr) && $countones(msk) == 2 && (msk & lk) != 0) n_second++;
    end
  end

  int open_now, open_max = 0;
  always @(posedge clk) begin
    open_now = 0;
    for (int t = 0; t < N; t++) if (tx_ready[t]) open_now++;
    if (open_now > open_max) open_max = open_now;
  end

  int n_retry = 0, n_refuse = 0;
  always @(posedge clk) if (rst_n) n_retry += $countones(retry);
  for (genvar t = 0; t < N; t++) begin : g_dmon
    always @(posedge clk)
      if (rst_n && dut.g_row[t / MX].g_col[t % MX].u_tile.u_drain.net_rev == REV_NACK) n_refuse++;
  end

  // ---------------- per-tile traffic
  // Phase 1 drives tile 0 from the initial block (p1_*); phase 2 uses the
  // per-tile generators (g_*).
  logic [N-1:0]         g_cmd_valid, g_tx_valid;
  logic [N-1:0][7:0]    g_cmd_dest, g_tx_data;
  logic [N-1:0][LW-1:0] g_cmd_len;
  logic       p1_cmd_valid = 0, p1_tx_valid = 0;
  logic [7:0] p1_tx_data = 0;
  bit phase2 = 0;

  always_comb begin
    cmd_valid = g_cmd_valid; cmd_dest = g_cmd_dest; cmd_len = g_cmd_len;
    tx_valid  = g_tx_valid;  tx_data  = g_tx_data;
    if (!phase2) begin
      cmd_valid[0] = p1_cmd_valid; cmd_dest[0] = 8'd63; cmd_len[0] = LW'(8);
      tx_valid[0]  = p1_tx_valid;  tx_data[0]  = p1_tx_data;
    end
  end

  int exp_len [N][TRANSFERS];
  bit got_done[N][TRANSFERS];
  int sent_done[N];
  int rx_bytes_total = 0, tx_bytes_total = 0, rx_transfers = 0;

  function automatic logic [7:0] pay(int src, int seq, int k);
    if (k == 0) return 8'(src);
    if (k == 1) return 8'(seq);
    return 8'(src * 7 + seq * 13 + k * 3);
  endfunction

  for (genvar t = 0; t < N; t++) begin : g_tile
    int seq = 0, k = 0, len = 0;
    bit busy = 0;
    // source
    always @(posedge clk) begin
      if (!rst_n || !phase2) begin
        g_cmd_valid[t] <= 0; g_tx_valid[t] <= 0; g_tx_data[t] <= 0;
        g_cmd_dest[t] <= 0; g_cmd_len[t] <= 0;
        seq = 0; k = 0; busy = 0;
      end else begin
        if (g_cmd_valid[t] && cmd_ready[t]) g_cmd_valid[t] <= 0;
        if (g_tx_valid[t] && tx_ready[t]) begin k++; tx_bytes_total++; end
        if (done[t]) begin
          sent_done[t]++; seq++; busy = 0;
        end
        if (!busy && seq < TRANSFERS && $urandom_range(3, 0) == 0) begin
          int d;
          do d = $urandom_range(N - 1, 0); while (d == t);
          len = $urandom_range(24, 2);
          exp_len[t][seq] = len;
          g_cmd_dest[t] <= 8'(d); g_cmd_len[t] <= LW'(len); g_cmd_valid[t] <= 1;
          k = 0; busy = 1;
        end
        g_tx_valid[t] <= busy && (k < len) && ($urandom_range(7, 0) != 0);
        g_tx_data[t]  <= pay(t, seq, k);
      end
    end
    // drain
    int rk = 0, rsrc = -1, rseq = -1;
    always @(posedge clk) begin
      if (rx_start[t]) begin rk = 0; rsrc = -1; rseq = -1; end
      if (rx_valid[t]) begin
        if (rk == 0) rsrc = int'(rx_data[t]);
        else if (rk == 1) rseq = int'(rx_data[t]);
        else if (rsrc >= 0 && rsrc < N && rseq >= 0 && rseq < TRANSFERS)
          check(rx_data[t] == pay(rsrc, rseq, rk), "payload byte");
        rk++; rx_bytes_total++;
      end
      if (rx_end[t] && phase2) begin
        check(rsrc >= 0 && rsrc < N && rseq >= 0 && rseq < TRANSFERS, "transfer header");
        if (rsrc >= 0 && rsrc < N && rseq >= 0 && rseq < TRANSFERS) begin
          check(!got_done[rsrc][rseq], "delivered once");
          check(rk == exp_len[rsrc][rseq], "transfer length");
          got_done[rsrc][rseq] = 1;
        end
        rx_transfers++;
      end
    end
  end

  // two drains refuse for a while in phase 2
  int p2_start = 0;
  always_comb begin
    rx_accept = '1;
    if (phase2 && cycle < p2_start + 600) begin
      rx_accept[9]  = 1'b0;
      rx_accept[27] = 1'b0;
    end
  end

  // ---------------- phase 1 and the run
  int t_req, t_ack, t_first_tx, t_first_rx;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    p1_cmd_valid = 1;
    @(negedge clk);
    p1_cmd_valid = 0;
    t_req = int'(cycle);
    while (!tx_ready[0] && cycle < 1000) @(negedge clk);
    t_ack = int'(cycle);
    // 15 switches: request 4 per switch, drain answers in 1, ack 1 per
    // switch, and 1 for the source wrapper to register the ack
    check(t_ack - t_req == 4 * 15 + 1 + 15 + 1, "route setup time over 15 switches");
    $display("route setup took %0d cycles", t_ack - t_req);
    for (int k = 0; k < 8; k++) begin
      p1_tx_valid = 1; p1_tx_data = 8'(8'hC0 + k);
      if (k == 0) t_first_tx = int'(cycle);
      @(negedge clk);
    end
    p1_tx_valid = 0;
    while (!rx_valid[63] && cycle < 2000) @(negedge clk);
    t_first_rx = int'(cycle);
    check(t_first_rx - t_first_tx == 15 + 1, "payload latency 1 cycle per switch (+1 wrapper register)");
    $display("payload latency %0d cycles", t_first_rx - t_first_tx);
    for (int k = 0; k < 8; k++) begin
      check(rx_valid[63] && rx_data[63] == 8'(8'hC0 + k), "corner-to-corner payload");
      @(negedge clk);
    end
    while (!rx_end[63] && cycle < 3000) @(negedge clk);
    check(rx_end[63], "corner-to-corner cancel");
    repeat (20) @(negedge clk);
    check(dut.g_row[3].g_col[3].u_tile.u_switch.u_arb.out_locked == 0, "route released");
    rx_bytes_total = 0;
    p2_start = int'(cycle);

    // phase 2
    phase2 = 1;
    begin
      int all;
      do begin
        @(negedge clk);
        all = 1;
        for (int t = 0; t < N; t++) if (sent_done[t] < TRANSFERS) all = 0;
      end while (!all && cycle < 200000);
    end
    repeat (100) @(negedge clk);
    check(rx_transfers == N * TRANSFERS, "all transfers delivered");
    for (int t = 0; t < N; t++) for (int s = 0; s < TRANSFERS; s++)
      check(got_done[t][s], "transfer received");
    check(rx_bytes_total == tx_bytes_total, "byte count");
    $display("transfers %0d, bytes %0d, retries %0d, collisions %0d, second choice %0d, switch refusals %0d, drain refusals %0d, max open circuits %0d",
             rx_transfers, rx_bytes_total, n_retry, n_collide, n_second, n_fail, n_refuse, open_max);
    check(n_retry > 0, "nAck and retry happened");
    check(n_collide > 0, "colliding requests happened");
    check(n_second > 0, "second choice output happened");
    check(n_fail > 0, "switch refusal happened");
    check(n_refuse > 0, "drain refusal happened");
    check(open_max > 1, "concurrent circuits happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
