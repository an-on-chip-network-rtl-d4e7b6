// tb_socbus_traffic -- random and local traffic on the default 8x8 network.
//
// Three traffic patterns run one after the other, first at a low offered
// load and then at a high one. Within a load only the choice of destination
// differs:
//   (a) every destination is uniformly random;
//   (b) half of the transfers go at most 4 hops, the other half anywhere;
//   (c) every transfer goes at most 4 hops.
// Each idle source starts a transfer with probability 1/gap per cycle. The
// transfer has a random length and goes to a random destination of the
// pattern's kind. The payload is sent at full rate once the circuit is open.
//
// For each run the testbench measures three things:
// - the first-time blocking rate: the share of transfers whose first
//   request was refused;
// - the mean usage: payload bytes delivered, over 64 bytes per cycle;
// - the mean setup time.
// Every transfer must arrive exactly once, complete and in order. A longer
// path holds more outputs and so meets more locks. Local traffic must
// therefore block less often than uniform traffic. The testbench checks
// that (a) > (b) > (c) at the high load, and that each pattern blocks more
// at the high load than at the low one. Each run must also see some
// blocking, or the load is too low to tell the runs apart.
module tb_socbus_traffic;
  import socbus_pkg::*;

  localparam int MX = 8, MY = 8, N = MX * MY, LW = 16;
  localparam int PER_CASE = 12;   // transfers per source per run
  localparam int GAP_LO   = 96;   // mean idle cycles before a new transfer: low load
  localparam int GAP_HI   = 24;   //   and high load
  localparam int RUNS     = 6;    // three patterns at low load, then at high load
  localparam int MAXSEQ   = RUNS * PER_CASE;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  logic [N-1:0]         cmd_valid, cmd_ready, tx_valid, tx_ready, done, retry;
  logic [N-1:0]         rx_accept, rx_start, rx_valid, rx_end;
  logic [N-1:0][7:0]    cmd_dest, tx_data, rx_data;
  logic [N-1:0][LW-1:0] cmd_len;

  socbus_mesh dut (.*);

  assign rx_accept = '1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  function automatic int hops(int a, int b);
    int dx = a % MX - b % MX, dy = a / MX - b / MX;
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  function automatic logic [7:0] pay(int src, int seq, int k);
    if (k == 0) return 8'(src);
    if (k == 1) return 8'(seq);
    return 8'(src * 5 + seq * 11 + k * 7);
  endfunction

  int  pattern = -1;               // run number; pattern % 3 = (a), (b), (c); -1 = stopped
  int  gap = GAP_LO;
  int  n_started[RUNS], n_blocked[RUNS], setup_sum[RUNS];
  int  exp_len[N][MAXSEQ];
  bit  got[N][MAXSEQ];
  int  finished[N];
  int  rx_bytes = 0, rx_transfers = 0, tx_bytes = 0;

  for (genvar t = 0; t < N; t++) begin : g_tile
    int seq = 0, k = 0, len = 0, t_cmd = 0;
    bit busy = 0, first = 0, opened = 0;
    always @(posedge clk) begin
      if (!rst_n || pattern < 0) begin
        cmd_valid[t] <= 0; tx_valid[t] <= 0; tx_data[t] <= 0;
        cmd_dest[t] <= 0; cmd_len[t] <= 0;
        busy = 0;
      end else begin
        if (cmd_valid[t] && cmd_ready[t]) cmd_valid[t] <= 0;
        if (retry[t] && first) begin n_blocked[pattern]++; first = 0; end
        if (tx_ready[t] && !opened) begin
          opened = 1; setup_sum[pattern] += int'(cycle) - t_cmd;
        end
        if (tx_valid[t] && tx_ready[t]) begin k++; tx_bytes++; end
        if (done[t]) begin seq++; busy = 0; finished[t]++; end
        if (!busy && seq < (pattern + 1) * PER_CASE && $urandom_range(gap - 1, 0) == 0) begin
          int d;
          bit near;
          near = (pattern % 3 == 2) || (pattern % 3 == 1 && $urandom_range(1, 0) == 0);
          do d = $urandom_range(N - 1, 0);
          while (d == t || (near && hops(t, d) > 4));
          len = $urandom_range(48, 8);
          exp_len[t][seq] = len;
          cmd_dest[t] <= 8'(d); cmd_len[t] <= LW'(len); cmd_valid[t] <= 1;
          n_started[pattern]++;
          k = 0; busy = 1; first = 1; opened = 0; t_cmd = int'(cycle);
        end
        tx_valid[t] <= busy && (k < len);
        tx_data[t]  <= pay(t, seq, k);
      end
    end
    // drain side
    int rk = 0, rsrc = -1, rseq = -1;
    always @(posedge clk) begin
      if (rx_start[t]) begin rk = 0; rsrc = -1; rseq = -1; end
      if (rx_valid[t]) begin
        if (rk == 0) rsrc = int'(rx_data[t]);
        else if (rk == 1) rseq = int'(rx_data[t]);
        else if (rsrc >= 0 && rsrc < N && rseq >= 0 && rseq < MAXSEQ)
          check(rx_data[t] == pay(rsrc, rseq, rk), "payload byte");
        rk++; rx_bytes++;
      end
      if (rx_end[t]) begin
        check(rsrc >= 0 && rsrc < N && rseq >= 0 && rseq < MAXSEQ, "transfer header");
        if (rsrc >= 0 && rsrc < N && rseq >= 0 && rseq < MAXSEQ) begin
          check(!got[rsrc][rseq], "delivered once");
          check(rk == exp_len[rsrc][rseq], "transfer length");
          check(hops(rsrc, t) <= 4 || pattern % 3 != 2, "local pattern stays within 4 hops");
          got[rsrc][rseq] = 1;
        end
        rx_transfers++;
      end
    end
  end

  real block_rate[RUNS];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int p = 0; p < RUNS; p++) begin
      int all, b0;
      longint t0;
      b0 = rx_bytes; t0 = cycle;
      pattern = p;
      gap = p < 3 ? GAP_LO : GAP_HI;
      do begin
        @(negedge clk);
        all = 1;
        for (int t = 0; t < N; t++) if (finished[t] < (p + 1) * PER_CASE) all = 0;
      end while (!all && cycle < 400000);
      check(all, "every source finished the pattern");
      repeat (60) @(negedge clk);
      block_rate[p] = real'(n_blocked[p]) / real'(n_started[p]);
      $display("%s load, pattern %s: transfers %0d, first-time blocked %0d (%.1f%%), mean usage %.1f%%, mean setup %.1f cycles",
               p < 3 ? "low" : "high",
               p % 3 == 0 ? "(a) uniform" : p % 3 == 1 ? "(b) half local" : "(c) local",
               n_started[p], n_blocked[p], 100.0 * block_rate[p],
               100.0 * real'(rx_bytes - b0) / (real'(N) * real'(cycle - t0)),
               real'(setup_sum[p]) / real'(n_started[p]));
      check(n_started[p] == N * PER_CASE, "transfer count");
      check(n_blocked[p] > 0, "some first requests blocked");
    end
    pattern = -1;
    check(rx_transfers == RUNS * N * PER_CASE, "all transfers delivered");
    check(rx_bytes == tx_bytes, "byte count");
    for (int t = 0; t < N; t++) for (int s = 0; s < MAXSEQ; s++) check(got[t][s], "transfer received");
    check(block_rate[3] > block_rate[4], "uniform traffic blocks more than half-local traffic");
    check(block_rate[4] > block_rate[5], "half-local traffic blocks more than local traffic");
    for (int p = 0; p < 3; p++)
      check(block_rate[p + 3] > block_rate[p], "blocking rises with the load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
