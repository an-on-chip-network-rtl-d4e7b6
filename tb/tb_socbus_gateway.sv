// tb_socbus_gateway -- the data flow of a telephone / voice-over-IP gateway
// on a 7x7 network.
//
// Placement: the 7 tiles of the top row are swap memories. The left column
// holds 3 voice inputs (rows 1-3) and 3 voice outputs (rows 4-6). The
// remaining 36 tiles are processors: 18 first-layer ones (columns 1-3) and
// 18 second-layer ones (columns 4-6). Every transfer goes over the network,
// including the short control message that asks a memory for a buffer.
//
// One frame of one channel c:
//   input        -> P1(c)   32-byte voice frame
//   P1(c)        -> M1(c)   fetch request
//   M1(c)        -> P1(c)   200-byte computing buffer (swap in)
//   P1(c)        -> M1(c)   updated buffer (swap out), after COMPUTE cycles
//   P1(c)        -> P2(c)   processed voice frame
//   P2(c), M2(c)            the same fetch, swap in, swap out
//   P2(c)        -> output  final voice frame
//
// Each word carries a kind and a channel in its first two bytes. The
// processing is a simple byte map, so every step can be checked:
// - each receiver checks it is the right tile;
// - each memory checks that the buffer comes back updated exactly once per
//   frame;
// - each output checks the voice bytes after both layers.
// The inputs send a frame for every channel, then wait for all of them to
// come out before sending the next. The first half of the frames are sent
// in a burst: all channels at once, with no schedule. In the second half
// the inputs spread the channels SLOT cycles apart, a crude stand-in for a
// traffic schedule. The testbench reports first-time blocking for each
// half (the share of transfers whose first request was refused). It checks
// that spreading cuts blocking by more than half, and that every kind of
// transfer happened for every channel and frame.
module tb_socbus_gateway;
  import socbus_pkg::*;

  localparam int MX = 7, MY = 7, N = MX * MY, LW = 16;
  localparam int CH = 36, FRAMES = 4, VOICE = 32, SWAP = 200, COMPUTE = 20, SLOT = 400;
  localparam int K_VIN = 1, K_FETCH1 = 2, K_SWIN1 = 3, K_SWOUT1 = 4, K_V1 = 5,
                 K_FETCH2 = 6, K_SWIN2 = 7, K_SWOUT2 = 8, K_VOUT = 9;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  logic [N-1:0]         cmd_valid, cmd_ready, tx_valid, tx_ready, done, retry;
  logic [N-1:0]         rx_accept, rx_start, rx_valid, rx_end;
  logic [N-1:0][7:0]    cmd_dest, tx_data, rx_data;
  logic [N-1:0][LW-1:0] cmd_len;

  socbus_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  assign rx_accept = '1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // ---------------- placement
  function automatic int tile(int x, int y); return y * MX + x; endfunction
  function automatic int t_in (int c); return tile(0, 1 + c % 3); endfunction
  function automatic int t_out(int c); return tile(0, 4 + c % 3); endfunction
  function automatic int t_p1 (int c); return tile(1 + (c % 18) % 3, 1 + (c % 18) / 3); endfunction
  function automatic int t_p2 (int c); return tile(4 + ((c * 5) % 18) % 3, 1 + ((c * 5) % 18) / 3); endfunction
  function automatic int t_m1 (int c); return tile(c % 7, 0); endfunction
  function automatic int t_m2 (int c); return tile((c + 3) % 7, 0); endfunction

  // ---------------- contents
  logic [7:0] voice1[CH][VOICE], voice2[CH][VOICE];
  logic [7:0] swap1[CH][SWAP], swap2[CH][SWAP];
  logic [7:0] mem1[CH][SWAP], mem2[CH][SWAP];
  int frame = 0;

  function automatic logic [7:0] v_in(int c, int f, int k); return 8'(c * 3 + f * 7 + k * 5); endfunction
  function automatic logic [7:0] mem_init(int c, int k, int layer); return 8'(c * 11 + k + layer * 50); endfunction

  function automatic int len_of(int kind);
    case (kind)
      K_FETCH1, K_FETCH2: return 2;
      K_SWIN1, K_SWIN2, K_SWOUT1, K_SWOUT2: return 2 + SWAP;
      default: return 2 + VOICE;
    endcase
  endfunction

  function automatic logic [7:0] byte_of(int kind, int c, int k);
    if (k == 0) return 8'(kind);
    if (k == 1) return 8'(c);
    case (kind)
      K_VIN:    return v_in(c, frame, k - 2);
      K_V1:     return voice1[c][k - 2] ^ 8'h5A;
      K_VOUT:   return voice2[c][k - 2] + 8'd1;
      K_SWIN1:  return mem1[c][k - 2];
      K_SWIN2:  return mem2[c][k - 2];
      K_SWOUT1: return swap1[c][k - 2] + 8'd1;
      K_SWOUT2: return swap2[c][k - 2] + 8'd3;
      default:  return 8'h00;
    endcase
  endfunction

  // ---------------- per-tile job queues
  typedef struct { int dest; int kind; int chan; longint not_before; } job_t;
  job_t jobs[N][$];
  int   kind_count[10];
  int   n_started = 0, n_blocked = 0, payload_bytes = 0, frames_out = 0;

  function automatic void post(int src, int dest, int kind, int c, longint delay);
    job_t j;
    j.dest = dest; j.kind = kind; j.chan = c; j.not_before = cycle + delay;
    jobs[src].push_back(j);
  endfunction

  // what a tile does with a transfer it has received
  task automatic receive(int t, int kind, int c, ref logic [7:0] buf_[2 + SWAP], input int len);
    kind_count[kind]++;
    check(len == len_of(kind), "transfer length");
    case (kind)
      K_VIN: begin
        check(t == t_p1(c), "voice reaches its first-layer processor");
        for (int k = 0; k < VOICE; k++) voice1[c][k] = buf_[2 + k];
        post(t, t_m1(c), K_FETCH1, c, 0);
      end
      K_FETCH1: begin
        check(t == t_m1(c), "fetch reaches memory");
        post(t, t_p1(c), K_SWIN1, c, 0);
      end
      K_SWIN1: begin
        check(t == t_p1(c), "buffer reaches first-layer processor");
        for (int k = 0; k < SWAP; k++) swap1[c][k] = buf_[2 + k];
        post(t, t_m1(c), K_SWOUT1, c, COMPUTE);
        post(t, t_p2(c), K_V1, c, COMPUTE);
      end
      K_SWOUT1: begin
        check(t == t_m1(c), "buffer returns to memory");
        for (int k = 0; k < SWAP; k++) begin
          check(buf_[2 + k] == mem1[c][k] + 8'd1, "first-layer buffer updated once");
          mem1[c][k] = buf_[2 + k];
        end
      end
      K_V1: begin
        check(t == t_p2(c), "voice reaches its second-layer processor");
        for (int k = 0; k < VOICE; k++) voice2[c][k] = buf_[2 + k];
        post(t, t_m2(c), K_FETCH2, c, 0);
      end
      K_FETCH2: begin
        check(t == t_m2(c), "fetch reaches memory");
        post(t, t_p2(c), K_SWIN2, c, 0);
      end
      K_SWIN2: begin
        check(t == t_p2(c), "buffer reaches second-layer processor");
        for (int k = 0; k < SWAP; k++) swap2[c][k] = buf_[2 + k];
        post(t, t_m2(c), K_SWOUT2, c, COMPUTE);
        post(t, t_out(c), K_VOUT, c, COMPUTE);
      end
      K_SWOUT2: begin
        check(t == t_m2(c), "buffer returns to memory");
        for (int k = 0; k < SWAP; k++) begin
          check(buf_[2 + k] == mem2[c][k] + 8'd3, "second-layer buffer updated once");
          mem2[c][k] = buf_[2 + k];
        end
      end
      K_VOUT: begin
        check(t == t_out(c), "voice reaches its output");
        for (int k = 0; k < VOICE; k++)
          check(buf_[2 + k] == (v_in(c, frame, k) ^ 8'h5A) + 8'd1, "voice after both layers");
        frames_out++;
      end
      default: check(0, "unknown transfer kind");
    endcase
  endtask

  for (genvar t = 0; t < N; t++) begin : g_tile
    job_t cur;
    int   k = 0, len = 0;
    bit   busy = 0, first = 0;
    always @(posedge clk) begin
      if (!rst_n) begin
        cmd_valid[t] <= 0; tx_valid[t] <= 0; tx_data[t] <= 0;
        cmd_dest[t] <= 0; cmd_len[t] <= 0;
        busy = 0;
      end else begin
        if (cmd_valid[t] && cmd_ready[t]) cmd_valid[t] <= 0;
        if (retry[t] && first) begin n_blocked++; first = 0; end
        if (tx_ready[t]) first = 0;
        if (tx_valid[t] && tx_ready[t]) begin k++; payload_bytes++; end
        if (done[t]) busy = 0;
        if (!busy && jobs[t].size() > 0 && jobs[t][0].not_before <= cycle) begin
          cur = jobs[t].pop_front();
          len = len_of(cur.kind);
          cmd_dest[t] <= 8'(cur.dest); cmd_len[t] <= LW'(len); cmd_valid[t] <= 1;
          k = 0; busy = 1; first = 1; n_started++;
        end
        tx_valid[t] <= busy && (k < len);
        tx_data[t]  <= busy ? byte_of(cur.kind, cur.chan, k) : 8'h00;
      end
    end
    // drain side
    logic [7:0] rbuf[2 + SWAP];
    int rk = 0;
    always @(posedge clk) begin
      if (rx_start[t]) rk = 0;
      if (rx_valid[t]) begin
        if (rk < 2 + SWAP) rbuf[rk] = rx_data[t];
        rk++;
      end
      if (rx_end[t]) begin
        if (int'(rbuf[1]) < CH) receive(t, int'(rbuf[0]), int'(rbuf[1]), rbuf, rk);
        else check(0, "channel number");
      end
    end
  end

  real blocked_pct[2] = '{0.0, 0.0};
  initial begin
    longint t0;
    for (int c = 0; c < CH; c++) for (int k = 0; k < SWAP; k++) begin
      mem1[c][k] = mem_init(c, k, 1);
      mem2[c][k] = mem_init(c, k, 2);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    t0 = cycle;
    for (int f = 0; f < FRAMES; f++) begin
      int s0, b0;
      longint tf;
      bit spread;
      spread = f >= FRAMES / 2;
      frame = f;
      frames_out = 0;
      s0 = n_started; b0 = n_blocked; tf = cycle;
      for (int c = 0; c < CH; c++) post(t_in(c), t_p1(c), K_VIN, c, spread ? c * SLOT : 0);
      while (frames_out < CH && cycle < 200000) @(negedge clk);
      check(frames_out == CH, "every channel of the frame came out");
      blocked_pct[spread] += 100.0 * real'(n_blocked - b0) / real'(n_started - s0) / real'(FRAMES / 2);
      $display("frame %0d (%s): %0d cycles, first-time blocked %0d of %0d", f,
               spread ? "spread" : "burst", cycle - tf, n_blocked - b0, n_started - s0);
    end
    $display("first-time blocking: burst %.1f%%, spread %.1f%%", blocked_pct[0], blocked_pct[1]);
    check(blocked_pct[1] < blocked_pct[0] / 2.0, "spreading the channels in time removes most blocking");
    repeat (50) @(negedge clk);
    $display("%0d transfers, %0d payload bytes in %0d cycles (%.2f bytes/cycle), first-time blocked %0d (%.1f%%)",
             n_started, payload_bytes, cycle - t0, real'(payload_bytes) / real'(cycle - t0),
             n_blocked, 100.0 * real'(n_blocked) / real'(n_started));
    check(n_started == FRAMES * CH * 9, "transfer count");
    for (int kd = K_VIN; kd <= K_VOUT; kd++)
      check(kind_count[kd] == FRAMES * CH, "each kind of transfer happened for every channel and frame");
    for (int c = 0; c < CH; c++) begin
      check(mem1[c][0] == mem_init(c, 0, 1) + 8'(FRAMES), "first-layer buffer swapped every frame");
      check(mem2[c][0] == mem_init(c, 0, 2) + 8'(3 * FRAMES), "second-layer buffer swapped every frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
