// tb_socbus_arbiter_lock -- checks the arbiter and lock unit.
// The routing table is replaced by a test table whose entry is the low five
// bits of the address, so every candidate set can be produced. A directed
// part checks the rules one at a time (round robin between colliding
// requests, second choice when the first output is locked, failure when
// all candidates are locked, no U-turn, release); a random part compares
// every grant, failure and lock with a reference model kept in the
// testbench.
module tb_socbus_arbiter_lock;
  import socbus_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]             try_req, release_req, grant, fail, out_locked, lookup_mask;
  logic [NPORTS-1:0][DATA_W-1:0] req_addr;
  logic [DATA_W-1:0]             lookup_addr;
  logic [PORT_W-1:0]             grant_port;
  logic [NPORTS-1:0][PORT_W-1:0] out_owner;

  assign lookup_mask = lookup_addr[NPORTS-1:0];

  socbus_arbiter_lock dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference model
  int r_in = 0, r_out = 0;
  bit [4:0] r_locked = '0;
  int r_owner[5];

  task automatic idle_inputs();
    try_req = '0; release_req = '0; req_addr = '0;
  endtask

  initial begin
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // Two inputs (0 and 2) both want output 1 only. Input 0 served first.
    try_req = 5'b00101; req_addr[0] = 8'b00010; req_addr[2] = 8'b00010;
    #1 check(grant == 5'b00001 && grant_port == 1 && fail == 0, "rr first served");
    @(negedge clk);
    try_req = 5'b00100;
    #1 check(out_locked[1] && out_owner[1] == 0, "lock set for input 0");
    check(fail == 5'b00100 && grant == 0, "colliding request fails on locked output");
    @(negedge clk);
    // Input 3 may go east(1) or south(2): east locked, takes second choice.
    try_req = 5'b01000; req_addr[3] = 8'b00110;
    #1 check(grant == 5'b01000 && grant_port == 2, "second choice taken");
    @(negedge clk);
    // Input 1 asks only for its own port: U-turn not allowed.
    try_req = 5'b00010; req_addr[1] = 8'b00010;
    #1 check(fail == 5'b00010, "no U-turn");
    @(negedge clk);
    // Release of input 0's output; then input 4 gets output 1.
    try_req = '0; release_req = 5'b00001;
    @(negedge clk);
    release_req = '0;
    #1 check(!out_locked[1] && out_locked[2], "release frees only own output");
    try_req = 5'b10000; req_addr[4] = 8'b00010;
    #1 check(grant == 5'b10000 && grant_port == 1, "freed output granted again");
    @(negedge clk);
    // Output rr: input 0 to {2,3,4} with 2 locked; pointer is at 2 -> picks 3.
    try_req = 5'b00001; req_addr[0] = 8'b11100;
    #1 check(grant == 5'b00001 && grant_port == 3, "output round robin");
    @(negedge clk);
    idle_inputs(); release_req = 5'b11111;
    @(negedge clk);
    release_req = '0;
    #1 check(out_locked == 0, "all released");

    // Random phase against the reference model (state resynchronised).
    rst_n = 0; @(negedge clk); rst_n = 1;
    r_in = 0; r_out = 0; r_locked = '0;
    for (int c = 0; c < 3000; c++) begin
      bit served, found; int pick, ch; bit [4:0] cand, exp_grant, exp_fail;
      try_req = 5'($urandom);
      for (int i = 0; i < 5; i++) req_addr[i] = 8'($urandom);
      release_req = 5'($urandom) & 5'($urandom);
      #1;
      served = 0; pick = 0;
      for (int k = 0; k < 5; k++) if (!served && try_req[(r_in + k) % 5]) begin served = 1; pick = (r_in + k) % 5; end
      cand = 5'(req_addr[pick]) & ~r_locked; cand[pick] = 0;
      found = 0; ch = 0;
      for (int k = 0; k < 5; k++) if (!found && cand[(r_out + k) % 5]) begin found = 1; ch = (r_out + k) % 5; end
      exp_grant = 0; exp_fail = 0;
      if (served) begin if (found) exp_grant[pick] = 1; else exp_fail[pick] = 1; end
      check(grant == exp_grant && fail == exp_fail, "random grant/fail");
      if (found && served) check(grant_port == PORT_W'(ch), "random grant port");
      check(out_locked == r_locked, "random locks");
      for (int o = 0; o < 5; o++) if (r_locked[o]) check(out_owner[o] == PORT_W'(r_owner[o]), "random owner");
      @(posedge clk);
      for (int o = 0; o < 5; o++) if (r_locked[o] && release_req[r_owner[o]]) r_locked[o] = 0;
      if (served) begin
        r_in = (pick + 1) % 5;
        if (found) begin r_locked[ch] = 1; r_owner[ch] = pick; r_out = (ch + 1) % 5; end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
