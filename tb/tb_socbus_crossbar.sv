// tb_socbus_crossbar -- checks the crossbar with random lock patterns.
// Each cycle a random permutation assigns distinct owners to a random
// subset of outputs; every output must carry its owner's forward word (or
// idle when unlocked) and every input must see its output's reverse
// control (or none when it owns no output).
module tb_socbus_crossbar;
  import socbus_pkg::*;

  int checks = 0, failures = 0;
  fwd_t [NPORTS-1:0] in_fwd, out_fwd;
  rev_t [NPORTS-1:0] out_rev, in_rev;
  logic [NPORTS-1:0] out_locked;
  logic [NPORTS-1:0][PORT_W-1:0] out_owner;

  socbus_crossbar dut (.*);

  initial begin
    for (int c = 0; c < 2000; c++) begin
      int perm[5];
      int owned_by[5];
      for (int i = 0; i < 5; i++) perm[i] = i;
      for (int i = 4; i > 0; i--) begin
        int j, t;
        j = $urandom_range(i, 0);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int i = 0; i < 5; i++) owned_by[i] = -1;
      for (int o = 0; o < 5; o++) begin
        out_locked[o] = 1'($urandom);
        out_owner[o]  = PORT_W'(perm[o]);
        if (out_locked[o]) owned_by[perm[o]] = o;
        in_fwd[o]  = fwd_t'($urandom);
        out_rev[o] = rev_t'($urandom_range(2, 0));
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (out_fwd[o] !== (out_locked[o] ? in_fwd[perm[o]] : FWD_IDLE)) begin
          failures++; $display("FAIL fwd output %0d", o);
        end
      end
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (in_rev[i] !== (owned_by[i] >= 0 ? out_rev[owned_by[i]] : REV_NONE)) begin
          failures++; $display("FAIL rev input %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
