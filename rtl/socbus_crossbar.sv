// socbus_crossbar -- five-by-five crossbar of a SoCBUS switch.
//
// The arbiter's locks are the crossbar control: output o carries the
// forward word of the input that owns it (out_owner[o]) while out_locked[o]
// is set, and an idle word otherwise. In the reverse direction each input
// sees the reverse control of the output it owns, or REV_NONE when it owns
// none. Since an input owns at most one output and an output has at most
// one owner, any set of disjoint routes passes at the same time.
//
// Purely combinational; the document places no register in the crossbar
// (the one register stage per switch sits at the inputs).
module socbus_crossbar
  import socbus_pkg::*;
(
  input  fwd_t [NPORTS-1:0]               in_fwd,
  input  logic [NPORTS-1:0]               out_locked,
  input  logic [NPORTS-1:0][PORT_W-1:0]   out_owner,
  output fwd_t [NPORTS-1:0]               out_fwd,
  input  rev_t [NPORTS-1:0]               out_rev,
  output rev_t [NPORTS-1:0]               in_rev
);

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++) begin
      out_fwd[o] = out_locked[o] ? in_fwd[out_owner[o]] : FWD_IDLE;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NPORTS; i++) begin
      in_rev[i] = REV_NONE;
      for (int unsigned o = 0; o < NPORTS; o++) begin
        if (out_locked[o] && out_owner[o] == PORT_W'(i)) in_rev[i] = out_rev[o];
      end
    end
  end

endmodule
