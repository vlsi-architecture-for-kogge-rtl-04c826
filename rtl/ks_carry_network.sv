// ks_carry_network: carry-processing stage of a Kogge-Stone adder.
//
// The per-bit (g, p) pairs are merged by a Kogge-Stone parallel-prefix tree:
// in stage s (s = 0 .. clog2(W)-1) every bit i >= 2**s combines its pair with
// the pair of bit i - 2**s, so after clog2(W) stages bit i holds the group
// pair (G[i:0], P[i:0]) of all bits at and below it. Every stage has full
// width and each cell drives at most two loads, which is what makes the
// Kogge-Stone tree fast and regular at the price of wiring. The carry-in is
// then folded in once: carry out of bit i = G[i:0] | (P[i:0] & cin).
//
// Outputs: c[i] is the carry INTO bit i (c[0] = cin) and cout the carry out
// of bit W-1. Combinational. The document gives this stage's role and its
// dot-cell equations; folding cin in after the tree is this design's choice.
module ks_carry_network
  import ks_pkg::*;
#(
  parameter int unsigned W = ks_pkg::KS_CELL_W
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] g,
  input  logic         cin,
  output logic [W-1:0] c,
  output logic         cout
);

  localparam int unsigned STAGES = (W > 1) ? $clog2(W) : 0;

  // Group generate / propagate after each stage; index 0 is the input.
  logic [STAGES:0][W-1:0] gs;
  logic [STAGES:0][W-1:0] ps;

  assign gs[0] = g;
  assign ps[0] = p;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar i = 0; i < W; i++) begin : g_cell
      if (i >= (1 << s)) begin : g_dot
        pg_t r;
        assign r = ks_combine('{g: gs[s][i], p: ps[s][i]},
                              '{g: gs[s][i-(1<<s)], p: ps[s][i-(1<<s)]});
        assign gs[s+1][i] = r.g;
        assign ps[s+1][i] = r.p;
      end else begin : g_pass
        assign gs[s+1][i] = gs[s][i];
        assign ps[s+1][i] = ps[s][i];
      end
    end
  end

  // Carry out of each bit, then shift by one to get the carry into each bit.
  logic [W-1:0] co;
  always_comb begin
    co   = gs[STAGES] | (ps[STAGES] & {W{cin}});
    cout = co[W-1];
  end

  if (W > 1) begin : g_cwide
    assign c = {co[W-2:0], cin};
  end else begin : g_cone
    assign c = cin;
  end

endmodule
