// ks_preprocess: pre-processing stage of a Kogge-Stone adder.
//
// For every bit position i it forms the propagate P[i] = A[i] ^ B[i] and the
// generate G[i] = A[i] & B[i], one half adder per bit. These pairs feed both
// the carry-processing (prefix) stage and, through P, the post-processing
// (sum) stage. Combinational; W is the number of bits (default: one 2-bit
// cell).
module ks_preprocess #(
  parameter int unsigned W = ks_pkg::KS_CELL_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic [W-1:0] g
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    ks_half_adder u_ha (
      .a(a[i]),
      .b(b[i]),
      .p(p[i]),
      .g(g[i])
    );
  end

endmodule
