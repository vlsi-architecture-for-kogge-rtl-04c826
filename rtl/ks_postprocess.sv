// ks_postprocess: post-processing stage of a Kogge-Stone adder.
//
// Each sum bit is the bit's propagate signal XORed with the carry into that
// bit: S[i] = P[i] ^ C[i]. Combinational; W bits (default: one 2-bit cell).
module ks_postprocess #(
  parameter int unsigned W = ks_pkg::KS_CELL_W
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] c,
  output logic [W-1:0] s
);

  always_comb s = p ^ c;

endmodule
