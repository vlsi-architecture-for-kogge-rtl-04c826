// ks_block: one Kogge-Stone adder cell, by default 2 bits wide.
//
// The cell is a complete small Kogge-Stone adder: half adders form per-bit
// propagate/generate (pre-processing), a prefix tree turns them into carries
// (carry processing) and XOR gates form the sums (post-processing). For the
// default 2-bit cell the tree is a single dot cell:
//   c1   = g0 | (p0 & cin)
//   cout = g1 | (p1 & g0) | (p1 & p0 & cin)
//   s0   = p0 ^ cin,  s1 = p1 ^ c1.
// Unlike a bare 2-bit Kogge-Stone adder, the cell takes a carry-in so that
// cells can be chained ripple-fashion into a wide adder (see mks_adder); the
// carry-in costs a few gates beyond the two half adders, two ANDs, one XOR
// and one OR of the carry-free 2-bit adder. Combinational.
module ks_block #(
  parameter int unsigned BLOCK_W = ks_pkg::KS_CELL_W
) (
  input  logic [BLOCK_W-1:0] a,
  input  logic [BLOCK_W-1:0] b,
  input  logic               cin,
  output logic [BLOCK_W-1:0] sum,
  output logic               cout
);

  logic [BLOCK_W-1:0] p, g, c;

  ks_preprocess #(.W(BLOCK_W)) u_pre (
    .a(a), .b(b), .p(p), .g(g)
  );

  ks_carry_network #(.W(BLOCK_W)) u_carry (
    .p(p), .g(g), .cin(cin), .c(c), .cout(cout)
  );

  ks_postprocess #(.W(BLOCK_W)) u_post (
    .p(p), .c(c), .s(sum)
  );

endmodule
