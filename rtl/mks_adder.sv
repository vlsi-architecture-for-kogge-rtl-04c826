// mks_adder: modified Kogge-Stone adder, the top of the design.
//
// A wide Kogge-Stone adder grows in area and wiring with log2(N) full-width
// prefix stages. This adder instead splits the word into WIDTH/BLOCK_W small
// Kogge-Stone cells (ks_block, 2 bits each by default) and chains them like
// the full adders of a ripple-carry adder: the carry-out of cell k is the
// carry-in of cell k+1. Inside a cell the carry is resolved in parallel;
// between cells it ripples, so the area grows linearly with WIDTH and the
// worst-case path crosses WIDTH/BLOCK_W cells.
//
// Interface: a, b (WIDTH bits) in; sum (WIDTH bits) and cout out. As in the
// document's implementations there is no carry-in port: the first cell's
// carry-in is 0. Purely combinational, no clock or reset; the result is
// valid one combinational delay after the operands.
// WIDTH defaults to 64, the widest of the word sizes (8, 16, 32, 64) the
// adder is evaluated at; the narrower ones are the same chain with fewer
// cells, set through WIDTH. WIDTH must be a multiple of BLOCK_W. Chaining
// the cells, the 2-bit cell width and the missing carry-in follow the
// document; the carry-in inside each cell and the default width are this
// design's choices.
module mks_adder #(
  parameter int unsigned WIDTH   = ks_pkg::KS_WORD_W,
  parameter int unsigned BLOCK_W = ks_pkg::KS_CELL_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NCELL = WIDTH / BLOCK_W;

  if (WIDTH % BLOCK_W != 0 || WIDTH == 0) begin : g_bad_width
    $error("mks_adder: WIDTH must be a nonzero multiple of BLOCK_W");
  end

  // carry[k] is the carry into cell k; carry[NCELL] leaves the adder.
  logic [NCELL:0] carry;

  assign carry[0] = 1'b0;

  for (genvar k = 0; k < NCELL; k++) begin : g_cell
    ks_block #(.BLOCK_W(BLOCK_W)) u_cell (
      .a   (a[k*BLOCK_W +: BLOCK_W]),
      .b   (b[k*BLOCK_W +: BLOCK_W]),
      .cin (carry[k]),
      .sum (sum[k*BLOCK_W +: BLOCK_W]),
      .cout(carry[k+1])
    );
  end

  assign cout = carry[NCELL];

endmodule
