// ks_pkg: types and operators shared by the Kogge-Stone adder modules.
//
// A (generate, propagate) pair describes how a span of bits treats an
// incoming carry: g = the span makes a carry on its own, p = the span passes
// an incoming carry through. The prefix operator ks_combine merges the pair
// of a high span with the pair of the adjacent low span beneath it; it is the
// "dot" cell of every parallel-prefix carry network:
//   G = G_hi | (P_hi & G_lo),   P = P_hi & P_lo.
// The default sizes give the configuration used throughout: 2-bit
// Kogge-Stone cells chained into a 64-bit adder.
package ks_pkg;

  // Width of one Kogge-Stone cell of the chained adder.
  localparam int unsigned KS_CELL_W = 2;
  // Default word size of the complete adder.
  localparam int unsigned KS_WORD_W = 64;

  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  function automatic pg_t ks_combine(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
