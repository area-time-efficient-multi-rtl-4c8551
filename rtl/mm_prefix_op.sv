// mm_prefix_op: the plain parallel-prefix operator (black node).
//
// Combines the (generate, propagate) pair of a more significant group
// (g, p) with that of the adjacent less significant group (g', p'):
//   gn = g | (p & g'),   pn = p & p'
// One AND-OR (an AOI in a custom cell) for gn and one AND for pn.
// Purely combinational.
module mm_prefix_op
  import mm_pkg::*;
(
  input  gp_t hi,   // (g, p): more significant group
  input  gp_t lo,   // (g', p'): less significant group
  output gp_t res   // (gn, pn)
);

  always_comb res = gp_combine(hi, lo);

endmodule
