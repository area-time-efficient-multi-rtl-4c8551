// mm_prefix_op_spp: the modified prefix operator of the sparse parallel-prefix
// (SPP) multi-moduli adder.
//
// Like the FPP node it gates the fed-back generate with nm, and in addition
// it gates the fed-back propagate, so that with nm = 0 the node passes the
// more significant pair (g, p) through unchanged and with nm = 1 it is a
// plain prefix operator:
//   gn = g | (p & g' & nm),   pn = p & (p' | ~nm)
// The propagate path gains one OR gate (an OAI in a custom cell), which
// adds no logic level.
// Purely combinational.
module mm_prefix_op_spp
  import mm_pkg::*;
(
  input  gp_t  hi,  // (g, p): more significant group
  input  gp_t  lo,  // (g', p'): fed-back group from the top of the word
  input  logic nm,  // 1: modulo 2^n - 1 / 2^n + 1, 0: modulo 2^n
  output gp_t  res
);

  always_comb begin
    res.g = hi.g | (hi.p & lo.g & nm);
    res.p = hi.p & (lo.p | ~nm);
  end

endmodule
