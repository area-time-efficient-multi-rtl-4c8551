// mm_prefix_op_fpp: the modified prefix operator of the full parallel-prefix
// (FPP) multi-moduli adder.
//
// It sits wherever the less significant input (g', p') is a carry fed back
// from the top end of the word (end-around carry). The feedback generate is
// gated by nm, so the node honours it for the modulo 2^n - 1 and
// diminished-1 modes and ignores it for modulo 2^n:
//   gn = g | (p & g' & nm),   pn = p & p'
// The generate path thus has a 3-input AND where the plain node has a
// 2-input one. The propagate output is left as in the plain node: in
// modulo 2^n mode it is only ever used by other nodes whose generate output
// is in turn gated, so its value does not reach a carry.
// Purely combinational.
module mm_prefix_op_fpp
  import mm_pkg::*;
(
  input  gp_t  hi,  // (g, p): more significant group
  input  gp_t  lo,  // (g', p'): fed-back group from the top of the word
  input  logic nm,  // 1: modulo 2^n - 1 / 2^n + 1, 0: modulo 2^n
  output gp_t  res
);

  always_comb begin
    res.g = hi.g | (hi.p & lo.g & nm);
    res.p = hi.p & lo.p;
  end

endmodule
