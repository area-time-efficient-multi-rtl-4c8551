// mm_ref_pkg: arithmetic reference for the multi-moduli adder testbenches.
//
// ref_add() works out the expected n-bit sum from plain integer arithmetic,
// with no prefix logic:
//   modulo 2^n        : (a + b) mod 2^n
//   modulo 2^n - 1    : end-around carry, (a + b + cout) mod 2^n, so that
//                       a + b = 2^n - 1 gives the all-ones form of zero
//   diminished-1 2^n+1: (a + b + !cout) mod 2^n, the usual diminished-1
//                       sum of two non-zero operands held as value-1
// cout is the carry out of the plain n-bit sum a + b.
package mm_ref_pkg;

  function automatic logic [63:0] ref_add(int n, logic [63:0] a, logic [63:0] b,
                                          logic nm, logic dim);
    logic [64:0] mask, sum, res;
    logic        cout;
    mask = (65'd1 << n) - 65'd1;
    sum  = {1'b0, a & mask[63:0]} + {1'b0, b & mask[63:0]};
    cout = sum[n];
    if (!nm)      res = sum;
    else if (!dim) res = sum + 65'(cout);
    else          res = sum + 65'(!cout);
    return res[63:0] & mask[63:0];
  endfunction

  // Integer value of a diminished-1 residue pair check: the true sum of
  // the represented values, modulo 2^n + 1, held back in diminished-1 form.
  // Used to cross-check ref_add itself on a few operands.
  function automatic logic [63:0] dim1_by_value(int n, logic [63:0] a, logic [63:0] b);
    logic [65:0] m, va, vb, vs;
    m  = (66'd1 << n) + 66'd1;
    va = {2'b0, a} + 66'd1;
    vb = {2'b0, b} + 66'd1;
    vs = (va + vb) % m;
    // vs == 0 has no diminished-1 n-bit form; the adder yields all zeros,
    // which ref_add also gives, so map it the same way.
    return (vs == 0) ? 64'd0 : 64'(vs - 66'd1);
  endfunction

endpackage
