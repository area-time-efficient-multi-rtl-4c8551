// mm_pkg: types and functions shared by the multi-moduli adders.
//
// Carry computation in every adder here works on (generate, propagate)
// pairs. gp_t holds one such pair. gp_combine() is the prefix operator
// (g,p) o (g',p') = (g | p&g', p & p'), where (g,p) covers the more
// significant bits and (g',p') the less significant ones.
//
// The operands are read as residues in one of three moduli, picked by the
// two control bits nm and dim:
//   nm=0 dim=0 : modulo 2^n
//   nm=1 dim=0 : modulo 2^n - 1
//   nm=1 dim=1 : modulo 2^n + 1, both operands and the sum in diminished-1
//                form (a value v is held as v-1)
// nm=0 dim=1 is not a defined mode. The encoding is the one the adder
// architecture uses; the enum below only names it for testbenches and
// readers.
package mm_pkg;

  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate (exclusive-OR definition, p = a ^ b)
  } gp_t;

  typedef enum logic [1:0] {
    MODE_POW2  = 2'b00,  // {nm, dim}: modulo 2^n
    MODE_MINUS = 2'b10,  // modulo 2^n - 1
    MODE_DIM1  = 2'b11   // diminished-1 modulo 2^n + 1
  } mm_mode_e;

  // Plain prefix operator.
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
