// mm_csb: modified carry-select block of the sparse multi-moduli adder.
//
// Produces W sum bits from the generate bits g, the half-sum bits h (which
// are also the propagate bits), the prefix-AND bits dsh[k] = D_{i+k-1:0}
// of the positions just below each bit (i being the block's lowest bit),
// the mode bit dim, and the carry cin coming into the block.
//
// How it works. Each half-sum bit is first conditionally complemented,
// hd_k = h_k ^ (dim & dsh[k]); this turns the modulo 2^n - 1 carries into
// diminished-1 ones and uses only the early D bits. Inside the block the
// group pair (G_k, P_k) of bits k..0 is formed with prefix operators; the
// carry into bit k+1 is G_k if cin = 0 and G_k | P_k if cin = 1. Both
// candidate sums hd_{k+1} ^ G_k and hd_{k+1} ^ (G_k | P_k) are computed
// ahead of the carry, which then only drives a 2:1 multiplexer per bit.
// The lowest bit has no candidates: s_0 = hd_0 ^ cin.
//
// The conditional complement in front of the sum XORs and the carry-select
// structure follow the architecture; the ripple of the in-block group terms
// (W-1 prefix operators in series) is this design's choice, which matches
// the 4-bit block of the architecture gate for gate.
//
// Interface: g, h, dsh, s are W bits; dim and cin are single bits.
// Timing: purely combinational; cin passes through one multiplexer.
module mm_csb
  import mm_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] h,
  input  logic [W-1:0] dsh,
  input  logic         dim,
  input  logic         cin,
  output logic [W-1:0] s
);

  logic [W-1:0] hd;
  gp_t          grp [W];  // grp[k]: group pair of bits k..0 of the block
  logic [W-1:0] s0, s1;   // candidate sums for cin = 0 and cin = 1

  always_comb begin
    hd = h ^ (dsh & {W{dim}});
    grp[0] = '{g: g[0], p: h[0]};
    for (int k = 1; k < W; k++) grp[k] = gp_combine('{g: g[k], p: h[k]}, grp[k-1]);
    s0[0] = hd[0];
    s1[0] = ~hd[0];
    for (int k = 1; k < W; k++) begin
      s0[k] = hd[k] ^ grp[k-1].g;
      s1[k] = hd[k] ^ (grp[k-1].g | grp[k-1].p);
    end
    s = cin ? s1 : s0;
  end

endmodule
