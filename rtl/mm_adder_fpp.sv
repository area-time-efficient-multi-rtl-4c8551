// mm_adder_fpp: full parallel-prefix (FPP) multi-moduli adder.
//
// Adds two N-bit residues modulo 2^N (nm=0, dim=0), modulo 2^N - 1 (nm=1,
// dim=0) or, in diminished-1 form, modulo 2^N + 1 (nm=1, dim=1).
//
// How it works. The carry tree is a modulo 2^N - 1 Kogge-Stone tree with
// the end-around carry recirculated inside its log2(N) levels: at level l
// (distance d = 2^(l-1)) every bit i combines its pair with the pair of bit
// i-d, taken cyclically, so after the last level bit i holds the generate
// of an N-bit cyclic group ending at i, which is the modulo 2^N - 1 carry.
// The nodes whose lower input wraps round from the top of the word (i < d)
// are the modified operators of mm_prefix_op_fpp: with nm = 0 they drop the
// wrapped generate and the tree yields the ordinary modulo 2^N carries
// c_i = g_{i:0}. The carry into bit 0 is the last carry ANDed with nm, so it
// is zero in modulo 2^N mode.
// For diminished-1 addition the carries are c+_i = c-_i ^ D_{i:0}, with
// D_{i:0} the AND of h_i..h_0 (mm_dprefix) and D_{-1:0} = 1. Since the D
// bits settle before the carries, the sum is formed as
//   s_i = (h_i ^ (dim & D_{i-1:0})) ^ c_{i-1}
// so the late carry passes through one XOR only.
//
// The tree shape, the set of modified nodes and the sum equation follow
// the architecture this design implements. The carry-in to bit 0 being
// zero for modulo 2^N, and the results for operands outside the residue
// range, are those of that structure. For modulo 2^N - 1, an all-ones sum
// (the second form of zero) is returned when a + b = 2^N - 1. Diminished-1
// operands are assumed non-zero; a zero operand is to be handled outside,
// as is usual for that representation.
//
// Interface: a, b, s are N bits; nm and dim select the modulus.
// N must be a power of two, at least 2.
// Timing: purely combinational: one pre-processing level, log2(N) prefix
// levels and two XOR levels.
module mm_adder_fpp
  import mm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         nm,
  input  logic         dim,
  output logic [N-1:0] s
);

  localparam int unsigned L = $clog2(N);

  if (N < 2 || (1 << L) != N) begin : g_bad_n
    $error("mm_adder_fpp: N must be a power of two");
  end

  logic [N-1:0] g, h;
  logic [N-2:0] D;        // D[i] = D_{i:0}
  logic [N-1:0] c;      // c[i]: carry out of bit i after the last level
  logic         c_in0;  // carry into bit 0
  logic [N-1:0] hd;     // half-sum bits, conditionally complemented

  mm_preproc #(.N(N)) u_pre (.a(a), .b(b), .g(g), .h(h));
  mm_dprefix #(.N(N-1)) u_dpx (.h(h[N-2:0]), .D(D));

  // g_level[l].row holds the pairs after prefix level l (row 0: leaves).
  for (genvar l = 0; l <= L; l++) begin : g_level
    gp_t row [N];
    if (l == 0) begin : g_leaves
      for (genvar i = 0; i < N; i++) begin : g_leaf
        assign row[i] = '{g: g[i], p: h[i]};
      end
    end else begin : g_nodes
      localparam int unsigned DIST = 1 << (l - 1);
      for (genvar i = 0; i < N; i++) begin : g_node
        if (i >= DIST) begin : g_plain
          mm_prefix_op u_op (
            .hi (g_level[l-1].row[i]),
            .lo (g_level[l-1].row[i-DIST]),
            .res(row[i])
          );
        end else begin : g_wrap
          mm_prefix_op_fpp u_op (
            .hi (g_level[l-1].row[i]),
            .lo (g_level[l-1].row[i+N-DIST]),
            .nm (nm),
            .res(row[i])
          );
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_carry
    assign c[i] = g_level[L].row[i].g;
  end

  assign c_in0 = nm & c[N-1];

  // The group propagates of the last level are not needed by the sum stage.
  always_comb begin
    hd[0] = h[0] ^ dim;  // D_{-1:0} = 1
    for (int i = 1; i < N; i++) hd[i] = h[i] ^ (dim & D[i-1]);
    s = hd ^ {c[N-2:0], c_in0};
  end

endmodule
