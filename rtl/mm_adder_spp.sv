// mm_adder_spp: sparse parallel-prefix (SPP) multi-moduli adder.
//
// Adds two N-bit residues modulo 2^N (nm=0, dim=0), modulo 2^N - 1 (nm=1,
// dim=0) or, in diminished-1 form, modulo 2^N + 1 (nm=1, dim=1).
//
// How it works. The word is cut into N/W blocks of W bits (W = 4, sparse-4).
// Only the carries at block boundaries are computed by the prefix tree:
//  * the first log2(W) levels form each block's group pair with a binary
//    tree of plain prefix operators (bits 1,3,5,.. then 3,7,11,..);
//  * the remaining log2(N/W) levels are a Kogge-Stone tree over the block
//    pairs with the end-around carry recirculated: at level m (distance
//    d = 2^(m-1) blocks) block j combines with block j-d taken cyclically.
//    Nodes whose lower input wraps round (j < d) are the modified operators
//    of mm_prefix_op_spp, which ignore the wrapped pair when nm = 0.
// After the last level the generate of block j is the carry out of its top
// bit: the modulo 2^N - 1 carry with nm = 1, the ordinary one with nm = 0.
// Block j > 0 takes the carry of block j-1; block 0 takes the carry of the
// top block ANDed with nm. The carry-select blocks (mm_csb) fold in the
// diminished-1 correction with the D bits of mm_dprefix before the carry
// arrives.
//
// The sparse-4 split, the modified nodes, the AND on the carry into the
// lowest block and the modified carry-select block follow the architecture
// this design implements, as drawn for N = 16. For other N the block-level
// tree is generalised as a cyclic Kogge-Stone over N/W blocks, which gives
// log2(N) prefix levels in all. Results for operands outside the residue
// range, the all-ones modulo 2^N - 1 zero and zero diminished-1 operands
// behave as in mm_adder_fpp.
//
// Interface: a, b, s are N bits; nm and dim select the modulus.
// N and W must be powers of two with W <= N.
// Timing: purely combinational: one pre-processing level, log2(N) prefix
// levels, then the carry-select multiplexer.
module mm_adder_spp
  import mm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned W = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         nm,
  input  logic         dim,
  output logic [N-1:0] s
);

  localparam int unsigned LW = $clog2(W);      // in-block levels
  localparam int unsigned B  = N / W;          // number of blocks
  localparam int unsigned LB = $clog2(B);      // block-level levels

  if (W < 1 || (1 << LW) != W || B < 1 || (1 << LB) != B || B * W != N) begin : g_bad_n
    $error("mm_adder_spp: N and W must be powers of two with W <= N");
  end

  logic [N-1:0] g, h;
  logic [N-2:0] D;        // D[i] = D_{i:0}
  logic [N-1:0] dsh;      // dsh[i] = D_{i-1:0}, with D_{-1:0} = 1
  logic [B-1:0] cin;      // carry into each block

  mm_preproc #(.N(N)) u_pre (.a(a), .b(b), .g(g), .h(h));
  mm_dprefix #(.N(N-1)) u_dpx (.h(h[N-2:0]), .D(D));

  // In-block levels, g_blevel[k].row after level k (row 0: leaves). At
  // level k a node sits on every bit whose low k bits are all ones and
  // combines it with the bit 2^(k-1) below.
  for (genvar k = 0; k <= LW; k++) begin : g_blevel
    gp_t row [N];
    if (k == 0) begin : g_leaves
      for (genvar i = 0; i < N; i++) begin : g_leaf
        assign row[i] = '{g: g[i], p: h[i]};
      end
    end else begin : g_nodes
      localparam int unsigned SPAN = 1 << k;
      for (genvar i = 0; i < N; i++) begin : g_bnode
        if ((i % SPAN) == SPAN - 1) begin : g_op
          mm_prefix_op u_op (
            .hi (g_blevel[k-1].row[i]),
            .lo (g_blevel[k-1].row[i - SPAN/2]),
            .res(row[i])
          );
        end else begin : g_pass
          assign row[i] = g_blevel[k-1].row[i];
        end
      end
    end
  end

  // Block levels, g_klevel[m].row after level m (row 0: block pairs):
  // cyclic Kogge-Stone with end-around recirculation.
  for (genvar m = 0; m <= LB; m++) begin : g_klevel
    gp_t row [B];
    if (m == 0) begin : g_leaves
      for (genvar j = 0; j < B; j++) begin : g_bleaf
        assign row[j] = g_blevel[LW].row[j*W + W - 1];
      end
    end else begin : g_nodes
      localparam int unsigned DIST = 1 << (m - 1);
      for (genvar j = 0; j < B; j++) begin : g_knode
        if (j >= DIST) begin : g_plain
          mm_prefix_op u_op (
            .hi (g_klevel[m-1].row[j]),
            .lo (g_klevel[m-1].row[j-DIST]),
            .res(row[j])
          );
        end else begin : g_wrap
          mm_prefix_op_spp u_op (
            .hi (g_klevel[m-1].row[j]),
            .lo (g_klevel[m-1].row[j+B-DIST]),
            .nm (nm),
            .res(row[j])
          );
        end
      end
    end
  end

  assign cin[0] = nm & g_klevel[LB].row[B-1].g;
  for (genvar j = 1; j < B; j++) begin : g_cin
    assign cin[j] = g_klevel[LB].row[j-1].g;
  end

  assign dsh = {D[N-2:0], 1'b1};

  for (genvar j = 0; j < B; j++) begin : g_csb
    mm_csb #(.W(W)) u_csb (
      .g  (g[j*W +: W]),
      .h  (h[j*W +: W]),
      .dsh(dsh[j*W +: W]),
      .dim(dim),
      .cin(cin[j]),
      .s  (s[j*W +: W])
    );
  end

endmodule
