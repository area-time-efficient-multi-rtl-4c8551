// mm_dprefix: the D-signal unit of the multi-moduli adders.
//
// Computes every prefix AND of the half-sum bits, D[i] = D_{i:0} =
// h_i & h_{i-1} & ... & h_0, for 0 <= i < N. A diminished-1 modulo 2^n + 1
// carry equals the modulo 2^n - 1 carry of the same position XOR-ed with
// D_{i:0}, so these bits are what turns the modulo 2^n - 1 adder into a
// diminished-1 one.
//
// Structure: a Ladner-Fischer prefix tree of two-input AND gates with
// log2(N) levels. At level k every position whose bit k is set takes the
// AND of its own value and the value at the top of the adjacent lower
// 2^k-bit group. With the exclusive-OR propagate definition these ANDs are
// the same functions as the group propagate terms of a prefix carry tree,
// so a synthesis tool may share them.
//
// The adders only need D_{i:0} up to i = n-2 for an n-bit word, so they
// instantiate this unit on their n-1 low half-sum bits.
//
// Interface: h in, D out, both N bits; any N >= 1 works.
// Timing: purely combinational, ceil(log2(N)) AND levels.
module mm_dprefix #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] h,
  output logic [N-1:0] D
);

  localparam int unsigned L = $clog2(N);

  logic [N-1:0] lvl [L+1];

  assign lvl[0] = h;

  for (genvar k = 0; k < L; k++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (((i >> k) & 1) == 1) begin : g_and
        assign lvl[k+1][i] = lvl[k][i] & lvl[k][((i >> k) << k) - 1];
      end else begin : g_pass
        assign lvl[k+1][i] = lvl[k][i];
      end
    end
  end

  assign D = lvl[L];

endmodule
