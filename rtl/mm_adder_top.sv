// mm_adder_top: the two multi-moduli adder architectures side by side.
//
// Both units add two N-bit residues modulo 2^N, 2^N - 1 or (diminished-1)
// 2^N + 1, chosen per addition by the control bits nm and dim:
//   nm dim : 0 0 -> mod 2^N, 1 0 -> mod 2^N - 1, 1 1 -> dim-1 mod 2^N + 1
// The FPP unit (mm_adder_fpp) is the faster one, a full cyclic Kogge-Stone
// carry tree; the SPP unit (mm_adder_spp) is the smaller one, a sparse tree
// that computes only every W-th carry and finishes in carry-select blocks.
// They are two implementations of one function and are independent here,
// each with its own operands, controls and sum, so either can be used (or
// left unconnected and trimmed by synthesis).
//
// Timing: purely combinational, no clock and no state.
module mm_adder_top #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 4
) (
  input  logic [N-1:0] fpp_a,
  input  logic [N-1:0] fpp_b,
  input  logic         fpp_nm,
  input  logic         fpp_dim,
  output logic [N-1:0] fpp_s,
  input  logic [N-1:0] spp_a,
  input  logic [N-1:0] spp_b,
  input  logic         spp_nm,
  input  logic         spp_dim,
  output logic [N-1:0] spp_s
);

  mm_adder_fpp #(.N(N)) u_fpp (
    .a(fpp_a), .b(fpp_b), .nm(fpp_nm), .dim(fpp_dim), .s(fpp_s)
  );

  mm_adder_spp #(.N(N), .W(W)) u_spp (
    .a(spp_a), .b(spp_b), .nm(spp_nm), .dim(spp_dim), .s(spp_s)
  );

endmodule
