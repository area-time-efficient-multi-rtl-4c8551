// mm_preproc: pre-processing stage of the multi-moduli adders.
//
// For every bit position i it forms the carry-generate bit g_i = a_i & b_i
// and the half-sum bit h_i = a_i ^ b_i. The adders use the exclusive-OR
// carry-propagate definition, so the half-sum bit doubles as the propagate
// bit (p_i = h_i) and no OR gate per bit is needed.
//
// Interface: a, b are the N-bit operands; g and h are N bits wide.
// Timing: purely combinational, one gate level.
module mm_preproc #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] h
);

  always_comb begin
    g = a & b;
    h = a ^ b;
  end

endmodule
