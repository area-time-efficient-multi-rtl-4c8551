// tb_mm_prefix_op_fpp: self-checking testbench of the FPP modified prefix operator.
//
// Applies every combination of the node's inputs and compares the outputs
// with the expected group generate and propagate: with nm = 1 the plain operator; with nm = 0 the fed-back generate is dropped (gn = g) and pn = p & p'.
// The expected values come from the meaning of the pairs (a group
// generates a carry if its upper part generates one, or propagates one
// that its lower part generates), written with if/else, not with the
// node's gate equation.
module tb_mm_prefix_op_fpp;
  import mm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  gp_t  hi, lo, res;
  logic nm;

  mm_prefix_op_fpp dut (.hi(hi), .lo(lo), .nm(nm), .res(res));

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic eg, ep, use_lo;
      {nm, hi.g, hi.p, lo.g, lo.p} = 5'(v);
      #1;
      use_lo = ("fpp" == "plain") ? 1'b1 : nm;
      if (hi.g) eg = 1'b1;
      else if (hi.p && use_lo) eg = lo.g;
      else eg = 1'b0;
      if ("fpp" == "spp" && !nm) ep = hi.p;
      else ep = hi.p ? lo.p : 1'b0;
      checks++;
      if (res.g !== eg || res.p !== ep) begin
        failures++;
        $display("FAIL nm=%0b hi=%b lo=%b res=%b exp=%b%b", nm, hi, lo, res, eg, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
