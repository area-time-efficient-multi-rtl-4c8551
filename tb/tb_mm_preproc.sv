// tb_mm_preproc: self-checking testbench of the pre-processing stage.
//
// Drives random and corner 16-bit operand pairs and checks that g is the
// bitwise AND and h the bitwise XOR of the operands, computed here bit by
// bit from the truth table of a half adder (g = carry, h = sum).
module tb_mm_preproc;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b, g, h;

  mm_preproc #(.N(16)) dut (.a(a), .b(b), .g(g), .h(h));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = (i < 4) ? {16{i[0]}} : 16'($urandom);
      b = (i < 4) ? {16{i[1]}} : 16'($urandom);
      #1;
      for (int k = 0; k < 16; k++) begin
        logic [1:0] ha;
        ha = 2'(a[k]) + 2'(b[k]);  // half-adder: {carry, sum}
        checks++;
        if (g[k] !== ha[1] || h[k] !== ha[0]) begin
          failures++;
          if (failures <= 10) $display("FAIL a=%h b=%h bit %0d", a, b, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
