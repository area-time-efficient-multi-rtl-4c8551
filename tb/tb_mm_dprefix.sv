// tb_mm_dprefix: self-checking testbench of the D-signal (prefix AND) unit.
//
// Checks a 16-bit instance (the default) and a 15-bit one (the width the
// 16-bit adders use) on every input that has a run of ones at the bottom
// of any length followed by random bits, plus random inputs. The expected
// D_{i:0} is 1 exactly when bits i..0 of h are all ones, found by counting
// the trailing ones of h.
module tb_mm_dprefix;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] h, d16;
  logic [14:0] d15;

  mm_dprefix            u16 (.h(h),        .D(d16));
  mm_dprefix #(.N(15))  u15 (.h(h[14:0]),  .D(d15));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ones;
      if (t < 17 * 20) begin
        int run;
        run = t % 17;
        h = 16'($urandom);
        h = (run == 16) ? 16'hffff : ((h & ~((16'd1 << (run + 1)) - 16'd1)) | ((16'd1 << run) - 16'd1));
      end else h = 16'($urandom) | 16'($urandom);
      #1;
      ones = 0;
      while (ones < 16 && h[ones]) ones++;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (d16[i] !== (i < ones)) begin
          failures++;
          if (failures <= 10) $display("FAIL N=16 h=%h D[%0d]=%b", h, i, d16[i]);
        end
        if (i < 15) begin
          checks++;
          if (d15[i] !== (i < ones)) begin
            failures++;
            if (failures <= 10) $display("FAIL N=15 h=%h D[%0d]=%b", h, i, d15[i]);
          end
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
