// tb_mm_csb: self-checking testbench of the modified carry-select block.
//
// Applies all 2^14 combinations of g, h, dsh (4 bits each), dim and cin to
// a 4-bit block. The expected sum is built as a ripple-carry adder: the
// carry into bit k is g | (h & carry) from the bit below, starting from
// cin, and each sum bit is the half-sum, complemented when dim and the
// matching dsh bit are both set, XOR the carry into that bit.
module tb_mm_csb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] g, h, dsh, s;
  logic       dim, cin;

  mm_csb #(.W(4)) dut (.g(g), .h(h), .dsh(dsh), .dim(dim), .cin(cin), .s(s));

  initial begin
    for (int v = 0; v < (1 << 14); v++) begin
      logic [3:0] exp;
      logic       c;
      {g, h, dsh, dim, cin} = 14'(v);
      #1;
      c = cin;
      for (int k = 0; k < 4; k++) begin
        exp[k] = h[k] ^ (dim & dsh[k]) ^ c;
        c = g[k] | (h[k] & c);
      end
      checks++;
      if (s !== exp) begin
        failures++;
        if (failures <= 10)
          $display("FAIL g=%b h=%b dsh=%b dim=%b cin=%b s=%b exp=%b", g, h, dsh, dim, cin, s, exp);
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
