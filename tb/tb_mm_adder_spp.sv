// tb_mm_adder_spp: self-checking testbench of the SPP (sparse-4) multi-moduli adder.
//
// Instantiates the adder at every width the architecture was evaluated for
// (n = 4, 8, 16, 32, 64). The 4- and 8-bit instances are checked on every
// operand pair in each of the three modes; the wider ones on random pairs
// plus corner operands (all zeros, all ones, complements). Every sum is
// compared with mm_ref_pkg::ref_add, which uses integer arithmetic only.
// The adder is combinational, so each check samples the sum 1 time unit
// after the inputs change. A watchdog ends the run if it hangs.
module tb_mm_adder_spp;
  import mm_ref_pkg::*;

  localparam int NR = 20000;  // random pairs per mode for the wide widths

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        nm, dim;
  logic [63:0] a, b;
  logic [3:0]  s4;
  logic [7:0]  s8;
  logic [15:0] s16;
  logic [31:0] s32;
  logic [63:0] s64;

  mm_adder_spp #(.N(4))  u4  (.a(a[3:0]),  .b(b[3:0]),  .nm(nm), .dim(dim), .s(s4));
  mm_adder_spp #(.N(8))  u8  (.a(a[7:0]),  .b(b[7:0]),  .nm(nm), .dim(dim), .s(s8));
  mm_adder_spp #(.N(16)) u16 (.a(a[15:0]), .b(b[15:0]), .nm(nm), .dim(dim), .s(s16));
  mm_adder_spp #(.N(32)) u32 (.a(a[31:0]), .b(b[31:0]), .nm(nm), .dim(dim), .s(s32));
  mm_adder_spp #(.N(64)) u64 (.a(a),        .b(b),        .nm(nm), .dim(dim), .s(s64));

  task automatic check_one(int n, logic [63:0] got);
    logic [63:0] exp;
    exp = ref_add(n, a, b, nm, dim);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL n=%0d nm=%0b dim=%0b a=%h b=%h got=%h exp=%h",
                 n, nm, dim, a, b, got, exp);
    end
  endtask

  task automatic check_all(logic wide_only);
    #1;
    if (!wide_only) begin
      check_one(4, 64'(s4));
      check_one(8, 64'(s8));
    end
    check_one(16, 64'(s16));
    check_one(32, 64'(s32));
    check_one(64, s64);
  endtask

  initial begin
    // Cross-check the reference's diminished-1 rule against plain values.
    for (int i = 0; i < 256; i++) begin
      logic [63:0] x, y;
      x = 64'(i % 16); y = 64'(i / 16);
      checks++;
      if (ref_add(4, x, y, 1'b1, 1'b1) !== dim1_by_value(4, x, y)) failures++;
    end

    for (int m = 0; m < 3; m++) begin
      nm  = (m != 0);
      dim = (m == 2);
      // exhaustive for 4 and 8 bits
      for (int i = 0; i < 65536; i++) begin
        a = 64'(i & 255) | ({$urandom, $urandom} & ~64'hff);
        b = 64'(i >> 8)  | ({$urandom, $urandom} & ~64'hff);
        #1;
        check_one(8, 64'(s8));
        if (i < 256) begin
          a = 64'(i & 15) | (a & ~64'hf);
          b = 64'(i >> 4) | (b & ~64'hf);
          #1;
          check_one(4, 64'(s4));
        end
      end
      // corners for the wide widths
      for (int k = 0; k < 4; k++) begin
        a = (k[0]) ? '1 : '0;
        b = (k[1]) ? '1 : '0;
        check_all(1'b0);
        a = {$urandom, $urandom};
        b = ~a;
        check_all(1'b0);
      end
      // random
      for (int i = 0; i < NR; i++) begin
        a = {$urandom, $urandom};
        b = {$urandom, $urandom};
        check_all(1'b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
