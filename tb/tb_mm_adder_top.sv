// tb_mm_adder_top: end-to-end testbench of the multi-moduli adder pair at
// its default size (16-bit operands, 4-bit carry-select blocks).
//
// Both units get the same operands and mode in each step; their sums are
// compared with the integer reference of mm_ref_pkg and with each other.
// Operands are directed corners, random pairs and pairs built to hit each
// mechanism of the architecture. The testbench counts how often each of
// these happened and counts a failure for any that never did:
//   - each of the three moduli (2^n, 2^n - 1, diminished-1 2^n + 1);
//   - an end-around carry taken (modulo 2^n - 1 with a carry out);
//   - a wrapped generate dropped by the modified nodes (modulo 2^n with a
//     carry out);
//   - the all-ones form of zero (modulo 2^n - 1, a + b = 2^n - 1);
//   - an inverted carry re-entering (diminished-1 with no carry out);
//   - a diminished-1 correction past bit 0 (D_{0:0} = 1, so the half-sum of
//     bit 1 is complemented);
//   - a carry of 1 into a carry-select block above the lowest one.
// Each addition is one combinational step; a watchdog ends a hung run.
module tb_mm_adder_top;
  import mm_pkg::*;
  import mm_ref_pkg::*;

  localparam int N = 16;

  int checks = 0, failures = 0;
  int n_pow2 = 0, n_minus = 0, n_dim1 = 0, n_eac = 0, n_drop = 0;
  int n_zero1s = 0, n_invc = 0, n_dcorr = 0, n_blkc = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b, s_fpp, s_spp;
  logic         nm, dim;

  mm_adder_top dut (
    .fpp_a(a), .fpp_b(b), .fpp_nm(nm), .fpp_dim(dim), .fpp_s(s_fpp),
    .spp_a(a), .spp_b(b), .spp_nm(nm), .spp_dim(dim), .spp_s(s_spp)
  );

  task automatic step(logic [N-1:0] x, logic [N-1:0] y, int mode);
    logic [63:0] exp;
    logic [N:0]  sum;
    mm_mode_e m;
    m = (mode == 0) ? MODE_POW2 : (mode == 1) ? MODE_MINUS : MODE_DIM1;
    a = x; b = y;
    {nm, dim} = m;
    #1;
    exp = ref_add(N, 64'(x), 64'(y), nm, dim);
    sum = {1'b0, x} + {1'b0, y};
    checks += 2;
    if (s_fpp !== exp[N-1:0]) begin
      failures++;
      if (failures <= 10) $display("FAIL fpp mode=%0d a=%h b=%h s=%h exp=%h", mode, x, y, s_fpp, exp[N-1:0]);
    end
    if (s_spp !== exp[N-1:0]) begin
      failures++;
      if (failures <= 10) $display("FAIL spp mode=%0d a=%h b=%h s=%h exp=%h", mode, x, y, s_spp, exp[N-1:0]);
    end
    case (mode)
      0: n_pow2++;
      1: n_minus++;
      default: n_dim1++;
    endcase
    if (mode == 1 && sum[N]) n_eac++;
    if (mode == 0 && sum[N]) n_drop++;
    if (mode == 1 && sum == (N+1)'((1 << N) - 1)) n_zero1s++;
    if (mode == 2 && !sum[N]) n_invc++;
    if (mode == 2 && (x[0] ^ y[0])) n_dcorr++;
    // carry into bit 4, 8 or 12 of the plain sum (block boundaries)
    if (((x[3:0] + y[3:0]) >> 4) != 0 || ((x[7:0] + y[7:0]) >> 8) != 0
        || ((x[11:0] + y[11:0]) >> 12) != 0) n_blkc++;
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s : %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int mode = 0; mode < 3; mode++) begin
      step('0, '0, mode);
      step('1, '1, mode);
      step('1, 16'd1, mode);
      step(16'h5555, 16'haaaa, mode);   // a + b = 2^n - 1
      step(16'h8000, 16'h8000, mode);
      step(16'h0001, 16'h0000, mode);
      for (int i = 0; i < 20000; i++) begin
        logic [N-1:0] x;
        x = 16'($urandom);
        step(x, 16'($urandom), mode);
        step(x, ~x ^ (16'd1 << ($urandom % N)), mode);  // long propagate chains
      end
    end
    need("modulo 2^n", n_pow2);
    need("modulo 2^n - 1", n_minus);
    need("diminished-1 modulo 2^n + 1", n_dim1);
    need("end-around carry taken", n_eac);
    need("wrapped generate dropped", n_drop);
    need("all-ones zero", n_zero1s);
    need("inverted carry re-entering", n_invc);
    need("diminished-1 correction", n_dcorr);
    need("carry into upper CSB", n_blkc);
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
