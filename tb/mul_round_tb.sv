// mul_round_tb: checks the multiplier-side addition and rounding. S and C
// are a random split of the exact product of two random significands; the
// rounded significand, exponent increment and inexact flag are compared with
// the reference rounding, and r_Mul must satisfy
//   (S and C cleared below the ULP) + r_Mul * ULP = rounded product.
module mul_round_tb;
  import snap_pkg::*;
  import fp_ref_pkg::*;
  logic [PROD_W-1:0] s, c;
  logic sign, ovf, inexact;
  rmode_e rm;
  logic [SIG_W-1:0] sig_r;
  logic [1:0] exp_inc, rmul;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_ovf = 0, n_carry = 0, n_rmul2 = 0;

  mul_round dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SIG_W-1:0] ma, mb;
    logic [PROD_W-1:0] p, msk, ulp;
    logic [PROD_W+1:0] lhs, rhs;
    ref_t r;
    for (int i = 0; i < 20000; i++) begin
      ma = {1'b1, 20'($urandom), 32'($urandom)};
      mb = {1'b1, 20'($urandom), 32'($urandom)};
      if (i % 50 == 0) begin ma = '1; mb = '1; end
      if (i % 50 == 1) begin mb = {1'b1, 52'd0}; end
      // Rounds up to exactly 2.0 in RNE (guard set): carry into the exponent.
      if (i % 50 == 2) begin ma = 53'h1F_FFFF_FFFF_FFFE; mb = 53'h10_0000_0000_0001; end
      p  = PROD_W'(ma) * PROD_W'(mb);
      msk = {$urandom, $urandom, $urandom, $urandom};
      s  = msk % (p + 1);
      c  = p - s;
      sign = 1'($urandom);
      rm = rmode_e'($urandom_range(3));
      @(posedge clk);
      r = round_pack(sign, 256'(p), -104, int'(rm));
      checks++;
      if (sig_r[51:0] !== r.res[51:0] || !sig_r[52] ||
          int'(exp_inc) !== int'(r.res[62:52]) - 1023 || inexact !== r.flags[0]) begin
        failures++;
        if (failures < 5) $display("round mismatch ma=%h mb=%h rm=%0d", ma, mb, rm);
      end
      ulp = ovf ? (PROD_W'(1) << 53) : (PROD_W'(1) << 52);
      lhs = (PROD_W+2)'(s & ~(ulp - 1)) + (PROD_W+2)'(c & ~(ulp - 1)) + (PROD_W+2)'(ulp) * rmul;
      rhs = (PROD_W+2)'(sig_r) << (52 + exp_inc);
      checks++;
      if (lhs !== rhs || ovf !== p[PROD_W-1]) begin
        failures++;
        if (failures < 5) $display("r_Mul mismatch ma=%h mb=%h", ma, mb);
      end
      if (ovf) n_ovf++;
      if (exp_inc == 2 || (exp_inc == 1 && !ovf)) n_carry++;
      if (rmul == 2) n_rmul2++;
    end
    $display("ovf %0d round-carry %0d rmul=2 %0d", n_ovf, n_carry, n_rmul2);
    if (n_ovf == 0 || n_carry == 0 || n_rmul2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
