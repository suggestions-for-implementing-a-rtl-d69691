// special_case_tb: checks the special-operand logic. Operands mix NaNs,
// infinities, zeros, denormals and normal numbers whose product overflows
// or underflows; the product inputs are computed by the testbench. Whenever
// the result is decided here it must equal the reference IEEE result and
// flags; otherwise the block must hand over to the datapath, asking for the
// largest-finite product operand exactly when the reference needs it.
module special_case_tb;
  import snap_pkg::*;
  import fp_ref_pkg::*;
  op_e op;
  fp64_t a, b, c, d;
  logic sub;
  rmode_e rm;
  logic signed [XE_W-1:0] prod_exp;
  logic [SIG_W-1:0] prod_sig;
  logic prod_inexact, is_special, x_maxfin;
  logic [63:0] res;
  fflags_t flags, pflags;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_spec = 0, n_pass = 0, n_maxfin = 0;

  special_case dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] specials [7] = '{
    64'h0000_0000_0000_0000, 64'h8000_0000_0000_0000, 64'h7FF0_0000_0000_0000,
    64'hFFF0_0000_0000_0000, 64'h7FF8_0000_0000_0001, 64'h7FF0_0000_0000_0001,
    64'h8000_0000_0000_0777};

  function automatic logic [63:0] opnd(int e0);
    return $urandom_range(2) == 0 ? specials[$urandom_range(6)] : rand_fp(e0, 20);
  endfunction

  initial begin
    ref_t r, p;
    int e0, ea, eb;
    logic exp_special, normal_ab, exp_maxfin;
    for (int i = 0; i < 20000; i++) begin
      op  = op_e'($urandom_range(2));
      sub = 1'($urandom);
      rm  = rmode_e'($urandom_range(3));
      e0  = (i % 3 == 0) ? 1023 : ((i % 3 == 1) ? 1545 : 500);
      a = opnd(e0); b = opnd(e0); c = opnd(1023); d = opnd(1023);
      normal_ab = !f_zero(a) && !f_zero(b) && a.exp != '1 && b.exp != '1;
      ea = int'(a.exp); eb = int'(b.exp);
      p = round_pack(a.sign ^ b.sign, 256'({1'b1, a.frac}) * 256'({1'b1, b.frac}), -104, int'(rm));
      prod_exp     = XE_W'(ea + eb - 1023 + int'(p.res[62:52]) - 1023);
      prod_sig     = {1'b1, p.res[51:0]};
      prod_inexact = p.flags[0];
      @(posedge clk);
      r = ref_op(int'(op), sub, int'(rm), a, b, c, d);
      exp_maxfin = 1'b0;
      if (op == OP_FADD)
        exp_special = f_zero(c) || f_zero(d) || c.exp == '1 || d.exp == '1;
      else if (op == OP_FMPY)
        exp_special = !normal_ab;
      else begin
        exp_special = !normal_ab || f_zero(c) || c.exp == '1 || prod_exp <= 0;
        if (!exp_special && prod_exp >= 2047) begin
          exp_maxfin  = !overflow_to_inf(rm, a.sign ^ b.sign);
          exp_special = !exp_maxfin;
        end
      end
      checks++;
      if (is_special !== exp_special || x_maxfin !== exp_maxfin) begin
        failures++;
        if (failures < 5) $display("decision mismatch op=%0d a=%h b=%h c=%h d=%h", op, a, b, c, d);
      end else if (exp_special) begin
        checks++;
        n_spec++;
        if (res !== r.res || flags !== r.flags) begin
          failures++;
          if (failures < 5) $display("mismatch op=%0d a=%h b=%h c=%h d=%h got %h/%b exp %h/%b",
                                     op, a, b, c, d, res, flags, r.res, r.flags);
        end
      end else begin
        n_pass++;
        if (exp_maxfin) n_maxfin++;
        checks++;
        if (op == OP_FMAF && pflags.inexact !== (prod_inexact | exp_maxfin)) failures++;
      end
    end
    $display("special %0d datapath %0d maxfinite product %0d", n_spec, n_pass, n_maxfin);
    if (n_spec == 0 || n_pass == 0 || n_maxfin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
