// near_path_tb: checks the near path (effective subtraction, exponent
// difference -2..2). X is a random double given as a random carry-save split
// S + C + r_Mul*ULP, with the ULP at bit 0 or bit 1 and junk below the ULP
// that the rounding mask must clear; Y is a random double. The rounded
// difference, exact-zero and inexact outputs are compared with the
// reference IEEE add. Heavy cancellation is provoked on purpose.
module near_path_tb;
  import snap_pkg::*;
  import fp_ref_pkg::*;
  logic [XT_W-1:0] xs, xc;
  logic [1:0] xr;
  logic x_ulp_hi, sx, sy, sign, zero, inexact;
  logic [SIG_W-1:0] y, sig;
  logic signed [XE_W-1:0] diff, eref, exp;
  rmode_e rm;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_zero = 0, n_deep = 0, n_round = 0;

  near_path dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] cx, dx;
    logic [XT_W-1:0] xv, rest, half;
    int ex, dd, u;
    ref_t r;
    for (int i = 0; i < 20000; i++) begin
      dx = rand_fp(1023, 3);
      dd = int'($urandom_range(4)) - 2;
      x_ulp_hi = 1'($urandom);
      // Reference exponent of X: bit 52 of xs is 1.0.
      ex = int'(dx[62:52]) - (x_ulp_hi ? 1 : 0);
      cx = {~dx[63], 11'(ex - dd), 20'($urandom), 32'($urandom)};
      if (i % 4 == 0) cx[51:0] = dx[51:0] ^ 52'($urandom_range(15));   // cancellation
      rm = rmode_e'($urandom_range(3));
      u  = x_ulp_hi ? 1 : 0;
      xv = XT_W'({1'b1, dx[51:0]}) << u;
      xr = 2'($urandom_range(2));
      if ((XT_W'(xr) << u) > xv) xr = 0;
      rest = xv - (XT_W'(xr) << u);
      half = XT_W'({$urandom, $urandom}) % ((rest >> u) + 1);
      xs = (half << u) | XT_W'(x_ulp_hi & 1'($urandom));
      xc = (rest - (half << u)) | XT_W'(x_ulp_hi & 1'($urandom));
      y  = {1'b1, cx[51:0]};
      diff = XE_W'(dd);
      sx = dx[63]; sy = cx[63];
      eref = XE_W'((dd >= 0) ? ex : ex - dd);
      @(posedge clk);
      r = ref_add(cx, dx, int'(rm));
      checks++;
      if (r.res[62:0] == 0) begin
        n_zero++;
        if (!zero) failures++;
      end else if (zero || {sign, exp[EXP_W-1:0], sig[FRAC_W-1:0]} !== r.res || !sig[52]
                   || inexact !== r.flags[0]) begin
        failures++;
        if (failures < 5) $display("mismatch c=%h d=%h ulp_hi=%b rm=%0d got %h exp %h", cx, dx,
                                   x_ulp_hi, rm, {sign, exp[EXP_W-1:0], sig[FRAC_W-1:0]}, r.res);
      end
      if (!zero && int'(exp) < int'(eref) - 10) n_deep++;
      if (r.flags[0]) n_round++;
    end
    $display("zero %0d deep-cancel %0d rounded %0d", n_zero, n_deep, n_round);
    if (n_zero == 0 || n_deep == 0 || n_round == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
