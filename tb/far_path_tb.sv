// far_path_tb: checks the far path (effective addition, or subtraction with
// an exponent difference above 2). The testbench aligns two random doubles
// itself, presents the larger-or-smaller X operand as a random carry-save
// split (S, C and a rounding-constant term), and compares the rounded
// result and inexact flag with the reference IEEE add in all four modes.
module far_path_tb;
  import snap_pkg::*;
  import fp_ref_pkg::*;
  logic [WIN_W-1:0] xs_al, xc_al, xr_al, y_al;
  logic eff_sub, x_small, sign, inexact;
  rmode_e rm;
  logic signed [XE_W-1:0] eref, exp;
  logic [SIG_W-1:0] sig;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_sub = 0, n_add = 0, n_tiny = 0;

  far_path dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIN_W-1:0] rnd_below(logic [WIN_W-1:0] lim);
    logic [WIN_W-1:0] r = {$urandom, $urandom, $urandom, $urandom};
    return r % (lim + 1);
  endfunction

  initial begin
    logic [63:0] cx, dx;
    logic [WIN_W-1:0] xw, yw, rest;
    int ex, ey, dd;
    ref_t r;
    for (int i = 0; i < 20000; i++) begin
      cx = rand_fp(1023, 3);
      dx = rand_fp(1023, (i % 3 == 0) ? 80 : 8);
      ex = int'(dx[62:52]); ey = int'(cx[62:52]); dd = ex - ey;
      if (cx[63] != dx[63] && dd <= 2 && dd >= -2) dx[63] = cx[63];
      rm = rmode_e'($urandom_range(3));
      xw = WIN_W'({1'b1, dx[51:0]}) << WIN_LSB;
      yw = WIN_W'({1'b1, cx[51:0]}) << WIN_LSB;
      if (dd >= 57)       yw = 1;
      else if (dd >= 0)   yw = yw >> dd;
      else if (-dd >= 57) xw = 1;
      else                xw = xw >> -dd;
      if (dd >= 57 || -dd >= 57) n_tiny++;
      xr_al = ($urandom_range(1) && xw != 0) ? (xw & -xw) : '0;
      rest  = xw - xr_al;
      xs_al = rnd_below(rest);
      xc_al = rest - xs_al;
      y_al  = yw;
      eff_sub = cx[63] ^ dx[63];
      x_small = dd < 0;
      sign    = (dd >= 0) ? dx[63] : cx[63];
      eref    = XE_W'((dd >= 0) ? ex : ey);
      @(posedge clk);
      r = ref_add(cx, dx, int'(rm));
      checks++;
      if ({sign, exp[EXP_W-1:0], sig[FRAC_W-1:0]} !== r.res || !sig[52] || inexact !== r.flags[0]) begin
        failures++;
        if (failures < 5) $display("mismatch c=%h d=%h rm=%0d got %h exp %h", cx, dx, rm,
                                   {sign, exp[EXP_W-1:0], sig[FRAC_W-1:0]}, r.res);
      end
      if (eff_sub) n_sub++; else n_add++;
    end
    $display("sub %0d add %0d sticky-only %0d", n_sub, n_add, n_tiny);
    if (n_sub == 0 || n_add == 0 || n_tiny == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
