// far_path: adder side for effective addition and for effective
// subtraction with an exponent difference above 2 (alignment cases 1, 2, 4, 6).
//
// The 4-2 CSA sums the aligned S, C, c and the rounding constant. For a
// subtraction the subtrahend's vectors are complemented; the compound adder
// supplies the +1 of the two's complement through its sum1 output, and a
// carry-save X subtrahend needs one more, which the constant term absorbs
// (-(s+c+r) = ~s + ~c + (1-r) + 1). With the larger operand known in this
// path the result is positive and lies in [0.5, 8) times 1.0 at REF_BIT, so
// normalization is a four-way choice of the leading bit; then round_select
// rounds to 53 bits. The 4-2 CSA and compound adder follow the SNAP
// organization; rounding after the normalization choice, rather than by
// pre-computed rounding outcomes, is this design's simplification.
// Combinational.
module far_path
  import snap_pkg::*;
(
  input  logic [WIN_W-1:0]       xs_al,
  input  logic [WIN_W-1:0]       xc_al,
  input  logic [WIN_W-1:0]       xr_al,
  input  logic [WIN_W-1:0]       y_al,
  input  logic                   eff_sub,
  input  logic                   x_small,   // X is the subtrahend
  input  logic                   sign,      // sign of the result
  input  rmode_e                 rm,
  input  logic signed [XE_W-1:0] eref,
  output logic [SIG_W-1:0]       sig,
  output logic signed [XE_W-1:0] exp,
  output logic                   inexact
);
  logic [WIN_W-1:0] t0, t1, t2, t3, ps, pc, r0, r1, r;
  logic [SIG_W-1:0] sig_t, sig_r;
  logic             guard, sticky, carry;
  logic signed [XE_W-1:0] e_n;

  always_comb begin
    t0 = xs_al; t1 = xc_al; t2 = y_al; t3 = xr_al;
    if (eff_sub && x_small) begin
      t0 = ~xs_al;
      t1 = ~xc_al;
      t3 = WIN_W'(1) - xr_al;
    end else if (eff_sub) begin
      t2 = ~y_al;
    end
  end

  csa42 #(.W(WIN_W)) u_csa42 (.w(t0), .x(t1), .y(t2), .z(t3), .s(ps), .c(pc));

  compound_adder #(.W(WIN_W)) u_add (
    .a(ps), .b(pc), .sum0(r0), .sum1(r1), .cout0(), .cout1()
  );

  always_comb begin
    r   = eff_sub ? r1 : r0;
    if (r[WIN_W-1]) begin
      sig_t = r[WIN_W-1 -: SIG_W];   guard = r[WIN_W-1-SIG_W];
      sticky = |r[WIN_W-2-SIG_W:0];  e_n = eref + 2;
    end else if (r[WIN_W-2]) begin
      sig_t = r[WIN_W-2 -: SIG_W];   guard = r[WIN_W-2-SIG_W];
      sticky = |r[WIN_W-3-SIG_W:0];  e_n = eref + 1;
    end else if (r[WIN_W-3]) begin
      sig_t = r[WIN_W-3 -: SIG_W];   guard = r[WIN_W-3-SIG_W];
      sticky = |r[WIN_W-4-SIG_W:0];  e_n = eref;
    end else begin
      sig_t = r[WIN_W-4 -: SIG_W];   guard = r[WIN_W-4-SIG_W];
      sticky = |r[WIN_W-5-SIG_W:0];  e_n = eref - 1;
    end
  end

  round_select u_round (
    .sig(sig_t), .guard(guard), .sticky(sticky), .sign(sign), .rm(rm),
    .sig_r(sig_r), .carry(carry), .inexact(inexact), .inc()
  );

  always_comb begin
    sig = sig_r;
    exp = e_n + XE_W'(carry);
  end
endmodule
