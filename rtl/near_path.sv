// near_path: adder side for effective subtraction with an exponent
// difference of at most 2 (alignment cases 3 and 5).
//
// Alignment is a 3-1 multiplexer: the operand with the smaller exponent is
// shifted right by 0, 1 or 2 bits. A 4-input carry-save step sums the
// product's S and C (cleared below its ULP), the rounding constant r_Mul
// and the complemented c, so no rounded product is needed first. The
// compound adder returns X-Y-1 and X-Y; the sign of X-Y picks either X-Y or
// ~(X-Y-1) = Y-X, giving the magnitude without a comparator. In parallel
// the LOP predicts the leading digit; the normalization left shift uses the
// prediction and a final shift of 0..3 bits corrects it. Large cancellation
// leaves an exact result; small cancellation is rounded by round_select.
// The window has one more bit than WIN_W for the sign. The 3-1 alignment
// multiplexer, compound adder and LOP follow the SNAP organization; the
// rounding step after the shift is this design's simplification.
// Combinational.
module near_path
  import snap_pkg::*;
(
  input  logic [XT_W-1:0]        xs,
  input  logic [XT_W-1:0]        xc,
  input  logic [1:0]             xr,
  input  logic                   x_ulp_hi,
  input  logic [SIG_W-1:0]       y,
  input  logic signed [XE_W-1:0] diff,     // ex - ey, -2..2
  input  logic                   sx,
  input  logic                   sy,
  input  rmode_e                 rm,
  input  logic signed [XE_W-1:0] eref,
  output logic [SIG_W-1:0]       sig,
  output logic signed [XE_W-1:0] exp,
  output logic                   sign,
  output logic                   zero,
  output logic                   inexact
);
  localparam int unsigned W  = WIN_W + 1;
  localparam int unsigned PW = $clog2(W);

  logic [W-1:0] ulp, mask, xs_w, xc_w, xr_w, y_w, ps, pc, r0, r1;
  logic [WIN_W-1:0] mag, n0, n;
  logic [1:0]   shx, shy;
  logic [PW-1:0] pos;
  logic         none, neg, guard, sticky, carry;
  logic [6:0]   sh0, sh1;
  logic [SIG_W-1:0] sig_r;

  always_comb begin
    shx  = (diff < 0) ? 2'(-diff) : 2'd0;
    shy  = (diff > 0) ? 2'(diff)  : 2'd0;
    ulp  = W'(1) << (x_ulp_hi ? WIN_LSB + 1 : WIN_LSB);
    mask = ~(ulp - W'(1));
    // 3-1 multiplexers for the alignment by 0, 1 or 2 bits.
    xs_w = ((W'(xs) << WIN_LSB) & mask) >> shx;
    xc_w = ((W'(xc) << WIN_LSB) & mask) >> shx;
    xr_w = (ulp * W'(xr)) >> shx;
    y_w  = ~((W'(y) << WIN_LSB) >> shy);
  end

  csa42 #(.W(W)) u_csa (.w(xs_w), .x(xc_w), .y(xr_w), .z(y_w), .s(ps), .c(pc));

  compound_adder #(.W(W)) u_add (
    .a(ps), .b(pc), .sum0(r0), .sum1(r1), .cout0(), .cout1()
  );

  lop #(.W(W)) u_lop (.a(ps), .b(pc), .pos(pos), .none(none));

  always_comb begin
    neg  = r1[W-1];
    mag  = neg ? WIN_W'(~r0) : WIN_W'(r1);
    sign = neg ? sy : sx;
    zero = mag == '0;
    // Coarse shift from the prediction, placing the predicted leading
    // digit two positions below the top. The true leading one of the
    // magnitude is at most one position above or below the prediction
    // (LOP error, and X-Y versus X-Y-1), so it lands one to three
    // positions below the top and the fine shift finishes the job.
    if (none || 32'(pos) + 2 >= WIN_W - 1) sh0 = '0;
    else                                  sh0 = 7'(WIN_W - 3 - 32'(pos));
    n0 = mag << sh0;
    // Fine correction.
    if      (n0[WIN_W-1]) sh1 = 7'd0;
    else if (n0[WIN_W-2]) sh1 = 7'd1;
    else if (n0[WIN_W-3]) sh1 = 7'd2;
    else                  sh1 = 7'd3;
    n      = n0 << sh1;
    guard  = n[WIN_W-1-SIG_W];
    sticky = |n[WIN_W-2-SIG_W:0];
  end

  round_select u_round (
    .sig(n[WIN_W-1 -: SIG_W]), .guard(guard), .sticky(sticky), .sign(sign),
    .rm(rm), .sig_r(sig_r), .carry(carry), .inexact(inexact), .inc()
  );

  always_comb begin
    sig = sig_r;
    exp = eref + 2 - XE_W'(sh0) - XE_W'(sh1) + XE_W'(carry);
  end
endmodule
