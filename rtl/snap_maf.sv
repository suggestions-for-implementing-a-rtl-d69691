// snap_maf: partially overlapped (SNAP-style) IEEE multiply-add-fused unit.
//
// Executes, in IEEE double precision,
//   OP_FMAF: a*b + c  (a*b - c with sub)   rounded as an FMPY then an FADD,
//   OP_FADD: c + d    (c - d with sub),
//   OP_FMPY: a*b.
// The multiplier side (Wallace tree, compound adder, rounding) works while
// the adder side already aligns: instead of waiting for the rounded
// product, the adder side takes the Wallace tree's S and C, cleared below
// the product's ULP, plus the rounding constant r_Mul from the multiplier
// rounding logic. The exponent difference between Ea+Eb-bias and Ec picks
// one of six alignment cases (1: add, X exponent larger; 2: add, c's
// exponent at least as large; 3/5: subtract, X or c larger by at most 2;
// 4/6: subtract, X or c larger by more than 2):
//   far path  (effective addition, or subtraction with |diff| > 2): two
//             right shifters (S or d, C or c), a 4-2 CSA and a compound adder;
//   near path (subtraction with |diff| <= 2): 0..2-bit multiplexer shift,
//             compound adder for |X-c|, LOP-driven left shift.
// For FADD the same shifters carry d and c instead of S and C.
// As in the published SNAP proposal, the fused result equals the IEEE sum
// of the rounded product and c, so it matches a separate multiply and add
// bit for bit; overflow, zeros and NaNs behave as in the two separate IEEE
// operations. Denormal handling (flush to zero), the encodings, and the
// single output register are this design's own choices.
//
// Interface: the operation is taken when in_valid is high; result, flags
// (invalid, overflow, underflow, inexact), path_case (alignment case 1..6, 0 for
// FMPY and special operands) and near_used appear with out_valid one clock
// later. One operation per clock; the datapath itself is combinational
// between the input and the output register. Reset is active low.
module snap_maf
  import snap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  op_e         op,
  input  logic        sub,
  input  rmode_e      rm,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic [63:0] c,
  input  logic [63:0] d,
  output logic        out_valid,
  output logic [63:0] result,
  output fflags_t     flags,
  output logic [2:0]  path_case,
  output logic        near_used
);
  fp64_t fa, fb, fc, fd;

  // Multiplier side.
  logic [PROD_W-1:0]      ps, pc;
  logic                   sp, povf, pinexact;
  logic [SIG_W-1:0]       psig;
  logic [1:0]             pexp_inc, rmul;
  logic signed [XE_W-1:0] eab, pexp;

  // Special cases.
  logic                   is_special, x_maxfin;
  logic [63:0]            spec_res;
  fflags_t                spec_flags, pflags;

  // Adder side operands: X = product (carry-save) or d, Y = c.
  logic [XT_W-1:0]        xs, xc;
  logic [1:0]             xr;
  logic                   x_ulp_hi, sx, sy, eff_sub;
  logic [SIG_W-1:0]       ysig;
  logic signed [XE_W-1:0] ex, ey, eref, diff;
  logic [SH_W-1:0]        shx, shy;
  logic                   x_tiny, y_tiny, near;
  logic [2:0]             pcase;
  logic [WIN_W-1:0]       xs_al, xc_al, xr_al, y_al;

  logic [SIG_W-1:0]       far_sig, near_sig;
  logic signed [XE_W-1:0] far_exp, near_exp;
  logic                   far_inexact, near_inexact, near_sign, near_zero, far_sign;

  src_e                   src;
  logic [63:0]            res_d;
  fflags_t                flags_d;

  assign fa = a;
  assign fb = b;
  assign fc = c;
  assign fd = d;

  // ---- multiplier side -------------------------------------------------
  wallace_tree #(.N(SIG_W)) u_tree (
    .a(sig_of(fa)), .b(sig_of(fb)), .s(ps), .c(pc)
  );

  assign sp = fa.sign ^ fb.sign;

  mul_round u_mround (
    .s(ps), .c(pc), .sign(sp), .rm(rm),
    .sig_r(psig), .exp_inc(pexp_inc), .ovf(povf), .rmul(rmul), .inexact(pinexact)
  );

  always_comb begin
    eab  = XE_W'(fa.exp) + XE_W'(fb.exp) - XE_W'(BIAS);
    pexp = eab + XE_W'(pexp_inc);
  end

  special_case u_spec (
    .op(op), .a(fa), .b(fb), .c(fc), .d(fd), .sub(sub), .rm(rm),
    .prod_exp(pexp), .prod_sig(psig), .prod_inexact(pinexact),
    .is_special(is_special), .res(spec_res), .flags(spec_flags),
    .pflags(pflags), .x_maxfin(x_maxfin)
  );

  // ---- adder side operand selection ------------------------------------
  always_comb begin
    ysig = sig_of(fc);
    ey   = XE_W'(fc.exp);
    sy   = fc.sign ^ (sub && op == OP_FMAF);
    if (op == OP_FADD) begin
      xs = {1'b0, sig_of(fd)}; xc = '0; xr = '0; x_ulp_hi = 1'b0;
      ex = XE_W'(fd.exp);      sx = fd.sign ^ sub;
    end else if (x_maxfin) begin
      xs = {1'b0, {SIG_W{1'b1}}}; xc = '0; xr = '0; x_ulp_hi = 1'b0;
      ex = XE_W'(2046);           sx = sp;
    end else begin
      xs = ps[PROD_W-1 -: XT_W]; xc = pc[PROD_W-1 -: XT_W]; xr = rmul;
      x_ulp_hi = povf;           ex = eab;                  sx = sp;
    end
    eff_sub = sx ^ sy;
  end

  exp_diff u_es (
    .ex(ex), .ey(ey), .eff_sub(eff_sub), .eref(eref), .diff(diff),
    .shx(shx), .shy(shy), .x_tiny(x_tiny), .y_tiny(y_tiny),
    .near(near), .path_case(pcase)
  );

  align_shifter u_align (
    .xs(xs), .xc(xc), .xr(xr), .x_ulp_hi(x_ulp_hi), .y(ysig),
    .shx(shx), .shy(shy), .x_tiny(x_tiny), .y_tiny(y_tiny),
    .xs_al(xs_al), .xc_al(xc_al), .xr_al(xr_al), .y_al(y_al)
  );

  assign far_sign = (diff >= 0) ? sx : sy;

  far_path u_far (
    .xs_al(xs_al), .xc_al(xc_al), .xr_al(xr_al), .y_al(y_al),
    .eff_sub(eff_sub), .x_small(diff < 0), .sign(far_sign), .rm(rm), .eref(eref),
    .sig(far_sig), .exp(far_exp), .inexact(far_inexact)
  );

  near_path u_near (
    .xs(xs), .xc(xc), .xr(xr), .x_ulp_hi(x_ulp_hi), .y(ysig), .diff(diff),
    .sx(sx), .sy(sy), .rm(rm), .eref(eref),
    .sig(near_sig), .exp(near_exp), .sign(near_sign), .zero(near_zero),
    .inexact(near_inexact)
  );

  // ---- 53b MUX ----------------------------------------------------------
  always_comb begin
    if (is_special)         src = SRC_SPEC;
    else if (op == OP_FMPY) src = SRC_PROD;
    else if (near)          src = SRC_NEAR;
    else                    src = SRC_FAR;
  end

  result_mux u_mux (
    .src(src), .rm(rm),
    .far_sign(far_sign), .far_sig(far_sig), .far_exp(far_exp), .far_inexact(far_inexact),
    .near_sign(near_sign), .near_sig(near_sig), .near_exp(near_exp),
    .near_inexact(near_inexact), .near_zero(near_zero),
    .prod_sign(sp), .prod_sig(psig), .prod_exp(pexp),
    .spec_res(spec_res), .spec_flags(spec_flags), .pflags(pflags),
    .res(res_d), .flags(flags_d)
  );

  // ---- output register -------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      flags     <= '0;
      path_case <= '0;
      near_used <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        result    <= res_d;
        flags     <= flags_d;
        path_case <= (src == SRC_NEAR || src == SRC_FAR) ? pcase : 3'd0;
        near_used <= src == SRC_NEAR;
      end
    end
  end
endmodule
