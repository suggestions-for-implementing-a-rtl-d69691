// result_mux: the final 53-bit result multiplexer and IEEE packing.
//
// Chooses the far-path, near-path, rounded-product (FMPY) or special result,
// checks the exponent range and packs sign, exponent and fraction. An
// exponent above 2046 overflows to infinity or to the largest finite
// number, depending on the rounding mode; an exponent below 1 flushes the
// result to a signed zero (no denormals). An exact cancellation in the near
// path gives +0, or -0 when rounding toward minus infinity. Flags are the
// path's own merged with the product's (pflags). Combinational.
module result_mux
  import snap_pkg::*;
(
  input  src_e                   src,
  input  rmode_e                 rm,
  input  logic                   far_sign,
  input  logic [SIG_W-1:0]       far_sig,
  input  logic signed [XE_W-1:0] far_exp,
  input  logic                   far_inexact,
  input  logic                   near_sign,
  input  logic [SIG_W-1:0]       near_sig,
  input  logic signed [XE_W-1:0] near_exp,
  input  logic                   near_inexact,
  input  logic                   near_zero,
  input  logic                   prod_sign,
  input  logic [SIG_W-1:0]       prod_sig,
  input  logic signed [XE_W-1:0] prod_exp,
  input  logic [63:0]            spec_res,
  input  fflags_t                spec_flags,
  input  fflags_t                pflags,
  output logic [63:0]            res,
  output fflags_t                flags
);
  logic                   s;
  logic [SIG_W-1:0]       m;
  logic signed [XE_W-1:0] e;
  logic                   inx;

  always_comb begin
    unique case (src)
      SRC_NEAR: begin s = near_sign; m = near_sig; e = near_exp; inx = near_inexact; end
      SRC_PROD: begin s = prod_sign; m = prod_sig; e = prod_exp; inx = 1'b0;         end
      default:  begin s = far_sign;  m = far_sig;  e = far_exp;  inx = far_inexact;  end
    endcase
    flags         = pflags;
    flags.inexact = pflags.inexact | inx;
    if (src == SRC_SPEC) begin
      res   = spec_res;
      flags = spec_flags;
    end else if (src == SRC_NEAR && near_zero) begin
      res = {rm == RM_RDN, 63'd0};
    end else if (e >= 2047) begin
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
      res = overflow_to_inf(rm, s) ? {s, 11'h7FF, 52'd0} : {s, 11'h7FE, {52{1'b1}}};
    end else if (e <= 0) begin
      flags.underflow = 1'b1;
      flags.inexact   = 1'b1;
      res = {s, 63'd0};
    end else begin
      res = {s, e[EXP_W-1:0], m[FRAC_W-1:0]};
    end
  end
endmodule
