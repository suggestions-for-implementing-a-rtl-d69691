// special_case: IEEE special operands and product range exceptions.
//
// Decides when the result does not come from the near or far path: NaN
// operands (quiet NaN out, invalid for a signalling NaN), infinity times
// zero and opposite infinities (invalid), infinities, zero operands, and,
// for MAF, a rounded product that overflows or falls below the normal
// range. The MAF result is defined as the IEEE sum of the rounded product
// and c, so a product that overflows to infinity gives infinity, a product
// flushed to zero gives c, and a product that overflows to the largest
// finite number (directed rounding) is passed on as an ordinary operand
// (x_maxfin). pflags are the product's own flags, to be merged with the
// adder side's. Denormal operands count as zero. Combinational.
module special_case
  import snap_pkg::*;
(
  input  op_e                    op,
  input  fp64_t                  a,
  input  fp64_t                  b,
  input  fp64_t                  c,
  input  fp64_t                  d,
  input  logic                   sub,
  input  rmode_e                 rm,
  input  logic signed [XE_W-1:0] prod_exp,   // biased exponent of the rounded product
  input  logic [SIG_W-1:0]       prod_sig,
  input  logic                   prod_inexact,
  output logic                   is_special,
  output logic [63:0]            res,
  output fflags_t                flags,
  output fflags_t                pflags,
  output logic                   x_maxfin
);
  fp64_t y, x;            // FADD operands c, d with the subtraction applied
  logic  sp, sc, p_ovf, p_unf, p_inf;
  fflags_t pf;            // flags of a finite, non-zero product

  function automatic logic [63:0] zero_sum(logic s1, logic s2, rmode_e m);
    return {(s1 == s2) ? s1 : (m == RM_RDN), 63'd0};
  endfunction

  always_comb begin
    sp = a.sign ^ b.sign;
    sc = c.sign ^ (sub && op == OP_FMAF);
    y  = c;
    x  = d;
    x.sign = d.sign ^ sub;
    p_ovf  = prod_exp >= 2047;
    p_unf  = prod_exp <= 0;
    p_inf  = overflow_to_inf(rm, sp);

    pf = '0;
    if (!is_zero(a) && !is_zero(b) && a.exp != '1 && b.exp != '1) begin
      if (p_ovf)      begin pf.overflow  = 1'b1; pf.inexact = 1'b1; end
      else if (p_unf) begin pf.underflow = 1'b1; pf.inexact = 1'b1; end
      else            pf.inexact = prod_inexact;
    end

    is_special = 1'b1;
    res        = QNAN;
    flags      = '0;
    pflags     = '0;
    x_maxfin   = 1'b0;

    unique case (op)
      OP_FADD: begin
        if (is_nan(x) || is_nan(y)) begin
          flags.invalid = is_snan(x) || is_snan(y);
        end else if (is_inf(x) && is_inf(y) && x.sign != y.sign) begin
          flags.invalid = 1'b1;
        end else if (is_inf(y)) begin
          res = y;
        end else if (is_inf(x)) begin
          res = x;
        end else if (is_zero(x) && is_zero(y)) begin
          res = zero_sum(x.sign, y.sign, rm);
        end else if (is_zero(x)) begin
          res = y;
        end else if (is_zero(y)) begin
          res = x;
        end else begin
          is_special = 1'b0;
        end
      end
      default: begin  // OP_FMPY and OP_FMAF
        if (is_nan(a) || is_nan(b) || (op == OP_FMAF && is_nan(c))) begin
          flags = pf;
          flags.invalid = is_snan(a) || is_snan(b) || (op == OP_FMAF && is_snan(c))
                        || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b));
        end else if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
          flags.invalid = 1'b1;
        end else if (is_inf(a) || is_inf(b)) begin
          if (op == OP_FMAF && is_inf(c) && sc != sp) flags.invalid = 1'b1;
          else res = {sp, 11'h7FF, 52'd0};
        end else if (op == OP_FMAF && is_inf(c)) begin
          flags = pf;
          // A product that overflowed to infinity meets the opposite infinity.
          if (p_ovf && p_inf && sp != sc) flags.invalid = 1'b1;
          else                            res = {sc, c[62:0]};
        end else if (is_zero(a) || is_zero(b)) begin
          if (op == OP_FMPY)   res = {sp, 63'd0};
          else if (is_zero(c)) res = zero_sum(sp, sc, rm);
          else                 res = {sc, c[62:0]};
        end else if (op == OP_FMPY) begin
          is_special = 1'b0;
          pflags.inexact = prod_inexact;
        end else if (p_ovf) begin
          pflags = pf;
          flags  = pf;
          if (p_inf)            res = {sp, 11'h7FF, 52'd0};
          else if (is_zero(c))  res = {sp, 11'h7FE, {52{1'b1}}};
          else begin
            is_special = 1'b0;
            x_maxfin   = 1'b1;
          end
        end else if (p_unf) begin
          flags = pf;
          res = is_zero(c) ? zero_sum(sp, sc, rm) : {sc, c[62:0]};
        end else if (is_zero(c)) begin
          res   = {sp, prod_exp[EXP_W-1:0], prod_sig[FRAC_W-1:0]};
          flags = pf;
        end else begin
          is_special = 1'b0;
          pflags     = pf;
        end
      end
    endcase
  end
endmodule
