// snap_pkg: types, constants and small helper functions shared by the SNAP
// multiply-add-fused unit.
//
// The unit works on IEEE 754 double precision: a 53-bit significand (hidden
// one included) and an 11-bit biased exponent. The adder side aligns both of
// its operands in a common 112-bit window in which bit REF_BIT stands for 1.0
// at the larger of the two reference exponents; operand significands enter
// the window at bit WIN_LSB, so shifts of up to SH_LIM-1 positions keep every
// bit. Exponents inside the datapath are 13-bit signed values so that the
// product exponent Ea+Eb-bias can leave the normal range without wrapping.
package snap_pkg;

  localparam int unsigned SIG_W   = 53;    // significand bits, hidden one included
  localparam int unsigned FRAC_W  = 52;
  localparam int unsigned EXP_W   = 11;
  localparam int          BIAS    = 1023;
  localparam int unsigned XE_W    = 13;    // internal signed exponent width
  localparam int unsigned PROD_W  = 2 * SIG_W;  // 106-bit product
  localparam int unsigned XT_W    = SIG_W + 1;  // product upper part, bits 105:52
  localparam int unsigned WIN_W   = 112;   // adder-side alignment window
  localparam int unsigned WIN_LSB = 57;    // window bit of operand bit 0
  localparam int unsigned REF_BIT = WIN_LSB + SIG_W - 1;  // 109: weight 1.0
  localparam int unsigned SH_LIM  = 57;    // shifts >= this leave only a sticky bit
  localparam int unsigned SH_W    = 6;

  typedef enum logic [1:0] {
    RM_RNE = 2'd0,  // round to nearest, ties to even
    RM_RTZ = 2'd1,  // round toward zero
    RM_RUP = 2'd2,  // round toward +infinity
    RM_RDN = 2'd3   // round toward -infinity
  } rmode_e;

  typedef enum logic [1:0] {
    OP_FMPY = 2'd0,  // a * b
    OP_FADD = 2'd1,  // c +/- d
    OP_FMAF = 2'd2   // a * b +/- c
  } op_e;

  // Source selected by the final 53-bit result multiplexer.
  typedef enum logic [1:0] {
    SRC_FAR  = 2'd0,
    SRC_NEAR = 2'd1,
    SRC_PROD = 2'd2,
    SRC_SPEC = 2'd3
  } src_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } fflags_t;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  // IEEE rounding decision from the bits around the rounding position.
  function automatic logic round_up(rmode_e rm, logic sign, logic lsb,
                                    logic guard, logic sticky);
    unique case (rm)
      RM_RNE:  return guard & (lsb | sticky);
      RM_RTZ:  return 1'b0;
      RM_RUP:  return ~sign & (guard | sticky);
      default: return sign & (guard | sticky);
    endcase
  endfunction

  // On overflow: infinity when rounding away from zero, else the largest finite.
  function automatic logic overflow_to_inf(rmode_e rm, logic sign);
    return (rm == RM_RNE) || (rm == RM_RUP && !sign) || (rm == RM_RDN && sign);
  endfunction

  // Denormals are treated as zero (flush-to-zero), so the hidden bit is the
  // "exponent non-zero" bit.
  function automatic logic [SIG_W-1:0] sig_of(fp64_t x);
    return {x.exp != '0, x.frac};
  endfunction

  function automatic logic is_zero(fp64_t x);
    return x.exp == '0;
  endfunction

  function automatic logic is_inf(fp64_t x);
    return x.exp == '1 && x.frac == '0;
  endfunction

  function automatic logic is_nan(fp64_t x);
    return x.exp == '1 && x.frac != '0;
  endfunction

  function automatic logic is_snan(fp64_t x);
    return is_nan(x) && !x.frac[FRAC_W-1];
  endfunction

endpackage
