// exp_diff: exponent subtraction (ES) and path selection.
//
// X is the product (reference exponent Ea+Eb-bias, significand in [1,4))
// or, for FADD, the operand d; Y is the operand c. The signed difference
// ex-ey picks the alignment case: for effective addition case 1 (ex > ey) or
// 2; for effective subtraction cases 3 and 5 (|ex-ey| <= 2, the near path,
// where a 3-1 multiplexer does the alignment) or cases 4 and 6 (the far
// path, full alignment shift). The boundary is 2 rather than 1 because S+C
// may reach 4. Only the operand with the smaller exponent is shifted right;
// a shift of SH_LIM or more leaves nothing of it but a sticky bit.
// The case split and the boundary of 2 follow the SNAP organization; the
// sticky-only limit SH_LIM is this design's choice. Combinational.
module exp_diff
  import snap_pkg::*;
(
  input  logic signed [XE_W-1:0] ex,
  input  logic signed [XE_W-1:0] ey,
  input  logic                   eff_sub,
  output logic signed [XE_W-1:0] eref,
  output logic signed [XE_W-1:0] diff,
  output logic [SH_W-1:0]        shx,
  output logic [SH_W-1:0]        shy,
  output logic                   x_tiny,
  output logic                   y_tiny,
  output logic                   near,
  output logic [2:0]             path_case
);
  logic signed [XE_W-1:0] ndiff;

  always_comb begin
    diff   = ex - ey;
    ndiff  = ey - ex;
    eref   = (diff >= 0) ? ex : ey;
    shx    = '0;
    shy    = '0;
    x_tiny = 1'b0;
    y_tiny = 1'b0;
    if (diff >= 0) begin
      if (diff >= XE_W'(SH_LIM)) y_tiny = 1'b1;
      else                       shy    = SH_W'(diff);
    end else begin
      if (ndiff >= XE_W'(SH_LIM)) x_tiny = 1'b1;
      else                        shx    = SH_W'(ndiff);
    end
    near = eff_sub && diff <= 2 && diff >= -2;
    if (!eff_sub)       path_case = (diff > 0) ? 3'd1 : 3'd2;
    else if (diff >= 0) path_case = (diff <= 2) ? 3'd3 : 3'd4;
    else                path_case = (diff >= -2) ? 3'd5 : 3'd6;
  end
endmodule
