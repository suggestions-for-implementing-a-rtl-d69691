// align_shifter: the two alignment right shifters of the adder side.
//
// The X operand arrives in carry-save form, xs + xc + xr*ULP (the unadded
// product S, C and r_Mul; for FADD xs is d and xc, xr are zero); Y is the
// significand of c. All are placed in a WIN_W-bit window with their bit 0 at
// WIN_LSB, so 1.0 sits at REF_BIT. The rounding mask, all ones from the
// product ULP upwards, clears the product bits below the ULP, and its lowest
// one scaled by r_Mul is the rounding constant. Only one operand is shifted:
//   Y shifted (case 1, 3, 4 and FADD with d larger): shifter R takes Y;
//   X shifted (case 2, 5, 6): shifter L takes S, shifter R takes C, and the
//   rounding constant is shifted with them.
// Shifts stay below SH_LIM, so with WIN_LSB low bits nothing is shifted
// out; an operand marked tiny is replaced by a one in bit 0, a sticky bit
// that rounds like any value far below the other operand's ULP.
// Combinational.
module align_shifter
  import snap_pkg::*;
(
  input  logic [XT_W-1:0]  xs,
  input  logic [XT_W-1:0]  xc,
  input  logic [1:0]       xr,
  input  logic             x_ulp_hi,
  input  logic [SIG_W-1:0] y,
  input  logic [SH_W-1:0]  shx,
  input  logic [SH_W-1:0]  shy,
  input  logic             x_tiny,
  input  logic             y_tiny,
  output logic [WIN_W-1:0] xs_al,
  output logic [WIN_W-1:0] xc_al,
  output logic [WIN_W-1:0] xr_al,
  output logic [WIN_W-1:0] y_al
);
  logic [WIN_W-1:0] ulp, mask, xs_w, xc_w, y_w, rc_w;
  logic [WIN_W-1:0] l_out, r_in, r_out;
  logic [SH_W-1:0]  r_sh;
  logic             y_mode;

  always_comb begin
    ulp    = WIN_W'(1) << (x_ulp_hi ? WIN_LSB + 1 : WIN_LSB);
    mask   = ~(ulp - WIN_W'(1));
    xs_w   = (WIN_W'(xs) << WIN_LSB) & mask;
    xc_w   = (WIN_W'(xc) << WIN_LSB) & mask;
    y_w    = WIN_W'(y) << WIN_LSB;
    rc_w   = ulp * WIN_W'(xr);
    y_mode = shy != '0;

    // Shifter L: S (or d).
    l_out  = xs_w >> shx;
    // Shifter R: c when c is the smaller operand, else C.
    r_in   = y_mode ? y_w : xc_w;
    r_sh   = y_mode ? shy : shx;
    r_out  = r_in >> r_sh;

    xs_al  = x_tiny ? WIN_W'(1) : l_out;
    xc_al  = x_tiny ? '0 : (y_mode ? xc_w : r_out);
    xr_al  = x_tiny ? '0 : (rc_w >> shx);
    y_al   = y_tiny ? WIN_W'(1) : (y_mode ? r_out : y_w);
  end
endmodule
