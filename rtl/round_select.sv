// round_select: IEEE rounding decision and selection for a 53-bit result.
//
// A compound adder provides the truncated significand and its successor;
// the rounding logic decides from the mode, the sign, the LSB, the guard
// bit and the sticky bit whether the successor is taken. When the successor
// overflows (all ones plus one) the result is 1.0 and carry asks the caller
// to add one to the exponent. inexact is set when any dropped bit was one.
// Combinational.
module round_select
  import snap_pkg::*;
(
  input  logic [SIG_W-1:0] sig,
  input  logic             guard,
  input  logic             sticky,
  input  logic             sign,
  input  rmode_e           rm,
  output logic [SIG_W-1:0] sig_r,
  output logic             carry,
  output logic             inexact,
  output logic             inc
);
  logic [SIG_W-1:0] plus0, plus1;
  logic             co1;

  compound_adder #(.W(SIG_W)) u_add (
    .a(sig), .b('0), .sum0(plus0), .sum1(plus1), .cout0(), .cout1(co1)
  );

  always_comb begin
    inc     = round_up(rm, sign, sig[0], guard, sticky);
    inexact = guard | sticky;
    carry   = inc & co1;
    if (!inc)      sig_r = plus0;
    else if (co1)  sig_r = {1'b1, {(SIG_W-1){1'b0}}};
    else           sig_r = plus1;
  end
endmodule
