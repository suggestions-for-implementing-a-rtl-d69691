// csa42: 4-2 carry-save adder.
//
// Reduces four W-bit vectors to two whose sum equals w+x+y+z modulo 2^W.
// Built as two chained 3-2 carry-save adders: the first level's carries are
// the "hidden" carries passed to the neighbouring column. In the SNAP adder
// side it sums the aligned S, C, c and the rounding constant. Combinational.
module csa42 #(
  parameter int unsigned W = 112
) (
  input  logic [W-1:0] w,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] s1, c1;

  csa32 #(.W(W)) u_lvl1 (.x(w),  .y(x),  .z(y), .s(s1), .c(c1));
  csa32 #(.W(W)) u_lvl2 (.x(s1), .y(c1), .z(z), .s(s),  .c(c));
endmodule
