// csa32: 3-2 carry-save adder.
//
// Reduces three W-bit vectors to a sum vector and a carry vector whose sum
// equals x+y+z modulo 2^W: s is the bitwise XOR, c the bitwise majority moved
// up one position. It has no carry propagation, so its delay is two XOR gates
// whatever W is. Purely combinational. Users keep W wide enough that the
// carry out of the top bit is always zero.
module csa32 #(
  parameter int unsigned W = 106
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[W-2:0], 1'b0};
  end
endmodule
