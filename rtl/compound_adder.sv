// compound_adder: computes a+b and a+b+1 at the same time.
//
// Having both sums lets later logic round (choose the value or its
// successor) or form an absolute difference (choose x+~y+1 or ~(x+~y))
// with a multiplexer instead of a second carry-propagate addition. The
// carry structure (conditional sum, Ling or other) is left to synthesis.
// Combinational; the carry outs of both sums are also provided.
module compound_adder #(
  parameter int unsigned W = 53
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum0,
  output logic [W-1:0] sum1,
  output logic         cout0,
  output logic         cout1
);
  always_comb begin
    {cout0, sum0} = {1'b0, a} + {1'b0, b};
    {cout1, sum1} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, 1'b1};
  end
endmodule
