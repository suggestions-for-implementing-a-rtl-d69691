// lop: leading-one predictor.
//
// Predicts, from two addends a and b, where the leading significant digit
// of their W-bit two's complement sum will be, so that the normalization
// shift amount is ready about when the sum is. Per bit position the
// propagate t = a^b, generate g = a&b and zero z = ~a&~b signals form an
// indicator string
//   f[i] = t[i+1] & (g[i] & ~z[i-1] | z[i] & ~g[i-1])
//        | ~t[i+1] & (z[i] & ~z[i-1] | g[i] & ~g[i-1])
// whose leading one is at the leading digit of a+b (the first bit that
// differs from the sign) or one position above it. A leading-one detector
// turns f into a bit position. Bit W-1 is taken as a sign bit and never
// flagged; below bit 0 a zero column is assumed. Combinational.
module lop #(
  parameter int unsigned W = 113
) (
  input  logic [W-1:0]         a,
  input  logic [W-1:0]         b,
  output logic [$clog2(W)-1:0] pos,
  output logic                 none
);
  logic [W-1:0] t, g, z, f;

  always_comb begin
    t = a ^ b;
    g = a & b;
    z = ~a & ~b;
    f = '0;
    for (int i = 1; i < W - 1; i++) begin
      f[i] = (t[i+1] & ((g[i] & ~z[i-1]) | (z[i] & ~g[i-1])))
           | (~t[i+1] & ((z[i] & ~z[i-1]) | (g[i] & ~g[i-1])));
    end
    // Column -1 is a zero column: z = 1, g = 0.
    f[0] = (t[1] & z[0]) | (~t[1] & g[0]);
    pos  = '0;
    none = 1'b1;
    for (int i = 0; i < W - 1; i++) begin
      if (f[i]) begin
        pos  = i[$clog2(W)-1:0];
        none = 1'b0;
      end
    end
  end
endmodule
