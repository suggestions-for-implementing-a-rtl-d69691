// lop_tb: checks the leading-one predictor. For random carry-save pairs
// whose sum lies in the near path's range (|a+b| < 2^110 in a 113-bit
// word), the predicted position must be the leading significant digit of
// a+b or the position just above it.
module lop_tb;
  localparam int W = 113;
  logic [W-1:0] a, b;
  logic [$clog2(W)-1:0] pos;
  logic none;
  logic clk = 1'b0;
  int checks = 0, failures = 0, exact = 0, below = 0;

  lop #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, r;
    int lead, mag;
    for (int i = 0; i < 20000; i++) begin
      // A signed value with a random number of significant bits.
      mag = $urandom_range(109, 2);
      v = W'({$urandom, $urandom, $urandom, $urandom}) & ((W'(1) << mag) - 1);
      v[mag-1] = 1'b1;
      if ($urandom_range(1)) v = -v;
      r = {$urandom, $urandom, $urandom, $urandom};
      a = r;
      b = v - r;
      @(posedge clk);
      lead = -1;
      for (int k = 0; k < W - 1; k++) if (v[k] != v[W-1]) lead = k;
      checks++;
      if (none || !(int'(pos) == lead || int'(pos) == lead + 1)) begin
        failures++;
        if (failures < 5) $display("mismatch v=%h pos=%0d lead=%0d neg=%0d", v, pos, lead, v[W-1]);
      end
      if (int'(pos) == lead) exact++; else below++;
    end
    $display("exact %0d one-above %0d", exact, below);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
