// wallace_tree_tb: checks that S + C equals the exact 106-bit product of two
// 53-bit significands (random, all ones, powers of two, zero).
module wallace_tree_tb;
  localparam int N = 53;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] s, c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  wallace_tree #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] p;
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (i % 3 == 0) begin a[N-1] = 1'b1; b[N-1] = 1'b1; end
      if (i == 0) begin a = '1; b = '1; end
      if (i == 1) begin a = 1 << (N - 1); b = 1 << (N - 1); end
      if (i == 2) begin a = '0; b = '1; end
      @(posedge clk);
      p = (2*N)'(a) * (2*N)'(b);
      checks++;
      // Exact, not only modulo 2^106: no carry may be lost.
      if ({1'b0, s} + {1'b0, c} !== {1'b0, p}) begin
        failures++;
        if (failures < 5) $display("mismatch a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
