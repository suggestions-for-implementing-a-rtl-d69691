// csa32_tb: checks that the 3-2 carry-save adder's two outputs sum to
// x+y+z (modulo 2^W) for random and all-ones inputs, at the default width.
module csa32_tb;
  localparam int W = 106;
  logic [W-1:0] x, y, z, s, c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      x = rnd(); y = rnd(); z = rnd();
      if (i == 0) begin x = '1; y = '1; z = '1; end
      @(posedge clk);
      checks++;
      if (s + c !== x + y + z || (s ^ x ^ y ^ z) !== '0) begin
        failures++;
        if (failures < 5) $display("mismatch x=%h y=%h z=%h", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
