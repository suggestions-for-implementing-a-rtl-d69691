// csa42_tb: checks that the 4-2 carry-save adder's outputs sum to w+x+y+z
// (modulo 2^W) for random and all-ones inputs, at the default width.
module csa42_tb;
  localparam int W = 112;
  logic [W-1:0] w, x, y, z, s, c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  csa42 #(.W(W)) dut (.*);

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
      w = rnd(); x = rnd(); y = rnd(); z = rnd();
      if (i == 0) begin w = '1; x = '1; y = '1; z = '1; end
      if (i == 1) begin w = '1; x = '0; y = '0; z = 1; end
      @(posedge clk);
      checks++;
      if (s + c !== w + x + y + z) begin
        failures++;
        if (failures < 5) $display("mismatch w=%h x=%h y=%h z=%h", w, x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
