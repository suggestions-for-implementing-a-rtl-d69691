// compound_adder_tb: checks sum0 = a+b and sum1 = a+b+1, with carries,
// for random operands and the carry-through corner cases (53-bit default).
module compound_adder_tb;
  localparam int W = 53;
  logic [W-1:0] a, b, sum0, sum1;
  logic cout0, cout1;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  compound_adder #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] e0, e1;
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (i == 0) begin a = '1; b = '0; end
      if (i == 1) begin a = '1; b = '1; end
      if (i == 2) begin a = '0; b = '0; end
      if (i == 3) begin a = '1; b = 1; end
      @(posedge clk);
      e0 = {1'b0, a} + {1'b0, b};
      e1 = e0 + 1;
      checks += 2;
      if ({cout0, sum0} !== e0) failures++;
      if ({cout1, sum1} !== e1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
