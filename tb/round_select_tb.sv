// round_select_tb: checks the rounding decision and selection in all four
// modes against a direct statement of the IEEE rules, including the
// all-ones significand whose rounding carries into the exponent.
module round_select_tb;
  import snap_pkg::*;
  logic [SIG_W-1:0] sig, sig_r;
  logic guard, sticky, sign, carry, inexact, inc;
  rmode_e rm;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  round_select dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic up;
    logic [SIG_W:0] e;
    for (int i = 0; i < 4000; i++) begin
      sig    = {1'b1, 20'($urandom), 32'($urandom)};
      if (i % 16 == 0) sig = '1;
      guard  = 1'($urandom);
      sticky = 1'($urandom);
      sign   = 1'($urandom);
      rm     = rmode_e'(i % 4);
      @(posedge clk);
      // Nearest-even: above half, or exactly half with an odd LSB.
      case (rm)
        RM_RNE: up = guard && (sticky || sig[0]);
        RM_RTZ: up = 1'b0;
        RM_RUP: up = !sign && (guard || sticky);
        default: up = sign && (guard || sticky);
      endcase
      e = {1'b0, sig} + (SIG_W+1)'(up);
      if (e[SIG_W]) e = e >> 1;
      checks++;
      if ({carry, sig_r} !== {e[SIG_W] | (up && sig == '1), e[SIG_W-1:0]}
          || inexact !== (guard | sticky) || inc !== up) begin
        failures++;
        if (failures < 5) $display("mismatch sig=%h g=%b s=%b rm=%0d", sig, guard, sticky, rm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
