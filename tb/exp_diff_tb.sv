// exp_diff_tb: checks the exponent subtraction and the alignment case,
// near-path, shift and sticky-only decisions for random exponent pairs,
// with small and large differences in both directions.
module exp_diff_tb;
  import snap_pkg::*;
  logic signed [XE_W-1:0] ex, ey, eref, diff;
  logic eff_sub, x_tiny, y_tiny, near;
  logic [SH_W-1:0] shx, shy;
  logic [2:0] path_case;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int seen [7];

  exp_diff dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, ecase, esx, esy;
    logic en, ext, eyt;
    for (int i = 0; i < 5000; i++) begin
      ey = XE_W'($urandom_range(2046, 1));
      d  = (i % 2) ? int'($urandom_range(8)) - 4 : int'($urandom_range(240)) - 120;
      ex = ey + XE_W'(d);
      if (i % 7 == 0) ex = XE_W'(-1000);   // product far below range
      eff_sub = 1'($urandom);
      @(posedge clk);
      d = int'(ex) - int'(ey);
      if (!eff_sub)   ecase = (d > 0) ? 1 : 2;
      else if (d >= 0) ecase = (d <= 2) ? 3 : 4;
      else            ecase = (d >= -2) ? 5 : 6;
      en  = eff_sub && d >= -2 && d <= 2;
      eyt = d >= 57;
      ext = -d >= 57;
      esy = (d >= 0 && !eyt) ? d : 0;
      esx = (d < 0 && !ext) ? -d : 0;
      checks++;
      if (int'(diff) != d || int'(eref) != ((d >= 0) ? int'(ex) : int'(ey)) ||
          int'(path_case) != ecase || near != en || x_tiny != ext || y_tiny != eyt ||
          int'(shx) != esx || int'(shy) != esy) begin
        failures++;
        if (failures < 5) $display("mismatch ex=%0d ey=%0d sub=%b", ex, ey, eff_sub);
      end
      seen[path_case]++;
    end
    for (int k = 1; k <= 6; k++) if (seen[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
