// align_shifter_tb: checks the alignment shifters and the rounding mask.
// With X = S + C + r_Mul*ULP (S and C cleared below the ULP by the mask),
// the aligned X terms must sum exactly to X shifted right by shx, and the
// aligned c must be c shifted right by shy, both in the 112-bit window;
// operands marked tiny must become a single sticky one.
module align_shifter_tb;
  import snap_pkg::*;
  logic [XT_W-1:0] xs, xc;
  logic [1:0] xr;
  logic x_ulp_hi, x_tiny, y_tiny;
  logic [SIG_W-1:0] y;
  logic [SH_W-1:0] shx, shy;
  logic [WIN_W-1:0] xs_al, xc_al, xr_al, y_al;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  align_shifter dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIN_W+1:0] xv, got;
    int lsb;
    for (int i = 0; i < 5000; i++) begin
      xs = {$urandom, $urandom}; xc = {$urandom, $urandom};
      xs[XT_W-1] = 1'b0; xc[XT_W-1] = 1'b0;
      xr = 2'($urandom_range(2));
      x_ulp_hi = 1'($urandom);
      y = {1'b1, 20'($urandom), 32'($urandom)};
      shx = '0; shy = '0; x_tiny = 1'b0; y_tiny = 1'b0;
      case (i % 4)
        0: shx = SH_W'($urandom_range(56));
        1: shy = SH_W'($urandom_range(56));
        2: x_tiny = 1'b1;
        default: y_tiny = 1'b1;
      endcase
      @(posedge clk);
      lsb = x_ulp_hi ? 1 : 0;
      xv = ((WIN_W+2)'(xs >> lsb) + (WIN_W+2)'(xc >> lsb) + (WIN_W+2)'(xr)) << (WIN_LSB + lsb);
      got = (WIN_W+2)'(xs_al) + (WIN_W+2)'(xc_al) + (WIN_W+2)'(xr_al);
      checks += 2;
      if (x_tiny) begin
        if (got !== 1) failures++;
      end else if (got !== (xv >> shx) || ((xv >> shx) << shx) !== xv) begin
        failures++;
        if (failures < 5) $display("X mismatch shx=%0d", shx);
      end
      if (y_tiny) begin
        if (y_al !== 1) failures++;
      end else if (y_al !== ((WIN_W'(y) << WIN_LSB) >> shy)) begin
        failures++;
        if (failures < 5) $display("Y mismatch shy=%0d", shy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
