// result_mux_tb: checks the final result multiplexer: source selection,
// packing, overflow to infinity or the largest finite number by rounding
// mode, flush to zero below the normal range, the sign of an exact
// cancellation, and the merging of flags.
module result_mux_tb;
  import snap_pkg::*;
  src_e src;
  rmode_e rm;
  logic far_sign, far_inexact, near_sign, near_inexact, near_zero, prod_sign;
  logic [SIG_W-1:0] far_sig, near_sig, prod_sig;
  logic signed [XE_W-1:0] far_exp, near_exp, prod_exp;
  logic [63:0] spec_res, res;
  fflags_t spec_flags, pflags, flags;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;

  result_mux dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [XE_W-1:0] rexp();
    case ($urandom_range(3))
      0: return XE_W'($urandom_range(2050, 2040));
      1: return XE_W'(int'($urandom_range(6)) - 4);
      default: return XE_W'($urandom_range(2046, 1));
    endcase
  endfunction

  initial begin
    logic s, inx;
    logic [SIG_W-1:0] m;
    int e;
    logic [63:0] er;
    logic [3:0] ef;
    for (int i = 0; i < 5000; i++) begin
      src = src_e'($urandom_range(3));
      rm  = rmode_e'($urandom_range(3));
      far_sign = 1'($urandom);  far_sig = {1'b1, 20'($urandom), 32'($urandom)};  far_exp = rexp();
      near_sign = 1'($urandom); near_sig = {1'b1, 20'($urandom), 32'($urandom)}; near_exp = rexp();
      prod_sign = 1'($urandom); prod_sig = {1'b1, 20'($urandom), 32'($urandom)}; prod_exp = rexp();
      far_inexact = 1'($urandom); near_inexact = 1'($urandom);
      near_zero = ($urandom_range(7) == 0);
      spec_res = {$urandom, $urandom}; spec_flags = 4'($urandom); pflags = 4'($urandom);
      @(posedge clk);
      case (src)
        SRC_NEAR: begin s = near_sign; m = near_sig; e = int'(near_exp); inx = near_inexact; end
        SRC_PROD: begin s = prod_sign; m = prod_sig; e = int'(prod_exp); inx = 1'b0; end
        default:  begin s = far_sign;  m = far_sig;  e = int'(far_exp);  inx = far_inexact; end
      endcase
      ef = pflags | {3'b000, inx};
      if (src == SRC_SPEC) begin
        er = spec_res; ef = spec_flags;
      end else if (src == SRC_NEAR && near_zero) begin
        er = (rm == RM_RDN) ? 64'h8000_0000_0000_0000 : 64'd0;
      end else if (e > 2046) begin
        n_ovf++;
        ef = ef | 4'b0101;
        if (rm == RM_RNE || (rm == RM_RUP && !s) || (rm == RM_RDN && s)) er = {s, 11'h7FF, 52'd0};
        else er = {s, 63'h7FEF_FFFF_FFFF_FFFF};
      end else if (e < 1) begin
        n_unf++;
        ef = ef | 4'b0011;
        er = {s, 63'd0};
      end else begin
        er = {s, 11'(e), m[51:0]};
      end
      checks++;
      if (res !== er || flags !== ef) begin
        failures++;
        if (failures < 5) $display("mismatch src=%0d rm=%0d got %h exp %h", src, rm, res, er);
      end
    end
    if (n_ovf == 0 || n_unf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
