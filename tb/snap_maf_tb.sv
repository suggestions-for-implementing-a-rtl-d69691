// snap_maf_tb: end-to-end test of the SNAP multiply-add-fused unit at its
// default (IEEE double) size.
//
// Drives one operation per clock and checks each result and flag set one
// clock later against the exact reference model in fp_ref_pkg (multiply,
// then add, each rounded once), in all four rounding modes. Round-to-nearest
// results in the normal range are also checked against the simulator's own
// double arithmetic. The operand mix steers the unit through every case of
// the six alignment cases, the near path with heavy cancellation,
// product overflow and underflow, FADD, FMPY and special operands; each is
// counted and one that never happens counts as a failure. The output must
// follow in_valid by exactly one clock.
module snap_maf_tb;
  import snap_pkg::*;
  import fp_ref_pkg::*;

  localparam int NVEC = 200000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  op_e         op = OP_FMAF;
  logic        sub = 1'b0;
  rmode_e      rm = RM_RNE;
  logic [63:0] a = '0, b = '0, c = '0, d = '0;
  logic        out_valid;
  logic [63:0] result;
  fflags_t     flags;
  logic [2:0]  path_case;
  logic        near_used;

  int checks = 0, failures = 0;
  int cnt_case [7];
  int cnt_near = 0, cnt_cancel = 0, cnt_povf = 0, cnt_unf = 0, cnt_nan = 0,
      cnt_inf = 0, cnt_fadd = 0, cnt_fmpy = 0, cnt_inexact = 0, cnt_real = 0;

  snap_maf dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] specials [10] = '{
    64'h0000_0000_0000_0000, 64'h8000_0000_0000_0000, 64'h7FF0_0000_0000_0000,
    64'hFFF0_0000_0000_0000, 64'h7FF8_0000_0000_0001, 64'h7FF0_0000_0000_0001,
    64'h0000_0000_0000_0123, 64'h3FF0_0000_0000_0000, 64'hBFF0_0000_0000_0000,
    64'h7FEF_FFFF_FFFF_FFFF};

  function automatic logic [63:0] pick_special();
    return specials[$urandom_range(9)];
  endfunction

  // Build one random operation; returns nothing, sets the inputs.
  task automatic make_vector(int k);
    int cat, ea, eb, ep;
    ref_t p;
    cat = $urandom_range(9);
    rm  = rmode_e'($urandom_range(3));
    sub = 1'($urandom);
    op  = OP_FMAF;
    a = rand_fp(1023, 4); b = rand_fp(1023, 4);
    ea = int'(a[62:52]); eb = int'(b[62:52]); ep = ea + eb - 1023;
    unique case (cat)
      0, 1: c = rand_fp(ep, 3);                       // near and close far cases
      2:    c = rand_fp(ep, 80);                      // wide alignment, sticky only
      3: begin                                        // heavy cancellation
        p = ref_mul(a, b, 0);
        c = p.res ^ 64'($urandom_range(7));
        c[63] = p.res[63] ^ ~sub;
        if ($urandom_range(1)) c[51:0] = p.res[51:0];
      end
      4: begin op = OP_FADD; c = rand_fp(1023, 3);  d = rand_fp(1023, 3); end
      5: begin op = OP_FADD; c = rand_fp(1023, 70); d = rand_fp(1023, 70); end
      6: begin op = OP_FMPY; a = rand_fp(1023, 600); b = rand_fp(1023, 600); end
      7: begin                                        // product out of range
        a = rand_fp($urandom_range(1) ? 2000 : 40, 30);
        b = {1'($urandom), a[62:52], 52'($urandom)};
        c = $urandom_range(1) ? rand_fp(2040, 6) : rand_fp(3, 2);
        op = $urandom_range(3) == 0 ? OP_FMPY : OP_FMAF;
      end
      8: begin                                        // specials mixed in
        op = op_e'($urandom_range(2));
        a = $urandom_range(1) ? pick_special() : a;
        b = $urandom_range(1) ? pick_special() : b;
        c = $urandom_range(1) ? pick_special() : rand_fp(ep, 3);
        d = $urandom_range(1) ? pick_special() : rand_fp(1023, 3);
      end
      default: begin                                  // sum near the overflow edge
        a = rand_fp(1534, 2); b = rand_fp(1534, 2); c = rand_fp(2045, 2);
      end
    endcase
    if (k < 4) begin  // a fixed start: 1.5*2 + 1 = 4
      op = OP_FMAF; rm = RM_RNE; sub = 1'b0;
      a = 64'h3FF8_0000_0000_0000; b = 64'h4000_0000_0000_0000; c = 64'h3FF0_0000_0000_0000;
    end
  endtask

  task automatic check_one(ref_t exp_r, int o, logic [63:0] ia, ib, ic, id, logic isub, int irm);
    real rr;
    logic [63:0] rb;
    checks++;
    if (result !== exp_r.res || flags !== exp_r.flags) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH op=%0d sub=%0d rm=%0d a=%h b=%h c=%h d=%h got %h/%b exp %h/%b case=%0d near=%0d",
                 o, isub, irm, ia, ib, ic, id, result, flags, exp_r.res, exp_r.flags, path_case, near_used);
    end
    // Independent check of the reference in round-to-nearest.
    if (irm == 0 && exp_r.flags[2:1] == 2'b00 && exp_r.res[62:52] != 0 && exp_r.res[62:52] != 11'h7FF
        && !f_zero(ia) && !f_zero(ib) && !f_zero(ic) && !f_zero(id)
        && !f_nan(ia) && !f_nan(ib) && !f_nan(ic) && !f_nan(id)
        && !f_inf(ia) && !f_inf(ib) && !f_inf(ic) && !f_inf(id)) begin
      if (o == 0)      rr = $bitstoreal(ia) * $bitstoreal(ib);
      else if (o == 1) rr = isub ? $bitstoreal(ic) - $bitstoreal(id) : $bitstoreal(ic) + $bitstoreal(id);
      else             rr = isub ? $bitstoreal(ia) * $bitstoreal(ib) - $bitstoreal(ic)
                                 : $bitstoreal(ia) * $bitstoreal(ib) + $bitstoreal(ic);
      rb = $realtobits(rr);
      if (rb[62:52] != 0) begin
        checks++;
        cnt_real++;
        if (rb !== result) begin
          failures++;
          if (failures < 20) $display("REAL MISMATCH got %h real %h", result, rb);
        end
      end
    end
  endtask

  initial begin : stim
    ref_t exp_q;
    logic [63:0] qa, qb, qc, qd;
    logic qsub;
    int   qop, qrm;
    logic pend;
    pend = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k <= NVEC; k++) begin
      @(negedge clk);
      // Result of the operation issued at the previous clock edge.
      if (pend) begin
        checks++;
        if (!out_valid) begin failures++; $display("out_valid missing"); end
        check_one(exp_q, qop, qa, qb, qc, qd, qsub, qrm);
        if (path_case != 0) cnt_case[path_case]++;
        if (near_used) cnt_near++;
        if (near_used && result[62:0] == 0) cnt_cancel++;
        if (exp_q.flags[2] && (qop != 1)) cnt_povf++;
        if (exp_q.flags[1]) cnt_unf++;
        if (exp_q.flags[0]) cnt_inexact++;
        if (f_nan(result)) cnt_nan++;
        if (f_inf(result)) cnt_inf++;
        if (qop == 1) cnt_fadd++;
        if (qop == 0) cnt_fmpy++;
      end
      if (k == NVEC) begin
        in_valid = 1'b0;
        pend = 1'b0;
      end else begin
        make_vector(k);
        in_valid = 1'b1;
        exp_q = ref_op(int'(op), sub, int'(rm), a, b, c, d);
        qa = a; qb = b; qc = c; qd = d; qsub = sub; qop = int'(op); qrm = int'(rm);
        pend = 1'b1;
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
    for (int i = 1; i <= 6; i++) begin
      $display("alignment case %0d: %0d", i, cnt_case[i]);
      if (cnt_case[i] == 0) failures++;
    end
    $display("near %0d cancel-to-zero %0d product-overflow %0d underflow %0d nan %0d inf %0d",
             cnt_near, cnt_cancel, cnt_povf, cnt_unf, cnt_nan, cnt_inf);
    $display("fadd %0d fmpy %0d inexact %0d real-arith checks %0d", cnt_fadd, cnt_fmpy, cnt_inexact, cnt_real);
    if (cnt_near == 0 || cnt_cancel == 0 || cnt_povf == 0 || cnt_unf == 0 || cnt_nan == 0 ||
        cnt_inf == 0 || cnt_fadd == 0 || cnt_fmpy == 0 || cnt_inexact == 0 || cnt_real == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
