// fp_ref_pkg: bit-exact reference model of IEEE double multiply and add
// for the testbenches, written independently of the RTL datapath.
//
// Values are handled exactly as (-1)^s * M * 2^e with a 256-bit integer M
// and then rounded once (round_pack). Denormal inputs count as zero and
// results below the normal range flush to a signed zero, raising underflow
// and inexact, matching the unit's documented choice. The fused
// multiply-add reference is the IEEE add of the IEEE-rounded product and c.
// Flags are {invalid, overflow, underflow, inexact}.
package fp_ref_pkg;

  typedef struct packed {
    logic [63:0] res;
    logic [3:0]  flags;
  } ref_t;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic f_nan(logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] != 0;
  endfunction
  function automatic logic f_snan(logic [63:0] x);
    return f_nan(x) && !x[51];
  endfunction
  function automatic logic f_inf(logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] == 0;
  endfunction
  function automatic logic f_zero(logic [63:0] x);
    return x[62:52] == 0;
  endfunction
  function automatic logic [52:0] f_sig(logic [63:0] x);
    return {1'b1, x[51:0]};
  endfunction

  // Round (-1)^s * m * 2^e (m > 0) to double precision in mode rm
  // (0 nearest-even, 1 toward zero, 2 toward +inf, 3 toward -inf).
  function automatic ref_t round_pack(logic s, logic [255:0] m, int e, int rm);
    ref_t r;
    int   lead, eb, sh;
    logic [255:0] sig;
    logic guard, sticky, up;
    lead = 0;
    for (int i = 0; i < 256; i++) if (m[i]) lead = i;
    eb = lead + e + 1023;
    if (lead >= 52) begin
      sh     = lead - 52;
      sig    = m >> sh;
      guard  = (sh > 0) ? m[sh-1] : 1'b0;
      sticky = (sh > 1) ? ((m & ((256'd1 << (sh - 1)) - 1)) != 0) : 1'b0;
    end else begin
      sig = m << (52 - lead); guard = 0; sticky = 0;
    end
    case (rm)
      0: up = guard && (sig[0] || sticky);
      1: up = 0;
      2: up = !s && (guard || sticky);
      default: up = s && (guard || sticky);
    endcase
    if (up) sig = sig + 1;
    if (sig[53]) begin sig = sig >> 1; eb++; end
    r.flags = {3'b000, guard | sticky};
    if (eb >= 2047) begin
      r.flags = 4'b0101;
      if (rm == 0 || (rm == 2 && !s) || (rm == 3 && s)) r.res = {s, 11'h7FF, 52'd0};
      else r.res = {s, 11'h7FE, {52{1'b1}}};
    end else if (eb <= 0) begin
      r.flags = 4'b0011;
      r.res = {s, 63'd0};
    end else begin
      r.res = {s, eb[10:0], sig[51:0]};
    end
    return r;
  endfunction

  function automatic ref_t ref_mul(logic [63:0] a, logic [63:0] b, int rm);
    ref_t r;
    logic s = a[63] ^ b[63];
    r.flags = 0;
    if (f_nan(a) || f_nan(b)) begin
      r.res = QNAN; r.flags[3] = f_snan(a) || f_snan(b);
    end else if ((f_inf(a) && f_zero(b)) || (f_zero(a) && f_inf(b))) begin
      r.res = QNAN; r.flags[3] = 1;
    end else if (f_inf(a) || f_inf(b)) begin
      r.res = {s, 11'h7FF, 52'd0};
    end else if (f_zero(a) || f_zero(b)) begin
      r.res = {s, 63'd0};
    end else begin
      r = round_pack(s, 256'(f_sig(a)) * 256'(f_sig(b)),
                     int'(a[62:52]) + int'(b[62:52]) - 2 * 1075, rm);
    end
    return r;
  endfunction

  function automatic ref_t ref_add(logic [63:0] x, logic [63:0] y, int rm);
    ref_t r;
    int ex, ey, emin, dd;
    logic [255:0] mx, my, m;
    logic s;
    r.flags = 0;
    if (f_nan(x) || f_nan(y)) begin
      r.res = QNAN; r.flags[3] = f_snan(x) || f_snan(y);
    end else if (f_inf(x) && f_inf(y) && x[63] != y[63]) begin
      r.res = QNAN; r.flags[3] = 1;
    end else if (f_inf(x)) begin
      r.res = x;
    end else if (f_inf(y)) begin
      r.res = y;
    end else if (f_zero(x) && f_zero(y)) begin
      r.res = {(x[63] == y[63]) ? x[63] : (rm == 3), 63'd0};
    end else if (f_zero(x)) begin
      r.res = y;
    end else if (f_zero(y)) begin
      r.res = x;
    end else begin
      ex = int'(x[62:52]); ey = int'(y[62:52]);
      dd = (ex > ey) ? ex - ey : ey - ex;
      if (dd <= 150) begin
        emin = (ex < ey) ? ex : ey;
        mx = 256'(f_sig(x)) << (ex - emin);
        my = 256'(f_sig(y)) << (ey - emin);
      end else if (ex > ey) begin
        emin = ex - 3; mx = 256'(f_sig(x)) << 3; my = 1;
      end else begin
        emin = ey - 3; my = 256'(f_sig(y)) << 3; mx = 1;
      end
      if (x[63] == y[63]) begin m = mx + my; s = x[63]; end
      else if (mx > my)   begin m = mx - my; s = x[63]; end
      else                begin m = my - mx; s = y[63]; end
      if (m == 0) r.res = {rm == 3, 63'd0};
      else r = round_pack(s, m, emin - 1075, rm);
    end
    return r;
  endfunction

  // op: 0 FMPY, 1 FADD (c +/- d), 2 FMAF (a*b +/- c)
  function automatic ref_t ref_op(int op, logic sub, int rm, logic [63:0] a,
                                  logic [63:0] b, logic [63:0] c, logic [63:0] d);
    ref_t p, r;
    if (op == 0) return ref_mul(a, b, rm);
    if (op == 1) return ref_add(c, {d[63] ^ sub, d[62:0]}, rm);
    p = ref_mul(a, b, rm);
    r = ref_add(p.res, {c[63] ^ sub, c[62:0]}, rm);
    // A NaN product has already raised its invalid flag.
    r.flags = r.flags | p.flags;
    return r;
  endfunction

  // Random double with exponent near e0 (+/- spread); a few zeros.
  function automatic logic [63:0] rand_fp(int e0, int spread);
    int e;
    e = e0 + int'($urandom_range(2 * spread)) - spread;
    if (e < 1) e = 1;
    if (e > 2046) e = 2046;
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

endpackage
