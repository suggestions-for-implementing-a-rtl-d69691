// mul_round: multiplier side of the SNAP unit.
//
// Adds the Wallace-tree outputs S and C and rounds the 106-bit product to
// 53 bits. Two short carry-lookahead adders sum the low 52 and low 53 bits
// of S and C, one for each place the product's unit in the last place (ULP)
// can fall; a 54-bit compound adder sums the upper bits 105:52 and the
// low-part carry selects its +0 or +1 output. Bit 105 of the sum (product
// >= 2.0) moves the ULP from bit 52 to bit 53. The rounding logic then
// selects the rounded significand.
//
// For the adder side it also returns r_Mul: the low-part carry plus the
// rounding increment, counted in product ULPs. With S and C cleared below
// the ULP (the rounding mask) the rounded product is exactly
// S_masked + C_masked + r_Mul * ULP, so the adder side can use the
// unadded S and C. The two low-part adders and the compound adder follow
// the published multiplier; applying the rounding increment through
// round_select instead of a pre-added rounding constant is this design's
// simplification. Combinational.
module mul_round
  import snap_pkg::*;
(
  input  logic [PROD_W-1:0] s,
  input  logic [PROD_W-1:0] c,
  input  logic              sign,
  input  rmode_e            rm,
  output logic [SIG_W-1:0]  sig_r,
  output logic [1:0]        exp_inc,
  output logic              ovf,
  output logic [1:0]        rmul,
  output logic              inexact
);
  logic [51:0]   lo52;
  logic [52:0]   lo53;
  logic          cl52, cl53;
  logic [XT_W-1:0] hi0, hi1, upper;
  logic [SIG_W-1:0] sig_t;
  logic          guard, sticky, rcarry, inc;

  // CLA (round): low-order sums, one per possible ULP position.
  always_comb begin
    {cl52, lo52} = {1'b0, s[51:0]} + {1'b0, c[51:0]};
    {cl53, lo53} = {1'b0, s[52:0]} + {1'b0, c[52:0]};
  end

  compound_adder #(.W(XT_W)) u_hi (
    .a(s[PROD_W-1:52]), .b(c[PROD_W-1:52]),
    .sum0(hi0), .sum1(hi1), .cout0(), .cout1()
  );

  always_comb begin
    upper = cl52 ? hi1 : hi0;           // product bits 105:52
    ovf   = upper[XT_W-1];
    if (ovf) begin
      sig_t  = upper[XT_W-1:1];
      guard  = upper[0];
      sticky = |lo52;
    end else begin
      sig_t  = upper[SIG_W-1:0];
      guard  = lo52[51];
      sticky = |lo52[50:0];
    end
  end

  round_select u_round (
    .sig(sig_t), .guard(guard), .sticky(sticky), .sign(sign), .rm(rm),
    .sig_r(sig_r), .carry(rcarry), .inexact(inexact), .inc(inc)
  );

  always_comb begin
    exp_inc = 2'(ovf) + 2'(rcarry);
    rmul    = 2'(ovf ? cl53 : cl52) + 2'(inc);
  end
endmodule
