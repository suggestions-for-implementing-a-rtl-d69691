// wallace_tree: N x N bit partial-product generation and reduction.
//
// Forms the N partial products a & b[i] (shifted by i) and reduces them in
// levels of 3-2 carry-save adders: every level takes the rows three at a
// time and passes the one or two rows left over on unchanged, so N=53 rows
// shrink 53-36-24-16-11-8-6-4-3-2 in nine levels. The two remaining rows are
// the sum S and carry C of the product (S + C = a*b exactly, no carry is
// lost because every intermediate sum is below 2^(2N)). Combinational; the
// carry-propagate addition of S and C is left to the multiplier-side
// compound adder, and the adder side may shift S and C before it is done.
module wallace_tree #(
  parameter int unsigned N = 53
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] s,
  output logic [2*N-1:0] c
);
  localparam int unsigned PW = 2 * N;

  // Number of rows after each level.
  function automatic int unsigned rows_after(int unsigned lvl);
    int unsigned r = N;
    for (int unsigned i = 0; i < lvl; i++) r = 2 * (r / 3) + (r % 3);
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (rows_after(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  logic [PW-1:0] pp [N];

  // Level 0: the partial products.
  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = PW'(a & {N{b[i]}}) << i;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned R   = rows_after(l);
    localparam int unsigned G   = R / 3;
    localparam int unsigned REM = R % 3;
    logic [PW-1:0] cur [N];
    logic [PW-1:0] nxt [N];
    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa32 #(.W(PW)) u_csa (
        .x(cur[3*g]), .y(cur[3*g+1]), .z(cur[3*g+2]),
        .s(nxt[2*g]), .c(nxt[2*g+1])
      );
    end
    for (genvar k = 0; k < REM; k++) begin : g_pass
      assign nxt[2*G+k] = cur[3*G+k];
    end
    for (genvar k = 2*G + REM; k < N; k++) begin : g_unused
      assign nxt[k] = '0;
    end
  end

  assign s = g_lvl[LEVELS-1].nxt[0];
  assign c = g_lvl[LEVELS-1].nxt[1];
endmodule
