// N-bit reconfigurable hybrid Ling adder (SIMD adder). The word can be cut
// at every multiple of PART bits; each piece adds on its own with its own
// carry-in. brk[i] = 1 cuts between bit m-1 and bit m, m = PART*(i+1), and
// cin_b[i] is then the carry-in of the piece starting at bit m. With
// brk[i] = 0, cin_b[i] must be 1. For N = 32, PART = 8: brk = 3'b000 is
// one 32-bit add, 3'b010 two 16-bit adds, 3'b111 four 8-bit adds, and any
// other pattern a mix such as (8,8,16).
//
// It is hpcl_adder with the partition built into the carry-in stage, the
// cell stage ahead of the prefix tree, so no gate is added to the tree or
// the critical path:
//   * pair m-2 below each boundary: a break cell, clearing the pair when
//     cut (merged with the &2 cell where m-2 is an &2 position);
//   * pair m-1: a break-with-carry-in cell, turning the pair into
//     (cin_b, 1) when cut. The tree then returns C_{m-1} = cin_b, which
//     selects the carry-select block at bit m;
//   * the 4-bit block at the top of every PART-bit chunk is a carry-select
//     block with carry-out (scsa4_r); cout[j] is the carry out of bit
//     PART*(j+1)-1, which is the carry-out of a piece where a cut lies
//     above it, and cout[N/PART-1] is the word's carry-out;
//   * the prefix tree does not build the top block's path (GEN_TOP = 0),
//     since the top scsa4_r gives the final carry-out.
// The gate form of the break cells, the carry-select blocks with carry-out
// at uncut chunk tops and the cout vector are this design's choices; the
// cell positions follow the published method. Combinational, no clock.
module hpcl_adder_r
  import hpcl_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter int unsigned PART = 8
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic              cin,
  input  logic [N/PART-2:0] brk,
  input  logic [N/PART-2:0] cin_b,
  output logic [N-1:0]      sum,
  output logic [N/PART-1:0] cout
);
  localparam int unsigned M = N / BLK;

  if (!is_pow2(N) || N < 16 || PART % BLK != 0 || PART == 0 || N % PART != 0 || N / PART < 2)
  begin : g_bad_par
    $error("hpcl_adder_r: N must be a power of two >= 16, PART a multiple of 4 dividing N, N/PART >= 2");
  end

  logic [N-1:0] g, p, d;
  logic [N-1:0] gm, pm;
  logic [M-2:0] c4;
  logic         h_top_unused;

  for (genvar n = 0; n < N; n++) begin : g_bit
    pg_cell u_pg (.a(a[n]), .b(b[n]), .g(g[n]), .p(p[n]), .d(d[n]));
    if (cell_kind(n, N, PART) == CK_CIN) begin : g_cin
      cin_cell u_cin (.g0(g[n]), .p0(p[n]), .cin(cin), .g0_m(gm[n]), .p0_m(pm[n]));
    end else if (cell_kind(n, N, PART) == CK_BRK_CIN) begin : g_brk_cin
      brk_cin_cell u_bc (
        .g_n(g[n]), .p_n(p[n]), .brk(brk[(n+1)/PART-1]), .cin_b(cin_b[(n+1)/PART-1]),
        .g_m(gm[n]), .p_m(pm[n])
      );
    end else if (cell_kind(n, N, PART) == CK_BRK) begin : g_brk
      brk_cell u_br (.g_n(g[n]), .p_n(p[n]), .brk(brk[(n+2)/PART-1]), .g_m(gm[n]), .p_m(pm[n]));
    end else if (cell_kind(n, N, PART) == CK_BRK_AND2) begin : g_brk_and2
      brk_and2_cell u_ba (
        .g_n(g[n]), .p_n(p[n]), .p_up(p[n+1]), .brk(brk[(n+2)/PART-1]),
        .g_m(gm[n]), .p_m(pm[n])
      );
    end else if (cell_kind(n, N, PART) == CK_AND2) begin : g_and2
      and2_cell u_and2 (.g_n(g[n]), .p_n(p[n]), .p_up(p[n+1]), .g_m(gm[n]), .p_m(pm[n]));
    end else begin : g_pass
      assign gm[n] = g[n];
      assign pm[n] = p[n];
    end
  end

  ling_ks_tree #(.N(N), .GEN_TOP(1'b0)) u_tree (.g(gm), .p(pm), .c4(c4), .h_top(h_top_unused));

  for (genvar k = 0; k < M; k++) begin : g_csa
    localparam bit SEL_CIN = (k == 0);
    if ((BLK * (k + 1)) % PART == 0) begin : g_r
      scsa4_r u_csa (
        .g   (g[BLK*k +: BLK]),
        .p   (p[BLK*k +: BLK]),
        .d   (d[BLK*k +: BLK]),
        .sel (SEL_CIN ? cin : c4[SEL_CIN ? 0 : k - 1]),
        .sum (sum[BLK*k +: BLK]),
        .cout(cout[BLK*(k+1)/PART - 1])
      );
    end else begin : g_s
      scsa4 u_csa (
        .g  (g[BLK*k +: BLK]),
        .p  (p[BLK*k +: BLK]),
        .d  (d[BLK*k +: BLK]),
        .sel(SEL_CIN ? cin : c4[SEL_CIN ? 0 : k - 1]),
        .sum(sum[BLK*k +: BLK])
      );
    end
  end
endmodule
