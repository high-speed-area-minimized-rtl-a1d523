// N-bit area-minimized hybrid parallel-prefix / carry-select Ling adder
// with carry-in: sum = a + b + cin, cout = carry out of bit N-1.
//
// Structure, bit pair stage to sums:
//   * pg cells: g = a&b, p = a|b, d = a^b for every bit;
//   * carry-in cell on bit 0: g0 <- g0 | p0&cin, so the carry-in costs one
//     gate on one pair and no extra tree level;
//   * &2 cells on pairs n = 4k-2, k = N/8+1 .. N/4-1, so that the upper
//     half of the tree delivers normal carries C_{4k-1};
//   * the area-minimized Ling Kogge-Stone tree (ling_ks_tree), which gives
//     C_{4k-1} for k = 1 .. N/4-1 (&1 cells convert the lower half) and
//     the pseudo-carry H_{N-1};
//   * N/4 simple 4-bit carry-select blocks; block 0 is selected by cin,
//     block k by C_{4k-1};
//   * cout = p_{N-1} & H_{N-1} (an &1 cell).
// Because every block carry is a normal carry, the cheap carry-select
// blocks can be used instead of Ling-specific ones.
//
// N must be a power of two, at least 16. Purely combinational: no clock.
// The structure and cell positions follow the published method; the
// lowest block being selected by cin is this design's reading.
module hpcl_adder
  import hpcl_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned M = N / BLK;

  if (!is_pow2(N) || N < 16) begin : g_bad_n
    $error("hpcl_adder: N must be a power of two, at least 16");
  end

  logic [N-1:0]   g, p, d;     // bit signals
  logic [N-1:0]   gm, pm;      // pairs after carry-in and &2 cells
  logic [M-2:0]   c4;          // C_{4k-1}, k = 1..M-1
  logic           h_top;       // H_{N-1}

  for (genvar n = 0; n < N; n++) begin : g_bit
    pg_cell u_pg (.a(a[n]), .b(b[n]), .g(g[n]), .p(p[n]), .d(d[n]));
    if (cell_kind(n, N, 0) == CK_CIN) begin : g_cin
      cin_cell u_cin (.g0(g[n]), .p0(p[n]), .cin(cin), .g0_m(gm[n]), .p0_m(pm[n]));
    end else if (cell_kind(n, N, 0) == CK_AND2) begin : g_and2
      and2_cell u_and2 (.g_n(g[n]), .p_n(p[n]), .p_up(p[n+1]), .g_m(gm[n]), .p_m(pm[n]));
    end else begin : g_pass
      assign gm[n] = g[n];
      assign pm[n] = p[n];
    end
  end

  ling_ks_tree #(.N(N), .GEN_TOP(1'b1)) u_tree (.g(gm), .p(pm), .c4(c4), .h_top(h_top));

  for (genvar k = 0; k < M; k++) begin : g_csa
    scsa4 u_csa (
      .g  (g[BLK*k +: BLK]),
      .p  (p[BLK*k +: BLK]),
      .d  (d[BLK*k +: BLK]),
      .sel((k == 0) ? cin : c4[(k == 0) ? 0 : k - 1]),
      .sum(sum[BLK*k +: BLK])
    );
  end

  and1_cell u_cout (.h(h_top), .p_n(p[N-1]), .c(cout));
endmodule
