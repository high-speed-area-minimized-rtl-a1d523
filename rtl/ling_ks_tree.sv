// Area-minimized Kogge-Stone tree for Ling pseudo-carries.
//
// Only the carries at the tops of the 4-bit carry-select blocks (bits
// 4k-1) are needed, and Ling carries at odd bits depend only on odd-bit
// pairs. So the tree has:
//   1. N/2 Ling pair cells, one per odd bit n: G*_n = g_n|g_{n-1},
//      P*_n = p_{n-1}&p_{n-2} (p_{-1} = 0: the carry-in is already folded
//      into g_0 by the caller);
//   2. N/4 black nodes merging bits 4b+3 and 4b+1 into one term per block;
//   3. a Kogge-Stone prefix over the N/4 block terms (log2(N/4) levels).
// Its outputs are H_{4b+3}. Blocks in the lower half are final one level
// early and would pass the last level through buffers; there an &1 cell
// turns H into C = p_{4b+3} & H. Blocks in the upper half already come out
// as normal carries because the caller placed &2 cells on their pairs.
// With N = 32: 16 pair cells and 8 + 17 = 25 black nodes.
//
// g/p are the bit pairs after the carry-in, &2 and break cells.
// c4[b] = C_{4b+3} for b = 0..N/4-2. h_top = H_{N-1}, built only when
// GEN_TOP = 1; with GEN_TOP = 0 the whole path of the top block is left
// out (the reconfigurable adder takes its carry-out from a carry-select
// block instead) and h_top is 0, and bits N-4..N-1 of g/p go unused.
// p_0 is never read (P*_1 = p_0 & p_-1 = 0), nor p_{N-1} (the top
// carry-out's &1 cell is outside the tree).
// Combinational.
module ling_ks_tree #(
  parameter int unsigned N       = 32,
  parameter bit          GEN_TOP = 1'b1
) (
  input  logic [N-1:0]   g,
  input  logic [N-1:0]   p,
  output logic [N/4-2:0] c4,
  output logic           h_top
);
  localparam int unsigned M  = N / 4;             // number of 4-bit blocks
  localparam int unsigned MT = GEN_TOP ? M : M - 1; // blocks the tree covers
  localparam int unsigned L  = $clog2(M);         // Kogge-Stone levels

  // Ling pairs at odd bits, index j <-> bit 2j+1
  logic [2*MT-1:0] gs, ps;
  // block terms per Kogge-Stone level
  logic [MT-1:0] gk [L+1];
  logic [MT-1:0] pk [L+1];

  for (genvar j = 0; j < 2 * MT; j++) begin : g_pair
    if (j == 0) begin : g_low
      // bit 1: P*_1 = p_0 & p_-1 = 0
      assign gs[0] = g[1] | g[0];
      assign ps[0] = 1'b0;
    end else begin : g_cell
      ling_gp_cell u_gp (
        .g_n (g[2*j+1]), .g_n1(g[2*j]),
        .p_n1(p[2*j]),   .p_n2(p[2*j-1]),
        .gs  (gs[j]),    .ps  (ps[j])
      );
    end
  end

  for (genvar b = 0; b < MT; b++) begin : g_blk
    prefix_cell u_blk (
      .gh(gs[2*b+1]), .ph(ps[2*b+1]),
      .gl(gs[2*b]),   .pl(ps[2*b]),
      .go(gk[0][b]),  .po(pk[0][b])
    );
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar b = 0; b < MT; b++) begin : g_node
      if (b >= (1 << l)) begin : g_black
        prefix_cell u_pc (
          .gh(gk[l][b]),            .ph(pk[l][b]),
          .gl(gk[l][b - (1 << l)]), .pl(pk[l][b - (1 << l)]),
          .go(gk[l+1][b]),          .po(pk[l+1][b])
        );
      end else begin : g_buf
        assign gk[l+1][b] = gk[l][b];
        assign pk[l+1][b] = pk[l][b];
      end
    end
  end

  for (genvar b = 0; b < M - 1; b++) begin : g_out
    if (b < M / 2) begin : g_and1
      and1_cell u_and1 (.h(gk[L][b]), .p_n(p[4*b+3]), .c(c4[b]));
    end else begin : g_direct
      assign c4[b] = gk[L][b];
    end
  end

  if (GEN_TOP) begin : g_top
    assign h_top = gk[L][M-1];
  end else begin : g_notop
    assign h_top = 1'b0;
  end
endmodule
