// Ling pair cell: builds the prefix-tree input at bit n from bit pairs,
//   G*_n = g_n | g_{n-1},   P*_n = p_{n-1} & p_{n-2}.
// Combining these pairs with the ordinary operator over every second
// position yields the pseudo-carry H_n = C_n | C_{n-1}, one gate level
// earlier than C_n itself. Two gates, one level, combinational.
module ling_gp_cell (
  input  logic g_n,
  input  logic g_n1,
  input  logic p_n1,
  input  logic p_n2,
  output logic gs,
  output logic ps
);
  assign gs = g_n | g_n1;
  assign ps = p_n1 & p_n2;
endmodule
