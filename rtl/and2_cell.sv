// "&2" cell: placed on the bit pair (g_n,p_n), n = 4k-2, ahead of the Ling
// pair cell of bit n+1. It ANDs both signals with p_{n+1}:
//   g_m = g_n & p_{n+1},  p_m = p_n & p_{n+1}.
// The Ling pair of bit n+1 then becomes (g_{n+1} | p_{n+1}g_n,
// p_{n+1}p_n p_{n-1}) = p_{n+1} & (G*,P*), so the prefix tree returns the
// normal carry C_{n+1} = p_{n+1} & H_{n+1} for that position without an
// extra level after the tree. Higher positions are unaffected, because
// their Ling propagate terms already contain p_{n+1}.
// Two AND gates, combinational.
module and2_cell (
  input  logic g_n,
  input  logic p_n,
  input  logic p_up,
  output logic g_m,
  output logic p_m
);
  assign g_m = g_n & p_up;
  assign p_m = p_n & p_up;
endmodule
