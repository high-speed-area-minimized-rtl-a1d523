// "&2" cell merged with the break cell, used where an &2 position
// (n = 4k-2, upper half of the word) is also at m-2 below a partition
// boundary m. It converts the tree output at n+1 to a normal carry and,
// when brk is 1, cuts the pair from the segment below:
//   g_m = g_n & p_{n+1} & ~brk,  p_m = p_n & p_{n+1} & ~brk.
// Combinational, two levels.
module brk_and2_cell (
  input  logic g_n,
  input  logic p_n,
  input  logic p_up,
  input  logic brk,
  output logic g_m,
  output logic p_m
);
  assign g_m = g_n & p_up & ~brk;
  assign p_m = p_n & p_up & ~brk;
endmodule
