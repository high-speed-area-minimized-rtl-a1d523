// Break-with-carry-in cell of the reconfigurable adder, on bit pair
// n = m-1 just below a partition boundary m. With brk = 1 it replaces the
// pair by (cin_b, 1): together with the break cell at m-2 the tree then
// sees the segment carry-in cin_b as the carry out of bit m-1.
//   g_m = (g_n | brk) & cin_b,  p_m = p_n | brk
// This two-level OR-AND form requires cin_b = 1 whenever brk = 0, which is
// the rule for unused carry-ins of this adder. Combinational.
module brk_cin_cell (
  input  logic g_n,
  input  logic p_n,
  input  logic brk,
  input  logic cin_b,
  output logic g_m,
  output logic p_m
);
  assign g_m = (g_n | brk) & cin_b;
  assign p_m = p_n | brk;
endmodule
