// Carry-in cell: treats the carry-in as a pair (g_-1,p_-1) = (cin,1) and
// merges it into bit 0 with the carry operator, giving
//   g0_m = g0 | (p0 & cin),  p0_m = p0.
// The rest of the adder is then the same as an adder without carry-in,
// and cin drives a single gate. Combinational, one AND-OR level.
// p0_m is p0 itself (p_-1 = 1); the output is kept so the cell has the
// same pair-in, pair-out shape as the other cells of its stage.
module cin_cell (
  input  logic g0,
  input  logic p0,
  input  logic cin,
  output logic g0_m,
  output logic p0_m
);
  assign g0_m = g0 | (p0 & cin);
  assign p0_m = p0;
endmodule
