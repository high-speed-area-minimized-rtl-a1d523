// Break cell of the reconfigurable adder, on bit pair n = m-2 below a
// partition boundary m that lies in the lower half of the word. When brk
// is 1 it clears (g_n,p_n), so the Ling pair at m-1 no longer draws on the
// segment below. When brk is 0 it passes the pair through.
// The AND-with-inverted-break form is this design's choice; the function
// is the one the architecture calls for. Combinational, two levels.
module brk_cell (
  input  logic g_n,
  input  logic p_n,
  input  logic brk,
  output logic g_m,
  output logic p_m
);
  assign g_m = g_n & ~brk;
  assign p_m = p_n & ~brk;
endmodule
