// "&1" cell: takes the place of a buffer node on the last prefix level
// and converts a Ling pseudo-carry into an ordinary carry, C_n = p_n & H_n.
// One AND gate, combinational.
module and1_cell (
  input  logic h,
  input  logic p_n,
  output logic c
);
  assign c = p_n & h;
endmodule
