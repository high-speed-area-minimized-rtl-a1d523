// Black node of the prefix tree: the associative carry operator
//   (gh,ph) o (gl,pl) = (gh | ph&gl, ph&pl)
// where (gh,ph) covers the more significant span. Used unchanged on Ling
// pairs (G*,P*). Combinational, one AND-OR level (3 two-input gates).
module prefix_cell (
  input  logic gh,
  input  logic ph,
  input  logic gl,
  input  logic pl,
  output logic go,
  output logic po
);
  assign go = gh | (ph & gl);
  assign po = ph & pl;
endmodule
