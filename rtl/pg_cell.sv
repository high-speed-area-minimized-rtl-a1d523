// Pre-processing cell of a parallel-prefix adder: bit generate g = a&b,
// bit propagate p = a|b (the inclusive-OR form that Ling addition needs)
// and half-sum d = a^b. Combinational, one gate level.
module pg_cell (
  input  logic a,
  input  logic b,
  output logic g,
  output logic p,
  output logic d
);
  assign g = a & b;
  assign p = a | b;
  assign d = a ^ b;
endmodule
