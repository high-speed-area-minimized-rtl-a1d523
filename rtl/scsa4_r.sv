// 4-bit carry-select block for the reconfigurable adder: a simple
// carry-select block plus its carry-out. The two candidate carry-outs are
// the block generate G and G|P of the block (carry-in 0 and 1), and `sel`
// picks one, like the sum bits. Placed at the top of every partition
// chunk, where it supplies the segment's carry-out that the prefix tree no
// longer gives once a boundary is cut. The extra logic is this design's
// simplest choice for "a carry-select block that also gives its carry-out".
// Combinational.
module scsa4_r (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic [3:0] d,
  input  logic       sel,
  output logic [3:0] sum,
  output logic       cout
);
  logic gblk, pblk;

  scsa4 u_sum (.g(g), .p(p), .d(d), .sel(sel), .sum(sum));

  assign gblk = g[3] | (p[3] & (g[2] | (p[2] & (g[1] | (p[1] & g[0])))));
  assign pblk = &p;
  assign cout = sel ? (gblk | pblk) : gblk;
endmodule
