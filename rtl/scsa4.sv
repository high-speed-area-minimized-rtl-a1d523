// Simple 4-bit carry-select block. From the shared bit signals (g,p,d) it
// forms two ripple carry chains, one assuming a block carry-in of 0 and
// one assuming 1, and from them two candidate sums; the block carry `sel`
// from the prefix tree then picks one with a 2:1 multiplexer per bit.
// The carry-in-1 chain starts with c1[0] = g0|p0 = p0 (one OR), then
// AND-OR stages, then the sum XOR: 2K-1 = 7 AND-gate delays for K = 4,
// which is what the prefix tree needs to deliver `sel` in, so the block
// is off the critical path. Combinational.
module scsa4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic [3:0] d,
  input  logic       sel,
  output logic [3:0] sum
);
  logic [3:0] c0, c1;  // chain carries out of each bit, block cin 0 / 1;
                       // bit 3 of each is computed but only scsa4_r needs a carry-out
  logic [3:0] s0, s1;

  assign c0[0] = g[0];
  assign c1[0] = p[0];
  assign s0[0] = d[0];
  assign s1[0] = ~d[0];
  for (genvar i = 1; i < 4; i++) begin : g_chain
    assign c0[i] = g[i] | (p[i] & c0[i-1]);
    assign c1[i] = g[i] | (p[i] & c1[i-1]);
    assign s0[i] = d[i] ^ c0[i-1];
    assign s1[i] = d[i] ^ c1[i-1];
  end

  assign sum = sel ? s1 : s0;
endmodule
