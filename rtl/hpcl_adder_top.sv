// Top level: the two adders of this design side by side, each with its
// own ports.
//   * u_fix: hpcl_adder, the N-bit area-minimized hybrid Ling adder with
//     carry-in: {cout, sum} = a + b + cin.
//   * u_rcf: hpcl_adder_r, its reconfigurable version, which splits the
//     word at multiples of PART bits under control of brk/cin_b (see
//     hpcl_adder_r for the rules).
// Defaults N = 32, PART = 8. Purely combinational: results are valid one
// propagation delay after the inputs change.
module hpcl_adder_top #(
  parameter int unsigned N    = 32,
  parameter int unsigned PART = 8
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic              cin,
  output logic [N-1:0]      sum,
  output logic              cout,
  input  logic [N-1:0]      ra,
  input  logic [N-1:0]      rb,
  input  logic              rcin,
  input  logic [N/PART-2:0] brk,
  input  logic [N/PART-2:0] cin_b,
  output logic [N-1:0]      rsum,
  output logic [N/PART-1:0] rcout
);
  hpcl_adder #(.N(N)) u_fix (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  hpcl_adder_r #(.N(N), .PART(PART)) u_rcf (
    .a(ra), .b(rb), .cin(rcin), .brk(brk), .cin_b(cin_b), .sum(rsum), .cout(rcout)
  );
endmodule
