// Test helper: drives one hpcl_adder of width N with NVEC vectors and
// compares {cout,sum} with a + b + cin computed in N+1-bit arithmetic.
// The vectors are corner cases (all-propagate words, which carry cin
// through every block, all-generate, alternating patterns), then random
// operands, some with long runs of propagate bits. Raises `done` when
// finished and reports its counts on the outputs.
module adder_chk #(
  parameter int unsigned N    = 32,
  parameter int unsigned NVEC = 2000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  logic [N:0]   expect_v;

  hpcl_adder #(.N(N)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic logic [N-1:0] rnd();
    logic [((N + 31) / 32) * 32 - 1:0] w;
    for (int i = 0; i < N; i += 32) w[i +: 32] = $urandom;
    return w[N-1:0];
  endfunction

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vc);
    a = va; b = vb; cin = vc;
    #1;
    expect_v = {1'b0, va} + {1'b0, vb} + {{N{1'b0}}, vc};
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      if (failures < 10)
        $display("N=%0d FAIL a=%h b=%h cin=%b got %b_%h expected %b_%h",
                 N, va, vb, vc, cout, sum, expect_v[N], expect_v[N-1:0]);
    end
  endtask

  initial begin
    logic [N-1:0] ra, mask;
    done = 0; checks = 0; failures = 0;
    for (int c = 0; c < 2; c++) begin
      apply('0, '0, c[0]);
      apply('1, '0, c[0]);          // all propagate: cin ripples to cout
      apply('0, '1, c[0]);
      apply('1, '1, c[0]);          // all generate
      apply({N/2{2'b01}}, {N/2{2'b10}}, c[0]);
      apply({N/2{2'b01}}, {N/2{2'b01}}, c[0]);
      for (int k = 0; k < N; k++) begin
        apply(~(N'(1) << k), N'(1) << k, c[0]);  // propagate everywhere, one break
        apply(N'(1) << k, N'(1) << k, c[0]);     // single generate
      end
    end
    for (int v = 0; v < NVEC; v++) begin
      ra = rnd();
      if (v % 3 == 0) begin
        mask = rnd();                             // b close to ~a: long carries
        apply(ra, ~ra ^ (mask & rnd() & rnd()), 1'($urandom));
      end else begin
        apply(ra, rnd(), 1'($urandom));
      end
    end
    done = 1;
  end
endmodule
