// Exhaustive self-checking testbench of pg_cell.
// Pre-processing cell: g, p and d against the truth table of one-bit addition (g is the carry of a+b, d its sum bit, p is 1 unless both are 0).
module tb_pg_cell;
  logic a;
  logic b;
  logic g;
  int   exp_g;
  logic p;
  int   exp_p;
  logic d;
  int   exp_d;
  int checks = 0;
  int failures = 0;
  bit skip;

  pg_cell dut (.a(a), .b(b), .g(g), .p(p), .d(d));

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = v[0];
      b = v[1];
      #1;
      skip = 0;
      exp_g = ((a + b) >> 1) & 1; exp_p = (a + b) != 0; exp_d = (a + b) & 1;
      if (!skip) begin
        checks++;
        if ((g !== 1'(exp_g)) || (p !== 1'(exp_p)) || (d !== 1'(exp_d))) begin
          failures++;
          $display("FAIL input=%b g=%b p=%b d=%b", 2'(v), g, p, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
