// Exhaustive self-checking testbench of brk_cin_cell.
// Break-with-carry-in cell: with brk = 0 (and cin_b = 1, the only legal value then) it passes (g, p); with brk = 1 it gives (cin_b, 1).
module tb_brk_cin_cell;
  logic g_n;
  logic p_n;
  logic brk;
  logic cin_b;
  logic g_m;
  int   exp_g_m;
  logic p_m;
  int   exp_p_m;
  int checks = 0;
  int failures = 0;
  bit skip;

  brk_cin_cell dut (.g_n(g_n), .p_n(p_n), .brk(brk), .cin_b(cin_b), .g_m(g_m), .p_m(p_m));

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      g_n = v[0];
      p_n = v[1];
      brk = v[2];
      cin_b = v[3];
      #1;
      skip = 0;
      skip = !brk && !cin_b; exp_g_m = brk ? cin_b : g_n; exp_p_m = brk ? 1 : p_n;
      if (!skip) begin
        checks++;
        if ((g_m !== 1'(exp_g_m)) || (p_m !== 1'(exp_p_m))) begin
          failures++;
          $display("FAIL input=%b g_m=%b p_m=%b", 4'(v), g_m, p_m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
