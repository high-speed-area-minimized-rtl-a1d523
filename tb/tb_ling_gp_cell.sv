// Exhaustive self-checking testbench of ling_gp_cell.
// Ling pair cell: G* = g_n OR g_{n-1}, P* = p_{n-1} AND p_{n-2}, checked over all 16 input combinations.
module tb_ling_gp_cell;
  logic g_n;
  logic g_n1;
  logic p_n1;
  logic p_n2;
  logic gs;
  int   exp_gs;
  logic ps;
  int   exp_ps;
  int checks = 0;
  int failures = 0;
  bit skip;

  ling_gp_cell dut (.g_n(g_n), .g_n1(g_n1), .p_n1(p_n1), .p_n2(p_n2), .gs(gs), .ps(ps));

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      g_n = v[0];
      g_n1 = v[1];
      p_n1 = v[2];
      p_n2 = v[3];
      #1;
      skip = 0;
      exp_gs = (g_n + g_n1) > 0; exp_ps = (p_n1 + p_n2) == 2;
      if (!skip) begin
        checks++;
        if ((gs !== 1'(exp_gs)) || (ps !== 1'(exp_ps))) begin
          failures++;
          $display("FAIL input=%b gs=%b ps=%b", 4'(v), gs, ps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
