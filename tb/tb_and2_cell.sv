// Exhaustive self-checking testbench of and2_cell.
// &2 cell: both outputs are cleared when p_{n+1} is 0 and follow (g_n, p_n) otherwise.
module tb_and2_cell;
  logic g_n;
  logic p_n;
  logic p_up;
  logic g_m;
  int   exp_g_m;
  logic p_m;
  int   exp_p_m;
  int checks = 0;
  int failures = 0;
  bit skip;

  and2_cell dut (.g_n(g_n), .p_n(p_n), .p_up(p_up), .g_m(g_m), .p_m(p_m));

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      g_n = v[0];
      p_n = v[1];
      p_up = v[2];
      #1;
      skip = 0;
      exp_g_m = p_up ? g_n : 0; exp_p_m = p_up ? p_n : 0;
      if (!skip) begin
        checks++;
        if ((g_m !== 1'(exp_g_m)) || (p_m !== 1'(exp_p_m))) begin
          failures++;
          $display("FAIL input=%b g_m=%b p_m=%b", 3'(v), g_m, p_m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
