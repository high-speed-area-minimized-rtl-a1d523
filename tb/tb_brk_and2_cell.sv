// Exhaustive self-checking testbench of brk_and2_cell.
// &2 cell merged with the break cell: (0, 0) when brk is 1, otherwise the &2 function.
module tb_brk_and2_cell;
  logic g_n;
  logic p_n;
  logic p_up;
  logic brk;
  logic g_m;
  int   exp_g_m;
  logic p_m;
  int   exp_p_m;
  int checks = 0;
  int failures = 0;
  bit skip;

  brk_and2_cell dut (.g_n(g_n), .p_n(p_n), .p_up(p_up), .brk(brk), .g_m(g_m), .p_m(p_m));

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
      p_up = v[2];
      brk = v[3];
      #1;
      skip = 0;
      exp_g_m = (brk || !p_up) ? 0 : g_n; exp_p_m = (brk || !p_up) ? 0 : p_n;
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
