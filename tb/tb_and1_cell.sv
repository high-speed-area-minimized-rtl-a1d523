// Exhaustive self-checking testbench of and1_cell.
// &1 cell: C = p AND H over the four input combinations.
module tb_and1_cell;
  logic h;
  logic p_n;
  logic c;
  int   exp_c;
  int checks = 0;
  int failures = 0;
  bit skip;

  and1_cell dut (.h(h), .p_n(p_n), .c(c));

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      h = v[0];
      p_n = v[1];
      #1;
      skip = 0;
      exp_c = (h + p_n) == 2;
      if (!skip) begin
        checks++;
        if ((c !== 1'(exp_c))) begin
          failures++;
          $display("FAIL input=%b c=%b", 2'(v), c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
