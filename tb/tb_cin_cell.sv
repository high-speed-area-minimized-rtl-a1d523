// Exhaustive self-checking testbench of cin_cell.
// Carry-in cell: checked against the carry out of bit 0 for every (g0, p0, cin); p0 passes unchanged.
module tb_cin_cell;
  logic g0;
  logic p0;
  logic cin;
  logic g0_m;
  int   exp_g0_m;
  logic p0_m;
  int   exp_p0_m;
  int checks = 0;
  int failures = 0;
  bit skip;

  cin_cell dut (.g0(g0), .p0(p0), .cin(cin), .g0_m(g0_m), .p0_m(p0_m));

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      g0 = v[0];
      p0 = v[1];
      cin = v[2];
      #1;
      skip = 0;
      exp_g0_m = g0 ? 1 : (p0 ? cin : 0); exp_p0_m = p0;
      if (!skip) begin
        checks++;
        if ((g0_m !== 1'(exp_g0_m)) || (p0_m !== 1'(exp_p0_m))) begin
          failures++;
          $display("FAIL input=%b g0_m=%b p0_m=%b", 3'(v), g0_m, p0_m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
