// Exhaustive self-checking testbench of scsa4: all 4-bit operand pairs and
// both block carries (512 cases); sum must equal the low 4 bits of
// a + b + sel.
module tb_scsa4;
  logic [3:0] a, b, sum;
  logic       sel;
  logic [4:0] ref_v;
  int checks = 0;
  int failures = 0;

  scsa4 dut (.g(a & b), .p(a | b), .d(a ^ b), .sel(sel), .sum(sum));

  initial begin
    #10000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {sel, a, b} = 9'(v);
      #1;
      ref_v = 5'(a) + 5'(b) + 5'(sel);
      checks++;
      if (sum !== ref_v[3:0]) begin
        failures++;
        $display("FAIL a=%h b=%h sel=%b sum=%h expected %h", a, b, sel, sum, ref_v[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
