// Exhaustive self-checking testbench of scsa4_r: all 4-bit operand pairs
// and both block carries; {cout, sum} must equal a + b + sel.
module tb_scsa4_r;
  logic [3:0] a, b, sum;
  logic       sel, cout;
  logic [4:0] ref_v;
  int checks = 0;
  int failures = 0;

  scsa4_r dut (.g(a & b), .p(a | b), .d(a ^ b), .sel(sel), .sum(sum), .cout(cout));

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
      if ({cout, sum} !== ref_v) begin
        failures++;
        $display("FAIL a=%h b=%h sel=%b got %b_%h expected %b_%h", a, b, sel, cout, sum,
                 ref_v[4], ref_v[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
