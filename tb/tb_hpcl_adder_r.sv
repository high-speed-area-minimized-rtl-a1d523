// Self-checking testbench of hpcl_adder_r: the 32-bit adder with 8-bit
// partitions (every one of its eight partition schemes), the 16- and
// 64-bit versions with 8-bit partitions, and 32 bits with 4- and 16-bit
// partitions. Sums and chunk carry-outs are compared with a reference that
// adds each piece on its own.
module tb_hpcl_adder_r;
  logic [4:0] dn;
  int         c [5];
  int         f [5];
  int         checks, failures;

  adder_r_chk #(.N(32), .PART(8))  u0 (.done(dn[0]), .checks(c[0]), .failures(f[0]));
  adder_r_chk #(.N(16), .PART(8))  u1 (.done(dn[1]), .checks(c[1]), .failures(f[1]));
  adder_r_chk #(.N(64), .PART(8))  u2 (.done(dn[2]), .checks(c[2]), .failures(f[2]));
  adder_r_chk #(.N(32), .PART(4))  u3 (.done(dn[3]), .checks(c[3]), .failures(f[3]));
  adder_r_chk #(.N(32), .PART(16)) u4 (.done(dn[4]), .checks(c[4]), .failures(f[4]));

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endfunction

  initial begin
    #200000;
    total();
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (&dn);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
