// Self-checking testbench of hpcl_adder at the widths the design is
// evaluated at (16, 32 and 64 bits) and at 128 bits. Each width runs
// corner cases and random vectors against a + b + cin.
module tb_hpcl_adder;
  logic d16, d32, d64, d128;
  int   c16, c32, c64, c128, f16, f32, f64, f128;
  int   checks, failures;

  adder_chk #(.N(16))  u16  (.done(d16),  .checks(c16),  .failures(f16));
  adder_chk #(.N(32))  u32  (.done(d32),  .checks(c32),  .failures(f32));
  adder_chk #(.N(64))  u64  (.done(d64),  .checks(c64),  .failures(f64));
  adder_chk #(.N(128)) u128 (.done(d128), .checks(c128), .failures(f128));

  initial begin
    #100000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32 + c64 + c128, f16 + f32 + f64 + f128 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d16 && d32 && d64 && d128);
    checks   = c16 + c32 + c64 + c128;
    failures = f16 + f32 + f64 + f128;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
