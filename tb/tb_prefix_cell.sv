// Exhaustive self-checking testbench of prefix_cell.
// Black node: the combined span generates if the upper span generates or propagates a lower generate, and propagates only if both propagate.
module tb_prefix_cell;
  logic gh;
  logic ph;
  logic gl;
  logic pl;
  logic go;
  int   exp_go;
  logic po;
  int   exp_po;
  int checks = 0;
  int failures = 0;
  bit skip;

  prefix_cell dut (.gh(gh), .ph(ph), .gl(gl), .pl(pl), .go(go), .po(po));

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      gh = v[0];
      ph = v[1];
      gl = v[2];
      pl = v[3];
      #1;
      skip = 0;
      exp_go = gh ? 1 : (ph ? gl : 0); exp_po = (ph && pl) ? 1 : 0;
      if (!skip) begin
        checks++;
        if ((go !== 1'(exp_go)) || (po !== 1'(exp_po))) begin
          failures++;
          $display("FAIL input=%b go=%b po=%b", 4'(v), go, po);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
