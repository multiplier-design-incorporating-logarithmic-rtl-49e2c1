// tb_blec: self-checking testbench for the logarithmic error corrector.
// Exhaustive over all 1024 mantissas: the output must equal the reference
// piecewise-linear formula, and must lie within 0.018 of log2(1 + m).
module tb_blec;
  import rlns_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] m = '0, cm;

  blec dut (.m(m), .cm(cm));

  initial begin
    for (int v = 0; v < 1024; v++) begin
      real exact, err;
      @(posedge clk); m = 10'(v); #1;
      checks++;
      if (int'(cm) != ref_blec(v)) begin
        failures++; $display("FAIL m=%0d cm=%0d exp=%0d", v, cm, ref_blec(v));
      end
      exact = $ln(1.0 + v / 1024.0) / $ln(2.0);
      err = exact - cm / 1024.0;
      checks++;
      if (err > 0.018 || err < -0.018) begin
        failures++; $display("FAIL accuracy m=%0d err=%f", v, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
