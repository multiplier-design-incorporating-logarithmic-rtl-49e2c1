// tb_balec: self-checking testbench for the antilogarithmic error corrector.
// Exhaustive over all 1024 added mantissas: the output must equal the
// reference formula (including the leading-one sub-cases of the first
// region), have its MSB set, and lie within 0.032 of 2^m.
module tb_balec;
  import rlns_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  m = '0;
  logic [10:0] pm;

  balec dut (.m(m), .pm(pm));

  initial begin
    for (int v = 0; v < 1024; v++) begin
      real err;
      @(posedge clk); m = 10'(v); #1;
      checks++;
      if (int'(pm) != ref_balec(v) || !pm[10]) begin
        failures++; $display("FAIL m=%0d pm=%0d exp=%0d", v, pm, ref_balec(v));
      end
      err = $pow(2.0, v / 1024.0) - pm / 1024.0;
      checks++;
      if (err > 0.032 || err < -0.032) begin
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
