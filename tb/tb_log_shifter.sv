// tb_log_shifter: self-checking testbench for the normalising shifter.
// For random non-zero 32-bit operands (of every leading-one position) the
// expected mantissa is (a * 2^(31-k)) mod 2^31, formed by multiplication.
module tb_log_shifter;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a = 32'd1;
  logic [4:0]  k = '0;
  logic [30:0] frac;

  log_shifter #(.N(32)) dut (.a(a), .k(k), .frac(frac));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int kk;
      logic [63:0] prod;
      @(posedge clk);
      kk = i % 32;
      a = (32'(1) << kk) | ($urandom & ((32'(1) << kk) - 1));
      k = 5'(kk);
      #1;
      prod = 64'(a) * (64'(1) << (31 - kk));
      checks++;
      if (frac !== prod[30:0]) begin
        failures++; $display("FAIL a=%h k=%0d frac=%h exp=%h", a, kk, frac, prod[30:0]);
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
