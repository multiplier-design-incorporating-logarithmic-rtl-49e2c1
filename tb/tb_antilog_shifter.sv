// tb_antilog_shifter: self-checking testbench for the 2N-bit antilog shifter.
// N = 32: for every shift amount 0..63 and random 1.f mantissas the product
// must be floor(pm * 2^T / 1024) mod 2^64, computed by multiplication; the
// zero input must force 0.
module tb_antilog_shifter;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] pm = 11'h400;
  logic [5:0]  t = '0;
  logic        zero = 1'b0;
  logic [63:0] z;

  antilog_shifter #(.N(32)) dut (.pm(pm), .t(t), .zero(zero), .z(z));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [127:0] expz;
      @(posedge clk);
      pm = 11'(1024 + $urandom % 1024);
      t = 6'(i % 64);
      zero = (i % 97 == 5);
      #1;
      expz = (128'(pm) * (128'(1) << t)) / 1024;
      checks++;
      if (zero ? (z !== '0) : (z !== expz[63:0])) begin
        failures++; $display("FAIL pm=%0d t=%0d zero=%b z=%h", pm, t, zero, z);
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
