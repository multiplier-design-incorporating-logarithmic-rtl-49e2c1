// tb_log_converter: self-checking testbench for the binary-to-log converter.
// Checks characteristic, 10-bit mantissa and zero flag at N = 32 (mantissa
// truncated) and N = 8 (mantissa padded) against floor(log2 a) and
// floor((a - 2^k) * 1024 / 2^k) from the reference package.
module tb_log_converter;
  import rlns_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a32 = '0;
  logic [4:0]  k32;
  logic [9:0]  m32;
  logic        z32;
  logic [7:0]  a8 = '0;
  logic [2:0]  k8;
  logic [9:0]  m8;
  logic        z8;

  log_converter #(.N(32)) dut32 (.a(a32), .k(k32), .m(m32), .zero(z32));
  log_converter #(.N(8))  dut8  (.a(a8),  .k(k8),  .m(m8),  .zero(z8));

  task automatic check32(input logic [31:0] v);
    @(posedge clk); a32 = v; #1;
    checks++;
    if (v == 0) begin
      if (!z32) begin failures++; $display("FAIL zero flag N=32"); end
    end else if (z32 || int'(k32) != ref_char(64'(v)) || int'(m32) != ref_mant(64'(v))) begin
      failures++; $display("FAIL N=32 a=%h k=%0d m=%0d", v, k32, m32);
    end
  endtask

  initial begin
    check32('0);
    for (int i = 0; i < 3000; i++) check32($urandom >> ($urandom % 32));
    for (int v = 0; v < 256; v++) begin
      @(posedge clk); a8 = 8'(v); #1;
      checks++;
      if (v == 0) begin
        if (!z8) begin failures++; $display("FAIL zero flag N=8"); end
      end else if (z8 || int'(k8) != ref_char(64'(v)) || int'(m8) != ref_mant(64'(v))) begin
        failures++; $display("FAIL N=8 a=%0d k=%0d m=%0d", v, k8, m8);
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
