// tb_mant_adder: self-checking testbench for the ripple-carry mantissa adder.
// Random and corner operand pairs; {c, s} must equal x + y.
module tb_mant_adder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] x = '0, y = '0, s;
  logic       c;

  mant_adder dut (.x(x), .y(y), .s(s), .c(c));

  task automatic check(input int a, input int b);
    @(posedge clk); x = 10'(a); y = 10'(b); #1;
    checks++;
    if (int'({c, s}) != a + b) begin
      failures++; $display("FAIL %0d + %0d = %0d", a, b, {c, s});
    end
  endtask

  initial begin
    check(0, 0); check(1023, 1023); check(1023, 1); check(512, 512); check(511, 512);
    for (int i = 0; i < 20000; i++) check($urandom % 1024, $urandom % 1024);
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
