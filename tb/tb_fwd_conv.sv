// tb_fwd_conv: self-checking testbench for the forward (binary to residue)
// converter. Exhaustive over 5-bit inputs for the moduli 7 and 9, and over the
// 4-bit inputs of the second-level moduli 4 and 5; the expected residue is
// found by repeated subtraction. A 3-bit input with modulus 9 (the N = 8
// characteristic) checks that the modulus is not cut to the input width.
module tb_fwd_conv;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] x5 = '0;
  logic [3:0] x4 = '0;
  logic [2:0] r7;
  logic [3:0] r9;
  logic [1:0] r4;
  logic [2:0] r5;
  logic [3:0] r9n;

  fwd_conv #(.W(5), .M(7)) dut7 (.x(x5), .r(r7));
  fwd_conv #(.W(5), .M(9)) dut9 (.x(x5), .r(r9));
  fwd_conv #(.W(4), .M(4)) dut4 (.x(x4), .r(r4));
  fwd_conv #(.W(4), .M(5)) dut5 (.x(x4), .r(r5));
  fwd_conv #(.W(3), .M(9)) dut9n (.x(x5[2:0]), .r(r9n));

  function automatic int residue(input int x, input int m);
    while (x >= m) x -= m;
    return x;
  endfunction

  initial begin
    for (int v = 0; v < 32; v++) begin
      @(posedge clk); x5 = 5'(v); x4 = 4'(v); #1;
      checks += 2;
      if (int'(r7) != residue(v, 7)) begin failures++; $display("FAIL %0d mod 7 = %0d", v, r7); end
      if (int'(r9) != residue(v, 9)) begin failures++; $display("FAIL %0d mod 9 = %0d", v, r9); end
      if (v < 8) begin
        checks++;
        if (int'(r9n) != residue(v, 9)) begin failures++; $display("FAIL 3-bit %0d mod 9 = %0d", v, r9n); end
      end
      if (v < 16) begin
        checks += 2;
        if (int'(r4) != residue(v, 4)) begin failures++; $display("FAIL %0d mod 4 = %0d", v, r4); end
        if (int'(r5) != residue(v, 5)) begin failures++; $display("FAIL %0d mod 5 = %0d", v, r5); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
