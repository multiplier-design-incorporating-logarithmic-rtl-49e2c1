// tb_mod_add: self-checking testbench for the residue adder.
// Exhaustive over both residues and the carry for the moduli 7, 9, 4 and 5;
// expected value (x + y + c) mod M by repeated subtraction.
module tb_mod_add;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] x = '0, y = '0;
  logic       c = 1'b0;
  logic [2:0] s7;
  logic [3:0] s9;
  logic [1:0] s4;
  logic [2:0] s5;

  mod_add #(.M(7)) dut7 (.x(x[2:0]), .y(y[2:0]), .cin(c), .s(s7));
  mod_add #(.M(9)) dut9 (.x(x),      .y(y),      .cin(c), .s(s9));
  mod_add #(.M(4)) dut4 (.x(x[1:0]), .y(y[1:0]), .cin(c), .s(s4));
  mod_add #(.M(5)) dut5 (.x(x[2:0]), .y(y[2:0]), .cin(c), .s(s5));

  function automatic int residue(input int v, input int m);
    while (v >= m) v -= m;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 9; j++)
        for (int k = 0; k < 2; k++) begin
          @(posedge clk); x = 4'(i); y = 4'(j); c = k[0]; #1;
          checks++;
          if (int'(s9) != residue(i + j + k, 9)) begin failures++; $display("FAIL mod 9 %0d+%0d+%0d=%0d", i, j, k, s9); end
          if (i < 7 && j < 7) begin
            checks++;
            if (int'(s7) != residue(i + j + k, 7)) begin failures++; $display("FAIL mod 7 %0d+%0d+%0d=%0d", i, j, k, s7); end
          end
          if (i < 5 && j < 5) begin
            checks++;
            if (int'(s5) != residue(i + j + k, 5)) begin failures++; $display("FAIL mod 5 %0d+%0d+%0d=%0d", i, j, k, s5); end
          end
          if (i < 4 && j < 4) begin
            checks++;
            if (int'(s4) != residue(i + j + k, 4)) begin failures++; $display("FAIL mod 4 %0d+%0d+%0d=%0d", i, j, k, s4); end
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
