// tb_crt2: self-checking testbench for the CRT reverse converter.
// Exhaustive over all residue pairs of {7, 9} and of {4, 5}; the expected value
// is the unique X below the dynamic range with X mod M1 = r1 and X mod M2 = r2,
// found by search.
module tb_crt2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] a1 = '0;
  logic [3:0] a2 = '0;
  logic [5:0] xa;
  logic [1:0] b1 = '0;
  logic [2:0] b2 = '0;
  logic [4:0] xb;

  crt2 #(.M1(7), .M2(9)) dut_a (.r1(a1), .r2(a2), .x(xa));
  crt2 #(.M1(4), .M2(5)) dut_b (.r1(b1), .r2(b2), .x(xb));

  function automatic int find_x(input int r1, input int r2, input int m1, input int m2);
    for (int v = 0; v < m1 * m2; v++) if (v % m1 == r1 && v % m2 == r2) return v;
    return -1;
  endfunction

  initial begin
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 9; j++) begin
        @(posedge clk); a1 = 3'(i); a2 = 4'(j); #1;
        checks++;
        if (int'(xa) != find_x(i, j, 7, 9)) begin failures++; $display("FAIL {7,9} (%0d,%0d) -> %0d", i, j, xa); end
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 5; j++) begin
        @(posedge clk); b1 = 2'(i); b2 = 3'(j); #1;
        checks++;
        if (int'(xb) != find_x(i, j, 4, 5)) begin failures++; $display("FAIL {4,5} (%0d,%0d) -> %0d", i, j, xb); end
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
