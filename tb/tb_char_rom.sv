// tb_char_rom: self-checking testbench for the characteristic ROM.
// Activates each word line of the 32-word ROM in turn and checks that the
// word read is the line's index, and that no active line reads as 0.
module tb_char_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] wl = '0;
  logic [4:0]  k;

  char_rom #(.N(32)) dut (.wl(wl), .k(k));

  initial begin
    @(posedge clk); wl = '0; #1;
    checks++; if (k !== 5'd0) begin failures++; $display("FAIL no line k=%0d", k); end
    for (int i = 0; i < 32; i++) begin
      @(posedge clk); wl = 32'(1) << i; #1;
      checks++;
      if (int'(k) != i) begin failures++; $display("FAIL line %0d read %0d", i, k); end
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
