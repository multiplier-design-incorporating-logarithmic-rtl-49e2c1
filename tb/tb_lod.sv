// tb_lod: self-checking testbench for the leading one detector.
// Drives every single-bit word, zero, and random words at W = 32 and W = 7
// (the width used inside the antilog corrector), and compares the one-hot
// output with the highest set bit found by a scan of the input.
module tb_lod;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] d32 = '0, oh32;
  logic        z32;
  logic [6:0]  d7 = '0, oh7;
  logic        z7;

  lod #(.W(32)) dut32 (.d(d32), .onehot(oh32), .zero(z32));
  lod #(.W(7))  dut7  (.d(d7),  .onehot(oh7),  .zero(z7));

  function automatic logic [31:0] expect_oh(input logic [31:0] d);
    for (int i = 31; i >= 0; i--) if (d[i]) return 32'(1) << i;
    return '0;
  endfunction

  task automatic check(input logic [31:0] v);
    @(posedge clk);
    d32 = v; d7 = v[6:0];
    #1;
    checks++;
    if (oh32 !== expect_oh(v) || z32 !== (v == 0)) begin
      failures++; $display("FAIL W=32 d=%h oh=%h", v, oh32);
    end
    checks++;
    if (oh7 !== expect_oh({25'b0, v[6:0]})[6:0] || z7 !== (v[6:0] == 0)) begin
      failures++; $display("FAIL W=7 d=%h oh=%h", v[6:0], oh7);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < 32; i++) check(32'(1) << i);
    for (int i = 0; i < 2000; i++) check($urandom >> ($urandom % 32));
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
