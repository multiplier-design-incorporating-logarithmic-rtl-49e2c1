// tb_rlns_mult: self-checking testbench for the RLNS multiplier.
// Instances at N = 32 (default) and N = 8. Random operands of random lengths,
// plus zero and all-ones corner cases, are compared bit for bit with the
// integer reference model, and products of at least 2^12 that do not exceed
// the 63-step characteristic range must be within 4 % of the true product.
module tb_rlns_mult;
  import rlns_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int wraps = 0, carries = 0;

  logic [31:0] a32 = '0, b32 = '0;
  logic [63:0] z32;
  logic [7:0]  a8 = '0, b8 = '0;
  logic [15:0] z8;

  rlns_mult            dut32 (.a(a32), .b(b32), .z(z32));
  rlns_mult #(.N(8))   dut8  (.a(a8),  .b(b8),  .z(z8));

  task automatic check(input logic [31:0] va, input logic [31:0] vb);
    int t, c, cmn;
    logic [63:0] e32, e8;
    real tv, err;
    @(posedge clk);
    a32 = va; b32 = vb; a8 = va[7:0]; b8 = vb[7:0];
    #1;
    e8  = ref_mult(64'(va[7:0]), 64'(vb[7:0]), 8, t, c, cmn);
    e32 = ref_mult(64'(va), 64'(vb), 32, t, c, cmn);
    if (c != 0) carries++;
    checks += 2;
    if (z32 !== e32) begin failures++; $display("FAIL N=32 %0d * %0d = %0d exp %0d", va, vb, z32, e32); end
    if (z8 !== e8[15:0]) begin failures++; $display("FAIL N=8 %0d * %0d = %0d exp %0d", va[7:0], vb[7:0], z8, e8[15:0]); end
    if (va != 0 && vb != 0 && ref_char(64'(va)) + ref_char(64'(vb)) + c >= 63) wraps++;
    else begin
      tv = real'(va) * real'(vb);
      if (tv >= 4096.0) begin
        err = (tv - real'(z32)) / tv;
        checks++;
        if (err > 0.04 || err < -0.04) begin failures++; $display("FAIL accuracy %0d * %0d err=%f", va, vb, err); end
      end
    end
  endtask

  initial begin
    check(0, 0); check(0, 1234); check(77, 0); check(1, 1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF); check(32'hFF, 32'hFF); check(32'h7FFF_FFFF, 32'h8000_0000);
    for (int i = 0; i < 3000; i++) check($urandom >> ($urandom % 32), $urandom >> ($urandom % 32));
    $display("products past the 63-step range: %0d, mantissa carries: %0d", wraps, carries);
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
