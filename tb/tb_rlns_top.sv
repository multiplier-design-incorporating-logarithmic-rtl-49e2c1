// tb_rlns_top: end-to-end testbench of the top level at its default size
// (N = 32, 64-bit products), both multipliers.
// Random operands of random lengths and directed corner cases are applied to
// both multipliers; each product must match the integer reference model bit
// for bit, and the single-level and two-level products must agree. The test
// counts how often each mechanism of the datapath is exercised and fails if
// any never is: zero operands, the mantissa carry into the characteristic
// channels, wrap-around in the mod-7 and mod-9 channels, every region of the
// logarithmic corrector, every region of the antilogarithmic corrector with
// each leading-one sub-case of its first region, and a characteristic sum that
// overflows the 63-step dynamic range.
module tb_rlns_top;
  import rlns_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a = '0, b = '0, x = '0, y = '0;
  logic [63:0] za, zx;

  rlns_top dut (.a_rlns(a), .b_rlns(b), .z_rlns(za), .x_mrlns(x), .y_mrlns(y), .z_mrlns(zx));

  // coverage counters
  int n_zero = 0, n_carry = 0, n_nocarry = 0, n_wrap7 = 0, n_wrap9 = 0, n_range = 0;
  int n_lreg[8] = '{default: 0};
  int n_areg[8] = '{default: 0};
  int n_lead[11] = '{default: 0};   // first antilog region: lead position 4..10, 0 = none

  task automatic check(input logic [31:0] va, input logic [31:0] vb, input logic [31:0] vx,
                       input logic [31:0] vy);
    int t, c, cmn, lead, ka, kb;
    logic [63:0] ea, ex;
    @(posedge clk);
    a = va; b = vb; x = vx; y = vy;
    #1;
    ea = ref_mult(64'(vx), 64'(vy), 32, t, c, cmn);
    ex = ea;
    ea = ref_mult(64'(va), 64'(vb), 32, t, c, cmn);
    checks += 2;
    if (za !== ea) begin failures++; $display("FAIL RLNS %0d * %0d = %0d exp %0d", va, vb, za, ea); end
    if (zx !== ex) begin failures++; $display("FAIL MRLNS %0d * %0d = %0d exp %0d", vx, vy, zx, ex); end
    if (va == vx && vb == vy) begin
      checks++;
      if (za !== zx) begin failures++; $display("FAIL RLNS/MRLNS differ for %0d * %0d", va, vb); end
    end
    // coverage, from the RLNS operands
    if (va == 0 || vb == 0) n_zero++;
    else begin
      ka = ref_char(64'(va)); kb = ref_char(64'(vb));
      n_lreg[ref_mant(64'(va)) / 128]++;
      n_lreg[ref_mant(64'(vb)) / 128]++;
      if (c != 0) n_carry++; else n_nocarry++;
      if (ka % 7 + kb % 7 + c >= 7) n_wrap7++;
      if (ka % 9 + kb % 9 + c >= 9) n_wrap9++;
      if (ka + kb + c >= 63) n_range++;
      n_areg[cmn / 128]++;
      if (cmn < 128) begin
        lead = 0;
        for (int j = 10; j >= 4; j--) if (((cmn >> (10 - j)) & 1) != 0) lead = j;
        n_lead[lead]++;
      end
    end
  endtask

  task automatic cover_check(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    check(0, 5, 0, 5); check(9, 0, 9, 0); check(1, 1, 1, 1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'hC000_0000, 32'hC000_0000, 32'hC000_0000, 32'hC000_0000);
    // first antilog region sub-cases: 1 * (1 + j/1024) keeps the added mantissa small
    for (int j = 1; j < 128; j++) check(1024 + j, 1, 1024 + j, 1);
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] ra, rb;
      ra = $urandom >> ($urandom % 32);
      rb = $urandom >> ($urandom % 32);
      if (i % 2 == 0) check(ra, rb, ra, rb);
      else check(ra, rb, $urandom >> ($urandom % 32), $urandom >> ($urandom % 32));
    end
    $display("mechanism counts:");
    cover_check("zero operand", n_zero);
    cover_check("mantissa carry C = 1", n_carry);
    cover_check("mantissa carry C = 0", n_nocarry);
    cover_check("mod-7 channel wrap", n_wrap7);
    cover_check("mod-9 channel wrap", n_wrap9);
    cover_check("characteristic sum >= 63 (wraps)", n_range);
    for (int r = 0; r < 8; r++) cover_check($sformatf("B-LEC region %0d", r), n_lreg[r]);
    for (int r = 0; r < 8; r++) cover_check($sformatf("B-ALEC region %0d", r), n_areg[r]);
    cover_check("B-ALEC region 0, m = 0", n_lead[0]);
    for (int j = 4; j <= 10; j++) cover_check($sformatf("B-ALEC region 0, lead one m_-%0d", j), n_lead[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
