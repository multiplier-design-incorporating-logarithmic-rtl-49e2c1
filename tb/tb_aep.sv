// tb_aep: accuracy workload. For each operand width N = 8, 16 and 32, 250
// random operand pairs are multiplied by both multipliers and the error
// percentage EP = (TV - EV) / TV * 100 of each product is accumulated into an
// average error percentage, both signed (positive and negative errors
// cancelling) and absolute. At N = 32 pairs whose characteristic sum reaches
// the 63-step dynamic range are redrawn and counted. Every product must also
// match the reference model, and the averages must stay below 0.6 % signed and
// 1.0 % absolute.
module tb_aep;
  import rlns_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a8 = '0, b8 = '0;
  logic [15:0] a16 = '0, b16 = '0;
  logic [31:0] a32 = '0, b32 = '0;
  logic [15:0] z8r, z8m;
  logic [31:0] z16r, z16m;
  logic [63:0] z32r, z32m;

  rlns_top #(.N(8))  dut8  (.a_rlns(a8),  .b_rlns(b8),  .z_rlns(z8r),  .x_mrlns(a8),  .y_mrlns(b8),  .z_mrlns(z8m));
  rlns_top #(.N(16)) dut16 (.a_rlns(a16), .b_rlns(b16), .z_rlns(z16r), .x_mrlns(a16), .y_mrlns(b16), .z_mrlns(z16m));
  rlns_top #(.N(32)) dut32 (.a_rlns(a32), .b_rlns(b32), .z_rlns(z32r), .x_mrlns(a32), .y_mrlns(b32), .z_mrlns(z32m));

  task automatic run(input int n);
    real sum_s = 0.0, sum_a = 0.0, tv, ep, aep_s, aep_a;
    int redrawn = 0, t, c, cmn;
    logic [63:0] va, vb, e, zr, zm;
    for (int i = 0; i < 250; i++) begin
      do begin
        va = {$urandom, $urandom} % (64'(1) << n);
        vb = {$urandom, $urandom} % (64'(1) << n);
        if (va == 0) va = 1;
        if (vb == 0) vb = 1;
        e = ref_mult(va, vb, n, t, c, cmn);
        if (ref_char(va) + ref_char(vb) + c >= 63) redrawn++;
      end while (ref_char(va) + ref_char(vb) + c >= 63);
      @(posedge clk);
      a8 = va[7:0]; b8 = vb[7:0]; a16 = va[15:0]; b16 = vb[15:0]; a32 = va[31:0]; b32 = vb[31:0];
      #1;
      case (n)
        8:       begin zr = 64'(z8r);  zm = 64'(z8m);  end
        16:      begin zr = 64'(z16r); zm = 64'(z16m); end
        default: begin zr = z32r;      zm = z32m;      end
      endcase
      checks += 2;
      if (zr !== e) begin failures++; $display("FAIL N=%0d RLNS %0d * %0d = %0d exp %0d", n, va, vb, zr, e); end
      if (zm !== e) begin failures++; $display("FAIL N=%0d MRLNS %0d * %0d = %0d exp %0d", n, va, vb, zm, e); end
      tv = real'(va) * real'(vb);
      ep = (tv - real'(zr)) / tv * 100.0;
      sum_s += ep;
      sum_a += (ep < 0.0) ? -ep : ep;
    end
    aep_s = sum_s / 250.0;
    aep_a = sum_a / 250.0;
    $display("N=%0d: AEP signed %f %%, absolute %f %%, pairs redrawn %0d", n, aep_s, aep_a, redrawn);
    checks += 2;
    if (aep_s > 0.6 || aep_s < -0.6) begin failures++; $display("FAIL N=%0d signed AEP too large", n); end
    if (aep_a > 1.0) begin failures++; $display("FAIL N=%0d absolute AEP too large", n); end
  endtask

  initial begin
    run(8);
    run(16);
    run(32);
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
