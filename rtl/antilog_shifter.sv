// antilog_shifter: 2N-bit logarithmic shifter of the antilogarithmic converter.
//
// Forms the product Z = 2^T * (1.f) from the corrected mantissa pm = {1, f}
// (FW fraction bits) and the reverse-converted characteristic T. The mantissa
// is placed at the bottom of a 2N+FW bit word, shifted left in log2 stages by
// T (stage s shifts by 2^s when T[s] is set), and the FW fraction bits are
// dropped, i.e. the product is truncated to an integer. zero forces Z = 0 for a
// zero operand. Combinational.
// The 2N-bit width and the 6-bit control follow the reference design; the
// barrel structure, the truncation and the zero gating are this design's.
module antilog_shifter
  import rlns_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [FW:0]    pm,
  input  logic [TW-1:0]  t,
  input  logic           zero,
  output logic [2*N-1:0] z
);

  localparam int unsigned EW = 2 * N + FW;

  logic [EW-1:0] stage [TW+1];

  always_comb begin
    stage[0] = EW'(pm);
    for (int s = 0; s < TW; s++)
      stage[s+1] = t[s] ? (stage[s] << (1 << s)) : stage[s];
  end

  assign z = zero ? '0 : stage[TW][EW-1:FW];

endmodule
