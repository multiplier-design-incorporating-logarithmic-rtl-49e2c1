// log_converter: binary to logarithm conversion of one operand.
//
// A = 2^k (1 + m): the leading one detector finds the leading one, the
// characteristic ROM turns its one-hot position into the binary characteristic
// k, and the logarithmic shifter left-aligns the operand so that the bits below
// the leading one form the mantissa m. Only the FW most significant mantissa
// bits go on to the error corrector; when the operand has fewer than FW bits
// below its MSB the mantissa is padded with zeros at the bottom, and when it has
// more, the lower bits are dropped (truncation).
// zero flags an all-zero operand, which has no logarithm; k and m are 0 then.
// Combinational.
// LOD, ROM and shifter follow the reference design; truncation, padding and
// the zero flag are this design's choices.
module log_converter
  import rlns_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  a,
  output logic [KW-1:0] k,
  output logic [FW-1:0] m,
  output logic          zero
);

  logic [N-1:0] wl;
  logic [N-2:0] frac;

  lod #(.W(N)) u_lod (.d(a), .onehot(wl), .zero(zero));
  char_rom #(.N(N)) u_rom (.wl(wl), .k(k));
  log_shifter #(.N(N)) u_shift (.a(a), .k(k), .frac(frac));

  if (N - 1 >= FW) begin : g_trunc
    assign m = frac[N-2 -: FW];
  end else begin : g_pad
    assign m = {frac, {(FW - N + 1){1'b0}}};
  end

endmodule
