// log_shifter: N-bit logarithmic (barrel) shifter of the binary-to-log converter.
//
// Shifts the operand left by N-1-k, where k is the position of its leading one,
// so that the leading one lands in the MSB; the N-1 bits below it are the
// Mitchell mantissa m, MSB (weight 2^-1) first. The shift is done in log2(N)
// stages, stage s shifting by 2^s when bit s of the shift amount is set.
// Combinational.
// The shifter's role and width follow the reference design; the barrel
// structure is this design's choice.
module log_shifter #(
  parameter int unsigned N = 32,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  a,
  input  logic [KW-1:0] k,
  output logic [N-2:0]  frac
);

  logic [KW-1:0] sh;
  logic [N-1:0]  stage [KW+1];

  assign sh = KW'(N - 1) - k;

  always_comb begin
    stage[0] = a;
    for (int s = 0; s < KW; s++)
      stage[s+1] = sh[s] ? (stage[s] << (1 << s)) : stage[s];
  end

  assign frac = stage[KW][N-2:0];

endmodule
