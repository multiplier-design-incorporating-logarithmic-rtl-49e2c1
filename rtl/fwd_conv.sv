// fwd_conv: forward converter, binary to residue.
//
// Gives r = x mod M for a small binary number x (a characteristic, or a
// first-level residue in the multilevel design). The inputs are at most a few
// bits wide, so the reduction is written directly as a constant modulo, which
// synthesises to a small combinational table. Combinational.
// Direct forward conversion follows the reference design, which does not
// detail its circuit; the table form is this design's choice.
module fwd_conv #(
  parameter int unsigned W = 5,
  parameter int unsigned M = 7,
  localparam int unsigned RW = (M > 2) ? $clog2(M) : 1
) (
  input  logic [W-1:0]  x,
  output logic [RW-1:0] r
);

  assign r = RW'(32'(x) % M);

endmodule
