// mod_add: residue arithmetic unit of one modulo channel.
//
// Adds two residues and the carry out of the mantissa addition with a ripple
// carry adder, then reduces the sum modulo M. Since both residues are below M
// and the carry is 0 or 1, the sum is at most 2M-1 and one conditional
// subtraction of M is enough. Adding residues of the characteristics is the
// residue form of log(A*B) = log A + log B. Combinational.
// Ripple-carry addition with the mantissa carry follows the reference design;
// the single conditional subtraction is this design's choice.
module mod_add #(
  parameter int unsigned M = 7,
  localparam int unsigned RW = (M > 2) ? $clog2(M) : 1
) (
  input  logic [RW-1:0] x,
  input  logic [RW-1:0] y,
  input  logic          cin,
  output logic [RW-1:0] s
);

  logic [RW:0] sum;

  assign sum = {1'b0, x} + {1'b0, y} + (RW+1)'(cin);
  assign s   = (sum >= (RW+1)'(M)) ? RW'(sum - (RW+1)'(M)) : sum[RW-1:0];

endmodule
