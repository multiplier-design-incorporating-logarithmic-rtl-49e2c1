// crt2: reverse converter for a two-modulus residue system (Chinese Remainder
// Theorem).
//
//   X = < <r1 N1>_M1 * Mi1 + <r2 N2>_M2 * Mi2 >_(M1 M2)
// with Mi1 = M2, Mi2 = M1 and Ni the inverse of Mi modulo Mi. For {7, 9} these
// are M = 63, Mi = (9, 7), N = (4, 4); for {4, 5}, M = 20, Mi = (5, 4),
// N = (1, 4). The constants are computed at elaboration from the moduli.
// Inputs must be proper residues (r1 < M1, r2 < M2). Combinational.
// The CRT method and its constants follow the reference design; computing the
// constants from the moduli and the final conditional subtraction are this
// design's choices.
module crt2
  import rlns_pkg::*;
#(
  parameter int unsigned M1 = 7,
  parameter int unsigned M2 = 9,
  localparam int unsigned R1W = (M1 > 2) ? $clog2(M1) : 1,
  localparam int unsigned R2W = (M2 > 2) ? $clog2(M2) : 1,
  localparam int unsigned XW  = $clog2(M1 * M2)
) (
  input  logic [R1W-1:0] r1,
  input  logic [R2W-1:0] r2,
  output logic [XW-1:0]  x
);

  localparam int unsigned MM  = M1 * M2;
  localparam int unsigned N1  = mod_inverse(M2, M1);
  localparam int unsigned N2  = mod_inverse(M1, M2);
  localparam int unsigned SW  = $clog2(2 * MM);

  logic [R1W-1:0] p1;   // <r1 N1>_M1
  logic [R2W-1:0] p2;   // <r2 N2>_M2
  logic [SW-1:0]  sum;

  assign p1  = R1W'((r1 * N1) % M1);
  assign p2  = R2W'((r2 * N2) % M2);
  // each product term is below MM, so the sum is below 2 MM
  assign sum = SW'(p1 * M2) + SW'(p2 * M1);
  assign x   = (sum >= SW'(MM)) ? XW'(sum - SW'(MM)) : XW'(sum);

endmodule
