// mant_adder: ripple-carry adder of the two corrected mantissas.
//
// Adds the FW-bit corrected mantissas of the two operands with a chain of full
// adders starting at the LSB, as in the reference design. The FW-bit sum is the fractional part of
// log2(A) + log2(B); the carry out has weight 1 and is added into every
// characteristic residue channel. A ripple-carry structure is used because the
// design aims at low area and power rather than speed. Combinational.
module mant_adder
  import rlns_pkg::*;
(
  input  logic [FW-1:0] x,
  input  logic [FW-1:0] y,
  output logic [FW-1:0] s,
  output logic          c
);

  logic [FW:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < FW; i++) begin : g_fa
    assign s[i]       = x[i] ^ y[i] ^ carry[i];
    assign carry[i+1] = (x[i] & y[i]) | (carry[i] & (x[i] ^ y[i]));
  end

  assign c = carry[FW];

endmodule
