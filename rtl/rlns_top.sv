// rlns_top: the two residue logarithmic multipliers side by side.
//
// rlns_mult is the single-level design (characteristics encoded modulo
// {7, 9}); mrlns_mult is the two-level design (modulo {7, 9}, then {4, 5}),
// which gives the same products with an extra encoding level. Each has its own
// operands and product, so both can be used, compared or synthesised together.
// N is the operand width: 8, 16 or 32 in the reference evaluation, 32 by
// default. Purely combinational: products follow the operands.
module rlns_top #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a_rlns,
  input  logic [N-1:0]   b_rlns,
  output logic [2*N-1:0] z_rlns,
  input  logic [N-1:0]   x_mrlns,
  input  logic [N-1:0]   y_mrlns,
  output logic [2*N-1:0] z_mrlns
);

  rlns_mult  #(.N(N)) u_rlns  (.a(a_rlns),  .b(b_rlns),  .z(z_rlns));
  mrlns_mult #(.N(N)) u_mrlns (.x(x_mrlns), .y(y_mrlns), .z(z_mrlns));

endmodule
