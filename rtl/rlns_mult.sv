// rlns_mult: single-level residue logarithmic (RLNS) multiplier.
//
// Z ~ A * B computed as antilog(log2 A + log2 B), with the integer parts of
// the logarithms carried in a residue number system:
//   1. Each operand goes through log_converter (leading one detector,
//      characteristic ROM, logarithmic shifter) and blec, giving the
//      characteristic k and a corrected 10-bit mantissa.
//   2. The corrected mantissas are added by a ripple-carry adder; the carry C
//      has weight 1. The characteristics are converted to residues modulo
//      {7, 9} and added channel by channel together with C.
//   3. A CRT reverse converter recovers T = kA + kB + C (mod 63), balec turns
//      the added mantissa into an approximation of 2^m, and the 2N-bit
//      antilogarithmic shifter shifts it by T.
// Product bits below 2^0 are truncated. A zero operand gives Z = 0 (this
// design's choice; the method is defined for positive operands only).
// Because the moduli set has a dynamic range of 63, a characteristic sum of 63
// or more wraps; with N = 32 this happens when kA + kB + C = 63, i.e. for
// products of about 2^63 and above. The moduli set is the reference design's.
// Interface: operands a, b (N bits, unsigned), product z (2N bits).
// Purely combinational: z follows a and b after the logic delay.
module rlns_mult
  import rlns_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] z
);

  logic [KW-1:0] ka, kb;
  logic [FW-1:0] ma, mb, cma, cmb, cmn;
  logic          za, zb, carry;
  logic [2:0]    ka1, kb1;       // residues mod 7
  logic [3:0]    ka2, kb2;       // residues mod 9
  logic [2:0]    t1;
  logic [3:0]    t2;
  logic [TW-1:0] t;
  logic [FW:0]   pm;

  // step 1: logarithmic conversion and error correction
  log_converter #(.N(N)) u_log_a (.a(a), .k(ka), .m(ma), .zero(za));
  log_converter #(.N(N)) u_log_b (.a(b), .k(kb), .m(mb), .zero(zb));
  blec u_blec_a (.m(ma), .cm(cma));
  blec u_blec_b (.m(mb), .cm(cmb));

  // forward conversion of the characteristics
  fwd_conv #(.W(KW), .M(M1A)) u_fa1 (.x(ka), .r(ka1));
  fwd_conv #(.W(KW), .M(M2A)) u_fa2 (.x(ka), .r(ka2));
  fwd_conv #(.W(KW), .M(M1A)) u_fb1 (.x(kb), .r(kb1));
  fwd_conv #(.W(KW), .M(M2A)) u_fb2 (.x(kb), .r(kb2));

  // step 2: residue arithmetic (log A + log B)
  mant_adder u_madd (.x(cma), .y(cmb), .s(cmn), .c(carry));
  mod_add #(.M(M1A)) u_ch1 (.x(ka1), .y(kb1), .cin(carry), .s(t1));
  mod_add #(.M(M2A)) u_ch2 (.x(ka2), .y(kb2), .cin(carry), .s(t2));

  // step 3: reverse conversion and antilogarithmic conversion
  crt2 #(.M1(M1A), .M2(M2A)) u_crt (.r1(t1), .r2(t2), .x(t));
  balec u_balec (.m(cmn), .pm(pm));
  antilog_shifter #(.N(N)) u_alog (.pm(pm), .t(t), .zero(za | zb), .z(z));

endmodule
