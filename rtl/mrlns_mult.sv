// mrlns_mult: two-level (multilevel) residue logarithmic (MRLNS) multiplier.
//
// Same arithmetic as rlns_mult, but the characteristics pass through two
// levels of residue encoding, so that the residues that are added are small
// and both moduli sets are needed to interpret them:
//   level 1: kX, kY -> a_i, b_i = residues modulo {7, 9}
//   level 2: each a_i, b_i -> residues modulo {4, 5}:
//            c = a_1 mod {4,5}, d = a_2 mod {4,5},
//            e = b_1 mod {4,5}, f = b_2 mod {4,5}
//   add:     u_i = <c_i + e_i + C>, v_i = <d_i + f_i + C> modulo {4, 5},
//            C being the carry of the mantissa addition
//   CRT B:   w1 = CRT{4,5}(u), w2 = CRT{4,5}(v)   (values below 20)
//   reduce:  t1 = w1 mod 7, t2 = w2 mod 9
//   CRT A:   T  = CRT{7,9}(t1, t2)                  (value mod 63)
// Since a_1 + b_1 + C <= 13 and a_2 + b_2 + C <= 17 are below 20, CRT B
// recovers the first-level channel sums exactly and T equals the single-level
// result. Mantissa handling (blec, ripple adder, balec, 2N-bit shifter) is
// identical to rlns_mult. The assignment of c, d, e, f to a_1, a_2, b_1, b_2
// is this design's reading of the reference description.
// Interface: operands x, y (N bits, unsigned), product z (2N bits).
// Purely combinational.
module mrlns_mult
  import rlns_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);

  logic [KW-1:0] kx, ky;
  logic [FW-1:0] mx, my, cmx, cmy, cmn;
  logic          zx, zy, carry;
  logic [2:0]    a1, b1;          // level 1, mod 7
  logic [3:0]    a2, b2;          // level 1, mod 9
  logic [1:0]    c1, d1, e1, f1;  // level 2, mod 4
  logic [2:0]    c2, d2, e2, f2;  // level 2, mod 5
  logic [1:0]    u1, v1;
  logic [2:0]    u2, v2;
  logic [4:0]    w1, w2;
  logic [2:0]    t1;
  logic [3:0]    t2;
  logic [TW-1:0] t;
  logic [FW:0]   pm;

  // logarithmic conversion and error correction
  log_converter #(.N(N)) u_log_x (.a(x), .k(kx), .m(mx), .zero(zx));
  log_converter #(.N(N)) u_log_y (.a(y), .k(ky), .m(my), .zero(zy));
  blec u_blec_x (.m(mx), .cm(cmx));
  blec u_blec_y (.m(my), .cm(cmy));
  mant_adder u_madd (.x(cmx), .y(cmy), .s(cmn), .c(carry));

  // first-level forward conversion, moduli {7, 9}
  fwd_conv #(.W(KW), .M(M1A)) u_fa1 (.x(kx), .r(a1));
  fwd_conv #(.W(KW), .M(M2A)) u_fa2 (.x(kx), .r(a2));
  fwd_conv #(.W(KW), .M(M1A)) u_fb1 (.x(ky), .r(b1));
  fwd_conv #(.W(KW), .M(M2A)) u_fb2 (.x(ky), .r(b2));

  // second-level forward conversion, moduli {4, 5}
  fwd_conv #(.W(3), .M(M1B)) u_c1 (.x(a1), .r(c1));
  fwd_conv #(.W(3), .M(M2B)) u_c2 (.x(a1), .r(c2));
  fwd_conv #(.W(4), .M(M1B)) u_d1 (.x(a2), .r(d1));
  fwd_conv #(.W(4), .M(M2B)) u_d2 (.x(a2), .r(d2));
  fwd_conv #(.W(3), .M(M1B)) u_e1 (.x(b1), .r(e1));
  fwd_conv #(.W(3), .M(M2B)) u_e2 (.x(b1), .r(e2));
  fwd_conv #(.W(4), .M(M1B)) u_f1 (.x(b2), .r(f1));
  fwd_conv #(.W(4), .M(M2B)) u_f2 (.x(b2), .r(f2));

  // residue addition in the second-level channels
  mod_add #(.M(M1B)) u_u1 (.x(c1), .y(e1), .cin(carry), .s(u1));
  mod_add #(.M(M2B)) u_u2 (.x(c2), .y(e2), .cin(carry), .s(u2));
  mod_add #(.M(M1B)) u_v1 (.x(d1), .y(f1), .cin(carry), .s(v1));
  mod_add #(.M(M2B)) u_v2 (.x(d2), .y(f2), .cin(carry), .s(v2));

  // first reverse conversion level (CRT B, moduli {4, 5})
  crt2 #(.M1(M1B), .M2(M2B)) u_crt_b1 (.r1(u1), .r2(u2), .x(w1));
  crt2 #(.M1(M1B), .M2(M2B)) u_crt_b2 (.r1(v1), .r2(v2), .x(w2));
  fwd_conv #(.W(5), .M(M1A)) u_t1 (.x(w1), .r(t1));
  fwd_conv #(.W(5), .M(M2A)) u_t2 (.x(w2), .r(t2));

  // second reverse conversion level (CRT A, moduli {7, 9})
  crt2 #(.M1(M1A), .M2(M2A)) u_crt_a (.r1(t1), .r2(t2), .x(t));

  // antilogarithmic conversion
  balec u_balec (.m(cmn), .pm(pm));
  antilog_shifter #(.N(N)) u_alog (.pm(pm), .t(t), .zero(zx | zy), .z(z));

endmodule
