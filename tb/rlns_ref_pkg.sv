// rlns_ref_pkg: reference model of the residue logarithmic multiplier, for
// the testbenches only.
//
// The model works on plain integers rather than on residues: the characteristic
// is floor(log2 A), the mantissa is (A - 2^k) / 2^k scaled to 10 bits, the
// correction constants are written as fractions of 1024, and the reverse
// conversion is simply (kA + kB + C) mod 63, the value the residue datapath must
// reproduce. Products are formed by multiplication, not by shifting.
package rlns_ref_pkg;

  typedef logic [127:0] u128_t;

  // floor(log2 a), a > 0
  function automatic int ref_char(input logic [63:0] a);
    int k = 0;
    for (int i = 0; i < 64; i++) if (a[i]) k = i;
    return k;
  endfunction

  // 10-bit mantissa of a with n-bit operand: floor((a - 2^k) * 1024 / 2^k)
  function automatic int ref_mant(input logic [63:0] a);
    int k = ref_char(a);
    u128_t num = (u128_t'(a) - (u128_t'(1) << k)) * 1024;
    return int'(num / (u128_t'(1) << k));
  endfunction

  // floor(m * num / 2^sh) for a 10-bit mantissa
  function automatic int part(input int m, input int sh);
    return m / (1 << sh);
  endfunction

  // B-LEC: corrected logarithm mantissa, in units of 2^-10
  function automatic int ref_blec(input int m);
    int inv7 = 127 - (m / 8);   // inverted 7 MSBs, in units of 2^-7
    int inv5 = 31 - (m / 32);   // inverted 5 MSBs, in units of 2^-5
    int r = m / 128;
    int add;
    case (r)
      0: add = part(m, 2) + part(m, 3) + part(m, 5);
      1: add = part(m, 2) + part(m, 4) + part(m, 5) + part(m, 6);
      2: add = 73;
      3: add = 2 * 43;
      4: add = inv7 + 8 * 3;
      5: add = inv7 + 2 * 15;
      6: add = inv5 * 8 + inv5 / 2;      // 17/64 = 1/4 + 1/64
      default: add = inv5 * 4 + inv5;    // 5/32 = 1/8 + 1/32
    endcase
    return (m + add) % 1024;
  endfunction

  // B-ALEC: 2^m approximation, 1.f in units of 2^-10 (1024 .. 2047)
  function automatic int ref_balec(input int m);
    int r = m / 128;
    int add;
    int lead = 0;            // j of the leading one among m_-4 .. m_-10, 0 if none
    bit c1, c2, c3, c4;
    static int radd[8] = '{0, 983, 952, 938, 941, 947, 965, 991};
    if (r == 0) begin
      for (int j = 10; j >= 4; j--) if (((m >> (10 - j)) & 1) != 0) lead = j;
      c1 = lead inside {4, 5, 6, 7};
      c2 = lead inside {5, 7};
      c3 = lead inside {6, 7};
      c4 = lead inside {8, 9, 10};
      add = 896 * int'(c1 | c2 | c3) + 102 * int'(c1) + 8 * int'(c2) + 16 * int'(c3) + 7 * int'(c4);
    end else begin
      add = radd[r];
    end
    return 1024 + ((m + add) % 1024);
  endfunction

  // whole product, also returning the internal quantities for coverage
  function automatic logic [63:0] ref_mult(input logic [63:0] a, input logic [63:0] b,
                                           input int n, output int t, output int carry,
                                           output int cmn);
    int ka, kb, ma, mb, s, pm;
    u128_t z;
    t = 0; carry = 0; cmn = 0;
    if (a == 0 || b == 0) return '0;
    ka = ref_char(a); kb = ref_char(b);
    ma = ref_mant(a); mb = ref_mant(b);
    s = ref_blec(ma) + ref_blec(mb);
    carry = s / 1024;
    cmn = s % 1024;
    t = (ka + kb + carry) % 63;
    pm = ref_balec(cmn);
    z = (u128_t'(pm) * (u128_t'(1) << t)) / 1024;
    z = z % (u128_t'(1) << (2 * n));
    return z[63:0];
  endfunction

endpackage
