// balec: binary antilogarithmic error correction (B-ALEC).
//
// Mitchell's antilogarithm takes 2^m ~ 1 + m. This circuit approximates 2^m as
// m plus a constant chosen by the region of m (its three MSBs, m_-1..m_-3),
// reduced modulo 1 and given an integer bit of 1, so the output is 1.f with an
// FW = 10 bit fraction:
//   1/8 <= m < 1/4 : m + 15/16 + 2^-6 + 2^-8 + 2^-9 + 2^-10
//   1/4 <= m < 3/8 : m + 29/32 + 2^-6 + 2^-7
//   3/8 <= m < 1/2 : m + 29/32 + 2^-7 + 2^-9
//   1/2 <= m < 5/8 : m + 29/32 + 2^-7 + 2^-8 + 2^-10
//   5/8 <= m < 3/4 : m + 29/32 + 2^-6 + 2^-9 + 2^-10
//   3/4 <= m < 7/8 : m + 15/16 + 2^-8 + 2^-10
//   7/8 <= m < 1   : m + 15/16 + 2^-6 + ... + 2^-10
// In the first region (c5 = ~m_-1 ~m_-2 ~m_-3) a leading one detector over
// m_-4..m_-10 gives the one-hot altered mantissa am_-4..am_-10, from which
//   c1 = am_-4|am_-5|am_-6|am_-7, c2 = am_-5|am_-7, c3 = am_-6|am_-7,
//   c4 = am_-8|am_-9|am_-10
// and the correction is 7/8 (c1|c2|c3) + 51/512 c1 + 1/128 c2 + 1/64 c3
// + 7/1024 c4. The regions, constants and condition variables follow the
// reference design. All constants are exact at 10 fraction bits, so no
// rounding occurs. The sum's carry into the integer position is dropped and the
// output MSB is tied to 1.
// Interface: m is the FW-bit added mantissa, pm = {1, f} the approximated 2^m
// with weight 2^0 at bit FW. Combinational.
module balec
  import rlns_pkg::*;
(
  input  logic [FW-1:0] m,
  output logic [FW:0]   pm
);

  logic [2:0]    region;
  logic [6:0]    am;      // am[6] = am_-4 ... am[0] = am_-10
  logic          am_none;
  logic          c1, c2, c3, c4, c5;
  logic [FW-1:0] corr;
  logic [FW-1:0] frac;

  assign region = m[FW-1 -: 3];

  lod #(.W(7)) u_lod (.d(m[FW-4 -: 7]), .onehot(am), .zero(am_none));

  assign c1 = am[6] | am[5] | am[4] | am[3];
  assign c2 = am[5] | am[3];
  assign c3 = am[4] | am[3];
  assign c4 = am[2] | am[1] | am[0];
  assign c5 = ~m[FW-1] & ~m[FW-2] & ~m[FW-3];

  always_comb begin
    if (c5) begin
      corr = ((c1 | c2 | c3) ? FW'(896) : '0)   // 7/8
           + (c1 ? FW'(102) : '0)               // 51/512
           + (c2 ? FW'(8)   : '0)               // 1/128
           + (c3 ? FW'(16)  : '0)               // 1/64
           + (c4 ? FW'(7)   : '0);              // 7/1024
    end else begin
      unique case (region)
        3'd1: corr = FW'(960 + 16 + 4 + 2 + 1);
        3'd2: corr = FW'(928 + 16 + 8);
        3'd3: corr = FW'(928 + 8 + 2);
        3'd4: corr = FW'(928 + 8 + 4 + 1);
        3'd5: corr = FW'(928 + 16 + 2 + 1);
        3'd6: corr = FW'(960 + 4 + 1);
        3'd7: corr = FW'(960 + 16 + 8 + 4 + 2 + 1);
        default: corr = '0;
      endcase
    end
    frac = m + corr;
  end

  assign pm = {1'b1, frac};

endmodule
