// blec: binary logarithmic error correction (B-LEC).
//
// Mitchell's approximation takes log2(1+m) ~ m. This circuit replaces it by an
// eight-region piecewise-linear estimate, the region chosen by the three MSBs of
// m (m_-1..m_-3):
//   0   <= m < 1/8 : cm = m + (2^-2+2^-3+2^-5) m             (13/32 m)
//   1/8 <= m < 1/4 : cm = m + (2^-2+2^-4+2^-5+2^-6) m        (23/64 m)
//   1/4 <= m < 3/8 : cm = m + 73/1024
//   3/8 <= m < 1/2 : cm = m + 43/512
//   1/2 <= m < 5/8 : cm = m + ~m[7 MSBs]/8 + 3/128
//   5/8 <= m < 3/4 : cm = m + ~m[7 MSBs]/8 + 15/512
//   3/4 <= m < 7/8 : cm = m + (2^-2+2^-6) ~m[5 MSBs]         (17/64)
//   7/8 <= m < 1   : cm = m + (2^-3+2^-5) ~m[5 MSBs]         (5/32)
// where ~m[n MSBs] is the n-bit fraction formed by inverting the top n bits of m.
// All coefficients are sums of powers of two, so each term is a shifted copy of
// m or ~m; bits shifted below 2^-10 are dropped before the terms are added, as
// in a 10-bit adder chain whose LSB is m_-10. The sum never reaches 1, so the
// carry out of the m_-1 position is discarded. Regions and coefficients follow
// the reference design; the per-term truncation is this design's choice.
// Interface: m and cm are FW = 10 bit fractions, bit FW-1 weighing 2^-1.
// Combinational.
module blec
  import rlns_pkg::*;
(
  input  logic [FW-1:0] m,
  output logic [FW-1:0] cm
);

  logic [2:0]    region;
  logic [6:0]    inv7;    // inverted m_-1..m_-7
  logic [4:0]    inv5;    // inverted m_-1..m_-5
  logic [FW-1:0] corr;

  assign region = m[FW-1 -: 3];
  assign inv7   = ~m[FW-1 -: 7];
  assign inv5   = ~m[FW-1 -: 5];

  always_comb begin
    unique case (region)
      3'd0: corr = (m >> 2) + (m >> 3) + (m >> 5);
      3'd1: corr = (m >> 2) + (m >> 4) + (m >> 5) + (m >> 6);
      3'd2: corr = FW'(73);                       // 73/1024
      3'd3: corr = FW'(86);                       // 43/512
      3'd4: corr = FW'(inv7) + FW'(24);           // ~m7/8 + 3/128
      3'd5: corr = FW'(inv7) + FW'(30);           // ~m7/8 + 15/512
      3'd6: corr = (FW'(inv5) << 3) + FW'(inv5 >> 1);  // 2^-2 and 2^-6 of ~m5
      3'd7: corr = (FW'(inv5) << 2) + FW'(inv5);       // 2^-3 and 2^-5 of ~m5
      default: corr = '0;
    endcase
    cm = m + corr;
  end

endmodule
