// rlns_pkg: constants and helper functions shared by the residue-logarithmic
// multipliers.
//
// FW is the number of mantissa bits the logarithmic and antilogarithmic error
// correction circuits work on (10 in the reference design). The moduli are the
// first-level set {2^3-1, 2^3+1} = {7, 9} and the second-level set used by the
// multilevel variant, {2^2, 2^2+1} = {4, 5}. mod_inverse() computes the
// multiplicative inverses the CRT reverse converters need, at elaboration time.
package rlns_pkg;

  localparam int unsigned FW   = 10;  // mantissa bits seen by B-LEC / B-ALEC
  localparam int unsigned TW   = 6;   // width of the reverse-converted characteristic
  localparam int unsigned M1A  = 7;   // first-level moduli {2^3 - 1, 2^3 + 1}
  localparam int unsigned M2A  = 9;
  localparam int unsigned M1B  = 4;   // second-level moduli {2^2, 2^2 + 1}
  localparam int unsigned M2B  = 5;

  // Smallest n with (a * n) mod m == 1; 0 if a has no inverse modulo m.
  function automatic int unsigned mod_inverse(int unsigned a, int unsigned m);
    for (int unsigned n = 1; n < m; n++)
      if (((a % m) * n) % m == 1) return n;
    return 0;
  endfunction

endpackage
