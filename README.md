# Residue-logarithmic multipliers (RLNS and MRLNS)

This RTL multiplies two unsigned N-bit integers without a partial-product
array. It adds their base-2 logarithms and takes the antilogarithm of the sum:

    A * B = 2^(log2 A + log2 B)

Each logarithm is split into an integer part, the *characteristic* k (the
position of the leading one), and a fractional part, the *mantissa* m, so that
A = 2^k (1 + m). The characteristics are small integers (0..31 for N = 32), and
they are carried through a residue number system (RNS): each one is stored as
its remainders modulo a few small, pairwise coprime moduli, added channel by
channel without carries between channels, and recovered with the Chinese
Remainder Theorem (CRT). The mantissas are added in ordinary binary.
Mitchell's approximations, log2(1+m) ~ m and 2^m ~ 1+m, are corrected by two
small piecewise-linear circuits. These circuits are what keep the error down,
and they take the most room in this description.

Two variants are provided. They compute bit-identical products:

* **RLNS** (`rlns_mult`) is the single-level design. The characteristics are
  coded modulo {7, 9}, i.e. {2^3-1, 2^3+1}, which gives a dynamic range of 63.
* **MRLNS** (`mrlns_mult`) is the multilevel design. The {7, 9} residues are
  coded again modulo {4, 5}, i.e. {2^2, 2^2+1}. The adds happen on those
  second-level residues, and two CRT stages undo the two levels. The point is
  that the residues in flight can only be read by someone who knows both
  moduli sets. It costs some extra logic and gives no extra range.

`rlns_top` holds both multipliers side by side, each with its own operands and
product. Everything is combinational: there is no clock. A product is valid one
logic delay after its operands change.

## Datapath

```
 A ──► log_converter ──► k_A ──► fwd_conv mod 7, mod 9 ──┐
        (lod, char_rom,   m_A ──► blec ──┐               │
         log_shifter)                     ├─► mant_adder ─┤ carry C
 B ──► log_converter ──► k_B ──► ...      │   (cmn)       ▼
                          m_B ──► blec ──┘        mod_add per channel
                                                  (k_A + k_B + C mod m_i)
                                                          │
                                                  crt2 {7,9} ──► T (6 bits)
                                 cmn ──► balec ──► 1.f ──► antilog_shifter ──► Z
```

1. **Logarithmic conversion** (`log_converter`). A leading one detector (`lod`)
   marks the operand's MSB one-hot. A ROM of N words of log2 N bits
   (`char_rom`, word i = i) turns that one-hot line into the characteristic k.
   A log2(N)-stage barrel shifter (`log_shifter`) shifts the operand left by
   N-1-k, and the bits below the leading one are the mantissa. Only the 10 top
   mantissa bits are kept: lower bits are truncated, and for N = 8 the 7
   available bits are padded with zeros.
2. **Logarithm correction** (`blec`). See below.
3. **Addition.** A 10-bit ripple-carry adder (`mant_adder`) adds the corrected
   mantissas. Its carry C has weight 1 and is added into every residue
   channel together with the characteristic residues (`fwd_conv`, `mod_add`).
4. **Reverse conversion** (`crt2`). For {7, 9}, the CRT constants are
   M = 63, M_i = (9, 7) and the inverses N_i = (4, 4). The result is
   T = k_A + k_B + C mod 63, 6 bits wide.
5. **Antilogarithm.** `balec` approximates 2^cmn as a 1.f value with a
   10-bit fraction. A 2N-bit barrel shifter (`antilog_shifter`) shifts it left
   by T and drops the fraction bits, giving Z = floor(2^T * 1.f).

The MRLNS variant replaces steps 3 and 4 for the characteristics:

| stage | operation | range |
|---|---|---|
| level 1 | a_i = k_X mod {7,9}, b_i = k_Y mod {7,9} | |
| level 2 | c = a_1 mod {4,5}, d = a_2 mod {4,5}, e = b_1 mod {4,5}, f = b_2 mod {4,5} | |
| add | u_i = c_i + e_i + C, v_i = d_i + f_i + C, each mod {4,5} | |
| CRT B | w1 = CRT{4,5}(u), w2 = CRT{4,5}(v); constants M = 20, M_i = (5, 4), N_i = (1, 4) | a_1+b_1+C ≤ 13 and a_2+b_2+C ≤ 17 are both below 20, so w1 and w2 are the exact level-1 channel sums |
| reduce | t1 = w1 mod 7, t2 = w2 mod 9 | |
| CRT A | T = CRT{7,9}(t1, t2) | same T as RLNS |

## The logarithm corrector (`blec`)

The mantissa interval [0, 1) is cut into eight equal regions, selected by
m_-1..m_-3. In each region, log2(1+m) is replaced by m plus a correction whose
coefficients are sums of a few powers of two. Each correction term is
therefore just a shifted copy of m, or of m with its top bits inverted. In the
table, ~m7 and ~m5 are the 7- and 5-bit fractions formed by inverting the top
7 or top 5 mantissa bits:

| region | corrected mantissa cm |
|---|---|
| [0, 1/8) | m + (2^-2 + 2^-3 + 2^-5) m |
| [1/8, 1/4) | m + (2^-2 + 2^-4 + 2^-5 + 2^-6) m |
| [1/4, 3/8) | m + 73/1024 |
| [3/8, 1/2) | m + 43/512 |
| [1/2, 5/8) | m + ~m7 / 8 + 3/128 |
| [5/8, 3/4) | m + ~m7 / 8 + 15/512 |
| [3/4, 7/8) | m + (2^-2 + 2^-6) ~m5 |
| [7/8, 1) | m + (2^-3 + 2^-5) ~m5 |

Bits shifted below 2^-10 are dropped before the terms are summed. The sum
always stays below 1, so the carry out of the top position is discarded (an
exhaustive test checks this). The worst error against log2(1+m) is about
0.017, at the start of the [7/8, 1) region.

## The antilogarithm corrector (`balec`)

Outside the first region, 2^m is approximated as m plus a constant for that
region. The constants are 15/16 or 29/32 plus a few 2^-6..2^-10 terms; for
example, [1/2, 5/8) uses 29/32 + 2^-7 + 2^-8 + 2^-10. The sum lies in
[1, 2). Its integer bit is dropped, and the output's MSB is tied to 1.

In the first region, [0, 1/8), the correction depends on how small m is. A
7-bit leading one detector looks at m_-4..m_-10 and gives a one-hot "altered
mantissa" am_-4..am_-10. From it the circuit derives:

    c1 = am_-4 | am_-5 | am_-6 | am_-7
    c2 = am_-5 | am_-7
    c3 = am_-6 | am_-7
    c4 = am_-8 | am_-9 | am_-10

The correction is then:

    7/8·(c1|c2|c3) + 51/512·c1 + 1/128·c2 + 1/64·c3 + 7/1024·c4

The correction is 0.9746 when the leading one is at m_-4, 0.9824 at m_-5,
0.9902 at m_-6 and 0.9980 at m_-7. These are decreasing offsets that follow
2^m - m near 0. When the leading one is at m_-8..m_-10, the sum m + 7/1024
stays below 1. The tied MSB then supplies the integer 1, so the output is
1 + m + 7/1024. For m = 0 the output is exactly 1.

All constants are exact at 10 fraction bits, so this corrector does not round.
Its worst error against 2^m is about 0.032, as m approaches 1: the last
region's constant gives 1.968 where 2 is due.

## Accuracy and limits

* **Error.** For 250 random operand pairs, the average of the signed error
  percentage (TV - EV) / TV is 0.25 % at N = 8, 0.34 % at N = 16 and 0.28 %
  at N = 32. The average of the absolute error is about 0.6 %, and single
  products reach about 2.5 %. The published figures for these corrector
  equations are 0.39 %, 0.40 % and 0.30 %.
* **Range at N = 32.** The {7, 9} moduli represent characteristic sums
  0..62. With 32-bit operands, k_A + k_B + C can reach 63, which wraps to 0.
  The product then comes out about 2^63 times too small. This happens when
  both operands are at least 2^31 and their corrected mantissas carry. That
  is roughly one uniformly random pair in eight, and it covers all products
  of about 2^63 and above. N = 8 and N = 16 are not affected. The moduli are
  kept as published. A larger moduli set (for example {7, 11}) would remove
  the wrap, but it would change `rlns_pkg` and `crt2`'s constants.
* **Zero.** A zero operand has no logarithm. The leading one detector's zero
  flag forces the product to 0; this design adds that gating.
* **Truncation.** Mantissas are truncated to 10 bits, and the product's
  fraction bits are dropped rather than rounded. Small products are therefore
  relatively less accurate: 3 × 5, for example, gives 14.

## Choices made in this RTL

The published description fixes the algorithm, the moduli, the correction
equations and the 10-bit mantissa width. The following are this
implementation's own:

* the internal structure of the LOD (a running OR), of both shifters (barrel
  shifters) and of the residue adders (add, then one conditional subtraction);
* the forward converters, written as constant modulo operations on 3- to
  5-bit values;
* the ROM, written as an OR plane over the LOD's word lines rather than as a
  transistor-level MOS ROM;
* the per-term truncation inside `blec`;
* zero handling, and the fully combinational, unregistered timing;
* in MRLNS, which first-level residue feeds c, d, e and f. The chosen
  assignment is the only one that makes CRT B followed by mod 7 / mod 9
  reproduce the first-level channel sums.

Where the published text gives a 12-bit mantissa for the antilog corrector in
one place and 10 bits in another, 10 bits are used throughout.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `N` | `rlns_top`, `rlns_mult`, `mrlns_mult`, `log_converter`, `antilog_shifter` | 32 | operand width; product is 2N bits. 8, 16 and 32 are the evaluated sizes; N must be a power of two |
| `FW` | `rlns_pkg` | 10 | mantissa bits seen by the correctors; the correction constants assume 10 |
| `M1A, M2A` / `M1B, M2B` | `rlns_pkg` | 7, 9 / 4, 5 | first- and second-level moduli |

## Files

* `rtl/rlns_pkg.sv` holds the shared constants and the modular inverse
  function used for the CRT constants.
* `rtl/rlns_top.sv`, `rtl/rlns_mult.sv` and `rtl/mrlns_mult.sv` are the top
  level and the two multipliers.
* `rtl/log_converter.sv`, `rtl/lod.sv`, `rtl/char_rom.sv` and
  `rtl/log_shifter.sv` form the binary-to-log conversion.
* `rtl/blec.sv` and `rtl/balec.sv` are the two correctors.
* `rtl/mant_adder.sv`, `rtl/fwd_conv.sv`, `rtl/mod_add.sv` and `rtl/crt2.sv`
  are the adders and the residue converters.
* `rtl/antilog_shifter.sv` is the final shifter.
* `tb/tb_<module>.sv` is one self-checking testbench per module.
  `tb/tb_rlns_top.sv` runs the whole design end to end at N = 32.
  `tb/tb_aep.sv` is the 250-pair accuracy run at N = 8, 16 and 32.
  `tb/rlns_ref_pkg.sv` is an integer reference model shared by the testbenches.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. For
example:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/rlns_pkg.sv tb/rlns_ref_pkg.sv tb/tb_rlns_top.sv --top-module tb_rlns_top
./obj_dir/Vtb_rlns_top
```

To lint a module on its own:
`verilator --lint-only -Wall -y rtl rtl/rlns_pkg.sv rtl/rlns_top.sv`.

## Verification status

* The correctors are tested exhaustively over all 1024 inputs, against the
  formulas and against log2 and exp2 within the error bounds above.
* The residue units and CRTs are tested exhaustively for all four moduli.
* The shifters, the LOD and the log converter are tested with directed and
  random vectors.
* The multipliers are checked bit for bit against an integer reference model
  at N = 8 and N = 32.
* The top-level test drives about 4000 random and directed pairs through
  both multipliers at the default size. It counts each datapath case: zero
  operands, mantissa carry on and off, wrap in both residue channels, all 8
  regions of each corrector, every leading-one sub-case of the antilog
  corrector's first region, and the 63 wrap. It fails if any case never
  occurs.
* Each testbench has been shown to fail on a deliberately broken copy of its
  module.
* Timing, area and power have not been characterised. The published results
  come from a transistor-level 45 nm design at 0.5 V, which RTL does not
  reproduce.
