// char_rom: N x log2(N) characteristic ROM.
//
// A NOR/OR-plane ROM with N word lines, one per bit position of the operand.
// Word i holds the binary number i, the characteristic of any operand whose
// leading one sits at bit i. The word lines come straight from the leading one
// detector, so exactly one (or none, for a zero operand) is active; the output
// is the OR of the selected words, as in a precharged ROM bit line.
// Combinational. The ROM contents are generated at elaboration from the
// formula word[i] = i.
// The ROM's size comes from the reference design; its contents and its form
// as logic rather than a transistor-level MOS array are this design's reading.
module char_rom #(
  parameter int unsigned N = 32,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  wl,  // one-hot word lines
  output logic [KW-1:0] k
);

  typedef logic [N-1:0][KW-1:0] rom_t;

  function automatic rom_t rom_contents();
    rom_t r;
    for (int i = 0; i < N; i++) r[i] = KW'(i);
    return r;
  endfunction

  localparam rom_t ROM = rom_contents();

  always_comb begin
    k = '0;
    for (int i = 0; i < N; i++)
      if (wl[i]) k |= ROM[i];
  end

endmodule
