// lod: leading one detector.
//
// Marks the most significant set bit of d with a one-hot vector: onehot[i] is 1
// when d[i] is 1 and every bit above it is 0. It is built as a running OR from
// the MSB down, so the result is purely combinational. zero is 1 when d holds
// no set bit (onehot is then all zeros).
//
// The multipliers use it twice: on the whole operand, to find the
// characteristic of its logarithm, and on bits m_-4..m_-10 of the added
// mantissa inside the antilogarithmic error corrector.
// The reference design names the detector but not its circuit; the running
// OR structure is this design's choice.
module lod #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] onehot,
  output logic         zero
);

  logic [W:0] seen;  // seen[i]: some bit at position >= i is set

  always_comb begin
    seen[W] = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      onehot[i] = d[i] & ~seen[i+1];
      seen[i]   = d[i] | seen[i+1];
    end
    zero = ~seen[0];
  end

endmodule
