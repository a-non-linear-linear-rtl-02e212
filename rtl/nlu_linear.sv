// Linear unit: multiplication of the operand by a binary matrix over GF(2).
//
// Output bit i is the parity of the operand ANDed with matrix row i, which is
// m[W*i +: W]; within a row, m[W*i + j] multiplies operand bit j. With W = 8
// the 64 matrix bits are the contents of the configuration register, so the
// row for the top output bit is m[63:56] and the row for bit 0 is m[7:0].
// That row order follows the published gate diagram; the order of the bits
// inside a row follows the published PRESENT permutation code, in which a row
// value of 0x40 selects operand bit 6.
//
// Interface: m (W*W matrix bits), din, dout.
// Timing: purely combinational.
module nlu_linear #(
  parameter int unsigned W = 8
) (
  input  logic [W*W-1:0] m,
  input  logic [W-1:0]   din,
  output logic [W-1:0]   dout
);

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      dout[i] = ^(m[W*i +: W] & din);
    end
  end

endmodule
