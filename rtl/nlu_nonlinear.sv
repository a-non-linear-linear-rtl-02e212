// Non-linear unit: nibble-wise 4x4 S-box given in algebraic normal form.
//
// Each 4-bit nibble {a,b,c,d} (a is the most significant bit) is mapped to
// {a',b',c',d'}. Every output bit is the XOR of the 16 monomials of the four
// inputs (1, d, c, cd, b, bd, bc, bcd, a, ad, ..., abcd), each masked by one
// coefficient: output a' uses m[0..15], b' m[16..31], c' m[32..47] and d'
// m[48..63]. Monomial k contains variable d, c, b, a when bit 0, 1, 2, 3 of k
// is set, so coefficient m[16j+k] is the ANF coefficient of monomial k in
// output j. A coefficient of zero masks an unused monomial. All nibbles of
// the operand share the same 64 coefficients.
//
// The monomial numbering, the coefficient ranges per output bit and the
// sharing between nibbles follow the published gate network of the unit;
// it is drawn as AND gates and a balanced XOR tree, written here as a
// reduction so that synthesis chooses the tree.
//
// Interface: m (64 coefficients, m[i] = coefficient i), din, dout.
// Timing: purely combinational.
module nlu_nonlinear #(
  parameter int unsigned NIBBLES = 2
) (
  input  logic [63:0]          m,
  input  logic [4*NIBBLES-1:0] din,
  output logic [4*NIBBLES-1:0] dout
);

  // Value of monomial k for nibble x: all variables selected by k are 1.
  function automatic logic [15:0] monomials(input logic [3:0] x);
    logic [15:0] mono;
    for (int k = 0; k < 16; k++) begin
      mono[k] = &(x | ~4'(k));
    end
    return mono;
  endfunction

  always_comb begin
    for (int n = 0; n < int'(NIBBLES); n++) begin
      logic [15:0] mono;
      mono = monomials(din[4*n +: 4]);
      for (int j = 0; j < 4; j++) begin
        // output j (a'..d') is bit 3-j of the nibble
        dout[4*n + 3 - j] = ^(m[16*j +: 16] & mono);
      end
    end
  end

endmodule
