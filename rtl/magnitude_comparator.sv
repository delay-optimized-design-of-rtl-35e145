// magnitude_comparator: MSB-first cascaded "greater than" comparator.
//
// Bit i of x decides the result when x[i] = 1, d[i] = 0 and every higher
// bit pair is equal; the equality of a bit pair is an XNOR. The output is
// the OR of one product term per bit:
//
//   y = x2 & ~d2 | eq2 & x1 & ~d1 | eq2 & eq1 & x0 & ~d0    (W = 3)
//
// so a lower bit only matters when all higher bits agree. Equal operands
// give y = 0. For W = 3 the longest path is XNOR, 4-input AND, 3-input OR.
//
// Interface: x = magnitude, d = threshold, y = (x > d). Combinational.
// The cascaded structure follows the published one; reading y as strictly
// "greater than" and the width parameter are this implementation's choices.
module magnitude_comparator #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] d,
  output logic         y
);

  always_comb begin
    logic eq_above;   // all bits above the current one are equal
    y        = 1'b0;
    eq_above = 1'b1;
    for (int i = W - 1; i >= 0; i--) begin
      y        = y | (eq_above & x[i] & ~d[i]);
      eq_above = eq_above & ~(x[i] ^ d[i]);
    end
  end

endmodule
