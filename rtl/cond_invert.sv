// cond_invert: conditional bitwise inversion of the magnitude bits.
//
// Each magnitude bit of a two's-complement sample is XORed with the sign
// bit: a positive sample (sign = 0) passes unchanged, a negative one
// (sign = 1) becomes its ones' complement, the first half of "invert and
// add one". One 2-input XOR per bit, so the delay is one gate.
//
// Interface: a = A2..A0, sign = A3, b = B2..B0. Combinational.
// The XOR-with-sign structure is the published one; the width parameter is
// this implementation's generalisation (default 3, the published width).
module cond_invert #(
  parameter int unsigned MAG_W = 3
) (
  input  logic [MAG_W-1:0] a,
  input  logic             sign,
  output logic [MAG_W-1:0] b
);

  always_comb begin
    for (int i = 0; i < MAG_W; i++) begin
      b[i] = a[i] ^ sign;
    end
  end

endmodule
