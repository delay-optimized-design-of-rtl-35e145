// cond_increment: conditional increment of the inverted magnitude, trimmed
// for an input range that excludes -8.
//
// A generic design would add the sign bit A3 to B2..B0 with a 3-bit
// ripple-carry adder, which puts the carry chain on the critical path.
// Here each output bit is a flat sum of products, derived from the truth
// table of B + A3 with the -8 input (A3 = 1, B = 3'b111) as a don't-care:
//
//   X2 = B2 | A3 & B1 & B0                 (exact form: B2 ^ (A3 & B1 & B0))
//   X1 = B1 & ~B0 | ~A3 & B1 | A3 & ~B1 & B0     (= B1 ^ (A3 & B0))
//   X0 = A3 ^ B0
//
// The don't-care turns X2 from a four-term expression into one AND feeding
// an OR. X1 then carries the longest path (inverter, 3-input AND, 3-input
// OR). For every input except -8 the result equals B + A3 exactly; for -8
// it is 3'b100.
//
// Interface: sign = A3, b = B2..B0 from cond_invert, x = X2..X0 = |A|.
// Combinational. Equations follow the published ones; they are fixed at
// three bits because the simplification exists only for this width.
module cond_increment
  import abs_det_pkg::*;
(
  input  logic sign,
  input  mag_t b,
  output mag_t x
);

  always_comb begin
    x[2] = b[2] | (sign & b[1] & b[0]);
    x[1] = (b[1] & ~b[0]) | (~sign & b[1]) | (sign & ~b[1] & b[0]);
    x[0] = sign ^ b[0];
  end

endmodule
