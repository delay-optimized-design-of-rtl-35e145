// abs_detector: 4-bit absolute value detector.
//
// Computes the magnitude of a 4-bit two's-complement sample A (range -7..+7)
// and flags whether it exceeds a 3-bit threshold D:
//
//   x = |a|,   y = (|a| > d)
//
// abs_value forms |a| by conditional inversion and a conditional increment
// whose logic is trimmed on the premise that -8 never occurs; this removes
// the ripple carry chain and shortens the longest path from 13 to 7 gate
// stages. magnitude_comparator then compares |a| with d MSB first.
//
// Interface: a = A3..A0 (sign in A3), d = D2..D0, x = X2..X0, y = Y.
// Purely combinational, no clock, no reset, no pipelining: y settles one
// combinational delay after a or d changes. The block split and wiring
// follow the published design; bringing x out as a port is this
// implementation's choice.
module abs_detector
  import abs_det_pkg::*;
(
  input  sample_t a,
  input  mag_t    d,
  output mag_t    x,
  output logic    y
);

  abs_value u_abs (
    .a (a),
    .x (x)
  );

  magnitude_comparator #(.W(MAG_W)) u_cmp (
    .x (x),
    .d (d),
    .y (y)
  );

endmodule
