// abs_value: absolute value of a 4-bit two's-complement sample in -7..+7.
//
// Sign detection takes the MSB A3 as the sign. cond_invert XORs A2..A0 with
// it (ones' complement of a negative sample) and cond_increment adds the
// sign back in, completing "invert and add one" for negative samples and
// leaving positive ones unchanged. The increment is the trimmed form that
// assumes -8 never occurs; an assertion flags that input in simulation.
//
// Interface: a = A3..A0, x = X2..X0 = |A|. Combinational, no clock or
// reset (the design is not pipelined). The structure follows the published
// one; the assertion is this implementation's addition.
module abs_value
  import abs_det_pkg::*;
(
  input  sample_t a,
  output mag_t    x
);

  logic sign;
  mag_t b;

  assign sign = a[IN_W-1];

  cond_invert #(.MAG_W(MAG_W)) u_invert (
    .a    (a[MAG_W-1:0]),
    .sign (sign),
    .b    (b)
  );

  cond_increment u_increment (
    .sign (sign),
    .b    (b),
    .x    (x)
  );

  // -8 is outside the supported range: its magnitude does not fit in MAG_W.
  always_comb begin
    assert final (a != EXCLUDED_SAMPLE)
      else $error("abs_value: input -8 is outside the supported range");
  end

endmodule
