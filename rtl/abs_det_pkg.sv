// abs_det_pkg: widths, types and constants shared by the 4-bit absolute
// value detector.
//
// The detector takes a 4-bit two's-complement sample (A3 is the sign) and
// produces its 3-bit magnitude X and a flag Y = (X > D) against a 3-bit
// threshold D. The sample -8 (4'b1000) is outside the supported range: the
// design trims its increment logic on the assumption that -8 never arrives,
// so the magnitude always fits in three bits. Everything is combinational.
package abs_det_pkg;

  // Input sample width (sign + 3 magnitude bits) and magnitude width.
  localparam int unsigned IN_W  = 4;
  localparam int unsigned MAG_W = IN_W - 1;

  typedef logic [IN_W-1:0]  sample_t;  // two's complement, -7..+7
  typedef logic [MAG_W-1:0] mag_t;     // unsigned magnitude, 0..7

  // The one code the design does not handle.
  localparam sample_t EXCLUDED_SAMPLE = sample_t'(1) << (IN_W - 1);

endpackage
