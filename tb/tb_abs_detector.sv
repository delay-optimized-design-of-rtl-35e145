// tb_abs_detector: end-to-end self-check of the absolute value detector.
//
// Applies every supported sample (-7..+7) against every threshold (0..7),
// 120 vectors, with the top at its default configuration. Expected values
// come from integer arithmetic: x = |a| and y = (|a| > d). It also counts
// how often each mechanism of the design was exercised and fails if one
// never was:
//   - positive sample passed through unchanged
//   - negative sample inverted and incremented
//   - increment carrying into the magnitude MSB (X2 = A3 & B1 & B0 term)
//   - comparator decided at bit 2, at bit 1, at bit 0
//   - comparator operands equal (y = 0 with no differing bit)
//   - y = 1 and y = 0
// Finally 200 random vectors (excluding -8) are applied back to back.
module tb_abs_detector;
  import abs_det_pkg::*;

  int checks   = 0;
  int failures = 0;

  int n_positive = 0, n_negative = 0, n_carry = 0;
  int n_bit[3];
  int n_equal = 0, n_high = 0, n_low = 0;

  sample_t a;
  mag_t    d, x;
  logic    y;

  abs_detector dut (.a(a), .d(d), .x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("tb_abs_detector: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int value, input int thr);
    int   mag;
    logic exp_y;
    a = sample_t'(value);
    d = mag_t'(thr);
    #1;
    mag   = (value < 0) ? -value : value;
    exp_y = (mag > thr);
    checks += 2;
    if (x !== mag_t'(mag)) begin
      failures++;
      $display("FAIL a=%0d d=%0d x=%0d exp=%0d", value, thr, x, mag);
    end
    if (y !== exp_y) begin
      failures++;
      $display("FAIL a=%0d d=%0d y=%0d exp=%0d", value, thr, y, exp_y);
    end
    if (value >= 0) n_positive++;
    else n_negative++;
    // carry into bit 2: negative sample whose inverted low bits are 11
    if (value < 0 && (~a[1:0]) == 2'b11) n_carry++;
    if (mag == thr) n_equal++;
    else if (mag[2] != thr[2]) n_bit[2]++;
    else if (mag[1] != thr[1]) n_bit[1]++;
    else n_bit[0]++;
    if (exp_y) n_high++;
    else n_low++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("  %-32s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int value = -7; value <= 7; value++) begin
      for (int thr = 0; thr < 8; thr++) begin
        apply(value, thr);
      end
    end
    for (int k = 0; k < 200; k++) begin
      apply(int'($urandom_range(14)) - 7, int'($urandom_range(7)));
    end
    $display("mechanism counts:");
    require("positive pass-through", n_positive);
    require("negative invert+increment", n_negative);
    require("increment carry into X2", n_carry);
    require("compare decided at bit 2", n_bit[2]);
    require("compare decided at bit 1", n_bit[1]);
    require("compare decided at bit 0", n_bit[0]);
    require("compare equal operands", n_equal);
    require("detector output high", n_high);
    require("detector output low", n_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
