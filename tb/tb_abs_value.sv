// tb_abs_value: exhaustive self-check of abs_value over -7..+7.
//
// Each sample is applied and x is compared with the magnitude computed from
// the signed integer value. -8 is not applied: it lies outside the range the
// block supports.
module tb_abs_value;
  import abs_det_pkg::*;

  int checks   = 0;
  int failures = 0;

  sample_t a;
  mag_t    x;

  abs_value dut (.a(a), .x(x));

  initial begin
    #100000;
    failures++;
    $display("tb_abs_value: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int value, mag;
    for (value = -7; value <= 7; value++) begin
      a = sample_t'(value);
      #1;
      mag = (value < 0) ? -value : value;
      checks++;
      if (x !== mag_t'(mag)) begin
        failures++;
        $display("FAIL a=%0d (%04b) x=%0d exp=%0d", value, a, x, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
