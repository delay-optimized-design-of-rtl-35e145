// tb_cond_increment: exhaustive self-check of the trimmed increment.
//
// For every (sign, b) pair except the excluded one (sign = 1, b = 3'b111,
// which comes from the input -8) it checks x == b + sign using integer
// addition, and checks that the trimmed X2 agrees with the untrimmed
// four-term expression
//   X2^0 = ~A3 B2 | A3 B2 ~B1 | A3 ~B2 B1 B0 | A3 B2 B1 ~B0.
// It also counts the cases where the increment carries into bit 2, so the
// check cannot pass without exercising the carry.
module tb_cond_increment;
  import abs_det_pkg::*;

  int checks   = 0;
  int failures = 0;
  int carries  = 0;

  logic s;
  mag_t b, x;

  cond_increment dut (.sign(s), .b(b), .x(x));

  initial begin
    #100000;
    failures++;
    $display("tb_cond_increment: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   sum;
    logic x2_full;
    for (int sv = 0; sv < 2; sv++) begin
      for (int v = 0; v < 8; v++) begin
        if (sv == 1 && v == 7) continue;  // -8: don't care
        s = sv[0];
        b = v[2:0];
        #1;
        sum = v + sv;
        x2_full = (~s & b[2]) | (s & b[2] & ~b[1]) | (s & ~b[2] & b[1] & b[0])
                | (s & b[2] & b[1] & ~b[0]);
        if (sv == 1 && v[1:0] == 2'b11) carries++;
        checks += 2;
        if (x !== sum[2:0]) begin
          failures++;
          $display("FAIL sign=%0d b=%03b x=%03b exp=%03b", s, b, x, sum[2:0]);
        end
        if (x[2] !== x2_full) begin
          failures++;
          $display("FAIL sign=%0d b=%03b x2=%0d untrimmed=%0d", s, b, x[2], x2_full);
        end
      end
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL carry into bit 2 never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
