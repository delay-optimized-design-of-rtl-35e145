// tb_magnitude_comparator: exhaustive self-check of the cascaded comparator.
//
// All 64 operand pairs at the default width 3 and all 256 at width 4 are
// applied; y is compared with the integer comparison x > d. For width 3 it
// also counts at which bit the result was decided (the first differing bit
// from the MSB) and the equal case, and fails if any of them never occurred.
module tb_magnitude_comparator;

  int checks   = 0;
  int failures = 0;
  int decided_at[3];
  int equal_cases = 0;

  logic [2:0] x3, d3;
  logic       y3;
  logic [3:0] x4, d4;
  logic       y4;

  magnitude_comparator dut3 (.x(x3), .d(d3), .y(y3));
  magnitude_comparator #(.W(4)) dut4 (.x(x4), .d(d4), .y(y4));

  initial begin
    #100000;
    failures++;
    $display("tb_magnitude_comparator: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        x4 = i[3:0];
        d4 = j[3:0];
        x3 = i[2:0];
        d3 = j[2:0];
        #1;
        checks++;
        if (y4 !== (i > j)) begin
          failures++;
          $display("FAIL w4 x=%0d d=%0d y=%0d", i, j, y4);
        end
        if (i < 8 && j < 8) begin
          checks++;
          if (y3 !== (i > j)) begin
            failures++;
            $display("FAIL w3 x=%0d d=%0d y=%0d", i, j, y3);
          end
          if (i == j) equal_cases++;
          else if (i[2] != j[2]) decided_at[2]++;
          else if (i[1] != j[1]) decided_at[1]++;
          else decided_at[0]++;
        end
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (decided_at[k] == 0) begin
        failures++;
        $display("FAIL no comparison decided at bit %0d", k);
      end
    end
    checks++;
    if (equal_cases == 0) begin
      failures++;
      $display("FAIL equal operands never applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
