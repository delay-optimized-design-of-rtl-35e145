// tb_cond_invert: exhaustive self-check of cond_invert.
//
// Drives every magnitude value with both sign values and compares b with
// the ones' complement of a (sign = 1) or a itself (sign = 0), computed
// here by subtraction from the all-ones word rather than by XOR. A second
// instance at width 5 checks that the width parameter is honoured.
module tb_cond_invert;

  int checks   = 0;
  int failures = 0;

  logic [2:0] a3, b3;
  logic       s;
  logic [4:0] a5, b5;

  cond_invert dut3 (.a(a3), .sign(s), .b(b3));
  cond_invert #(.MAG_W(5)) dut5 (.a(a5), .sign(s), .b(b5));

  initial begin
    #100000;
    failures++;
    $display("tb_cond_invert: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp3;
    logic [4:0] exp5;
    for (int sv = 0; sv < 2; sv++) begin
      for (int v = 0; v < 32; v++) begin
        s  = sv[0];
        a3 = v[2:0];
        a5 = v[4:0];
        #1;
        exp3 = s ? 3'(7 - v[2:0]) : v[2:0];
        exp5 = s ? 5'(31 - v[4:0]) : v[4:0];
        checks += 2;
        if (b3 !== exp3) begin
          failures++;
          $display("FAIL w3 sign=%0d a=%03b b=%03b exp=%03b", s, a3, b3, exp3);
        end
        if (b5 !== exp5) begin
          failures++;
          $display("FAIL w5 sign=%0d a=%05b b=%05b exp=%05b", s, a5, b5, exp5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
