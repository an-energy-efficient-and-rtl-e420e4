// tb_bfilm_sign: exhaustive check of the product sign (all four sign pairs)
// against the rule "negative iff exactly one operand is negative".
module tb_bfilm_sign;
  logic s1, s2, sp;
  int checks = 0, failures = 0;

  bfilm_sign dut (.s1(s1), .s2(s2), .sp(sp));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        logic expect_neg;
        s1 = a[0];
        s2 = b[0];
        expect_neg = (a + b == 1);
        #1;
        checks++;
        if (sp !== expect_neg) begin
          failures++;
          $display("FAIL s1=%0d s2=%0d sp=%0d", s1, s2, sp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
