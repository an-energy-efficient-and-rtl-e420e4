// tb_bfilm_exp_adders: exhaustive check of the exponent adders over all
// exponent pairs and both carry values. The expected exponent is the unbiased
// sum computed in integer arithmetic, e1 + e2 + cin - 127, reduced modulo 256.
module tb_bfilm_exp_adders;
  logic [7:0] e1, e2, ep;
  logic       cin;
  int checks = 0, failures = 0;

  bfilm_exp_adders dut (.e1(e1), .e2(e2), .cin(cin), .ep(ep));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          int expected;
          e1  = 8'(a);
          e2  = 8'(b);
          cin = c[0];
          expected = ((a + b + c - 127) % 256 + 256) % 256;
          #1;
          checks++;
          if (int'(ep) != expected) begin
            failures++;
            if (failures < 10)
              $display("FAIL e1=%0d e2=%0d cin=%0d ep=%0d expected %0d", a, b, c, ep, expected);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
