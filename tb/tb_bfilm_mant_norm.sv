// tb_bfilm_mant_norm: exhaustive check of the mantissa normaliser over all
// 512 values of Pa. The expected fraction is derived from the value of Pa
// (2.7 fixed point): if Pa >= 2.0 the significand is Pa/2, otherwise Pa; the
// fraction is the significand minus its leading one, truncated to 7 bits.
module tb_bfilm_mant_norm;
  logic [8:0] pa;
  logic [6:0] frac;
  logic       norm;
  int checks = 0, failures = 0;

  bfilm_mant_norm dut (.pa(pa), .frac(frac), .norm(norm));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int sig128;   // significand in units of 2^-7
      int exp_frac;
      bit exp_norm;
      pa = 9'(v);
      exp_norm = (v >= 256);
      sig128   = exp_norm ? v / 2 : v;
      exp_frac = sig128 % 128;
      #1;
      checks += 2;
      if (norm !== exp_norm) begin
        failures++;
        $display("FAIL pa=%0d norm=%0d", v, norm);
      end
      if (int'(frac) != exp_frac) begin
        failures++;
        $display("FAIL pa=%0d frac=%0d expected %0d", v, frac, exp_frac);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
