// tb_bfilm_mred: accuracy of the BFILM multiplier against the number of ILM
// steps, measured as the mean relative error distance (MRED) over every pair
// of bfloat16 fractions (128 x 128 pairs, both exponents 127).
//
// The reference is an exact bfloat16 multiplier that truncates the product to
// 7 fraction bits. MRED = mean(|approx - exact| / exact).
// Two instances run: the nine-bit datapath (GUARD = 0, the default) and one
// with 7 guard bits (GUARD = 7), whose ILM terms are accumulated without
// truncation. Expected MRED values (x 1e-3):
//   steps          1       2       3       8
//   GUARD = 7    91.21    9.08    0.86     0     (published figures for BFILM)
//   GUARD = 0    91.21   10.10    3.66     -     (this datapath, computed
//                                                  offline from the recurrence)
// Tolerance is 0.01e-3. The step-1 figure is the same for both because the
// first step shifts by 7 and loses nothing to truncation.
module tb_bfilm_mred;
  import bfilm_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       start;
  bf16_t      o1, o2, p0, p7;
  logic [3:0] steps;
  logic       ready0, done0, ready7, done7;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bfilm_multiplier                dut0 (.clk(clk), .rst_n(rst_n), .start(start), .o1(o1), .o2(o2),
                                        .steps(steps), .ready(ready0), .done(done0), .p(p0));
  bfilm_multiplier #(.GUARD(7))   dut7 (.clk(clk), .rst_n(rst_n), .start(start), .o1(o1), .o2(o2),
                                        .steps(steps), .ready(ready7), .done(done7), .p(p7));

  function automatic real bf_value(bf16_t v);
    real m = 1.0 + real'(v.frac) / 128.0;
    int e = int'(v.exp) - 127;
    while (e > 0) begin
      m = m * 2.0;
      e--;
    end
    while (e < 0) begin
      m = m / 2.0;
      e++;
    end
    return v.sign ? -m : m;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(int n, output real mred0, output real mred7);
    real s0 = 0.0, s7 = 0.0;
    for (int f1 = 0; f1 < 128; f1++)
      for (int f2 = 0; f2 < 128; f2++) begin
        int prod, q;
        real exact;
        o1 = '{sign: 1'b0, exp: 8'd127, frac: 7'(f1)};
        o2 = '{sign: 1'b0, exp: 8'd127, frac: 7'(f2)};
        steps = 4'(n);
        start = 1'b1;
        @(posedge clk); #1;
        start = 1'b0;
        while (!done0) begin
          @(posedge clk); #1;
        end
        // exact significand product, truncated to 8 significant bits
        prod = (128 + f1) * (128 + f2);
        q = (prod >= (1 << 15)) ? (prod / 256) * 2 : prod / 128;
        exact = real'(q) / 128.0;
        s0 += (bf_value(p0) > exact ? bf_value(p0) - exact : exact - bf_value(p0)) / exact;
        s7 += (bf_value(p7) > exact ? bf_value(p7) - exact : exact - bf_value(p7)) / exact;
      end
    mred0 = s0 / 16384.0 * 1000.0;
    mred7 = s7 / 16384.0 * 1000.0;
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  initial begin
    real m0, m7;
    real pub7[3]  = '{91.21, 9.08, 0.86};
    real exp0[3]  = '{91.21, 10.10, 3.66};
    rst_n = 1'b0; start = 1'b0; o1 = '0; o2 = '0; steps = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 1; n <= 3; n++) begin
      sweep(n, m0, m7);
      $display("steps=%0d  MRED nine-bit=%.4f e-3  guarded=%.4f e-3", n, m0, m7);
      check($sformatf("guarded MRED at %0d steps: %.4f vs %.2f", n, m7, pub7[n-1]), near(m7, pub7[n-1]));
      check($sformatf("nine-bit MRED at %0d steps: %.4f vs %.2f", n, m0, exp0[n-1]), near(m0, exp0[n-1]));
    end
    sweep(8, m0, m7);
    $display("steps=8  MRED nine-bit=%.4f e-3  guarded=%.4f e-3", m0, m7);
    check("guarded MRED at 8 steps is zero", m7 == 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
