// tb_bfilm_multiplier: end-to-end test of the BFILM bfloat16 multiplier at its
// default parameters (nine-bit mantissa datapath, 4-bit step count).
//
// Random bfloat16 operands (exponents kept away from overflow and underflow)
// and random step counts 0..10 go through the multiplier. Each product is
// compared with a reference model written here: sign = s1 XOR s2; the ILM
// recurrence on the two significands with each term truncated to its bits
// above 2^7; normalisation on Pa[8]; exponent e1 + e2 + Pa[8] - 127.
// Independent of that model, the real value of every product is compared with
// the exact real product: it may never exceed it in magnitude (the ILM only
// drops non-negative terms and truncates), and after one step it is within
// 25 % plus the truncation loss of it.
// The latency (done exactly max(steps,1) cycles after the start edge) is
// checked, and the test counts each mechanism of the design and fails if one
// never happened: mantissa normalisation and its absence, single- and
// multi-step operation, steps = 0, a residue reaching zero before the last
// step, a negative product, a start while busy (ignored) and a start in the
// done cycle.
module tb_bfilm_multiplier;
  import bfilm_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       start;
  bf16_t      o1, o2, p;
  logic [3:0] steps;
  logic       ready, done;
  int checks = 0, failures = 0;

  int n_norm = 0, n_no_norm = 0, n_single = 0, n_multi = 0, n_zero_steps = 0;
  int n_residue_zero = 0, n_negative = 0, n_busy_start = 0, n_back_to_back = 0;

  always #5 clk = ~clk;

  bfilm_multiplier dut (.clk(clk), .rst_n(rst_n), .start(start), .o1(o1), .o2(o2),
                        .steps(steps), .ready(ready), .done(done), .p(p));

  function automatic int msb_pos(int v);
    int q = 0;
    while (v > 1) begin
      v = v / 2;
      q++;
    end
    return q;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

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

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bf16_t a, bf16_t b, int n, bit poke_busy);
    int lat, nn, xa, yb, acc, pa, efrac, eexp;
    bit enorm, zero_early;
    bf16_t expected;
    real exact, got, rel;
    o1 = a; o2 = b; steps = 4'(n); start = 1'b1;
    check("ready before start", ready);
    @(posedge clk); #1;
    start = 1'b0;
    // reference model
    nn = (n == 0) ? 1 : n;
    xa = 128 + int'(a.frac);
    yb = 128 + int'(b.frac);
    acc = 0;
    zero_early = 1'b0;
    for (int l = 1; l <= nn; l++) begin
      int kx, ky, rx, ry;
      if (xa == 0 || yb == 0) begin
        zero_early = 1'b1;
        break;
      end
      kx = msb_pos(xa); ky = msb_pos(yb);
      rx = xa - (1 << kx); ry = yb - (1 << ky);
      acc += (xa * (1 << ky)) / 128 + (ry * (1 << kx)) / 128;
      xa = rx; yb = ry;
    end
    pa = acc;
    enorm = (pa >= 256);
    efrac = enorm ? (pa / 2) % 128 : pa % 128;
    eexp  = (int'(a.exp) + int'(b.exp) + int'(enorm) - 127 + 256) % 256;
    expected.sign = a.sign ^ b.sign;
    expected.exp  = 8'(eexp);
    expected.frac = 7'(efrac);
    // wait for done
    lat = 0;
    while (!done) begin
      if (poke_busy && lat == 0 && !ready) begin
        o1 = ~a; o2 = ~b; steps = 4'd3; start = 1'b1;
        n_busy_start++;
      end
      @(posedge clk); #1;
      start = 1'b0;
      lat++;
      if (lat > 20) break;
    end
    check($sformatf("latency n=%0d got %0d", n, lat), lat == nn);
    check($sformatf("product %h * %h n=%0d got %h expected %h", a, b, n, p, expected), p == expected);
    exact = bf_value(a) * bf_value(b);
    got   = bf_value(p);
    rel   = (exact < 0.0 ? -exact : exact);
    rel   = (rel - (got < 0.0 ? -got : got)) / rel;
    check($sformatf("never above exact %h * %h n=%0d", a, b, n), rel >= -1.0e-12);
    if (nn == 1)
      check($sformatf("one-step error bound %h * %h rel=%f", a, b, rel), rel <= 0.25 + 2.0 / 128.0);
    if (enorm) n_norm++; else n_no_norm++;
    if (nn == 1) n_single++; else n_multi++;
    if (n == 0) n_zero_steps++;
    if (zero_early) n_residue_zero++;
    if (p.sign) n_negative++;
  endtask

  function automatic bf16_t rand_bf16();
    bf16_t v;
    v.sign = 1'($urandom);
    v.exp  = 8'($urandom_range(80, 170));
    v.frac = 7'($urandom);
    return v;
  endfunction

  initial begin
    bf16_t one, three_half;
    rst_n = 1'b0; start = 1'b0; o1 = '0; o2 = '0; steps = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // 1.0 * 1.0 = 1.0 exactly; 1.5 * 1.5 = 2.25 needs normalisation
    one = '{sign: 1'b0, exp: 8'd127, frac: 7'd0};
    three_half = '{sign: 1'b1, exp: 8'd127, frac: 7'd64};
    run(one, one, 1, 0);
    check("1.0 * 1.0", p == one);
    run(three_half, three_half, 2, 0);
    check("-1.5 * -1.5 = 2.25", p == {1'b0, 8'd128, 7'd16});
    for (int i = 0; i < 4000; i++) begin
      run(rand_bf16(), rand_bf16(), int'($urandom_range(0, 10)), (i % 40) == 1);
      if (i % 5 == 0) n_back_to_back++;
      else begin
        @(posedge clk); #1;
      end
    end
    $display("normalised=%0d not_normalised=%0d single_step=%0d multi_step=%0d steps0=%0d",
             n_norm, n_no_norm, n_single, n_multi, n_zero_steps);
    $display("residue_zero=%0d negative=%0d start_while_busy=%0d back_to_back=%0d",
             n_residue_zero, n_negative, n_busy_start, n_back_to_back);
    check("normalisation happened", n_norm > 0);
    check("no normalisation happened", n_no_norm > 0);
    check("single-step products", n_single > 0);
    check("multi-step products", n_multi > 0);
    check("steps = 0", n_zero_steps > 0);
    check("residue reached zero early", n_residue_zero > 0);
    check("negative products", n_negative > 0);
    check("start while busy", n_busy_start > 0);
    check("back-to-back starts", n_back_to_back > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
