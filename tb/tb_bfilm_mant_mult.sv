// tb_bfilm_mant_mult: self-checking test of the iterative mantissa multiplier.
//
// Two instances run side by side on the same stimulus: the nine-bit design
// (GUARD = 0) and one with 7 guard bits (GUARD = 7, no truncation at all).
// A reference model in this file repeats the ILM recurrence with integer
// arithmetic (x = 2^kx + rx; term = x*2^ky + ry*2^kx; next operands rx, ry),
// truncating every term to its bits above 2^7 for the nine-bit design.
// Checked for each multiplication:
//  * Pa of both instances against the model;
//  * latency: done arrives exactly max(steps,1) cycles after the start edge;
//  * with 8 or more steps the 16-bit instance equals floor(x*y / 128), i.e. the
//    iteration converges to the exact product;
//  * a start while busy is ignored; a start in the done cycle is accepted.
module tb_bfilm_mant_mult;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       start;
  logic [7:0] x, y;
  logic [3:0] steps;
  logic       ready_a, done_a, ready_b, done_b;
  logic [8:0] pa_a, pa_b;
  int checks = 0, failures = 0;
  int busy_starts = 0, back_to_back = 0;

  always #5 clk = ~clk;

  bfilm_mant_mult #(.W(8))            dut_a (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y),
    .steps(steps), .ready(ready_a), .done(done_a), .pa(pa_a));
  bfilm_mant_mult #(.W(8), .GUARD(7)) dut_b (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y),
    .steps(steps), .ready(ready_b), .done(done_b), .pa(pa_b));

  function automatic int msb_pos(int v);
    int p = 0;
    while (v > 1) begin
      v = v / 2;
      p++;
    end
    return p;
  endfunction

  // Reference: returns the nine MSBs for the truncating (trunc=1) or the
  // exact-accumulation (trunc=0) datapath.
  function automatic int model(int a, int b, int n, bit trunc);
    int acc = 0;
    if (n == 0) n = 1;
    for (int l = 0; l < n; l++) begin
      int kx, ky, rx, ry;
      if (a == 0 || b == 0) break;
      kx = msb_pos(a);
      ky = msb_pos(b);
      rx = a - (1 << kx);
      ry = b - (1 << ky);
      if (trunc) acc += (a * (1 << ky)) / 128 + (ry * (1 << kx)) / 128;
      else       acc += a * (1 << ky) + ry * (1 << kx);
      a = rx;
      b = ry;
    end
    return trunc ? acc : acc / 128;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one multiplication; if chain is set, the next operands are given in
  // the done cycle and the task returns right after that start edge.
  task automatic run(int a, int b, int n, bit poke_busy);
    int lat, exp_lat, ea, eb;
    x = 8'(a); y = 8'(b); steps = 4'(n); start = 1'b1;
    check($sformatf("ready before start a=%0d b=%0d", a, b), ready_a && ready_b);
    @(posedge clk); #1;
    start = 1'b0;
    exp_lat = (n == 0) ? 1 : n;
    lat = 0;
    while (!done_a) begin
      if (poke_busy && lat == 0 && !ready_a) begin
        // a start while busy must not disturb the running product
        x = ~x; y = ~y; steps = 4'd1; start = 1'b1;
        busy_starts++;
      end
      @(posedge clk); #1;
      start = 1'b0;
      lat++;
      if (lat > 20) break;
    end
    ea = model(a, b, n, 1'b1);
    eb = model(a, b, n, 1'b0);
    check($sformatf("latency a=%0d b=%0d n=%0d lat=%0d", a, b, n, lat), lat == exp_lat);
    check("both done together", done_b == done_a);
    check($sformatf("pa9 a=%0d b=%0d n=%0d got %0d exp %0d", a, b, n, pa_a, ea), int'(pa_a) == ea);
    check($sformatf("pa16 a=%0d b=%0d n=%0d got %0d exp %0d", a, b, n, pa_b, eb), int'(pa_b) == eb);
    if (n >= 8)
      check($sformatf("converged a=%0d b=%0d got %0d", a, b, pa_b), int'(pa_b) == (a * b) / 128);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; x = '0; y = '0; steps = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // corner operands
    run(128, 128, 1, 0);
    run(255, 255, 1, 0);
    run(255, 255, 2, 0);
    run(255, 255, 8, 0);
    run(0, 200, 3, 0);
    run(177, 0, 2, 0);
    run(200, 150, 0, 0);
    run(129, 255, 15, 1);
    // random significands (normal: leading one set) and random bytes
    for (int i = 0; i < 3000; i++) begin
      int a, b, n;
      a = (i % 2 == 0) ? int'($urandom_range(128, 255)) : int'($urandom_range(0, 255));
      b = (i % 3 == 0) ? int'($urandom_range(0, 255))   : int'($urandom_range(128, 255));
      n = int'($urandom_range(0, 10));
      run(a, b, n, (i % 50) == 0);
      // every few runs, chain the next start into the done cycle
      if (i % 7 == 0) back_to_back++;
      else begin
        @(posedge clk); #1;
      end
    end
    check("start while busy exercised", busy_starts > 0);
    check("back-to-back start exercised", back_to_back > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
