// tb_bfilm_trunc_shifter: exhaustive check of the truncated barrel shifter
// for every input and shift amount, at the 9-bit output of the design and at a
// 16-bit output (no truncation). Expected: floor(a * 2^k / 2^(16 - OUT_W)).
module tb_bfilm_trunc_shifter;
  logic [7:0]  a;
  logic [2:0]  k;
  logic [8:0]  y9;
  logic [15:0] y16;
  int checks = 0, failures = 0;

  bfilm_trunc_shifter #(.W(8))             dut9  (.a(a), .k(k), .y(y9));
  bfilm_trunc_shifter #(.W(8), .OUT_W(16)) dut16 (.a(a), .k(k), .y(y16));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++)
      for (int s = 0; s < 8; s++) begin
        int prod;
        a = 8'(v);
        k = 3'(s);
        prod = v * (2 ** s);
        #1;
        checks += 2;
        if (int'(y9) != prod / 128) begin
          failures++;
          $display("FAIL a=%0d k=%0d y9=%0d expected %0d", v, s, y9, prod / 128);
        end
        if (int'(y16) != prod) begin
          failures++;
          $display("FAIL a=%0d k=%0d y16=%0d expected %0d", v, s, y16, prod);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
