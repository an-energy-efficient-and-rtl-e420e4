// tb_bfilm_ilm_core: exhaustive check of one ILM step over all 65536 operand
// pairs, for the nine-bit core and for a core with 7 guard bits.
// Expected values follow x = 2^kx + rx, y = 2^ky + ry:
//   full = x*2^ky + ry*2^kx (an integer up to 16 bits),
//   9-bit core:  floor(x*2^ky / 128) + floor(ry*2^kx / 128),
//   16-bit core: full.
// Also checked: full + rx*ry equals the exact product x*y, and a zero operand
// gives a zero product.
module tb_bfilm_ilm_core;
  logic [7:0]  x, y;
  logic [8:0]  pa9;
  logic [15:0] pa16;
  logic [7:0]  rx9, ry9, rx16, ry16;
  int checks = 0, failures = 0;

  bfilm_ilm_core #(.W(8))             dut9  (.x(x), .y(y), .pa(pa9),  .rx(rx9),  .ry(ry9));
  bfilm_ilm_core #(.W(8), .GUARD(7))  dut16 (.x(x), .y(y), .pa(pa16), .rx(rx16), .ry(ry16));

  function automatic int msb_pos(int v);
    int p = 0;
    while (v > 1) begin
      v = v / 2;
      p++;
    end
    return p;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        int kx, ky, erx, ery, e9, e16;
        x = 8'(a);
        y = 8'(b);
        if (a == 0 || b == 0) begin
          erx = (a == 0) ? 0 : a - (1 << msb_pos(a));
          ery = (b == 0) ? 0 : b - (1 << msb_pos(b));
          e9  = 0;
          e16 = 0;
        end else begin
          kx  = msb_pos(a);
          ky  = msb_pos(b);
          erx = a - (1 << kx);
          ery = b - (1 << ky);
          e16 = a * (1 << ky) + ery * (1 << kx);
          e9  = (a * (1 << ky)) / 128 + (ery * (1 << kx)) / 128;
          checks++;
          if (e16 + erx * ery != a * b) begin
            failures++;
            $display("FAIL model identity x=%0d y=%0d", a, b);
          end
        end
        #1;
        checks += 4;
        if (int'(pa9) != e9) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d pa9=%0d expected %0d", a, b, pa9, e9);
        end
        if (int'(pa16) != e16) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d pa16=%0d expected %0d", a, b, pa16, e16);
        end
        if (int'(rx9) != erx || int'(rx16) != erx) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d rx=%0d expected %0d", a, rx9, erx);
        end
        if (int'(ry9) != ery || int'(ry16) != ery) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d ry=%0d expected %0d", b, ry9, ery);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
