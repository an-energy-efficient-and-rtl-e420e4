// tb_bfilm_lod: exhaustive check of the leading one detector for all 256
// inputs. The expected position is found by repeated halving (floor(log2 x)).
module tb_bfilm_lod;
  logic [7:0] x, onehot;
  logic [2:0] k;
  logic       zero;
  int checks = 0, failures = 0;

  bfilm_lod #(.W(8)) dut (.x(x), .onehot(onehot), .k(k), .zero(zero));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int pos, t, weight;
      pos = 0;
      t = v;
      while (t > 1) begin
        t = t / 2;
        pos++;
      end
      weight = (v == 0) ? 0 : (1 << pos);
      x = 8'(v);
      #1;
      checks += 3;
      if (zero !== (v == 0)) begin
        failures++;
        $display("FAIL x=%0d zero=%0d", v, zero);
      end
      if (int'(onehot) != weight) begin
        failures++;
        $display("FAIL x=%0d onehot=%b", v, onehot);
      end
      if (v != 0 && int'(k) != pos) begin
        failures++;
        $display("FAIL x=%0d k=%0d expected %0d", v, k, pos);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
