// bfilm_lod: leading one detector and encoder of the ILM core.
//
// For an unsigned W-bit input x it returns the weight of its most significant
// set bit as a one-hot vector (2^k) and the position k in binary. The one-hot
// output lets the core form the residue as x XOR 2^k; k drives the barrel
// shifters. For x = 0 both outputs are 0 and `zero` is set, so the core can
// treat a zero operand as giving a zero product.
// Built as a priority scan from the LSB up so the last (highest) set bit wins.
// Purely combinational.
module bfilm_lod #(
  parameter int unsigned W   = 8,
  parameter int unsigned K_W = $clog2(W)
) (
  input  logic [W-1:0]   x,
  output logic [W-1:0]   onehot,  // 2^k, the leading one alone
  output logic [K_W-1:0] k,       // position of the leading one
  output logic           zero     // x has no set bit
);
  always_comb begin
    onehot = '0;
    k      = '0;
    for (int unsigned i = 0; i < W; i++) begin
      if (x[i]) begin
        onehot = '0;
        onehot[i] = 1'b1;
        k = K_W'(i);
      end
    end
    zero = (x == '0);
  end
endmodule
