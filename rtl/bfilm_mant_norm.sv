// bfilm_mant_norm: mantissa normaliser of the BFILM multiplier.
//
// Pa is the 9-bit approximate significand product in 2.7 fixed point. If its
// integer part is 2 or 3 (Pa[8] set) the radix point moves one place left: the
// stored fraction is Pa[7:1] and the exponent is incremented (norm is wired to
// the exponent adders' carry-in). Otherwise Pa[7] is the hidden one and the
// stored fraction is Pa[6:0]. The dropped bit is truncated, not rounded.
// The selection follows the arithmetic (Pa >= 2 selects Pa[7:1]); a block
// diagram of the specification labels the two multiplexer inputs the other way
// round. Purely combinational: a 2:1 multiplexer selected by Pa[8].
module bfilm_mant_norm
  import bfilm_pkg::*;
(
  input  logic [PA_W-1:0]   pa,    // approximate significand product, 2.7
  output logic [FRAC_W-1:0] frac,  // stored fraction of the product
  output logic              norm   // 1: exponent must be incremented
);
  always_comb begin
    norm = pa[PA_W-1];
    frac = norm ? pa[PA_W-2:1] : pa[PA_W-3:0];
  end
endmodule
