// bfilm_trunc_shifter: truncated barrel shifter of the ILM core.
//
// Shifts the W-bit input a left by k (0..W-1), which gives a value of up to
// 2*W bits, and returns only its OUT_W most significant bits, i.e. bits
// [2W-1 : 2W-OUT_W] of the 2W-bit shifted word. Dropping the low bits keeps the
// shifter and the following adder small. With the default W = 8, OUT_W = 9 the
// output is the shifted value in 2.7 fixed point when a is read as 1.7.
// OUT_W may be raised above 9 to keep guard bits below the nine MSBs.
// Purely combinational.
module bfilm_trunc_shifter #(
  parameter int unsigned W     = 8,
  parameter int unsigned OUT_W = W + 1,
  parameter int unsigned K_W   = $clog2(W)
) (
  input  logic [W-1:0]     a,
  input  logic [K_W-1:0]   k,
  output logic [OUT_W-1:0] y
);
  logic [2*W-1:0] full;

  always_comb begin
    full = {{W{1'b0}}, a} << k;
    y    = full[2*W-1 -: OUT_W];
  end
endmodule
