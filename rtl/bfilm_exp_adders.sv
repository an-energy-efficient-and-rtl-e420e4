// bfilm_exp_adders: exponent of the BFILM product.
//
// Two cascaded 9-bit adders. The first adds the two 8-bit biased exponents
// and a carry-in that is the mantissa normalisation bit Pa[8] (set when the
// significand product is 2 or more). The second adds -127 (two's complement,
// 9 bits) to remove the doubled bias. The low eight bits of the result are the
// product's biased exponent; the ninth bit is dropped.
//
// As in the design this follows, no overflow, underflow, zero, subnormal,
// infinity or NaN handling is done: the exponent wraps modulo 256.
// Purely combinational.
module bfilm_exp_adders
  import bfilm_pkg::*;
(
  input  logic [EXP_W-1:0] e1,   // biased exponent of operand 1
  input  logic [EXP_W-1:0] e2,   // biased exponent of operand 2
  input  logic             cin,  // normalisation carry, Pa[8]
  output logic [EXP_W-1:0] ep    // biased exponent of the product
);
  localparam logic [EXP_W:0] NEG_BIAS = (EXP_W+1)'(-int'(EXP_BIAS));

  logic [EXP_W:0] sum1;  // e1 + e2 + cin
  logic [EXP_W:0] sum2;  // sum1 - 127

  always_comb begin
    sum1 = {1'b0, e1} + {1'b0, e2} + {{EXP_W{1'b0}}, cin};
    sum2 = sum1 + NEG_BIAS;
    ep   = sum2[EXP_W-1:0];
  end
endmodule
