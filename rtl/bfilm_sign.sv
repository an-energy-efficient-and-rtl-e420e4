// bfilm_sign: sign of the BFILM product.
//
// The product of two signed numbers is negative exactly when one operand is
// negative, so the sign is the XOR of the two operand signs. Purely
// combinational; this is the sign circuit of the multiplier as the design
// describes it.
module bfilm_sign (
  input  logic s1,  // sign of operand 1
  input  logic s2,  // sign of operand 2
  output logic sp   // sign of the product
);
  assign sp = s1 ^ s2;
endmodule
