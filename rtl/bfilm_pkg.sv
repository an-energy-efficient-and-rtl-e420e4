// bfilm_pkg: types and constants shared by the BFILM bfloat16 multiplier.
//
// A bfloat16 number is one sign bit, an 8-bit offset-binary exponent (bias 127)
// and a 7-bit stored fraction; the hidden leading one is prepended before the
// mantissa multiplication, giving an 8-bit significand in 1.7 fixed point.
// The significand product is 2.14 fixed point (16 bits); the mantissa datapath
// keeps its nine most significant bits, Pa, in 2.7 fixed point.
package bfilm_pkg;

  localparam int unsigned EXP_W   = 8;          // exponent width
  localparam int unsigned FRAC_W  = 7;          // stored fraction width
  localparam int unsigned SIG_W   = FRAC_W + 1; // significand with hidden one
  localparam int unsigned PA_W    = SIG_W + 1;  // kept MSBs of the 2*SIG_W product
  localparam int unsigned K_W     = $clog2(SIG_W); // width of a leading-one position
  localparam int unsigned EXP_BIAS = 127;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } bf16_t;

endpackage
