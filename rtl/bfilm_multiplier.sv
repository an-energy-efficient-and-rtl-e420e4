// bfilm_multiplier: BFILM, an accuracy-adjustable approximate bfloat16
// multiplier built on an iterative logarithmic mantissa multiplier.
//
// The product is assembled from three loosely coupled parts:
//  * sign: XOR of the operand signs (bfilm_sign), exact;
//  * exponent: e1 + e2 + Pa[8] - 127 in two adders (bfilm_exp_adders), exact
//    apart from the approximate normalisation carry;
//  * mantissa: the hidden one is prepended to both 7-bit fractions, the two
//    8-bit significands are multiplied approximately by bfilm_mant_mult in
//    `steps` ILM steps, and bfilm_mant_norm picks Pa[7:1] or Pa[6:0] as the
//    product fraction according to Pa[8].
// One ILM step has a worst-case relative error of 25 %; each extra step
// multiplies the residues left by the previous one and adds the result, so the
// accuracy is chosen per multiplication through `steps`, with no change to the
// hardware.
//
// Interface and timing: when `start` is high and `ready` is high, the operands
// and `steps` are captured at the clock edge. `done` pulses high max(steps,1)
// cycles later and `p` is then valid; it stays valid until the edge that
// captures the next operands (a new `start` may be given in the `done` cycle).
// The operand sign and exponent registers, like the significand registers,
// are this implementation's choice for a multi-cycle mantissa path.
// No special values are handled (zero, subnormal, infinity, NaN) and the
// exponent wraps on overflow or underflow; the product fraction is truncated.
// Synchronous active-low reset.
module bfilm_multiplier
  import bfilm_pkg::*;
#(
  parameter int unsigned GUARD  = 0,  // extra accumulator bits below the nine MSBs
  parameter int unsigned STEP_W = 4   // width of the ILM step count
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  bf16_t             o1,
  input  bf16_t             o2,
  input  logic [STEP_W-1:0] steps,   // number of ILM steps, 0 is taken as 1
  output logic              ready,
  output logic              done,
  output bf16_t             p
);
  logic             s1_q, s2_q;
  logic [EXP_W-1:0] e1_q, e2_q;
  logic [PA_W-1:0]  pa;
  logic             norm;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q <= 1'b0;
      s2_q <= 1'b0;
      e1_q <= '0;
      e2_q <= '0;
    end else if (start && ready) begin
      s1_q <= o1.sign;
      s2_q <= o2.sign;
      e1_q <= o1.exp;
      e2_q <= o2.exp;
    end
  end

  bfilm_mant_mult #(.W(SIG_W), .GUARD(GUARD), .STEP_W(STEP_W)) u_mant_mult (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .x     ({1'b1, o1.frac}),
    .y     ({1'b1, o2.frac}),
    .steps (steps),
    .ready (ready),
    .done  (done),
    .pa    (pa)
  );

  bfilm_mant_norm u_norm (.pa(pa), .frac(p.frac), .norm(norm));

  bfilm_exp_adders u_exp (.e1(e1_q), .e2(e2_q), .cin(norm), .ep(p.exp));

  bfilm_sign u_sign (.s1(s1_q), .s2(s2_q), .sp(p.sign));
endmodule
