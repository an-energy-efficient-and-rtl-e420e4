// bfilm_mant_mult: iterative approximate mantissa multiplier of BFILM.
//
// Multiplies two W-bit significands (1.7 fixed point by default) by running
// the ILM core for `steps` clock cycles, one ILM step per cycle. In step 1 the
// two input multiplexers pass the operands X and Y to the core; in every later
// step they pass the residues rx, ry of the previous step, so each step
// approximates the product of the residues and the accumulator adds it to the
// running approximation. More steps give a more accurate product with the same
// hardware. The accumulator keeps PA_W = W + 1 + GUARD bits; with GUARD = 0 it
// is the nine most significant bits of the 16-bit product, Pa, in 2.7 fixed
// point. With GUARD > 0 the low GUARD bits are dropped only at the output.
//
// The operand and residue registers sit at the multiplexer inputs, as the
// design calls for; the multiplexer select is "step number > 1".
//
// Interface and timing (this implementation's choice of handshake):
//  * `ready` is high while no multiplication is running. When `start` is high
//    in a cycle with `ready` high, X, Y and `steps` are captured at that clock
//    edge. `start` while busy is ignored.
//  * steps = 0 is treated as 1. Step l (1..steps) is computed in the l-th cycle
//    after the capturing edge. `done` is high for the one cycle that follows
//    the last step, and `pa` then holds the product; `pa` keeps that value until
//    the first step of the next multiplication. A new `start` can be given in
//    the `done` cycle, so one product takes steps + 1 cycles back to back.
//  * Synchronous active-low reset clears the control state and the accumulator.
module bfilm_mant_mult #(
  parameter int unsigned W      = 8,
  parameter int unsigned GUARD  = 0,
  parameter int unsigned STEP_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [W-1:0]      x,
  input  logic [W-1:0]      y,
  input  logic [STEP_W-1:0] steps,
  output logic              ready,
  output logic              done,
  output logic [W:0]        pa     // nine MSBs of the significand product
);
  localparam int unsigned ACC_W = W + 1 + GUARD;

  logic              busy;
  logic [STEP_W-1:0] step_q;     // current step number l, 1-based
  logic [STEP_W-1:0] last_q;     // number of steps of this multiplication
  logic [W-1:0]      x_q, y_q;   // operands, multiplexer input 0
  logic [W-1:0]      rx_q, ry_q; // residues of the previous step, input 1
  logic [ACC_W-1:0]  acc_q;

  logic              later;      // l > 1: feed back the residues
  logic [W-1:0]      core_x, core_y;
  logic [ACC_W-1:0]  core_pa;
  logic [W-1:0]      core_rx, core_ry;

  assign later  = (step_q != STEP_W'(1));
  assign core_x = later ? rx_q : x_q;
  assign core_y = later ? ry_q : y_q;

  bfilm_ilm_core #(.W(W), .GUARD(GUARD), .PA_W(ACC_W)) u_core (
    .x(core_x), .y(core_y), .pa(core_pa), .rx(core_rx), .ry(core_ry)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      step_q <= '0;
      last_q <= '0;
      x_q    <= '0;
      y_q    <= '0;
      rx_q   <= '0;
      ry_q   <= '0;
      acc_q  <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        acc_q  <= later ? acc_q + core_pa : core_pa;
        rx_q   <= core_rx;
        ry_q   <= core_ry;
        step_q <= step_q + 1'b1;
        if (step_q == last_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        busy   <= 1'b1;
        x_q    <= x;
        y_q    <= y;
        step_q <= STEP_W'(1);
        last_q <= (steps == '0) ? STEP_W'(1) : steps;
      end
    end
  end

  assign ready = !busy;
  assign pa    = acc_q[ACC_W-1 -: (W+1)];

  // The accumulated approximation never exceeds the exact product, so the
  // accumulator must not wrap.
  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
    busy && later |-> ({1'b0, acc_q} + {1'b0, core_pa}) < (ACC_W+1)'(1) << ACC_W);
endmodule
