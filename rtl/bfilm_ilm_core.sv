// bfilm_ilm_core: one step of the iterative logarithmic multiplier (ILM).
//
// Writing x = 2^kx + rx and y = 2^ky + ry, the exact product is
// x*2^ky + ry*2^kx + rx*ry. The core drops the last term and returns
//   pa = x*2^ky + ry*2^kx
// together with the residues rx and ry, whose product is the error left for a
// further step. Two leading-one detectors give 2^k and k for each operand; the
// residues are x XOR 2^kx and y XOR 2^ky; x is shifted by ky and ry by kx in
// truncated barrel shifters that keep only the PA_W most significant bits of
// the 2W-bit result; a PA_W-bit adder sums the two. The sum cannot overflow
// because it never exceeds the exact product.
//
// GUARD widens the shifters and the adder by that many bits below the nine
// MSBs (PA_W = W + 1 + GUARD). GUARD = 0 is the nine-bit datapath of the
// design; a larger value trades area for accuracy in later steps.
//
// A zero operand has no leading one. Such an operand makes pa zero (and its
// residue zero), so a step after a residue has reached zero adds nothing; this
// zero gating is a choice of this implementation.
// Purely combinational.
module bfilm_ilm_core #(
  parameter int unsigned W     = 8,
  parameter int unsigned GUARD = 0,
  parameter int unsigned PA_W  = W + 1 + GUARD
) (
  input  logic [W-1:0]    x,
  input  logic [W-1:0]    y,
  output logic [PA_W-1:0] pa,  // approximate product, MSBs of the 2W-bit value
  output logic [W-1:0]    rx,  // residue of x
  output logic [W-1:0]    ry   // residue of y
);
  localparam int unsigned K_W = $clog2(W);

  logic [W-1:0]    lead_x, lead_y;
  logic [K_W-1:0]  kx, ky;
  logic            zx, zy;
  logic [PA_W-1:0] sh_x, sh_ry;

  bfilm_lod #(.W(W), .K_W(K_W)) u_lod_x (.x(x), .onehot(lead_x), .k(kx), .zero(zx));
  bfilm_lod #(.W(W), .K_W(K_W)) u_lod_y (.x(y), .onehot(lead_y), .k(ky), .zero(zy));

  assign rx = x ^ lead_x;
  assign ry = y ^ lead_y;

  bfilm_trunc_shifter #(.W(W), .OUT_W(PA_W), .K_W(K_W)) u_sh_x  (.a(x),  .k(ky), .y(sh_x));
  bfilm_trunc_shifter #(.W(W), .OUT_W(PA_W), .K_W(K_W)) u_sh_ry (.a(ry), .k(kx), .y(sh_ry));

  assign pa = (zx || zy) ? '0 : sh_x + sh_ry;
endmodule
