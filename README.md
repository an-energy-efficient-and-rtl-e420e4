# BFILM: a bfloat16 multiplier whose accuracy is set per multiplication

BFILM (brain-float iterative logarithmic multiplier) multiplies two bfloat16
numbers. The sign and the exponent are computed exactly. The significands are
multiplied approximately, with a logarithmic approximation that needs only
shifts and one addition. The approximation can be refined by repeating it on
what it left out. The number of these refinement steps is an input of each
multiplication. One step is cheap and coarse. A few steps are close to exact.
No part of the hardware changes between them: more steps only take more clock
cycles. The intended use is neural-network training. There, a network can
start with one step and move to more steps as it converges.

All RTL is SystemVerilog-2017 in `rtl/`. Self-checking testbenches are in `tb/`.

## The approximation behind one ILM step

Write an unsigned operand as its leading one plus a residue: `x = 2^kx + rx`
and `y = 2^ky + ry`. Then the exact product is

    x*y = x*2^ky + ry*2^kx + rx*ry

An ILM (iterative logarithmic multiplier) step keeps the first two terms:

    pa = x*2^ky + ry*2^kx

This takes two leading-one detections, two shifts and an add. The term it drops,
`rx*ry`, is never negative, so `pa` never exceeds the true product. After one
step the error is at most 25 % of the product. The dropped term is itself a
product, of the two residues. A second step applies the same procedure to
`(rx, ry)` and adds its result. Each step leaves a smaller residue product.
Once a residue is zero the result is exact, up to truncation.

## Datapath

A bfloat16 number has a 1-bit sign, an 8-bit exponent with bias 127, and a
7-bit fraction. Inputs and outputs use the `bf16_t` struct from `bfilm_pkg`.

| part | module | what it does |
|---|---|---|
| sign | `bfilm_sign` | `s1 XOR s2` |
| exponent | `bfilm_exp_adders` | 9-bit adder `e1 + e2 + cin`, then 9-bit adder `+ (-127)`; low 8 bits out |
| significand product | `bfilm_mant_mult` | ILM steps on `{1,frac1}` and `{1,frac2}` (1.7 fixed point); keeps the 9 MSBs `Pa` of the 16-bit (2.14) product |
| normaliser | `bfilm_mant_norm` | if `Pa[8]` (product >= 2): fraction `Pa[7:1]`, exponent +1 through `cin`; else fraction `Pa[6:0]` |
| top | `bfilm_multiplier` | operand capture, handshake, wiring |

The only coupling between the exponent and the significand is the
normalisation bit `Pa[8]`. It feeds the carry-in of the first exponent adder.

### ILM core (`bfilm_ilm_core`)

- **Leading ones.** Two leading-one detectors (`bfilm_lod`) return `2^k` as a
  one-hot vector and `k` in 3 bits.
- **Residues.** Each residue is the operand XOR its one-hot leading one.
- **Shifts.** Two truncated barrel shifters (`bfilm_trunc_shifter`) form
  `x << ky` and `ry << kx`. Each keeps only bits [15:7] of the 16-bit result,
  which is the 2.7 fixed-point value.
- **Sum.** A 9-bit adder adds the two shifted values. It cannot overflow,
  because the sum never exceeds the exact product.
- **Zero operand.** A zero operand, which has no leading one, forces `pa` to 0.

### Iterative mantissa multiplier (`bfilm_mant_mult`)

Two 2:1 multiplexers choose what the core sees:

- in step 1, the operands `X` and `Y`;
- in step `l > 1`, the residues `rx`, `ry` that the core produced in the
  previous step.

The operands and the residues are held in registers at the multiplexer inputs.
An accumulator adds each step's `pa`: in step 1 it loads `pa`, in later steps it
adds `pa`. The core runs once per clock cycle.

## Interface and timing

`bfilm_multiplier` ports: `clk`, `rst_n` (synchronous, active low), `start`,
`o1`, `o2`, `steps`, `ready`, `done` and `p`.

- **Capture.** When `start` and `ready` are both high, the two operands and
  `steps` are captured at the clock edge.
- **Latency.** `done` goes high for one cycle `max(steps,1)` cycles later. `p`
  is valid then. It stays valid until the edge that captures the next operands.
- **Back to back.** A new `start` may be given in the `done` cycle. One product
  with `n` steps then takes `n + 1` cycles.
- **Start while busy.** A `start` while busy is ignored.
- **`steps = 0`** is taken as one step. `STEP_W = 4` allows up to 15 steps.
  Eight steps exhaust the 8-bit residues, so more steps change nothing.

The delay therefore grows linearly with the number of steps, while the area
stays the same.

## Accuracy and the `GUARD` parameter

`GUARD` (default 0) adds bits below the nine MSBs in the shifters, the adder
and the accumulator. The output `Pa` is still the top nine bits.

- **`GUARD = 0`.** Every step's terms are truncated to the 2.7 grid. This is the
  nine-bit datapath the design is specified with.
- **`GUARD = 7`.** Nothing is truncated before the end.

The error measure is the mean relative error distance (MRED). It is taken over
all 128 x 128 fraction pairs. The reference is an exact bfloat16 product
truncated to 7 fraction bits. `tb/tb_bfilm_mred.sv` measures it:

| ILM steps | 1 | 2 | 3 | 8 |
|---|---|---|---|---|
| MRED, `GUARD = 0` (x1e-3) | 91.21 | 10.10 | 3.66 | 3.44 |
| MRED, `GUARD = 7` (x1e-3) | 91.21 | 9.09 | 0.86 | 0 |
| published figures for BFILM (x1e-3) | 91.21 | 9.08 | 0.86 | - |

With one step both datapaths lose nothing, because the first step shifts by 7.
In later steps, truncating each term costs accuracy. The published accuracy for
two and three steps is reached only with the wider accumulation. The default
stays at the nine-bit datapath because that is how the hardware is described.
Use `GUARD = 7` (16-bit shifters and accumulator) if the published accuracy
matters more than a few flip-flops.

## What this multiplier does not do

These limits follow the datapath as specified. They are not simplifications
made here.

- **No special values.** There is no handling of zero, subnormals, infinity or
  NaN. A zero operand is read as `1.0 * 2^-127`.
- **Exponent wraps.** The exponent wraps modulo 256 on overflow and underflow.
- **Truncation.** The result fraction is truncated, not rounded. The dropped
  bit is `Pa[0]` or the bits below `Pa`.

Code that needs zeros must bypass the multiplier for them, for example with a
zero flag beside it.

## Choices made in this implementation

The following are not given by the specification:

- the start/ready/done handshake, with one ILM step per cycle;
- the registering of the sign and the exponents at `start`;
- synchronous reset;
- zero gating in the ILM core;
- the `zero` output of the leading-one detector;
- the 4-bit step count, with 0 read as 1;
- the multiplier always runs the requested number of steps, even if a residue
  reaches zero earlier (the remaining steps add 0).

The leading-one detector and the truncated shifter are specified only by what
they do. Here they are a priority scan and a full shift with the low bits
dropped.

The block diagram of the normaliser labels its multiplexer inputs the other way
round from the prose that describes it. The RTL follows the prose, which is the
arithmetically correct reading: `Pa[8] = 1` selects `Pa[7:1]`.

## Verification

Each module has a testbench in `tb/` named `tb_<module>`. Each ends with a
`TB_RESULT checks=N failures=M` line. Expected values are computed inside the
testbench with integer or real arithmetic.

- **Exhaustive tests.**
  - `tb_bfilm_lod`: all 256 inputs.
  - `tb_bfilm_trunc_shifter`: all inputs and shift amounts.
  - `tb_bfilm_ilm_core`: all 65536 operand pairs, at 9 and 16 output bits. It
    also checks that `pa + rx*ry == x*y`.
  - `tb_bfilm_exp_adders`: all exponent pairs and carries.
  - `tb_bfilm_mant_norm`: all values of `Pa`.
  - `tb_bfilm_sign`: all four sign pairs.
- **`tb_bfilm_mant_mult`.** Random operands, with both `GUARD = 0` and
  `GUARD = 7` checked against a step-by-step model. It also checks:
  - the latency;
  - convergence to `floor(x*y/128)` after 8 steps with `GUARD = 7`;
  - that a start while busy is ignored;
  - back-to-back starts.
- **`tb_bfilm_multiplier`.** The end-to-end test at default parameters, with
  4000 random bfloat16 products and random step counts 0..10. Each product is
  checked three ways:
  - against a model;
  - against the exact real product: it never exceeds it, and within 25 % plus
    truncation after one step;
  - for latency.

  It counts each mechanism and fails if one never occurs: normalisation and its
  absence, one step and several steps, `steps = 0`, a residue reaching zero
  early, a negative product, a start while busy and back-to-back operation.
- **`tb_bfilm_mred`.** The accuracy table above.

To simulate one testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_bfilm_multiplier \
      -y rtl -y tb +libext+.sv rtl/bfilm_pkg.sv tb/tb_bfilm_multiplier.sv
    ./obj_dir/Vtb_bfilm_multiplier

Replace the module name to run the others. All of them finish in well under a
second.

Lint notes:

- Verilator warns that `full[6:0]` in the truncated shifter is unused. Those are
  exactly the truncated bits.
- Verilator warns that bit 8 of the second exponent adder is unused. The format
  has no overflow flag.
- The unused-parameter warnings come from importing `bfilm_pkg`.
