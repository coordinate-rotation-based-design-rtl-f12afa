# Square root and division on a pair of circular CORDICs

This unit computes `sqrt(X)` or `X / Z` without a multiplier or a divider. It
uses only two circular CORDICs, the shift-and-add rotators that signal
processing chips often already carry for QR or eigenvalue work. Both functions
are turned into questions about an angle:

* **Square root.** Scale X into (1/4, 1] and write `X = cos²(Φ)`. Then
  `cos(2Φ) = 2X − 1`. A CORDIC in *vectoring* mode finds the angle 2Φ whose
  cosine is 2X−1. A CORDIC in *rotation* mode then turns the unit vector by
  Φ, and its x output is `cos(Φ) = sqrt(X)`.
* **Division.** With `|X| ≤ |Z|`, write `cos(β) = X/Z`. The vectoring CORDIC
  turns `[Z, 0]` until its x coordinate equals X, which gives β. The rotation
  CORDIC turns `[1, 0]` by β, and its x output is `cos(β) = X/Z`.

The angle never exists as a number. The vectoring CORDIC's decisions (one bit
per stage: turn clockwise or counter-clockwise) feed the rotation CORDIC
directly, stage by stage. The two pipelines run side by side, so a result
leaves N cycles after its operands enter, and a new operation (of either kind)
can enter every clock. This side-by-side arrangement is called *double
pipelining* below.

The method follows the architecture published as "Coordinate Rotation based
Design Methodology for Square root and Division computation". The RTL here is
an independent implementation. It fills in what that description leaves open
and corrects two points where the bare method does not give the right answer.
Those points are listed under [Departures](#departures-from-the-published-method).

## Data flow

```
 x_in, z_in, op
      │
 ┌────▼──────────┐ tgt_sqrt=|2Xs-1| ┌──────────┐ x0 (1 or Z)   ┌────────────┐
 │ input scaling ├──x_div, z_div──►│ operand  ├──xc (2X-1/X)─►│ vectoring  │ stage i
 │  (k, fold,    │                 │ muxes    │               │ CORDIC     ├─ mu[i] ─┐
 │   neg, inv.)  │                 └──────────┘               └────────────┘         │
 └────┬──────────┘                                                                   ▼
      │ meta: valid, op, k, fold, neg, invalid    ┌───────────────────────────────────────┐
      ├─────── side pipeline, one slot/stage ────►│ half-angle combiner:                  │
      │                                           │ B = ZERO_MU (sqrt) or A (div),        │
      │                                           │ code = {A_mu, B_mu}                   │
      │                                           └───────────────┬───────────────────────┘
      │                                                           ▼ code[i]
      │                                           ┌───────────────────────────────────────┐
      │                                           │ rotation CORDIC from [1/K, 0]         │
      │                                           │ x_n = cos, y_n = sin                  │
      │                                           └───────────────┬───────────────────────┘
      ▼                                                           ▼
 ┌─────────────────────────────────────────────────────────────────────┐
 │ output scaling: << k/2 (sqrt) or << k (div), sign, fold → result    │
 └─────────────────────────────────────────────────────────────────────┘
```

Stage i of both CORDICs handles the same operation in the same cycle. `mu[i]`
is produced combinationally by vectoring stage i. It goes through the
combiner and is used by rotation stage i in that same cycle. The side pipeline
carries each operation's mode, so the combiner in stage i always uses the mode
of the operation that is in stage i.

## Halving an angle given as micro-rotations

This is the core of the method and the least obvious part.

A CORDIC angle is a sum `θ = Σ σ_i · atan(2^-i)` with `σ_i = ±1`. Bit `mu_i = 1`
stands for σ_i = +1 (counter-clockwise) and `mu_i = 0` for σ_i = −1. For the
square root, the vectoring CORDIC delivers the bits of 2Φ, but the rotation
CORDIC needs Φ. A binary angle could be shifted right. Micro-rotation bits
cannot: `Σ σ_i θ_i / 2` is not a ±1 sum over the same angles.

The combiner uses a second sequence B instead, and rotates by `(A + B)/2`:

| A_mu | B_mu | code | rotation stage i does |
|------|------|------|------------------------|
| 0 | 0 | 00 | clockwise by atan(2^-i) |
| 0 | 1 | 01 | nothing |
| 1 | 0 | 10 | nothing |
| 1 | 1 | 11 | counter-clockwise by atan(2^-i) |

Per stage, (σA + σB)/2 is +1, 0 or −1, so the sum over all stages is exactly
`(A + B)/2`. Two cases use this:

* **Square root:** B is a fixed sequence whose angle is zero (to within the
  last stage). For 16 stages it is `1000101100001011`, stage 0 first, which
  sums to −0.0045°. The result is Φ = 2Φ/2.
* **Division:** B = A, so every stage rotates and the angle is β itself.

For example, A = `1101110111111010` is 70°, and combining it with the zero
sequence gives a rotation of 35°. `tb_halfangle_combiner` checks this.

`ZERO_MU` is a parameter of `halfangle_combiner`. For N ≠ 16 its default is
computed at elaboration: an N-stage vectoring run drives the vector (1, 0)
back onto the x axis, and its decisions form the sequence.

## Keeping the CORDIC gain fixed

Every micro-rotation lengthens the vector by `k_i = sqrt(1 + 2^-2i)`. Both
CORDICs have to handle this, and the bare method does not.

**Vectoring to a target x (`cv_cordic`).** Stage i has to decide whether the
angle so far is smaller or larger than `acos(xc/x0)`. After i stages the vector
is `G_i = Π_{j<i} k_j` times longer than at the start. So the stage compares
x_i with a target that grows the same way: `t_i = xc · G_i`, and
`t_{i+1} = t_i · k_i`. This is a constant multiply per stage. At 16 bits the
constants round to 1 from stage 8 on, so no multiplier is left there. The
stage turns counter-clockwise when `y_i < 0` or `x_i > t_i`, and clockwise
otherwise. The reachable range is Σ atan(2^-i) ≈ 99.9°. The input scaling
keeps every target angle within 0…90°.

**Rotation with skipped stages (`cr_cordic`).** A stage with code 01 or 10
does not rotate. If it passed the vector through unchanged, the total gain
would depend on the data: it is the product of k_i over only the stages that
rotate. At stage 0 alone that is a factor of √2. So a non-rotating stage
multiplies the vector by the same constant k_i instead. Then every operation
sees the full gain K = Π k_i, and a start vector of `[1/K, 0]` makes the result
`[cos θ, sin θ]`.

## Range reduction

**Square root.** The scaling step picks the even k with `2^(k−2) < X ≤ 2^k`,
so `Xs = X / 2^k` lies in (1/4, 1]. The result is shifted back left by k/2.
For example, X = 49 gives k = 6, Xs = 0.765625, sqrt = 0.875, result 7.

Because Xs can be as small as 1/4, `2Xs − 1` can reach −1/2, and 2Φ can reach
120°. That is beyond the CORDIC's 99.9°. The design therefore *folds* the
target: when `2Xs − 1 < 0`, it vectors to `|2Xs − 1|`, which gives ψ = π − 2Φ.
The rotation stage then produces `sin(ψ/2) = cos(Φ)` on its y output. X = 0
lands on the folded path with ψ = 0 and gives exactly 0.

**Division.** The division works on magnitudes and restores the sign at the
end. If `|X| > |Z|`, k is the smallest value with
`2^(k−1) ≤ |X| − |Z| ≤ 2^k`. That rule can leave `|X|/2^k > |Z|` when
|X|−|Z| = 1 or |Z| = 1, and k is then raised by one. For example, 55/30 gives
k = 5, and 1.71875/30 · 32 = 1.833. Both operands are then shifted by a common
amount so that |Z| lies in [1/2, 1). The quotient does not change, and the
vectoring CORDIC works with full fraction precision.

## Interface and timing (`sqdiv_cordic`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the valid side pipeline |
| `in_valid` | in | 1 | operands present this cycle |
| `op` | in | 1 | `OP_SQRT` = 0, `OP_DIV` = 1 |
| `x_in`, `z_in` | in | B | signed integers; `z_in` is ignored for a square root |
| `out_valid` | out | 1 | result valid, exactly N cycles (2N with `DP = 0`) after `in_valid` |
| `result` | out | 2B+1 | signed fixed point with B−2 fraction bits |
| `out_invalid` | out | 1 | Z = 0, or X < 0 for a square root; `result` is then 0 |

Parameters: `B` (word length, 16), `N` (stages, 16) and `DP` (1).

`DP` selects how the micro-rotations are handed over. `DP = 1` (doubly
pipelined) passes them straight across, as drawn above, and gives a latency
of N. `DP = 0` passes each bit through an N-cycle delay line, so the rotation
CORDIC starts only after the vectoring pass has finished. The latency is then
2N cycles, but the stages stay pipelined and one operation per clock can
still enter.

The CORDIC words are B bits wide, two's complement, with B−2 fraction bits.
There is no stall and no back-pressure. Every cycle with `in_valid` high starts
an operation, and square roots and divisions can alternate freely. Input and
output scaling are combinational, so the latency is exactly N cycles (2N with
`DP = 0`). Only the valid side pipeline is reset.

## Accuracy

`tb_mae_sweep` measures the mean absolute error over 2048 random operands for
each function. The error is taken on the normalised result (the cos value in
[0, 1], before the shift back):

| b | n | sqrt MAE | div MAE |
|---|---|----------|---------|
| 16 | 4 | 0.025 | 0.022 |
| 16 | 8 | 0.0025 | 0.0048 |
| 16 | 16 | 0.00008 | 0.00010 |
| 8 | 4 | 0.022 | 0.048 |
| 8 | 16 | 0.009 | 0.018 |
| 4 | 4 | 0.22 | 0.16 |

The published figures are about 0.04, 0.003 and 0.001 at b = 16 for n = 4, 8
and 16. The error falls with n in the same way here. At b = 4 the internal
words have only two fraction bits and the error is large. The published b = 4
figures (about 0.1) suggest wider internal words there. Here the internal word
is always B bits.

The end-to-end test at B = N = 16 sees a largest error of about 12 units of
the last fraction bit (times the output shift). It checks against a bound of
16.

## Departures from the published method

* **Gain.** Non-rotating stages multiply by sqrt(1+2^-2i) instead of passing
  the vector unchanged. The rotation CORDIC starts at [1/K, 0], not [1, 0].
  The vectoring CORDIC lengthens its target stage by stage. The published
  method does not address the CORDIC gain. Without these changes the result is
  off by up to a factor of 1.65. The per-stage constant multiplies (stages 0…7
  at 16 bits) are hardware beyond the "two additions and two subtractions per
  stage" of the published transistor-count estimate.
* **Square-root fold** for scaled X below 1/2, so that targets stay within the
  CORDIC's reach. The result is then read from the rotation CORDIC's y output.
* **Division scaling.** The extra k step, the common normalisation of X and Z,
  and the use of magnitudes with the sign restored at the output.
* **Direction labels.** The published table labels code 00 as anti-clockwise,
  while its rotation equation and its worked bit strings use mu = 1 for
  counter-clockwise. The RTL follows the equation and the bit strings. The
  combining rule is the same under either labelling.
* **Register count.** The published FPGA figures list 161 registers. A fully
  pipelined pair of 16-stage CORDICs, as built here (latency n, one result per
  clock, as the published timing analysis states), holds 1389 flip-flop bits.
  The published prototype may therefore have kept fewer pipeline registers.
* **Not reproduced:** the published ASIC and FPGA results (area, power,
  clock rate).
* **Own choices:** the handshake (`in_valid`/`out_valid`), the invalid flag,
  the result format, and the reset.

## Files

| file | contents |
|------|----------|
| `rtl/sqdiv_pkg.sv` | types (`op_e`, `ab_code_e`, `meta_t`) and elaboration-time constants: stage gains, 1/K, zero sequence |
| `rtl/sqdiv_cordic.sv` | top: wiring, side pipeline |
| `rtl/sqdiv_input_scaling.sv` | shift k, 2X−1 with fold, normalised X and Z, sign and invalid flags |
| `rtl/sqdiv_operand_mux.sv` | x0 = 1 or Z, target = 2X−1 or X |
| `rtl/cv_cordic.sv` | vectoring CORDIC, emits mu per stage |
| `rtl/halfangle_combiner.sv` | B multiplexer and {A, B} code per stage |
| `rtl/cr_cordic.sv` | rotation CORDIC driven by codes |
| `rtl/sqdiv_output_scaling.sv` | shift back, sign, fold, clamp |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sqdiv_cordic_seq.sv` (DP = 0) and `tb_mae_sweep.sv` (accuracy sweep) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5, from the top folder:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sqdiv_pkg.sv \
          tb/tb_sqdiv_cordic.sv --top-module tb_sqdiv_cordic -o sim
./obj_dir/sim
```

Replace `tb_sqdiv_cordic` with any other testbench name. `tb_sqdiv_cordic`
runs the full-size unit: 4000 mixed operations, latency and throughput
checks, and counts of the fold, scaling, sign, invalid, mode-switch and
no-rotation cases. `tb_sqdiv_cordic_seq` repeats this with `DP = 0` and checks
the 2N latency. `tb_mae_sweep` builds nine units (b, n ∈ {4, 8, 16}) and
prints the accuracy table above.

To change the size, set `B` and `N` on `sqdiv_cordic`. `B` must lie between 4
and 31, because the shift k is 5 bits wide. The stage constants and the zero sequence
follow N and B automatically.
