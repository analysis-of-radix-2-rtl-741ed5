# 16-point radix-2⁴ single-path delay-feedback FFT

This is a streaming FFT. It takes one complex sample per clock and gives one
complex frequency bin per clock. It computes 16-point transforms back to back
with no gap between frames. The pipeline has four radix-2 butterfly stages,
each with a feedback delay line. Together the lines hold 8 + 4 + 2 + 1 = 15
words, which is N − 1 for N = 16. The "radix-2⁴" part is how the twiddle
factors are split between the stages. Every factor except one is a sign change
or a swap of real and imaginary parts (a multiplication by −j), or a rotation by
±45° that needs only one real constant. Only one general complex multiplier is
needed, and it multiplies by a fixed table of four constants.

On top of the plain FFT the butterflies do *zero tracing*. A butterfly whose two
operands are both zero does no arithmetic. One with a single zero operand only
copies or negates the other operand. This saves work when many inputs are zero,
as in a sparsely occupied OFDM spectrum.

```
x(n) ──► stage 1 ──► stage 2 ──► W8 rotator ──► stage 3 ──► W16 mult ──► stage 4 ──► X(k)
         BF I        BF II       1,W²,-j,W⁶      BF I        W⁰..W³       BF II
         8 words     4 words                     2 words                  1 word
```

## Index map and where each factor is applied

Write the time index as n = 8n₁ + 4n₂ + 2n₃ + n₄ and the frequency index as
k = k₁ + 2k₂ + 4k₃ + 8k₄, where every digit is 0 or 1. Then the DFT kernel
W₁₆^{nk} factors, modulo 16 in the exponent, as

```
W16^(nk) = (-1)^(n1 k1)                       stage 1 butterfly
         · (-j)^(n2 k1) · (-1)^(n2 k2)        stage 2: -j, then butterfly
         · W16^(2 n3 (k1 + 2 k2))             W8 rotator
         · (-1)^(n3 k3)                       stage 3 butterfly
         · W16^(n4 (k1 + 2 k2))               W16 multiplier
         · (-j)^(n4 k3) · (-1)^(n4 k4)        stage 4: -j, then butterfly
```

Each butterfly stage resolves one time digit and produces one frequency digit.
Stage 1 produces k₁, stage 2 produces k₂, and so on. The factors between stages
depend on the time digits still to be resolved and on the frequency digits
already produced. Inside a 16-sample frame, let the position of a word in the
stream be p = p₃p₂p₁p₀. At every point of the pipeline the meaning of p is
fixed: p₃ = k₁, p₂ = k₂, and the low bits are the digits not yet used. As a
result, every block picks its factor from a counter of the valid samples it has
seen:

| block | factor | selection |
|---|---|---|
| stage 2, butterfly type II | −j on the arriving sample | s = p₂, t = p₃ |
| W8 rotator | W₁₆^{2m}, m = p₁·(p₃ + 2p₂) | m ∈ {0,1,2,3} → 1, (1−j)/√2, −j, (−1−j)/√2 |
| W16 multiplier | W₁₆^{m}, m = p₀·(p₃ + 2p₂) | m ∈ {0,1,2,3} |
| stage 4, butterfly type II | −j on the arriving sample | s = p₀, t = p₁ |

The output leaves in bit-reversed order: X(0), X(8), X(4), X(12), X(2), …
The `out_k` output gives the index of each bin. A following block that needs
natural order must reorder the bins with a 16-word buffer. That buffer is not
part of this design.

## How an SDF stage works

A stage with a delay line of D words runs on groups of 2D samples:

* **Fill half (s = 0).** The butterfly is idle. Each arriving sample goes into
  the delay line. The word leaving the line goes to the output. That word is a
  difference left behind by the previous group.
* **Compute half (s = 1).** Sample x(n + D) arrives just as x(n) leaves the
  line. The sum x(n) + x(n + D) goes to the output. The difference
  x(n) − x(n + D) goes back into the line and leaves during the next fill half.

So a stage sends D sums and then D differences, one word per sample. Its
throughput equals its input rate. s is bit log₂D of the stage's sample counter.
A type II stage also uses the next bit up, t. When s and t are both high, the
arriving sample is multiplied by −j before the butterfly: the real and
imaginary parts swap and the new imaginary part is negated. This costs no
multiplier.

The stage advances only on samples marked by `in_valid`, so gaps in the input
stream simply pause it. In the first fill half after reset the line holds
nothing yet, so no valid output is given. After that, every valid input gives
one valid output. Because of this, the last frame of a burst stays inside the
pipeline until the next frame arrives. To push it out, send another frame, or
16 zero samples.

## Zero tracing

Each butterfly classifies its operation by comparing both operands with zero:

| class | operands | what the butterfly does |
|---|---|---|
| full pruning | both zero | outputs zero, no addition |
| partial pruning | one zero | sum = the other operand; difference = it, or its negation |
| no pruning | neither zero | full add/subtract |

The adders receive their operands only for a full butterfly. Otherwise their
inputs are held at zero, so they do not toggle. The results are the same as
without pruning. What pruning saves is switching activity, not cycles: the
pipeline keeps its fixed timing. `prune_full[i]` and `prune_part[i]` pulse for
stage i + 1 when it pruned an operation. They can be used for power statistics
or ignored.

## Numbers

* **Word growth.** Each butterfly and each rotator adds one bit. A `W_IN`-bit
  input (default 16) gives a `W_IN+6`-bit output, so no stage can overflow. The
  output is the unscaled DFT, X(k) = Σ x(n)·e^{−j2πnk/16}. The largest possible
  output component is 16·2^15·√2 < 2^21, so 22 bits is enough.
* **Twiddle constants.** These are 16-bit signed values with 14 fraction bits:
  cos(π/4) → 11585, cos(π/8) → 15137, sin(π/8) → 6270, 1.0 → 16384. Products
  are rounded to nearest (ties up). The value 1.0 is exact, so untwiddled
  samples pass unchanged. With full-scale random input, the error against an
  exact DFT is a few LSBs of the 22-bit output.
* **Latency.** Every stage and rotator registers its output. With a gap-free
  stream, bin X(0) of a frame leaves 21 cycles after that frame's first sample:
  (8+1) + (4+1) + 1 + (2+1) + 1 + (1+1). After that, one bin leaves per cycle.
* **Storage.** 15 delay words of growing width, plus 6 output registers.
* **Multipliers.** The W16 multiplier has four real constant multiplications.
  The W8 rotator has two, both by cos(π/4).

## Interface of the top, `r24sdf_fft16`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `in_valid` | in | 1 | a sample is offered this cycle |
| `in_re`, `in_im` | in | W_IN | x(n), two's complement; the first valid sample after reset is n = 0 |
| `out_valid` | out | 1 | a bin is delivered this cycle |
| `out_re`, `out_im` | out | W_IN+6 | X(k) |
| `out_k` | out | 4 | k of the bin being delivered |
| `prune_full`, `prune_part` | out | 4 | per-stage pruning strobes |

There is no back-pressure. The consumer must accept a bin in every cycle in
which `out_valid` is high. Frame alignment comes from reset: the sample
counters start at zero, and the first valid input sample is taken as n = 0 of
a frame.

## Where this design goes beyond its description, or departs from it

These choices belong to this implementation and are not given by the
architecture description:

* All word widths, the coefficient format and the rounding.
* The `in_valid` qualifier that pauses the pipeline.
* The asynchronous reset.
* A pipeline register after every block.
* The `out_k` index output.
* The use of pruning for operand isolation inside a streaming butterfly. The
  pruning method is described for a flow graph, not for this pipeline.

The factor after the second butterfly column is derived from the index map
above. Some factor labels on the radix-2⁴ flow graph this design follows do not
match the map. The map was followed, and the whole pipeline is checked against
a direct DFT.

The architecture drawing shows a multiplier symbol after the first butterfly as
well. In this design that factor is the trivial −j inside the stage-2
butterfly, so no separate block is needed there.

Not built: inverse-FFT mode, decimation-in-time ordering, parallel (multi-path)
versions, and lengths other than 16. These are mentioned as possible
extensions but not described. The 8-point radix-2² pipeline that serves as the
point of comparison is also not built. The delay lines are register chains. For
much longer transforms a RAM would be the usual choice.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | N, twiddle constants, pruning and butterfly-type enums |
| `rtl/delay_line.sv` | feedback shift register |
| `rtl/zero_prune.sv` | zero tracing classifier |
| `rtl/bf1.sv`, `rtl/bf2.sv` | butterflies type I and II (combinational) |
| `rtl/sdf_stage.sv` | stage = delay line + butterfly + s/t counter |
| `rtl/tw_mult_w8.sv` | W8 rotator (real constant) |
| `rtl/tw_mult_w16.sv` | W16 multiplier (complex constant) |
| `rtl/r24sdf_fft16.sv` | the pipeline |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. It has a
watchdog that ends the run as a failure if it hangs. For example, the
end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/fft_pkg.sv tb/tb_r24sdf_fft16.sv \
          --top-module tb_r24sdf_fft16 -o sim
./obj_dir/sim
```

The same command works for every testbench, with its own name in place of
`tb_r24sdf_fft16`. `-Irtl` lets verilator find the modules by file name;
`-Wno-fatal` keeps width and unused-signal lint warnings from stopping the build.

`tb_r24sdf_fft16` runs the top at its defaults and sends 25 frames:

* full-scale random frames;
* frames with every sample at the positive limit, and at the negative limit
  (the overflow check);
* an impulse;
* sparse frames, which make every stage prune fully and partially;
* random frames with random gaps in `in_valid`;
* a flush frame.

It checks every bin against a DFT computed in real arithmetic with a tolerance
of 8 LSB. It also checks the `out_k` order, the 21-cycle latency and the
one-bin-per-clock rate. It counts stalls and pruning events per stage, and
fails if any of them never happened.

The unit testbenches use their own references. The delay line is checked
against a queue model, the butterflies against their equations, and the
rotators against integer arithmetic with constants derived in the testbench
and against floating point.
