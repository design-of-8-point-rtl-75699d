# Serial 8-point DFT built from Rademacher-function accumulators

This is a small, multiplier-light 8-point discrete Fourier transform for real
input samples. Samples arrive one at a time; all eight complex results come
out in parallel three clock cycles after the last sample.

The idea is that a 4-point DFT needs no multiplier at all: every entry of its
matrix is +1, -1, +j, -j or 0, so each output is a running sum of +x, -x or
nothing. Which of the three applies to sample n is the sign pattern of a
product of Rademacher functions, and those square waves are simply the bits
of a counter. Two such serial 4-point DFTs, one for the even and one for the
odd samples, are combined by radix-2 decimation in time. Conjugate symmetry
of a real-input DFT then removes a quarter of the work:

* a 4-point DFT of real samples has U3 = conj(U1), so each 4-point core only
  builds X(0), X(1) and X(2): three real accumulators (Xr0, Xr1, Xr2) and one
  imaginary one (Xi1), instead of eight;
* the 8-point result has X(7) = conj(X(1)) and X(3) = conj(X(5)), so the
  fourth 2-point butterfly and its W8^3 twiddle disappear, replaced by two
  negation circuits;
* W8^2 = -j is not a multiplication but a relabelling: L2 goes straight into
  the imaginary lane of the third butterfly.

The only real multiplier left is W8^1 = (1 - j)/sqrt(2), applied once, to L1.

## Data flow

```
            even x ──► dft4_mod #1 ──► U0 ─────────────────┐ dft2 #1 ──► X0, X4
 x ─► split                       U1 (re, im) ─────────────┤ dft2 #2 ──► X1, X5  (re and im lane)
  (sample                         U2 ──────────────────────┤ U2 = Re X2 = Re X6
   counter) odd x ──► dft4_mod #2 ──► L0 ───────────────────┘
                                  L1 ─► twiddle_w81 (x W8^1) ─► dft2 #2
                                  L2 ─► dft2 #3 (im lane, 0 and L2, outputs swapped) ─► Im X6, Im X2
                                              Im X1 ─► neg_circuit ─► Im X7   Re X7 = Re X1
                                              Im X5 ─► neg_circuit ─► Im X3   Re X3 = Re X5
```

With U the 4-point DFT of x(0), x(2), x(4), x(6) and L that of x(1), x(3),
x(5), x(7), T = W8^1 L1:

| output | formula | built as |
|---|---|---|
| X0, X4 | U0 ± L0 | dft2 #1 |
| X1, X5 | U1 ± T | dft2 #2, one per real/imaginary lane |
| X2, X6 | U2 ∓ j L2 | real part U2; imaginary lane dft2(0, L2), outputs swapped |
| X3, X7 | conj(X5), conj(X1) | shared real parts, two negation circuits |

X(0) and X(4) are real; their imaginary outputs are tied to zero.

## The 4-point core (`dft4_mod`)

The core is the hardest part to read, because the arithmetic is hidden in the
control. For a frame x(0..3), with sample index n = {b1, b0} from a 2-bit
counter, the two non-constant Rademacher functions over the frame are
phi2 = (-1)^b1 (pattern + + - -) and phi3 = (-1)^b0 (+ - + -). The four
sums built are:

| sum | matrix row over n = 0..3 | as Rademacher products | control per sample |
|---|---|---|---|
| Xr0 = Re X(0) | + + + + | phi0 | always add +x |
| Xr1 = Re X(1) | + 0 - 0 | (phi2 + phi2·phi3)/2 | even n only, negated if b1 |
| Xr2 = Re X(2) | + - + - | phi3 | always, negated if b0 |
| Xi1 = Im X(1) | 0 - 0 + | (phi2·phi3 - phi2)/2 | odd n only, negated unless b1 |

`rademacher_ctrl` holds the counter and produces, per accumulator, an `en`
(the entry is not 0) and a `neg` (the entry is negative) bit, packed as
`dft8_pkg::acc_ctl_t`.

The pipeline has three register stages:

1. **Data buffers.** On `enter`, each buffer loads x or -x (from a
   negation circuit through a 2:1 multiplexer) together with that sample's
   control bits. The Xr0 buffer takes x directly: its row is all +1.
2. **Accumulators.** Each `accumulator` restarts from the sample on n = 0,
   adds it on later samples, skips it when `en` is 0, and holds when no
   sample arrives.
3. **Output buffers.** These take no control; they copy the accumulators
   every cycle.

Because the accumulators only move when samples arrive, a finished result
stays at the outputs until the next frame's x(0) reaches the accumulators.
This is what lets the top combine the even core, which finishes one sample
early, with the odd core without any extra storage. Two assertions in
`dft8_top` check this: the even core must have finished a frame before the
odd core reports it, and the two never finish in the same cycle.

The core is not a complete 4-point DFT on its own: X(3) is not produced.

## Interface and timing (`dft8_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | asynchronous, active low; the first sample afterwards is x(0) |
| `enter` | in | 1 | `x` carries the next sample this cycle |
| `x` | in | DATA_W | real sample, two's complement |
| `x_re[0:7]`, `x_im[0:7]` | out | DATA_W+3 each | X(k) = Σ x(n) e^(-j2πkn/8) |
| `out_valid` | out | 1 | one-cycle pulse with the results |

* Samples may come every cycle or with any number of idle cycles between
  them. The frame position is kept only by counting `enter` pulses, so there
  is no frame-start signal; reset realigns.
* `out_valid` is high in the third cycle after the cycle in which x(7) was
  entered. The results hold from then until two cycles after the next x(0)
  is entered. In continuous streaming they are therefore valid for exactly
  the `out_valid` cycle.
* Throughput: one frame per eight `enter` pulses, with no dead cycles
  between frames.

Parameters (defaults): `DATA_W = 8` input bits, `TW_FRAC = 15` fraction
bits of the 1/sqrt(2) constant. Widths grow inside: the data buffers hold
DATA_W+1 bits, the 4-point sums DATA_W+2 bits, the 8-point results DATA_W+3
bits. No overflow is possible at any input.

## Numerics

All outputs are exact integers except the ones that pass through W8^1:
X(1), X(3), X(5) and X(7). There, (a + b)/sqrt(2) and (b - a)/sqrt(2) are
computed with the constant round(2^15/sqrt(2)) = 23170 and rounded to the
nearest integer, ties upward. The error is at most 0.51 of one LSB. For
x = 1..8 the design gives 36, -4+10j, -4+4j, -4+2j, -4, -4-2j, -4-4j,
-4-10j; the exact values are ±9.66 and ±1.66 in the imaginary parts. The
constant is computed at elaboration by `dft8_pkg::inv_sqrt2_q`, a rounded
integer square root of 2^(2·TW_FRAC-1).

## Where this departs from, or adds to, the source design

The source fixes the block structure and the conjugate-symmetry reductions.
These choices are this design's own:

* **Widths and arithmetic.** The sample width, all internal widths, the
  fixed-point format of W8^1, its rounding and the W8^1 circuit itself are
  not specified by the source.
* **Timing and control.** The reset, the `enter`/`out_valid` handshake,
  the pipeline depth (one register per buffer and accumulator stage) and the
  even/odd routing counter are not specified either.
* **Rademacher functions.** The Rademacher definition is used in the form
  r(x) = sgn(sin(2^m πx)) with the two square waves sampled in the middle
  of each sample interval. These are the counter bits. The row-by-row
  expression as Rademacher products was derived here from the 4-point DFT.
* **Negation.** The -j of W8^2 is absorbed by swapping the two outputs of the
  third butterfly's imaginary lane, rather than by a separate negation.
* **Output registers.** The back end (twiddle, butterflies, negations) is
  combinational after the 4-point output buffers. No output register is
  added.

## Files

`rtl/` (one unit per file):

| file | contents |
|---|---|
| `dft8_pkg.sv` | shared constants, `acc_ctl_t`, the 1/sqrt(2) constant function |
| `dft8_top.sv` | the 8-point DFT |
| `dft4_mod.sv` | serial 4-point core: negation, multiplexers, data buffers, accumulators, output buffers |
| `rademacher_ctrl.sv` | counter and per-accumulator sign/enable control |
| `accumulator.sv` | one running sum |
| `dft2.sv` | 2-point butterfly: two adders, the second with inverted x1 and carry in |
| `twiddle_w81.sv` | multiplication by W8^1 |
| `neg_circuit.sv` | two's complement negation |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
one computes its expected values independently, with floating-point DFT
sums or plain integer models. Each ends by printing
`TB_RESULT checks=N failures=M`.

`tb_dft8_top` runs the top at its default parameters. It sends the x = 1..8
example, extreme frames (all -128, all 127, alternating, impulses), 300
random frames (a third of them with idle cycles) and 40 back-to-back
frames. It checks every output, the 3-cycle latency and that every frame
gives exactly one `out_valid`. It also counts that gaps, streaming, non-zero
values through the two negation circuits and a non-zero L2 all occur.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dft8_pkg.sv tb/tb_dft8_top.sv \
          --top-module tb_dft8_top -o sim
./obj_dir/sim
```

Replace `tb_dft8_top` with any other testbench name to test one unit.
`verilator --lint-only -Wall -Irtl rtl/dft8_pkg.sv rtl/dft8_top.sv` lints
the design. The package has to be named first, and the other files are found
through `-Irtl`. Every testbench finishes in well under a second.
