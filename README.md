# Recursive DCT with Type A, B and C Goertzel resonators

This is an N-point one-dimensional DCT-II (default N = 8) in which every
frequency bin is a second-order recursive filter, a Goertzel resonator. All
bins take the same input sample on the same clock, so the transform starts
on the first sample and needs no input buffer. The cost lies in the constant
multiplier inside each resonator loop. The conventional loop uses the
constant 2cos(kπ/N), which approaches ±2 near DC and near Nyquist, so it
needs many integer bits and many set bits. This design rewrites the loop for
the bins near DC and near Nyquist so that their constants stay small. Every
loop constant in the transform then lies in [0, 0.5]. For N = 8 the six
non-zero constants are built as shift-and-add *multiplier blocks*, with no
multiplier at all.

```
                 +-----------+    +---+
 in_data ---+--->| bin 0  Σ  |--->| R |--+
            |    +-----------+    +---+  |  shift toward the output
            +--->| bin 1  A  |--->| R |--+
            +--->| bin 2  A  |--->| R |--+      +---------+
            +--->| bin 3  B  |--->| R |--+----->|    x    |---> out_data, out_k
            +--->| bin 4  B  |--->| R |  |      +---------+
            +--->| bin 5  B  |--->| R |  |           ^
            +--->| bin 6  C  |--->| R |  |   scale ROM[out index]
            +--->| bin 7  C  |--->| R |--+
                 +-----------+    +---+
```

## What one resonator computes

For bin k let θ = kπ/N and let u(n) = (−1)^k x(n). The filter

    v(n) = u(n) + 2cos(θ)·v(n−1) − v(n−2),      y(n) = v(n) − v(n−1)

has impulse response cos((m+½)θ)/cos(θ/2). Start it from zero and feed it
the N samples of a block. After the last sample its output is

    y = Σ_n x(n)·cos((2n+1)kπ/2N) / cos(kπ/2N)

which is the unnormalised DCT-II sum divided by cos(kπ/2N). One
multiplication per bin after the loop, by c(k)·cos(kπ/2N), gives the
orthonormal coefficient X(k). Here c(0) = √(1/N) and c(k) = √(2/N). That
single multiplication is done by one shared output multiplier, whose
factors come from a small ROM. The sign (−1)^k costs nothing: for odd k the
input adder subtracts the sample instead of adding it.

Bin 0 has θ = 0 and is just the sum of the block. It is a plain
accumulator, not a resonator.

## The three loop forms

All three forms compute the same v(n) and y(n) above. They differ only in
which constant the loop multiplier carries. The factor 2 is always a wired
shift.

| type | used for bins | constant | loop equations (registers hold the z⁻¹ terms) | adders |
|---|---|---|---|---|
| A | 1 … ⌊N/3⌋ | α_k = 1 − cos θ | d(n) = u(n) + d(n−1) − 2α_k·v(n−1);  v(n) = v(n−1) + d(n);  y = d(n) | 3 |
| B | the middle | β_k = cos θ | v(n) = u(n) + [2β_k·v(n−1) − v(n−2)];  y = v(n) − v(n−1) | 3 |
| C | N−⌊N/3⌋ … N−1 | γ_k = 1 + cos θ | s(n) = u(n) + 2γ_k·v(n−1) − s(n−1);  v(n) = s(n) − v(n−1);  y = 2v(n) − s(n) | 4 |

**Type A** tracks the difference d(n) = v(n) − v(n−1) as a state. Since
2cos θ = 2 − 2α_k, the recursion becomes a double integrator with a small
correction, 2α_k·v. d(n) is itself the output, so Type A needs no output
adder. Its registers hold d(n) − 2α_k·v(n) and v(n).

**Type B** is the textbook Goertzel loop. Its registers hold
2β_k·v(n) − v(n−1) and v(n). For bin N/2 the constant is cos(π/2) = 0, so
that bin has no multiplier.

**Type C** tracks the sum s(n) = v(n) + v(n−1) as a state. Since
2cos θ = 2γ_k − 2, the loop carries γ_k, which is small near Nyquist. The
output needs one more adder, 2v(n) − s(n), and this is the overhead of the
Type C form. Its registers hold 2γ_k·v(n) − s(n) and v(n).

Bins are assigned by the rule ⌊N/3⌋ Type A after DC, ⌊N/3⌋ Type C at the
top, and Type B in between. The crossovers sit at θ = π/3 and 2π/3, where
2α, 2β and 2γ would reach 1. For N = 8 this gives A: 1, 2; B: 3, 4, 5;
C: 6, 7.

### Multiplier blocks for N = 8

In the N = 8 transform, the constants of bins 1, 2, 3, 5, 6 and 7 are
products of short sums of powers of two. Each is applied as a cascade:
the first bracket is formed once, and the second bracket is applied to that
partial result.

    α_1 = γ_7  = 2⁻⁴·((1 − 2⁻⁵)(1 − 2⁻¹⁰) + 2⁻² + 2⁻¹³)   ≈ 1 − cos(π/8)
    α_2 = γ_6  = 2⁻²·((1 + 2⁻²)(1 − 2⁻⁴ − 2⁻¹²) + 2⁻¹⁸)  ≈ 1 − cos(π/4)
    β_3 = −β_5 = 2⁻²·(1 + (2⁻¹ + 2⁻⁵)(1 − 2⁻¹⁰) + 2⁻¹⁹)  ≈ cos(3π/8)

Each of these is within 2e-7 of its cosine. `mult_block` adds 24
guard bits below the input LSB, so the cascade is exact, and it truncates
once at the end. Its output is exactly ⌊x·c⌋ for the dyadic constant c.
β_5 is obtained by negating the β_3 block's result. For any other N, and
with `USE_MB = 0`, `loop_mult` uses a hard-wired constant. That constant is
cos-derived, rounded to `COEF_FRAC` fractional bits and written as a product
with a constant, so synthesis keeps only the partial products of its set
bits.

## Timing and control

* One sample per clock enters every resonator at once. The clock is the
  sample clock. `in_valid` low is a gap: it freezes every loop and does not
  end the block. The design never stalls its input.
* `dct_ctrl` counts samples modulo N. On sample 0 (`first`), every loop
  ignores its stored state, so block b+1 can follow block b with no idle
  clock. On the clock that carries sample N−1 (`load`), the combinational
  bin results are final and are captured in the register bank R.
* R shifts toward the output multiplier, one bin per clock, bin 0 first.
  `scale_mult` multiplies by the ROM word of that bin and registers the
  product. X(0) is on `out_data` two clocks after the clock that carried the
  last sample, and X(k) follows k clocks later, with `out_k` = k.
* A block lasts at least N clocks and the read-out exactly N clocks. A load
  can therefore coincide with the last read-out clock, and continuous input
  gives continuous output: one coefficient per clock. The assertion
  `a_no_overrun` in `dct_ctrl` checks that R is never reloaded while it
  still holds unread bins.

## Number formats and accuracy

* `in_data`: signed integer, `IN_W` = 10 bits (−512 … 511).
* Loop states, bin results and `out_data`: signed, `FRAC` = 16 fractional
  bits, `SW` = IN_W + 2·log2(N) + 2 + FRAC bits (34 for N = 8). The integer
  part covers the worst-case resonator gain for full-scale input. That gain
  is below N/sin(π/N) for v(n), and below N/cos((N−1)π/2N) for the output.
* Scale ROM: unsigned factors below 1 with `SCALE_FRAC` = 24 fractional
  bits. The product is truncated back to the bin format.
* Measured against a floating-point DCT-II, with uniform random input in
  (−300, 300), the mean square error of X(k) is:

  | N | 8 | 16 | 32 | 64 |
  |---|---|---|---|---|
  | MSE | 3.0e-8 | 1.0e-8 | 2.9e-8 | 1.1e-7 |

  With `USE_MB = 0` (constants rounded to 24 bits instead of the
  multiplier blocks), N = 8 reaches 1.9e-9. All are below 5e-7, a level close to what a 2D transform needs for video
  coding accuracy. At N = 8 the largest error comes from the rounding of
  the multiplier-block constants. Bin 7 is the worst case: about 0.016 on a
  full-scale result of 13 000.
* All bins use one word width. A design tuned for area would trim the
  widths of each bin separately, down to the MSE target. This RTL does not.

## Modules

| module | role |
|---|---|
| `dct_pkg` | bin-type rule, loop and scale constants (computed at elaboration), width function |
| `goertzel_dct` | top level: accumulator, N−1 resonators, R bank, ROM, output multiplier, controller |
| `dc_accum` | bin 0: sum of the block |
| `rm_type_a`, `rm_type_b`, `rm_type_c` | the three resonator forms, parameterised by N and K |
| `loop_mult` | chooses a multiplier block or a hard-wired constant for one loop |
| `mult_block` | shift-and-add realisations of α_1, α_2, β_3 (and −β_3) |
| `out_regs` | register bank R: parallel load, shift toward the output |
| `scale_rom` | N scale factors c(k)·cos(kπ/2N) |
| `scale_mult` | the single general-purpose output multiplier, one clock of latency |
| `dct_ctrl` | sample counter and read-out sequencer |

Top-level parameters: `N` (8), `IN_W` (10), `FRAC` (16), `COEF_FRAC` (24),
`SCALE_FRAC` (24), `USE_MB` (1). `SW` and `KW` are derived and should not
be overridden. Reset `rst_n` is asynchronous and active low.

## Simulation

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=… failures=…`. Run from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dct_pkg.sv \
          tb/tb_goertzel_dct.sv --top-module tb_goertzel_dct
./obj_dir/Vtb_goertzel_dct
```

* `tb_goertzel_dct`: the default N = 8 transform, end to end. It sends 400
  blocks: random, full-scale, impulse and alternating-sign input, with gaps
  and back-to-back loads. It checks every coefficient, the bin order, the
  two-clock latency and the MSE.
* `tb_dct_sizes`: N = 16, 32 and 64 with the default widths, and N = 8
  with `USE_MB = 0` (hard-wired constants instead of multiplier blocks).
* `tb_rm_type_a/b/c`: each resonator form at several N and K, including
  multiplier-block, hard-wired and zero constants.
* `tb_mult_block`, `tb_loop_mult`, `tb_dc_accum`, `tb_out_regs`,
  `tb_scale_rom`, `tb_scale_mult` and `tb_dct_ctrl` test the remaining
  blocks one by one. `rm_check` and `dct_harness` are shared harnesses.

## Design choices and limits

The following follow the architecture as it was published. Each bin has
its own resonator, and bin 0 is a plain sum. Bins are split into Type A, B
and C by the ⌊N/3⌋ rule, and the three loop forms are the ones described
above. The N = 8 multiplier-block factorisations are the published ones.
The sign (−1)^k is realised by using subtractors, and the ×2 terms are
wired shifts. The output side has a register bank, a scale ROM and a single
output multiplier.

The following are this design's own choices. There were no published
values for them.

* All word widths, and the truncation (floor) rounding everywhere.
* The orthonormal scaling of the output.
* The restart of every loop on the first sample of a block, and the
  `in_valid` gap handling.
* The controller, the R bank shifting toward the multiplier, and the
  two-clock output latency.
* The asynchronous reset.
* Constants for N ≠ 8, taken straight from the cosine and rounded to
  `COEF_FRAC` bits. No per-bin optimised constants or multiplier blocks
  exist for these sizes.

Not included:

* The all-Type-B transform, which serves only as a reference for
  comparison. Forcing every bin to `rm_type_b` in `goertzel_dct` would give
  it.
* A combined forward/inverse transform. It would replace the hard-wired loop
  multipliers with general-purpose ones.
* A 2D transform.

With 10-bit input, every loop accumulates rounding error over N steps. The
testbenches show the error is small up to N = 64. Longer transforms, or
wider input, need larger `FRAC` and `COEF_FRAC`.
