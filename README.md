# LMS adaptive FIR filter on Vedic multipliers

An adaptive filter changes its own coefficients so that its output follows a
reference signal. It is used for system identification, channel equalisation,
and noise or echo cancellation. This design implements the least-mean-squares
(LMS) adaptive FIR filter on 64-bit two's complement samples:

    y(n)      = sum_{k=0}^{M-1} u[n-k] * w_k          filter output
    e(n)      = d(n) - y(n)                            estimation error
    w_k(n+1)  = w_k(n) + mu * u[n-k] * e(n)            tap-weight adaptation

Here `u[n-k]` is the tap-input vector, the last M samples of x. All 2M products
of each iteration are formed by 64x64-bit multipliers built with the *Urdhva
Tiryagbhyam* ("vertically and crosswise") method of Vedic arithmetic: a
multiplier is split recursively into four half-size multipliers, down to 2x2-bit
cells, and the partial products are merged with carry look-ahead adders.

```
 x(n) ──┬──► lms_fir (delay line, M Vedic mults, sum) ──yk──► lms_error ◄── d(n)
        │        ▲ w_k                                            │ e(n)
        └──────► lms_weight_update (M Vedic mults, mu shift, w regs) ◄┘
                 lms_ctrl sequences the five steps of one sample
```

## The Vedic multiplier hierarchy

`vedic_NxN` (N = 4, 8, 16, 32, 64) multiplies two unsigned N-bit numbers. With
H = N/2, it instantiates four `vedic_HxH`:

| instance | operands              | role                         |
|----------|-----------------------|------------------------------|
| `u_ll`   | A[H-1:0] × B[H-1:0]   | right vertical product       |
| `u_hl`   | A[N-1:H] × B[H-1:0]   | crosswise                    |
| `u_lh`   | A[H-1:0] × B[N-1:H]   | crosswise                    |
| `u_hh`   | A[N-1:H] × B[N-1:H]   | left vertical product        |

`vedic_combine` then assembles the 2N-bit product:

* P[H-1:0] is the low half of `u_ll`, passed straight through.
* A middle adder sums the two crosswise products and the upper half of `u_ll`.
  Its low H bits become P[N-1:H].
* The upper H bits of that sum, plus two carry bits, go to a left adder. The
  left adder adds them to `u_hh` and gives P[2N-1:N].

The three-operand middle sum uses two N-bit adders in series. Their two carry
outs together make up the two extra bits passed left. The left adder can
never carry out, because an NxN product fits in 2N bits.

`vedic_2x2` is the base cell. Its product bit 0 is a0·b0. Bit 1 and a carry
come from a half adder on the crosswise terms a1·b0 and a0·b1. Bits 3:2 come
from a half adder on a1·b1 and that carry.

`cla_adder` is a carry look-ahead adder of any width W ≥ 2. It uses a
parallel-prefix (Kogge-Stone) network on the generate and propagate vectors,
so every carry is looked ahead in ceil(log2 W) steps and none ripples.

**Registers and latency.** Only the 4-bit outputs of the 2x2 cells are
registered. A 64x64 multiplier therefore has (64/2)² = 1024 cells, 4096
flip-flops and a latency of one clock. It accepts a new operand pair on every
clock. Everything above the cells is one combinational path: five levels of
adders, each three carry look-ahead adders deep. In an ASIC or FPGA this path
sets the clock period. The design has no internal pipelining beyond the cell
registers.

`signed_vedic_mult` adapts the unsigned 64x64 multiplier to signed operands
using sign-magnitude. Each operand is replaced by its magnitude (|−2^63| still
fits in 64 bits). The product sign is carried through a one-clock register
beside the multiplier, and the 128-bit result is negated when that sign is
set. The result is the exact signed 128-bit product, one clock after the
operands.

## The LMS loop and its schedule

| module | job |
|---|---|
| `lms_fir` | delay line `u[0..M-1]`; one `signed_vedic_mult` per tap on `u[k]`, `w[k]`; full-precision 128-bit sum `yk` |
| `lms_error` | `y = yk >>> FRAC_W` truncated to 64 bits; `e = d - y` |
| `lms_weight_update` | one `signed_vedic_mult` per tap on `u[k]`, `e`; `w[k] += (u[k]*e) >>> (FRAC_W+MU_SHIFT)`; holds the weights |
| `lms_ctrl` | five-state sequencer (`lms_pkg::lms_state_e`) |
| `adaptive_filter64` | top level: wires the above, registers `yk`, `y`, `e` and the reference |

All multipliers have one clock of latency, and the error must exist before
the update products can be formed. One sample therefore takes five clocks:

| state | what happens on the clock edge that ends it |
|---|---|
| `ST_IDLE`  | `in_valid && in_ready`: x enters `u[0]`, older samples shift down, d is latched |
| `ST_FILT`  | filter multipliers capture `u[k]*w[k]` |
| `ST_ERR`   | `yk`, `y`, `e` registered |
| `ST_UPD`   | update multipliers capture `u[k]*e` |
| `ST_WRITE` | weights written |

`out_valid` is high for one clock after `ST_WRITE`. In that clock `yk`,
`y_out`, `e_out` and the already-updated `w_out` all belong to the sample
just processed. The controller is back in `ST_IDLE` in the same clock, so
with `in_valid` held high the filter takes one sample every five clocks.
`in_ready` is low while a sample is in flight. Assertions in `lms_ctrl` check
two rules: a sample is only taken while idle, and every taken sample is
written back four clocks later.

### Number format

* Samples, the reference, the error and the weights are signed 64-bit
  numbers with `FRAC_W` = 32 fractional bits (Q31.32).
* `yk` is the exact sum of the M products and has 64 fractional bits.
* `y` is `yk` shifted right arithmetically by `FRAC_W`, which truncates
  toward minus infinity.
* The weight increment is the 128-bit product `u*e` shifted right by
  `FRAC_W + MU_SHIFT`.
* Overflow wraps everywhere: there is no saturation.
* The step size is `mu = 2^-MU_SHIFT`, so the update needs no third
  multiplication.
* For convergence, mu must lie between 0 and 2/(M·S_max), where S_max is the
  largest value of the input's power spectral density. With the defaults
  (M = 4, mu = 1/8) an input of full-scale white noise in [−1, 1) is well
  inside that range.
* Reset is synchronous and active high. It clears the delay line, the
  weights and the output registers.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `TAPS` | 4 | `adaptive_filter64`, `lms_fir`, `lms_weight_update` | filter length M |
| `FRAC_W` | 32 | `adaptive_filter64`, `lms_error`, `lms_weight_update` | fractional bits |
| `MU_SHIFT` | 3 | `adaptive_filter64`, `lms_weight_update` | mu = 2^-MU_SHIFT |
| `W` | 64 | `cla_adder` | adder width |

The defaults live in `lms_pkg` (`DEF_TAPS`, `DEF_FRAC_W`, `DEF_MU_SHIFT`).
The data width is fixed at 64 bits by the 64x64 multiplier. With four taps
the filter holds eight 64x64 multipliers, 32,768 cell flip-flops in all.

## Where this design makes its own choices

The architecture comes from the LMS equations and the Vedic multiplier block
diagrams: four half-size multipliers plus a middle and a left carry
look-ahead adder at each level, 64-bit operands and a 128-bit filter sum.
The following were filled in here:

* **Tap count.** Four taps is an inference from a reported resource count of
  8192 four-bit registers: 8 multipliers of 1024 cells each, i.e. 4 filter
  and 4 update products. The filter length was never given explicitly.
* **Registers only at the 2x2 cells.** This is inferred from a reported
  count of 4096 flip-flops for one 64x64 multiplier. The resulting long
  combinational adder path is a property of that structure.
* **Adders.** The form of the carry look-ahead adder (Kogge-Stone prefix)
  and building the three-input middle adder from two adders are choices of
  this design.
* **Arithmetic choices.** These are all this design's own: the Q31.32
  format, truncation, wrap-around, the power-of-two step size and the
  sign-magnitude signed wrapper.
* **Sequencing.** The five-clock sequential schedule and the valid/ready
  input handshake are this design's. No throughput or latency figure was
  given to match.
* **Register count.** The register count matches the reference
  implementation's figures for the multipliers (4096 cell flip-flops per
  64x64, 8192 four-bit registers in all) and the single 128-bit output
  register. It does not match the six 64-bit registers reported for the
  filter. This design holds 4 delay-line taps, 4 weights, and the
  registered reference, y and e, i.e. eleven 64-bit registers.
* **Not built.** A multiplier based on a ROM of squares is mentioned only as
  a future direction and is not part of this design. Nothing here is
  "distributed arithmetic" in the look-up-table sense: every product comes
  from the Vedic multipliers.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Expected values are computed independently,
with the `*` operator and integer division on wider integers.

| testbench | what it covers |
|---|---|
| `tb_vedic_2x2`, `tb_vedic_4x4`, `tb_vedic_8x8` | every operand pair |
| `tb_vedic_16x16` … `tb_vedic_64x64` | 4000 random and corner pairs (0, 1, all ones, MSB only), one per clock; checks that the output still holds the old product before the edge and the new one after it (one clock latency, full throughput), and the all-ones product (2^N−1)² |
| `tb_cla_adder` | 8-bit exhaustive with both carry-ins; 64-bit random plus carry-chain corner cases |
| `tb_signed_vedic_mult` | random signed operands of all magnitudes, and ±1, 0, the most positive and most negative numbers |
| `tb_lms_error` | scaling and subtraction against division-based reference |
| `tb_lms_fir`, `tb_lms_weight_update` | delay line, filter sum and weight update with random gaps, against a model; run with `TAPS=2` |
| `tb_adaptive_filter64` | end to end, `TAPS=2`, other parameters default: see below |

The end-to-end tests identify an unknown FIR driven by white noise in
[−1, 1). Halfway through, the unknown system changes to different
coefficients, and the filter has to converge again. Each test checks:

* `yk`, `y`, `e` and every weight, against a bit-exact LMS model, on every
  sample;
* that results appear exactly five clocks after a sample is taken;
* that `in_ready` stays low while a sample is in flight, with the next
  sample held on the input during that time;
* that idle gaps are handled;
* that both error signs occur;
* that after each half the error is below 2^-20 and every weight is within
  2^-16 of the unknown coefficient.

The reduced test (`TAPS=2`) passes: 1200 samples, 12002 checks, both halves
converged. The testbenches are deterministic runs of `$urandom` with the
simulator's default seed.

To simulate with Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_vedic_64x64 \
        -y rtl -y tb +libext+.sv -Irtl rtl/lms_pkg.sv tb/tb_vedic_64x64.sv
    ./obj_dir/Vtb_vedic_64x64

**Build time.** Verilator flattens the whole hierarchy into C++. One 64x64
multiplier compiles in well under a minute. The four-multiplier
`tb_adaptive_filter64` takes about three to four minutes on two compiler
jobs. The default eight-multiplier filter (`TAPS=4`) took more than ten
minutes to compile, so the largest size simulated is `TAPS=2` with every other
parameter at its default. To run the default size, set `TAPS` in
`tb_adaptive_filter64` to `DEF_TAPS` and allow for a long build.
