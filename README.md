# Pipelined CORDIC direct digital frequency synthesizer

A direct digital frequency synthesizer (DDFS) makes a digital sine wave whose
frequency is set by a number, the frequency tuning word (FTW). A phase
accumulator adds the FTW to itself every clock, modulo 2^J. Each overflow is one
output period, so

    f_out = FTW * f_clk / 2^J        resolution f_clk / 2^J

A classic DDFS turns phase into amplitude with a sine ROM. The ROM roughly
doubles in size for every extra bit of phase resolution. This design uses a
CORDIC rotator instead. CORDIC rotates a vector by a chain of shift-and-add
steps. If the vector starts at (1/K, 0), where K is the CORDIC gain, the rotator
ends at (cos a, sin a) without a multiplier. Every CORDIC iteration is one
pipeline stage, so the synthesizer delivers one sample per clock. Only the
phase accumulator's carry chain limits the clock rate.

The default configuration gives 9 bits of sine accuracy:

| parameter | meaning | default |
|---|---|---|
| `J` | phase accumulator width | 16 |
| `B` | phase word into the rotator (the accumulator gives B+1 bits) | 13 |
| `L` | input word length of the rotator (sign + L-1 fraction bits) | 10 |
| `M` | guard bits below the input word | 4 |
| `NSTAGES` | CORDIC iterations, n | 10 |
| `N` | x/y and output word length, 1+L+M | 15 |

With J = 16 the resolution is f_clk/65536. At a 62.135 MHz clock that is 948.1 Hz.

## Signal flow

```
 ftw ──► phase_accumulator ──(B+1 bits)──► phase_complementor ──(B)──► cordic_rotator ──sin──► output_complementor ──► reg ──► sine_o
          J-bit, mod 2^J      bit B-1 ─────────┘                        (1/K,0), n stages          ▲
                              bit B ─────────────────────► delay_line (n) ──────────────────────────┘
```

| module | role |
|---|---|
| `phase_accumulator` | Frequency register, J-bit adder and phase register. Passes on the top B+1 bits and a wrap flag. |
| `phase_complementor` | Front complementor: folds quadrants 2 and 4 onto quadrant 1. |
| `cordic_rotator` | Pre-scaled CORDIC with `NSTAGES` pipelined `cordic_stage`s. |
| `cordic_stage` | One iteration: two x/y add/subtracts with fixed shifts, one angle adder, registers. |
| `output_complementor` | End complementor: negates the second half period. |
| `delay_line` | Carries the half-period bit and the valid/period flags beside the rotator. |
| `cordic_ddfs` | Top level. |
| `ddfs_pkg` | Elementary-angle table, CORDIC gain, 1/K start value, angle-path widths. |

The constants are not stored tables. They are computed when the design is
elaborated, so any word-length set can be built:

- the elementary angles: round(arctan(2^-i) · 2^B / π);
- the CORDIC gain: K = ∏ sqrt(1 + 2^-2i) over the n iterations;
- the start value 1/K, quantised to L bits and shifted left by M.

## Top-level interface and timing (`cordic_ddfs`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one sample per clock |
| `rst` | in | 1 | Synchronous, active high. Clears the frequency and phase registers and the flags. |
| `ftw_we` | in | 1 | Loads `ftw` into the frequency register. |
| `ftw` | in | J | frequency tuning word |
| `sine_o` | out | N | Two's complement sine with N-2 fraction bits: +1.0 = 2^(N-2), which is 8192 at the defaults. |
| `valid_o` | out | 1 | High once the pipeline holds samples of the running phase sequence. |
| `period_o` | out | 1 | High with the first sample after each accumulator overflow. |

Timing:

- **Latency.** A phase in the phase register during cycle t appears on `sine_o`
  in cycle t + NSTAGES + 1. That is n rotator stages plus the output register,
  11 clocks at the defaults.
- **After reset.** `valid_o` rises NSTAGES + 1 clocks after reset is released.
  An FTW written during reset reaches the frequency register on the first clock
  after reset. So the first two samples both have phase 0.
- **Changing the FTW.** A new FTW changes the step size from the next clock on.
  The phase itself never jumps, so frequency switching is phase-continuous.

## Phase word and quadrant folding

This is the part that needs the most care. CORDIC only converges for angles
in [-π/2, π/2], but the sine has to cover a whole turn. The top two phase bits
pick the quadrant (bits B, B-1 = 00, 01, 10, 11 for quadrants 1 to 4), and two
complementors fold the turn onto the first quadrant.

**Binary angles.** The low B bits of the phase go to the rotator. They are read
as a two's complement *binary angle*: one LSB is π/2^B. The B-bit range
[-2^(B-1), 2^(B-1)) is then exactly the convergence region [-π/2, π/2). The
phase never needs converting to radians, and the elementary angles are stored
in the same units (arctan(1) = 2^(B-2) = 2048 at B = 13). In this word, bit B-1
is the sign and bit B-2 is worth π/4.

**Front complementor.** Take the position u within the half period. In
quadrants 1 and 3, bit B-1 is clear and u already lies in [0, π/2). In
quadrants 2 and 4, the angle a = u is in [π/2, π), and sin a = sin(π − a). The
complementor inverts all B bits, giving 2^B − 1 − u. That is π − a minus one
LSB, with the sign bit cleared. Two's complement negation would be exact, but
at the quadrant boundary it gives +π/2, which a B-bit word cannot hold.
Inversion costs an angle error of one LSB (π/8192 at the defaults).

**End complementor.** The rotator therefore always returns sin of an angle in
[0, π/2). When bit B is set the sample belongs to the second half period. It is
negated in two's complement, since sin(π + a) = −sin(a). The rotator takes n
clocks, so bit B travels through an n-stage `delay_line` to meet its own
sample.

## The rotator

Stage i computes, with sigma = +1 when the residual angle z ≥ 0:

```
x' = x − sigma·(y >>> i)      y' = y + sigma·(x >>> i)      z' = z − sigma·arctan(2^-i)
```

Details:

- **Shifts.** The shifts are fixed wiring: arithmetic shifts that drop the low
  bits. Each stage is three adders and a register bank.
- **x/y words.** The x/y words are N = 1+L+M bits wide:
  - the L-bit input word (sign and L-1 fraction bits);
  - M guard bits below it, against the truncation error of the shifts;
  - one extra top bit, so intermediate values cannot overflow.
- **Start value.** 1/K is quantised to the L-bit input word.
- **Angle path.** The angle path narrows as the residual angle shrinks. z
  entering stage i has B bits for i = 0 and B − i + 1 bits for i ≥ 1. The
  final residual is only B − n + 1 = 4 bits at the defaults. The narrowed
  bits are only sign copies, which the tests confirm over the whole
  convergence region.
- **Outputs.** The rotator also produces cos and the final residual angle
  (`cos_o`, `z_res_o`). The synthesizer uses only the sine.

## Accuracy

The error of the pre-scaled CORDIC has two parts:

- an approximation error from stopping after n iterations and from rounding the
  elementary angles;
- a truncation error from the finite words.

A known bound for it is

    e ≤ 2K·arctan(2^(1−n)) + 2^(1−L−M)·(1 + Σ_{i=M+1}^{L−1} Σ_{j=i}^{L−1} sqrt(1 + 2^−2j))

The word-length sets below are the optimised ones for each accuracy.
`ddfs_word_lengths_tb` sweeps each set over every one of its 2^(B+1) phases.
The errors are measured against sin(2π·phase/2^J) with J = 16:

| accuracy a | L | M | n | B | N | worst error | mean error | 2^(1−a) |
|---|---|---|---|---|---|---|---|---|
| 4 | 5 | 3 | 5 | 8 | 9 | 0.0769 | 0.0274 | 0.125 |
| 5 | 6 | 3 | 6 | 9 | 10 | 0.0402 | 0.0181 | 0.0625 |
| 6 | 7 | 3 | 7 | 10 | 11 | 0.0195 | 0.0060 | 0.0313 |
| 7 | 8 | 4 | 8 | 11 | 13 | 0.0094 | 0.0036 | 0.0156 |
| 8 | 9 | 4 | 9 | 12 | 14 | 0.0058 | 0.0024 | 0.0078 |
| **9 (default)** | 10 | 4 | 10 | 13 | 15 | 0.0026 | 0.00069 | 0.0039 |
| 10 | 11 | 4 | 11 | 14 | 16 | 0.0014 | 0.00039 | 0.0020 |
| 11 | 12 | 4 | 12 | 15 | 17 | 0.00071 | 0.00025 | 0.00098 |

For the default set, an FPGA build of this architecture was reported with a
worst error of 0.0044 and a mean error of 0.0020. The end-to-end testbench uses
those two numbers as its limits.

## Design choices

The following follow the source architecture:

- the block structure and the quadrant control bits;
- pre-scaling by 1/K;
- one pipeline stage per iteration, with fixed-wired shifts;
- the narrowing angle adders;
- all default word lengths.

The following are this implementation's own choices, made where the
architecture leaves the detail open:

- Reading the rotator's phase word as a binary angle (LSB = π/2^B).
- Bitwise inversion in the front complementor. Two's complement negation in
  the end complementor.
- Truncating shifts. Elementary angles rounded to the nearest LSB. 1/K
  rounded to L bits.
- The synchronous reset, the `ftw_we` strobe, and the output register.
- The `valid_o` and `period_o` flags, and the delay line that aligns the
  half-period bit with its sample.
- The pipeline registers inside the rotator have no reset. They are flushed by
  new data within n clocks, and `valid_o` covers that time.
- Only the sine leaves the top level.
- The output word is N = 1+L+M = 15 bits. One FPGA area table lists the output
  adder as 10 bits wide. The 15-bit width matches both the word-length formula
  and the stated output width.

Not reproduced: the FPGA area figures (CLB counts) and the clock rate. They
belong to a specific device and place-and-route run.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ddfs_pkg.sv tb/cordic_ddfs_tb.sv \
          --top-module cordic_ddfs_tb -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `cordic_ddfs_tb` | Top level at the default sizes, against a reference accumulator and floating-point sine. Covers one full period at FTW = 1 and at FTW = 2 (the period count must double), 40 on-the-fly FTW changes, and a restart by reset with an exact latency check. It counts wraps, front- and end-complement use, FTW switches and restarts, and each must occur. |
| `ddfs_word_lengths_tb` | All eight word-length sets above, side by side, with full phase sweeps and the error bounds. |
| `cordic_rotator_tb` | Every angle in [-π/2, π/2) against cos/sin and the error bound, plus the latency of n clocks and the size of the residual angle. |
| `cordic_stage_tb` | Random vectors through iteration 0 and iteration 5 (narrowing 9→8 bits), against an integer model. |
| `phase_accumulator_tb` | Random FTW writes, modulo wrap, the write-to-use delay and reset. |
| `phase_complementor_tb` | Exhaustive over all 2^(B+1) phases. |
| `output_complementor_tb` | Exhaustive over [−1, +1]. |

All of them take well under a second. To build another accuracy, override `B`,
`L`, `M` and `NSTAGES` on `cordic_ddfs`. `N` follows from them. Keep
`J ≥ B+1`, and make `NSTAGES` at most B−1, so the last residual angle keeps at
least two bits.
