# Multiplierless, clock-gated FIR filter for seismic pre-processing

A seismic alert station has to low-pass filter its sensor stream
continuously, in real time, on a small power budget. This design is a
direct-form FIR filter,

    y[n] = sum_{k=0}^{N_TAPS-1} h[k] * x[n-k]

with no multipliers. Every coefficient is recoded into canonical signed
digits (CSD) and cut into groups of three digits. Each group is one of just
three shared multiples of the sample, x, 3x or 5x, shifted and possibly
negated. The multiples are computed once per sample, so a tap is a few
selectors and adders. The coefficients sit in registers and can be reloaded
while the filter runs. The adder tree is pipelined, and the output is rounded
to the HUB (half-unit biased) format, which rounds to nearest by plain
truncation. Latch-based clock gates stop the clock of every register bank
that has no work in a given cycle.

At the default size the filter has 16 taps, 16-bit Q1.15 samples and
coefficients, and a 16-bit HUB output. It accepts one sample per clock, and
each result comes out 5 clock edges after its sample.

## Datapath

```
 x_in ─► precomputer ─{x,3x,5x}─► delay_line ─taps[k]─┐
                                  (gated by in_valid)  │
 coef_we/addr/data ─► coef_bank ─codes[k]──────────────┴─► tap_mult[k] ─p[k]─► post_accum ─► y_hub / y_out
                      (CSD recode + grouping,              (select, shift,     (product regs, registered
                       gated by coef_we)                    negate, add)        adder tree, HUB rounding;
                                                                                gated while idle)
```

| module | file | role |
|---|---|---|
| `fir_top` | `rtl/fir_top.sv` | top level, wires everything, three clock gates |
| `fir_pkg` | `rtl/fir_pkg.sv` | CSD digit, multiple-select and group-code types; `group_code()` |
| `precomputer` | `rtl/precomputer.sv` | x, 3x = 4x−x, 5x = 4x+x |
| `delay_line` | `rtl/delay_line.sv` | shift register of the precomputed multiples |
| `csd_encoder` | `rtl/csd_encoder.sv` | two's complement to CSD (non-adjacent form) |
| `coef_bank` | `rtl/coef_bank.sv` | loadable coefficients, stored as group codes |
| `tap_mult` | `rtl/tap_mult.sv` | shift-and-add product of one tap |
| `post_accum` | `rtl/post_accum.sv` | product registers, registered binary adder tree, HUB rounding |
| `clock_gate` | `rtl/clock_gate.sv` | latch plus AND clock gate |

## How a coefficient becomes shifts and adds

This part needs the most explanation.

**CSD recoding.** A coefficient arrives as a two's complement number. The
`csd_encoder` rewrites it in the non-adjacent form: digits −1, 0 or +1, with
no two neighbouring digits both non-zero. This form has the fewest non-zero
digits of any signed-digit form, so it needs the fewest adders. A carry runs
up from bit 0. Wherever the running sum `a[i] + carry` is odd, the digit is
non-zero. It is −1 with a carry out when the next bit is one, which turns a
run of ones `0111` into `100-1`, and +1 otherwise. The bit above the top is
the sign bit repeated, so a C_W-bit coefficient needs only C_W digits.

**Grouping.** The digits are padded with zeros to a multiple of three (16
become 18, giving six groups). Because no two neighbouring digits are both
non-zero, a three-digit group can only take the values

| group digits (MSB..LSB) | value | realised as |
|---|---|---|
| `000` | 0 | nothing |
| `001`, `010`, `100` | 1, 2, 4 | x shifted 0, 1, 2 |
| `10-1` | 3 | 3x |
| `101` | 5 | 5x |
| negated versions | −1 … −5 | same, subtracted |

So the horizontal subexpressions `10-1` and `101` are the only two a filter
ever needs, whatever its coefficients. `fir_pkg::group_code()` turns the
three digits into a 5-bit `grp_code_t` `{neg, sel, shift}`. `coef_bank` does
the recoding and grouping when a coefficient is written and stores only the
codes: 16 taps × 6 groups × 5 bits.

**Sharing.** `precomputer` forms x, 3x and 5x once per input sample (one
adder and one subtractor), and the delay line carries all three along with
the sample. Every tap the sample passes reuses them, so they are never
rebuilt per tap. This costs three words of register per delay stage instead
of one, in exchange for two adders per tap removed. Because the multiples
are fixed rather than derived from a particular coefficient set, the
coefficients can be changed at run time.

**Tap product.** `tap_mult` adds, over the six groups, the selected multiple
shifted left by `shift + 3*g` and negated when `neg` is set. The sum is taken
modulo 2^(X_W+C_W). The exact product of two 16-bit numbers always fits in
32 bits, so the result is exact even though partial sums may wrap.

## Post accumulation and retiming

`post_accum` registers the N_TAPS products. This first register row is a
cut-set between the tap logic and the accumulation. The products are then
added pairwise in a balanced tree of ceil(log2 N_TAPS) levels, with a
register after every level. Each register row cuts every path from input to
output exactly once, so the function is that of the unpipelined tree. Only
the latency grows, and the longest path is one tap computation or one adder.
A tap count that is not a power of two is padded with constant-zero leaves.
The sum keeps full precision, X_W + C_W + log2(N_TAPS) bits (36 at
defaults), so nothing overflows inside the tree.

A valid bit travels beside each tree row on the free-running clock. The
block's `busy` output enables the pipeline's gated clock. It is high while
a valid sample is entering or any valid bit is set.

## HUB output rounding

A HUB number stores Y_W bits and has an implicit extra least significant bit
that is always one. Its value is the stored value plus half a unit in the
last place. Rounding a wider value to the nearest HUB number is therefore
plain truncation. The last step of `post_accum` keeps sum bits `OUT_MSB .. OUT_MSB-Y_W+1`
(bits 30..15 at defaults, a Q1.15 result) and needs no rounding adder. The
error lies in (−½, +½] of the last stored place and is centred on zero.
Plain truncation would err by [0, 1) and be biased.

- `y_hub` carries the Y_W stored bits.
- `y_out` carries the same value as an ordinary Y_W+1-bit two's complement
  number, with the implicit one written out as its LSB. That LSB is
  therefore constant by design.

## Clock gating

`clock_gate` is a latch followed by an AND gate. The latch is transparent
while `clk` is low and holds the enable through the high phase. An enable
that changes while the clock is high therefore cannot shorten or create a
pulse. `fir_top` has three gates:

| gated clock | enable | registers |
|---|---|---|
| `gclk_dl` | `in_valid` | delay line (all multiples of all taps) |
| `gclk_cf` | `coef_we` | coefficient codes |
| `gclk_pa` | `post_accum.busy` | product and adder-tree registers |

Only the few valid bits, one flag and the three latches see the free clock.
Every enable must be settled before the rising edge, as for any latch-based
gate. In the design the enables are either top-level inputs or outputs of
free-clock flops.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low reset; clears delay line, coefficients, pipeline |
| `in_valid` | in | 1 | `x_in` holds a sample this cycle |
| `x_in` | in | X_W | signed sample |
| `coef_we` | in | 1 | write `coef_data` to tap `coef_addr` at this edge |
| `coef_addr` | in | log2 N_TAPS | tap index k of h[k] |
| `coef_data` | in | C_W | signed coefficient |
| `y_valid` | out | 1 | a result is on `y_hub`/`y_out` |
| `y_hub` | out | Y_W | result, HUB stored bits |
| `y_out` | out | Y_W+1 | result with the implicit half-unit LSB written out |

- The stream has no back-pressure: one sample per cycle at most, and gaps
  are free.
- The sample taken at edge e produces `y_valid` after edge
  e + LATENCY, where LATENCY = ceil(log2 N_TAPS) + 1 (5 at 16 taps). The
  stages are one delay-line stage, one product row and one row per tree
  level. An assertion in `fir_top` checks this.
- A coefficient write lands at the edge it is set up for, and every sample
  accepted at that edge or later is filtered with the new value. Results
  already in the tree are not affected. Writes may happen while samples
  stream in. Samples accepted part-way through rewriting a whole set are
  filtered with a mix of old and new coefficients. To avoid that, pause
  the stream while reloading. The delay line never needs flushing.
- At defaults, data and coefficients are Q1.15 and `y_hub` is Q1.15. The
  sum wraps if sum |h[k]| ≥ 1; there is no saturation.

Parameters of `fir_top` are `N_TAPS` (16), `X_W` (16), `C_W` (16), `Y_W`
(16) and `OUT_MSB` (X_W+C_W−2, the accumulator bit that becomes the output
MSB).

## Simulating

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops on its own. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/fir_pkg.sv rtl/*.sv tb/*.sv \
          --top-module tb_fir_top -o sim && ./obj_dir/sim
```

Replace `tb_fir_top` with any other testbench name.

- `tb_fir_top` runs the whole filter at its default parameters. The input
  is a 3000-sample synthetic seismic trace: background noise, a slow swell,
  a P-wave-like burst and a stronger, slower S-wave-like burst. The filter is
  first loaded with a 16-tap Hamming-windowed-sinc low-pass. Halfway
  through, with the stream paused, it is reloaded with a band-pass set, and
  the stream resumes without flushing. Near the end a third set is written
  one tap per cycle while samples keep streaming, and the model follows
  each write from the edge it lands on.
  - Samples arrive in runs with random gaps.
  - Every output is compared with an exact integer model, its latency is
    checked, and its HUB rounding error is checked against half an output
    place.
  - It counts and requires: cycles with each of the three clocks gated off,
    coefficient writes, back-to-back samples, gaps, and outputs whose
    rounding dropped a non-zero remainder.
- `tb_fir_noise` measures noise removal at the default size with the
  low-pass set. It checks a pass-band gain of 0.8 to 1.1 at 0.01 fs (about
  0.90 measured). It checks at least 30 dB of attenuation at 0.35 fs (about
  50 dB measured). It checks at least 3 dB of SNR gain for a decaying
  seismic wavelet in white noise (about 5 dB in, 13 dB out).
- `tb_csd_encoder` checks all 65536 16-bit inputs, plus a 5-bit instance.
- `tb_post_accum` (with the helper `post_accum_check`) checks a 16-tap
  tree with an output as wide as the full sum, so the sum is checked
  exactly, and a 5-tap tree rounded to 10 bits. Each tree is clocked
  through a clock gate driven by its own `busy`.
- `tb_clock_gate`, `tb_precomputer`, `tb_delay_line`, `tb_coef_bank` and
  `tb_tap_mult` check their blocks against independent reference
  arithmetic.

Testbenches drive `rst_n` high and then low at time 1. In a two-state
simulator a reset that starts low gives no falling edge, so asynchronous
resets on gated clocks would never fire.

## What is specified and what is chosen here

The following come from the filter's description: the direct-form structure
with a delay line; CSD coefficients; common subexpressions found in 3-bit
groups and shared; shift-and-add tap computation; reloadable coefficients;
accumulation with cut-set retiming of the adder tree; HUB rounding of the
result; and latch-plus-AND clock gating.

The description gives no sizes, formats, interfaces or register placement.
Everything below is this design's own choice:

- 16 taps; 16-bit Q1.15 data, coefficients and output.
- Valid-only streaming interface and one-per-cycle coefficient write port.
- Coefficients recoded to CSD in hardware when written, rather than offline.
- Shared multiples carried down the delay line.
- A register after the products and after every tree level.
- No saturation.
- Asynchronous active-low reset.
- The three clock-gate enables listed above.

Departures and omissions:

- **Second grouping pass.** The described common-subexpression search goes
  on from 3-bit to 6-bit groups. That search applies to a fixed coefficient
  set, worked out offline. With reloadable coefficients the shared terms
  must not depend on the coefficients, so only the 3-digit grouping is
  built. A fixed-coefficient filter could share more.
- **Sharing across coefficients.** Vertical sharing between coefficients
  that have the same digit pattern at the same position is not built
  either, for the same reason. Sharing here is of each sample's multiples
  across all the taps it passes through.
- **Coefficient design and data conversion.** The filter's coefficients
  and its input data were produced offline (filter design and binary
  conversion in a numerical tool). That is software, not part of this RTL.
  The testbenches compute their own windowed-sinc coefficients and
  synthetic seismic input.
- **Partial coefficient updates.** The filter does not hold off samples
  while a set is only partly rewritten (see Interface and timing).
- **Reported figures.** The power and delay figures reported for an Artix-7
  FPGA implementation, 0.365 W against 11.172 W for a conventional filter,
  come from vendor tools. They are not reproduced here, and the sizes they
  were measured at are not known.
