# Reconfigurable distributed-arithmetic FIR filter

An N-tap FIR filter, y[k] = Σ c[n]·x[k−n], that uses no multipliers and whose
coefficients can be rewritten while it runs. It uses distributed arithmetic
(DA). The samples are processed one bit position at a time. In each clock,
the bits of all taps at one position form an address. That address selects a
precomputed sum of coefficients from a small RAM table. A shift-and-add
accumulator then combines the table outputs with their binary weights. When
the coefficients change, the tables are recomputed in place. There is no ROM
to regenerate.

Default configuration (module `da_top`):

| quantity | value | origin |
|---|---|---|
| sample width B (`DAT_IN`) | 16 bits, two's complement | reference interface |
| result width (`RESULT`) | 35 bits, exact | reference interface |
| truncated result (`RESULT_trun`) | 19 bits = `RESULT[34:16]` | width from the reference interface, bit choice ours |
| clocks per sample | 16 (`CLK1_16` = `CLK`/16) | reference interface |
| taps N | 8 | our choice |
| coefficient width | 16 bits, two's complement | our choice |
| taps per table M | 4, so two 16-word tables | our choice |
| bit slices per clock L (`DA_UNITS`) | 1 | follows from `CLK1_16` |

With 8 taps, 16 + 16 + log2 8 = 35. So the 35-bit result holds every possible
inner product exactly, including (−32768)·(−32768) on all taps.

## The arithmetic

Write each sample in two's complement as
x = −x_{B−1}·2^{B−1} + Σ_{b<B−1} x_b·2^b. Then

    y = Σ_b w_b · 2^b · T(x_b[0], x_b[1], …, x_b[N−1]),
    T(a) = Σ_{n: a_n = 1} c[n],       w_{B−1} = −1, other w_b = +1

T is the DA table. For three taps its 8 words are 0, c0, c1, c0+c1, c2, c0+c2,
c1+c2 and c0+c1+c2. A table over all N taps would need 2^N words. Instead the
taps are split into P = N/M groups of M consecutive taps. Each group has its
own 2^M-word table (tap p·M+i drives address bit i of table p). The P table
outputs of one bit position are added. At the defaults this needs 2 × 16
words instead of 256.

The bits are consumed most significant first. The accumulator computes

    acc ← partial                  (first step, bit B−1: the sign bit)
    acc ← (acc << L) + partial     (following steps)

After B/L steps, acc = y. Because the sign slice comes first, the only
special case is that its table sum is *subtracted*. This happens in
`da_partial_adder` when `msb_group` is set. With L > 1, each clock handles L
adjacent bit positions j = 0…L−1 (j = L−1 is the most significant). Their
table sums are added with weights 2^j before accumulation.

### Sharing the tables between bit slices

With L > 1, L bit positions ("DA units") read the same table in the same
clock. Nothing is copied per bit slice. Each table (`da_lut`) has one write
port and L asynchronous read ports over a single set of stored words. With
the default L = 1, one port serves all 16 bit positions, one after another.
Raising `DA_UNITS` trades read ports for fewer clocks per sample: B/L clocks.
`DA_UNITS` must divide B.

## Data path and blocks

```
 DAT_IN ─► da_input_shifter ──slice──► da_lut × P ──► da_partial_adder ──► da_scaling_accumulator ─► RESULT
           (delay line + 2D shifter)     ▲  (L read ports)                    (adder, register, shifter)  RESULT_trun
                                         │ rewrite
 COEF_* ─► da_coef_buffer ─changed─► da_lut_refresh
 CLK1_16 ─► da_control ─ start / step / first / last ─► shifter, accumulator;  RDEN, SAMPLE_DROPPED
```

| file | role |
|---|---|
| `rtl/da_pkg.sv` | default sizes and the width functions |
| `rtl/da_input_shifter.sv` | Delay line of N samples. On each new sample a copy is loaded into a shifter that moves L bits per clock toward the MSB, so the top L bits of every tap form the table address. |
| `rtl/da_coef_buffer.sv` | The N coefficient registers. One write per clock. Every write pulses `changed`. |
| `rtl/da_lut_refresh.sv` | Recomputes all table words after a coefficient change, one address per clock, writing all P tables in parallel. |
| `rtl/da_lut.sv` | One 2^M-word table in registers, with one write port and L asynchronous read ports. |
| `rtl/da_partial_adder.sv` | Adds the P×L table outputs of one clock, with weights 2^j and the sign-slice subtraction. |
| `rtl/da_scaling_accumulator.sv` | The shift-add register and the output register. |
| `rtl/da_control.sv` | Finds the rising edge of the sample clock, counts the bit steps and produces RDEN. |
| `rtl/da_top.sv` | Wires the blocks together. |

## Timing

Every register is clocked by `CLK`. `CLK1_16` is not used as a clock. It is
sampled, and its rising edge (high now, low in the previous clock) starts a
sample. It must therefore come from the same source as `CLK`, for example a
divide-by-16 of it.

* Edge t (first clock with `CLK1_16` high): `DAT_IN` enters tap 0 and the
  shifter is loaded.
* Edges t+1 … t+B/L: one bit step each. The table read is combinational, so
  one step takes one clock.
* After edge t+B/L: `RESULT` holds y and `RDEN` is high for exactly one clock.
  `RESULT` keeps its value until the next result.

The next sample may start on edge t+B/L, which is the full rate of one sample
every 16 clocks. A sample clock faster than that abandons the sample in
progress. An assertion in `da_control` reports it.

## Changing coefficients at run time

Write a coefficient with `COEF_WE`=1, `COEF_ADDR`=n and `COEF_IN`=c[n] for
one clock. c[0] weights the newest sample. The write starts a table rewrite.
Over the next 2^M clocks (`LUT_BUSY` high), `da_lut_refresh` writes address
a = 0…2^M−1 of every table with the sum of that group's coefficients selected
by the bits of a. If another coefficient is written during a rewrite, the
rewrite restarts from address 0. Loading all N coefficients back to back
therefore takes N + 2^M clocks, and the tables end up matching the last
write.

A sample whose bit steps coincide with a table write would mix the old and
new coefficient sets. That sample still completes, but `RDEN` stays low and
`SAMPLE_DROPPED` pulses in its place. The rule is deliberately conservative:
the sample is dropped if `LUT_BUSY` was high at any of its B/L step edges.
Samples taken entirely after the rewrite use the new coefficients. Samples
taken entirely before it use the old ones. The delay line is never cleared,
so a filter with new coefficients works on the same input history.

After reset every coefficient, table word and tap is zero, so the filter
outputs 0 until coefficients are loaded.

## Parameters of `da_top`

`DATA_W` (16), `COEF_W` (16), `N_TAPS` (8), `M` (4), `DA_UNITS` (1) and
`TRUNC_W` (19). The following are derived:

* result width = DATA_W + COEF_W + ⌈log2 N_TAPS⌉
* table word width = COEF_W + ⌈log2 M⌉
* P = N_TAPS/M tables
* DATA_W/DA_UNITS clocks per sample

`N_TAPS` must be a multiple of `M`, and `DATA_W` a multiple of `DA_UNITS`.
Setting `M = N_TAPS` gives a single-table filter. Because a sample starts on
a rising edge of the sampled `CLK1_16`, samples can arrive at most every
second clock. `DA_UNITS = DATA_W/2` already reaches that rate.

## Where this departs from, or adds to, the reference design

The reference fixes the block structure: input buffer, coefficient buffer,
LUT, adder, register and shifter. It also fixes the bit-serial address
generation and the content of the DA table. It gives the top-level pins
`DAT_IN[15:0]`, `CLK`, `CLK1_16`, `RST`, `RESULT[34:0]`, `RESULT_trun[18:0]`
and `RDEN`. The idea of run-time rewritable RAM tables, shared across bit
slices and split into smaller tables, is also from the reference. The
following points are this design's own:

* Tap count (8), coefficient width (16) and table size (M = 4). The reference
  does not state them. These values make the 35-bit result exact.
* The coefficient write port (`COEF_WE`, `COEF_ADDR`, `COEF_IN`) and the
  status outputs `LUT_BUSY` and `SAMPLE_DROPPED`. The reference symbol shows
  no coefficient pins, even though its block diagram has a coefficient input
  h[n].
* The meaning of `RESULT_trun` (the top 19 bits) and of `RDEN` (a one-clock
  result-valid strobe). Only the names and widths are given.
* Two's complement samples with the sign slice subtracted. The reference's
  derivation treats the sample bits as unsigned.
* MSB-first processing with a left-shifting accumulator, the sequential
  table rewrite, and the drop rule for samples that overlap a rewrite.
* A synchronous, active-high `RST`.
* The reference reports a sample rate of up to 91 MHz on an FPGA. That figure
  is not reproduced here: it depends on the device and on timing closure. At
  L = 1 it would need a 1456 MHz `CLK`. At L = 8 (two clocks per sample, the
  fastest the sample-clock edge detection allows) it would need 182 MHz.

## Verification

Each block has a self-checking testbench in `tb/` that compares the block
with values computed independently in the testbench. The two end-to-end
tests share `tb/da_top_check.svh`:

* `tb_da_top`: the default configuration, 3000 samples.
* `tb_da_top_parallel`: 12 taps in four 3-tap tables and 4 bit slices per
  clock, 3000 samples.

The stimulus uses random samples, including the most negative and most
positive values. The sample clock runs mostly at full rate, with some longer
periods. Coefficient sets, including −32768, are rewritten at random moments,
some of them mid-sample. Each sample's outcome is checked exactly B/L + 1
clocks after it was taken:

* either `RDEN` with `RESULT` equal to the exact 64-bit inner product,
* or `SAMPLE_DROPPED` when a rewrite overlapped it.

The tests also check that `RESULT_trun` is the top of `RESULT`. They fail if
any of these never happens: back-to-back samples, reconfiguration, a result
after reconfiguration, a dropped sample, a negative result, or the most
negative input.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/da_pkg.sv tb/tb_da_top.sv --top-module tb_da_top
./obj_dir/Vtb_da_top
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`.
