# Nested 1-3 digital delta-sigma modulator

A fractional-N frequency synthesizer gets a non-integer average division ratio
`N_int + X/2^N` by switching its divider between neighbouring integer ratios
every reference cycle. A digital delta-sigma modulator (DDSM) produces the
sequence of integer offsets: its long-run mean is exactly `X/2^N`, and its
quantization error is pushed to high frequencies, where the PLL loop filter
removes it.

The usual choice is a third-order MASH 1-1-1: three N-bit accumulators in
cascade plus a small noise cancellation network. Its cost grows as about 3N
flip-flops and 3N full adders. This RTL implements a cheaper structure, the
**nested 1-3 DDSM**. The input word is split. Its low bits go to a small
first-order modulator. That modulator's one-bit output is added to the high
bits through the carry input of the third-order MASH. Only the high bits then
pass through the three-accumulator cascade. With the default 14/6 split, the
design has the same output cycle length and a comparable noise spectrum as a
19-bit MASH 1-1-1. It needs 52 flip-flops instead of 61.

## Structure

```
              x[19:0]
          ┌──────┴───────┐
   x[5:0] │              │ x[19:6]
          ▼              ▼
   ┌─────────────┐   ┌──────────────────────────────────────────────┐
   │ efm1  N=6   │   │ mash111  N=14                                │
   │ (DDSM1)     │cin│ efm1 ──e1──► efm1 ──e2──► efm1               │
   │ carry out ──┼──►│  │c1          │c2          │c3               │
   └─────────────┘   │  └────────────┴──► mash_ncn ◄┘──► y[3:0]     │
                     └──────────────────────────────────────────────┘
```

| file | role |
|---|---|
| `rtl/ddsm_pkg.sv` | output type (`ddsm_out_t`, 4-bit signed), default wordlengths, the wordlength rule as functions |
| `rtl/efm1.sv` | first-order error-feedback modulator: an N-bit accumulator with carry in; carry out is the output bit |
| `rtl/mash_ncn.sv` | noise cancellation network, `y1 + (1-z^-1) y2 + (1-z^-1)^2 y3` |
| `rtl/mash111.sv` | three `efm1` in cascade plus `mash_ncn`, with a carry input on the first stage |
| `rtl/nested13_ddsm.sv` | top: splits the input word and connects the first-order modulator to the MASH carry input |

### The accumulator (`efm1`)

Each clock, `v = x + acc + cin` is formed in an (N+1)-bit adder. The carry
`v[N]` is the output bit, and `v[N-1:0]` is the new residue. The residue is
registered for the next cycle. It is also passed out on port `e`, combinationally,
to feed the next stage. With a constant input, the accumulator emits on
average `x + cin` ones every 2^N clocks. Its error
is first-order shaped: `Y = X/2^N - (1 - z^-1) E/2^N`, where E is the residue.

### The MASH 1-1-1 and its carry input (`mash111`, `mash_ncn`)

Stage 2 accumulates the residue of stage 1, and stage 3 accumulates the
residue of stage 2. The network combines the three carry bits so that the
residues of stages 1 and 2 cancel. Only the third stage's error remains, and
it is shaped by `(1 - z^-1)^3`. The output takes values -3..4 and is carried
as a 4-bit two's complement number. The network is written as two nested
first differences:

```
t[n] = y2[n] + y3[n] - y3[n-1]        range -1..2, 3 bits
y[n] = y1[n] + t[n]  - t[n-1]         range -3..4, 4 bits
```

This needs 1 + 3 = 4 flip-flops, the count assumed in the cost figures below.

The first stage's carry input is what makes nesting free. Adding the
first-order modulator's bit to `X_MSB` would otherwise need an N_MSB-bit
incrementer in front of the cascade. Instead, the bit enters the first
accumulator's existing adder as its carry. With `cin` tied to 0, `mash111`
is an ordinary MASH 1-1-1.

## Why the split works, and how to choose it

With `X = X_MSB * 2^N_LSB + X_LSB`, the output of the nested modulator is

```
Y = X/2^N  +  (1-z^-1) eQ / 2^N  +  (1-z^-1)^3 E3 / 2^N_MSB
```

The first term is the wanted mean. The last term is the usual third-order noise
of an N_MSB-bit MASH. The middle term is new. It is the first-order-shaped
error of the low-bit modulator, attenuated by 2^N_MSB because the MASH divides
its input by 2^N_MSB.

First-order shaping falls off much more slowly towards low frequency than
third-order shaping. The middle term is therefore harmless only if it stays
below the third-order noise everywhere. Both spectra are discrete. The
low-bit modulator's error repeats every 2^N_LSB clocks, so its lowest tone is
at `f_s / 2^N_LSB`. The whole output repeats every 2^N clocks. Near DC,
`|1-z^-1|^2 ≈ (2πf/f_s)^2`. If the first-order tone at `f_s / 2^N_LSB` lies
below the third-order envelope, then all higher first-order tones do too,
because the third-order envelope rises faster. Writing out that single
condition with white-noise estimates of both spectra gives

```
2^(4 N_LSB - N_MSB) <= 16 π^4      i.e.   4 N_LSB - N_MSB <= 10.6
```

With `N = N_MSB + N_LSB` and `M = N_MSB`, this becomes `M >= 0.8 N - 2.12`.
The design procedure is:

1. To match a conventional N0-bit MASH 1-1-1, take `N = N0 + 1` input bits.
   With odd inputs, both designs then have a 2^N-clock output cycle. For
   N0 = 19, this is 2^20 clocks; both testbenches measure it.
2. `N_MSB = ceil(0.8 N - 2.12)`. This is `ddsm_pkg::nested_msb_bits(N)`, which
   returns 14 for N = 20.
3. `N_LSB = N - N_MSB`.

`nested13_ddsm` refuses to elaborate when `ddsm_pkg::masking_ok(N_MSB, N_LSB)`
is false. For example, 13/7 gives 4·7 - 13 = 15 > 10.6.

## Cost

| | full adders | flip-flops |
|---|---|---|
| conventional MASH 1-1-1, N0 bits | 3 N0 + 12 | 3 N0 + 4 |
| nested 1-3 | N_LSB + 3 N_MSB + 12 | N_LSB + 3 N_MSB + 4 |
| N0 = 19 vs. 14/6 | 69 vs. 60 | 61 vs. 52 |

Synthesized at its defaults, `nested13_ddsm` has 52 flip-flop bits:
6 + 3·14 in the accumulators and 4 in the network. `mash111` at N = 19 has 61.
The 12 network full adders are an implementation count. Here the network is
written as behavioural sums, and their final shape is left to synthesis.

## Interface and timing (`nested13_ddsm`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | modulator clock: one output per divider/reference cycle |
| `rst_n` | in | 1 | asynchronous, active low; clears every register |
| `x` | in | N_MSB+N_LSB | fractional word; the mean of y is x / 2^N |
| `y` | out | 4, signed | offset -3..4 to add to the integer division ratio |

| parameter | default | meaning |
|---|---|---|
| `N_MSB` | 14 | bits through the third-order MASH |
| `N_LSB` | 6 | bits through the first-order modulator |

There are no pipeline registers. `y[n]` is a combinational function of `x[n]`
and the state, through four adders in series: DDSM1, then stages 1-3. The
state advances on each rising edge of `clk`. A divider that samples `y` on its
own clock edge can use it directly. For higher clock rates, add a register on
`y`. Pipelining the stages would need matching delays in the network, and it
is not done here.

## Choices not fixed by the architecture

- Reset: asynchronous, active low, to the all-zero state. The output cycle
  lengths quoted above are measured from that state.
- Each stage receives the current residue, not the registered one, so the
  stages are not pipelined.
- Output encoding: 4-bit two's complement.
- The carry input on `mash111` and port `e` on `efm1` are additions that the
  nesting requires. The first-order modulator's own residue output is unused.
- The frequency divider, phase detector, charge pump, loop filter and VCO of
  the surrounding PLL are not included. `y` is the port to the divider.

## Verification

Every testbench checks the RTL against `tb/ddsm_ref_pkg.sv`. That reference
model is a class that evaluates the accumulator and network difference
equations with integer arithmetic, independently of the RTL.

| testbench | what it runs |
|---|---|
| `tb_efm1` | random x/cin against the accumulator equation; one full 2^N cycle: x ones, residue back to 0 |
| `tb_mash_ncn` | random stage bits against the network equation; all eight output levels |
| `tb_mash111` | random x/cin at N = 19, then the conventional 19-bit MASH 1-1-1 with x = 157287 (0.3·2^19) for 2·2^20 clocks: the sum over a cycle is exactly 2·157287, the period is 2^20 and not 2^19, and the range is -3..4 |
| `tb_nested13_ddsm` | reduced 8/3 split. Covers random input, an asynchronous reset mid-run and full cycles for three inputs: odd, LSB-only and MSB-only. Counts the nested carry, the overflow of each stage, every output level and the reset, and fails if any never happened |
| `tb_ddsm_spectrum` | nested design (x = 314573) and the 19-bit MASH 1-1-1 (x = 157287) side by side, one 2^20 cycle each; DFT power summed in three bands up to f_s/64 (the nested design's lowest first-order tone) must be within 2x of the ideal third-order envelope and within 2x of each other |
| `tb_nested13_full` | defaults (14/6) with x = 314573 (0.3·2^20) for 2·2^20 clocks. The sum over a cycle is exactly 314573, the period is 2^20, the nested-carry rate is 13/64, and the wordlength functions are checked |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
To run one with Verilator (each takes a few seconds):

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_nested13_full rtl/ddsm_pkg.sv tb/ddsm_ref_pkg.sv tb/tb_nested13_full.sv
./obj_dir/Vtb_nested13_full
```

Measured band powers relative to the envelope `|2 sin(πk/L)|^6 / (12 L)`:

| band (f/f_s) | nested 14/6 | conventional 19-bit |
|---|---|---|
| 0.00098-0.00104 | 0.89 | 0.63 |
| 0.00391-0.00397 | 0.91 | 1.01 |
| 0.0156-0.0157 (around f_s/64) | 1.03 | 0.95 |

In aggregate, the nested design's first-order error stays below the
third-order noise. A single bin can still stand out. At exactly f_s/64, the
nested design's bin is about 6 times the envelope value there, but the
neighbouring bins lie below it. The bands above were chosen to measure the
aggregate, not individual tones.
