# Multiprecision reconfigurable FIR filter with razor error detection and frequency scaling

This design packs three ideas around one 16-bit multiply datapath:

* **Multiprecision, parallel multiplication.** A 16x16 multiplier made of four
  8x8 array multipliers computes either one 16x16 product, two independent 8x8
  products or four independent 4x4 products per cycle. Narrow operands
  therefore cost fewer cycles instead of wasting a wide multiplier.
* **A partially reconfigurable, linear-phase FIR filter** built from these
  multipliers. Every multiplier serves two taps of a symmetric filter, and
  whole 4-tap modules can be switched out for a bypass module while the rest
  of the filter keeps running.
* **Error-tolerant, workload-driven clocking.** Razor registers catch data
  that arrives too late and repair it at the cost of one cycle. An operand
  scheduler sorts a mixed-precision stream into same-precision groups, so
  that the clock rate (and, in a real chip, the supply voltage) changes only
  between groups. A DFS unit runs the datapath at 5 MHz steps.

All arithmetic is unsigned. Everything is synthesizable SystemVerilog except
that the razor register and the clock divider use both clock edges or a
derived clock, as their function requires.

## Block map

```
mp_fir_top
├── clk_div            100 MHz reference -> 50 MHz sys_clk (toggle flip-flop)
├── reset synchroniser rst_n stretched onto sys_clk
├── filter path
│   ├── dfs_unit       filter clock enable, 5 MHz*(sel+1)
│   └── reconfig_fir   5 x fir_module + right_side_module
│       ├── fir_module     2 x rmac, bypass select
│       │   └── rmac           mp_mult + prod_to_acc + 2 x seg_adder
│       └── right_side_module  mp_mult, even/odd folding
└── operand path
    ├── razor_reg      34-bit razor register on {valid, flush, x, y}
    ├── ios            input operands scheduler
    │   ├── range_detector   4/8/16-bit class of a pair
    │   ├── pattern_engine   packs 1, 2 or 4 pairs into a 16-bit pattern
    │   └── ios_buffer       three per-precision queues in one RAM
    ├── freq_analyzer  DFS code from the buffer head, settle wait
    ├── dfs_unit       operand-path clock enable
    └── mp_mult        + operand and result registers
```

`mp_pkg` holds the shared types: the precision enum `prec_e` and the
`pattern_t` struct. `array_mult8`, `seg_adder` and `prod_to_acc` are helpers.

## Lanes: how one word carries one, two or four numbers

The precision mode (`con` at the top, `prec_e` inside) decides how every
16-bit operand word and every 32-bit product is split:

| `con` | mode | operand word | product word |
|-------|------|--------------|--------------|
| `10`  | 1 x 16-bit | `[15:0]` | `[31:0]` |
| `01`  | 2 x 8-bit  | lane k = `[8k+7:8k]` | lane k = `[16k+15:16k]` |
| `11`  | 4 x 4-bit  | lane k = `[4k+3:4k]` | lane k = `[8k+7:8k]` |
| `00`  | reserved, behaves as 16-bit | | |

Inside `mp_mult`, the 16-bit mode uses all four 8x8 units as partial products
(aL·bL, aH·bL, aL·bH, aH·bH). The 8-bit mode uses only the two diagonal units
and forces the cross units' operands to zero. The 4-bit mode feeds each unit
one zero-extended nibble pair.

The filter accumulates sums of up to 22 products, so its chains are wider
than a product. They are `4*SEG` = 52 bits, built as four 13-bit segments
(`prod_to_acc`). The segments join into one 52-bit lane (16-bit mode), two
26-bit lanes (8-bit mode) or four 13-bit lanes (4-bit mode). `seg_adder`
cuts the carry at the lane boundaries. Each lane has at least 5 guard bits
(22·15·15 < 2^13, 22·255² < 2^26, 22·65535² < 2^52), so no lane overflows at
the default size. In the 2- and 4-lane modes the filter therefore runs as two
or four independent filters. Lane k of the sample meets lane k of every
coefficient.

## The folded symmetric filter

Each `rmac` multiplies the broadcast sample by its coefficient. It adds the
product into two register chains: one running left, towards the output, and
one running right, towards `right_side_module`. The right side module turns
the right-going chain around into the left-going one and adds the middle
tap. Count time in filter steps, one per enabled clock edge. Let `x[0]` be
the sample just taken. With M active units holding `c0..c(M-1)` (left to
right) and middle coefficient `cR`, the output is `y = Σ h[j]·x[-j]`, where

```
odd  (evenodd = 0): h = c0 … c(M-1), cR,     c(M-1) … c0     (2M+1 taps)
even (evenodd = 1): h = c0 … c(M-1), cR, cR, c(M-1) … c0     (2M+2 taps)
```

Unit j of the left-going chain contributes `c_j` at delay j. Unit j of the
right-going chain contributes `c_j` again at delay 2M−j (odd setting), after
the sum has gone through the right side module. In the even setting the
right side module keeps the turned-around sum in one extra register and adds
the middle product before and after it, so `cR` appears twice.

Default size: `M_MOD = 5` modules of `N_ORD = 4` taps (2 units each), so
M = 10, giving 21 or 22 taps. Setting `mod_bypass[i]` replaces module i by
the bypass module. Both chains then pass through it without a register, and
the filter loses that module's 4 taps: its two coefficients drop out of both
halves of `h`. This models swapping a module by partial reconfiguration at
run time. Change `con`, `evenodd` or `mod_bypass` only when the filter is
then refilled, because the registers keep sums formed under the old setting.

**Coefficient loading.** Coefficients are loaded serially, one per `sys_clk`
edge with `coef_shift` high, independent of the filter enable. `coef_in`
enters unit 0 of module 0, and each shift moves every coefficient one unit to
the right, ending in the right side module. Send `cR` first and `c0` last:
11 shifts at the default size.

A 20-tap symmetric response, the size the published experiment uses, is the
22-tap even setting with `c0 = 0`. Modules of 4 taps cannot give exactly 20.

## Razor input stage: timing contract

`razor_reg` samples its input twice:

* the main flip-flops take `d` on the rising edge;
* a shadow register takes `d` on the falling edge, half a cycle later;
* on that falling edge, a comparator registers `error = (main != d)`.

While `error` is high, a mux feeds the shadow value into the main flip-flops,
so the next rising edge repairs the stored value. The error clears on the
falling edge after that.

In this RTL model the half cycle stands in for the delay margin of a real
razor latch. At the top, the operand inputs `x`, `y`, `xy_valid` and
`xy_flush` must follow these rules:

1. Normally they change while `sys_clk` is low, between a falling edge and
   the next rising edge.
2. A change while `sys_clk` is high is a *late arrival*: the rising edge took
   the old value. `er` goes high at the falling edge.
3. While `er` is high, the producer must keep its inputs unchanged over the
   next rising edge. That is the one-cycle stall of the whole pipeline.
   Inside, the scheduler discards the stale value, and the corrected value
   follows one cycle later. Nothing is lost or duplicated.

`er` is meant to be sampled on rising edges or just after a falling edge.

## Input operands scheduler and frequency scaling

Every pair that leaves the razor stage gets an 8-bit tag: a count of the
accepted pairs, starting at 0 after reset. The pair then flows through three
stages:

1. `range_detector` classifies it by the larger of its two operands: 4-bit
   when both are < 16, 8-bit when both are < 256, otherwise 16-bit.
2. `pattern_engine` packs pairs into 16-bit patterns. A 16-bit pair leaves at
   once. 8-bit pairs leave in twos and 4-bit pairs in fours. `xy_flush`, in a
   cycle without a pair, pushes out a partly filled pattern: first 8-bit,
   then 4-bit. Unused lanes are masked off in `op_lanes`.
3. `ios_buffer` stores each pattern, with its DFS code, in the queue of its
   precision. It reads one queue until that queue is empty and then moves to
   the next non-empty queue (16 → 8 → 4 → 16). Same-precision work therefore
   comes out in groups.

The DFS codes stored with the patterns are 7, 3 and 1 (40, 20 and 10 MHz) for
the 16-, 8- and 4-bit patterns. All three give the same rate of 40 M operand
pairs per second, so packed patterns run at a lower clock rate. `freq_analyzer`
compares the code of the pattern at the head of the buffer with the code in
force. If they differ, it switches the operand path's `dfs_unit` and then
issues nothing for `SETTLE` (8) system cycles. This models the time a supply
or clock change needs. Otherwise the head pattern issues on the next DFS
enable into the operand register. The product lands in `op` one DFS enable
later, with `op_valid` high for one `sys_clk` cycle. `op_prec`, `op_lanes`
and `op_tags` tell which pair each lane belongs to. Results leave grouped by
precision, not in arrival order.

`xy_ready` falls while any queue has fewer than five free entries. A
producer that stops within two cycles of `xy_ready` falling never overflows
a queue. An assertion in `ios_buffer` reports an overflow.

`dfs_unit` makes a clock enable, not a new clock. A phase accumulator adds
`5·(code+1)` every 50 MHz cycle and fires when it passes 50. The output rate
is therefore exactly `5 MHz·(code+1)`, evenly spaced when that rate divides
50 MHz. The filter's `dfs_unit` takes its code from `sel`. `fir_ce` shows
the edges on which `fir_x` is taken and `fir_y` updated.

`clk_div` is the toggle flip-flop divider (D = not Q), reset high, cascadable
with `STAGES`. The top uses one stage to make `sys_clk` from `clk`. Its reset
is asynchronous, so `rst_n` needs a real falling edge, and it holds `sys_clk`
still while `rst_n` is low. A two-flop synchroniser therefore stretches the
reset: the internal reset releases on the second `sys_clk` rising edge after
`rst_n` rises. All other registers reset synchronously on that internal
reset.

## Top-level interface (`mp_fir_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | 100 MHz reference clock, active-low reset |
| `sys_clk` | out | 1 | clk/2; all inputs are sampled on it |
| `sel` | in | 3 | filter DFS code, rate 5 MHz·(sel+1) |
| `con` | in | 2 | precision mode (table above) |
| `evenodd` | in | 1 | 1 = even length, 0 = odd |
| `mod_bypass` | in | M_MOD | bypass module i |
| `coef_shift`, `coef_in` | in | 1, 16 | serial coefficient load |
| `fir_x` | in | 16 | sample, taken on edges with `fir_ce` |
| `fir_ce` | out | 1 | filter enable |
| `fir_y` | out | 52 | filter output, lane layout above |
| `x`, `y`, `xy_valid`, `xy_flush` | in | 16, 16, 1, 1 | operand pairs (razor contract above) |
| `xy_ready` | out | 1 | scheduler has room |
| `er` | out | 1 | razor error / stall |
| `op_valid`, `op`, `op_prec`, `op_lanes`, `op_tags` | out | 1, 32, 2, 4, 32 | products with precision, lane mask and per-lane tags |
| `freq_code`, `freq_changes`, `freq_settling` | out | 3, 16, 1 | operand-path DFS code, change count, settle wait |
| `ios_empty` | out | 1 | scheduler holds nothing |

Parameters (defaults): `M_MOD = 5`, `N_ORD = 4`, `SEG = 13`, `IOS_DEPTH = 16`,
`SETTLE = 8`, `DIV_STAGES = 1`. `SEG` must be at least 8 plus
ceil(log2(number of taps)) for the 4-bit lanes not to wrap.

## Where this design makes its own choices

The block structure follows the published description: the rMAC unit, the
right side module, filter modules with a bypass module, the razor register,
the toggle divider, and the scheduler's range detector, pattern engine,
buffer and frequency analyzer. The following points are choices of this
design or readings of an unclear description:

* **Two paths.** How the scheduler, razor stage and DFS attach to the filter
  is not specified. Here they form a separate operand path that shares the
  multiplier design. The filter has its own DFS unit, set by `sel`.
* **Razor placement.** The razor registers sit on the operand inputs, not on
  the multiplier outputs. The stall is a discard flag plus a producer hold
  instead of a gated clock.
* **DFS range.** The description asks for 5–50 MHz in 5 MHz steps from three
  control bits, which cannot both hold. The three bits are kept (5–40 MHz).
  `CODE_W = 4` in `dfs_unit` gives 5–50 MHz.
* **Filter size.** The published experiment used a 20-tap filter, and calls
  the reconfigured module both a 4-tap and a 14-tap module. Here, 4-tap
  modules and five of them are used.
* **Multiplier size.** The published system also names a mode of four
  independent 8x8 products and a 32x32 mode. Both need 32-bit operand words.
  Only the 16x16 multiplier with its 16/8/4-bit modes is built, and that is
  what the operand scheduler's three patterns need.
* **Clock reduction.** Packing lets the operand path run 8-bit work at half
  and 4-bit work at a quarter of the 16-bit clock rate. The published figure
  of one third of the original frequency is not reproduced by any packing
  of this datapath.
* **Unspecified details chosen here:** the precision encoding `01` (8-bit),
  the even/odd polarity, the DFS codes per pattern, the settle time, the
  queue depth and order, tags, flush, unsigned arithmetic, the accumulator
  guard bits, and the reset style.
* **Not modelled:** the FPGA's partial-bitstream machinery, the supply
  voltage regulator that razor and the scheduler would steer, and the board
  oscillator.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/mp_pkg.sv tb/tb_reconfig_fir.sv --top-module tb_reconfig_fir -o sim
./obj_dir/sim
```

* `tb_mp_fir_top` runs the whole system at the default parameters. It covers
  the filter in all three precision modes, even and odd lengths and several
  bypass patterns, checked against direct convolution, and the filter enable
  rate for several `sel` codes. It then streams 600 mixed-precision operand
  pairs, some of them late, checks each product by tag, and counts every
  mechanism: razor errors, back-pressure, partial patterns, frequency
  changes and group changes. Each mechanism must occur at least once.
* `tb_reconfig_fir` checks 90 random configurations against a convolution
  model.
* `tb_dpr_20tap` repeats the published reconfiguration experiment at the
  default size. A 20-tap symmetric filter (the 22-tap even setting with
  `c0 = 0`) is compared with a direct-form 20-tap filter. Then module 2 is
  swapped for the bypass module and back while samples keep streaming. After
  each swap the output must settle within the filter length, 22 steps, and
  then match the 16-tap or 20-tap reference exactly. It runs in all three
  precision modes.
* The block testbenches check their module against an independent model.
  This includes the razor repair sequence, the divider waveform, DFS rates
  and spacing, pattern packing and the grouping rule of the buffer.

All testbenches finish in well under a second.
