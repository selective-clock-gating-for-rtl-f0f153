# Selectively clock-gated 16-bit synchronous counter

A synchronous binary counter clocks every flip-flop on every cycle, yet in a
count most bits do not change: bit *k* toggles only once every 2^k cycles.
Each of those idle clock edges costs power and, because all flip-flops draw
current at the same instant, adds to the supply noise. A counter can never be
stopped as a whole (some bit changes on every count), so the clock has to be
stopped per bit or per group of bits.

This design splits a 16-bit up/down/load counter into groups of consecutive
bits and gives every group above the lowest its own gated clock. Because a
bit in a count can only change when its lowest neighbour in the group
changes, a single comparator on the group's lowest bit decides whether the
whole group needs a clock edge. The default uses groups of two bits (eight
groups, seven gated clock generators), the grouping that removes the most
clock activity; groups of 8 and 4 bits, and the plain ungated counter, are
one parameter away.

## The counter

`gated_counter` has a clock `ck`, an asynchronous active-low reset `r_n`
(clears the count to 0), a two-bit operation code `s` and a parallel input
`x`:

| `s` (S1 S0) | operation            |
|-------------|----------------------|
| 00          | hold (inhibit)       |
| 01          | count up             |
| 10          | count down           |
| 11          | load `x`             |

Operations take effect on the rising edge of `ck`, one per cycle; the count
wraps at both ends. `q` is the count. `group_ck` brings out the clock each
group actually receives (bit 0 is `ck` itself), so a testbench or a power
estimate can see which edges were suppressed.

Every bit is a `counter_cell`: a D flip-flop whose next state `d_int` comes
from a four-way selector,

- hold: `d_int = q`
- up: `d_int = q ^ t_up`, where `t_up[i] = q[i-1] & ... & q[0]`
- down: `d_int = q ^ t_dn`, where `t_dn[i] = ~q[i-1] & ... & ~q[0]`
- load: `d_int = x[i]`

The toggle chains `t_up`/`t_dn` are built once in `gated_counter` and fed to
the cells. `d_int` is a cell output because the clock gating compares it with
`q`.

## Grouping and the clock chain

With `GROUP_BITS = G`, group *g* holds bits *gG* to *gG+G-1*. Group 0 runs
on `ck`. Group *g* >= 1 gets a `gated_ck_gen` that compares `d_int` and `q`
of bit *gG*: if they are equal that bit will not change, and then no higher
bit of the group can change in a count either (a bit toggles only when every
lower bit toggles, in both directions). The inhibit is `INH = ~(d_int ^ q)`.

The generator of group *g* is driven by the clock of group *g-1*, not by
`ck`. The group clocks thus form a chain: a group can only tick when all
groups below it tick, which is always the case when its lowest bit toggles in
a count. Two consequences:

- Each link adds a gate delay, so in silicon the upper groups switch a little
  after the lower ones. The flip-flops that change on a long carry
  (255 -> 256 changes nine bits) no longer switch at one instant, which
  spreads the supply current peak. In RTL all edges fall in the same time step.
- The clock that reaches a group comes only from that group's generator and
  those below it, so a glitch-free generator keeps every group glitch-free.

A parallel load can change bits of a group while leaving its lowest bit
unchanged, which the one-bit comparator cannot see. Every generator
therefore also receives `load = (s == 11)`, which forces its clock through.
This costs one extra OR gate per generator.

Cost in generators: `WIDTH/GROUP_BITS - 1`, each one latch plus the
comparator, the clock gate and the load OR.

| `GROUP_BITS` | groups | generators | latches |
|--------------|--------|------------|---------|
| 16           | 1      | 0          | 0       |
| 8            | 2      | 1          | 1       |
| 4            | 4      | 3          | 3       |
| 2 (default)  | 8      | 7          | 7       |

## Gated clock generators

`gated_ck_gen` has three forms, chosen by `STYLE` (`counter_pkg::gate_style_e`).
All flip-flops trigger on the rising edge, so `d_int`, `q` and therefore
`INH` change just after a rising edge, while the clock is high. This is the
case that decides which forms are safe.

- **`GATE_LATCH_AND`** (default). The enable `~INH` passes through a latch
  that is transparent while the clock is low; `gated_ck = ck & en_latched`.
  While the clock is high the latch is closed, so the enable changing after
  the edge cannot cut or restart the pulse. The gated clock idles low.
- **`GATE_LATCH_OR`**. `INH` passes through a latch that is transparent while
  the clock is high; `gated_ck = ck | inh_latched`. Changes during the high
  phase are masked by the OR, and the latch holds the value through the low
  phase, so the next rising edge is clean. The gated clock idles high.
- **`GATE_FREE_OR`**. `gated_ck = ck | INH`, no latch. This is glitch-free
  only while `INH` settles before the clock falls, that is when the high
  phase of the clock is longer than the delay from the clock edge through the
  flip-flop, the toggle AND chain and the comparator. It saves the latch at
  the cost of that limit on the clock frequency.

A plain AND gate without a latch is not offered: an enable rising while the
clock is high would produce an extra edge.

The latches are the only level-sensitive storage in the design and are
intended. Synthesis tools report them as latches (one per generator).

## What the counting workload shows

`tb_count_up_workload` counts up for 500 cycles from reset on six
configurations at once and counts the clock edges that reach flip-flops:

| configuration                 | flip-flop clock edges | share of ungated |
|-------------------------------|-----------------------|------------------|
| ungated (`GROUP_BITS = 16`)   | 8000                  | 100 %            |
| groups of 8                   | 4008                  | 50 %             |
| groups of 4                   | 2128                  | 26 %             |
| groups of 2, any `STYLE`      | 1328                  | 16 %             |

Group *g* with lowest bit *k* is clocked `floor(500 / 2^k)` times, and the
testbench checks each group against that. These are clock-edge counts, not
power: the generators themselves draw current, and the real saving in
current and supply noise depends on the cell library, the flip-flop and the
package. For orientation, switch-level simulations of this counter in a
0.35 µm CMOS library with 1 nH supply and ground inductances gave, relative
to the ungated counter, roughly 80 %, 69 % and 63 % of the average supply
current and 50 %, 34 % and 25 % of the RMS supply noise for groups of 8, 4
and 2 bits. Gating single bits instead of groups, each with its own latched
generator on `ck`, saved far less (the per-bit overhead is comparable to the
flip-flop it stops) and is not part of this design.

## Departures and choices

Beyond the structure described above, these points are this design's own:

- The load term into every generator (see above).
- Reset is active low and clears to zero.
- `GATE_LATCH_AND` as the default form; `GATE_LATCH_OR` behaves the same at
  the flip-flops.
- The latch phases: transparent on low clock for the AND form, on high clock
  for the OR form.
- `GROUP_BITS` that does not divide `WIDTH` is accepted (the top group is
  shorter), but only 16, 8, 4 and 2 have been exercised.

## Files

| file                      | contents                                         |
|---------------------------|--------------------------------------------------|
| `rtl/counter_pkg.sv`      | operation code `op_e`, generator form `gate_style_e` |
| `rtl/counter_cell.sv`     | one counter bit                                   |
| `rtl/gated_ck_gen.sv`     | gated clock generator, three forms                |
| `rtl/gated_counter.sv`    | the counter (top)                                 |
| `tb/tb_counter_cell.sv`   | every operation with random inputs, async reset   |
| `tb/tb_gated_ck_gen.sv`   | all three forms with inputs changing in both clock phases (latched) or in the high phase only (latch-free); checks edge count and alignment |
| `tb/tb_gated_counter.sv`  | the default counter end to end: long count up, wrap both ways, holds, loads, random operations, async reset, per-group clock edge checks |
| `tb/count_up_probe.sv`, `tb/tb_count_up_workload.sv` | the 500-cycle count-up run on six configurations |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself after a
fixed number of cycles if something hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/counter_pkg.sv rtl/counter_cell.sv rtl/gated_ck_gen.sv rtl/gated_counter.sv \
  tb/tb_gated_counter.sv --top-module tb_gated_counter
./obj_dir/Vtb_gated_counter
```

For the workload, add `tb/count_up_probe.sv` and use
`tb/tb_count_up_workload.sv` with `--top-module tb_count_up_workload`. Each
run takes well under a second. The testbenches need no files besides these.
Verilator simulates the gated clocks correctly because the generators are
combinational logic and latches evaluated in the same time step as `ck`,
before any flip-flop updates; keep it that way if you add delays, or give
every path the same delay.
