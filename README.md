# Variable-rate pre-scaled synchronous binary counter

A wide synchronous binary counter is normally limited by its carry chain: bit
*k* may toggle only when all bits below it are 1, so the incrementer gets
slower as the counter gets wider, and the least significant bit, which feeds
every carry term, ends up with a huge fan-out. This design keeps the critical
path of an N-bit counter at roughly one AND gate plus one flip-flop, whatever N
is, by three ideas:

1. **Pre-scaling.** The count is split into three sub counters. Each higher
   one advances only when a *pre-scaled enable* (PEN) from the lower one is
   high, and those enables come rarely enough that the higher sub counter's
   slow logic has several clock periods to settle.
2. **Backward carry propagation** in the middle sub counter. Each bit has its
   own AND chain that starts with the most significant operands (which in a
   binary sequence become 1 earliest) and takes the fast-changing low bits
   last, so only the final AND gate is timing critical.
3. **Redundant 1-bit Johnson counters** for the enable of the wide top sub
   counter. Instead of one enable net driving all of its flip-flops, *m*
   identical copies are made, each driving at most *L* flip-flops.

On top of that counter sits a **programmable integer clock divider** that
sets the counting rate at run time: the counter advances once every `div`
source-clock cycles.

The architecture, the partitioning rules and the 64-bit example sizes
(N = 64, L = 16) come from a published design. The divider's internals, the
clock-enable coupling between divider and counter, the reset and the handling
of count pauses are choices made here; they are listed under
[Departures and open points](#departures-and-open-points).

## How the count is split

With `n = floor(log2 N)`:

| Sub counter | Bits            | Kind                                   | Advances when        |
|-------------|-----------------|----------------------------------------|----------------------|
| C1          | `Q[0]`          | 1-bit toggle flip-flop                 | `cnt`                |
| C2          | `Q[n-1:1]`      | (n-1)-bit backward-carry counter       | `cnt & PEN1`         |
| C3          | `Q[N-1:n]`      | (N-n)-bit ripple-carry counter         | `cnt & PEN2`         |

For the default N = 64: n = 6, C1 = 1 bit, C2 = 5 bits, C3 = 58 bits, and
`m = ceil((N-n)/L) = ceil(58/16) = 4` PEN2 copies, which drive C3 bits in
groups of 16, 16, 16 and 10.

Seen from outside, `q` is an ordinary binary up-counter: 0, 1, 2, … and back
to 0 after 2^N − 1, advancing by one on each rising clock edge at which the
count enable is high.

## The pre-scaled enables

This is the part that makes the timing work, and the part that is easiest to
get wrong, so here it is cycle by cycle. "Count *k*" means the cycle in which
`q` holds *k*; the next counted edge makes it *k*+1.

**PEN1** is a 1-bit Johnson counter (a flip-flop with D = not Q, loaded when
enabled) enabled by `cnt`, exactly like bit 0. It is therefore a copy of
`Q[0]`: high on odd counts, which are the counts after which the increment
carries into bit 1. Keeping it as a separate flip-flop means C2's enables do
not load the `Q[0]` output. PEN1 has a period of two counts, so C2's logic has
two clock periods to settle, and with backward carry propagation it needs far
less.

**PEN2** must be high on exactly one count in every 2^n: count 2^n − 1 (63 for
N = 64), after which the increment carries into C3. It is produced by *m*
identical 1-bit Johnson counters, all cleared to 0 by reset and all enabled by
the same signal

    en2 = Q[n-1] & ... & Q[1] & cnt          (= &Q[5:1] & cnt for N = 64)

`&Q[n-1:1]` is high on two consecutive counts, 2^n − 2 and 2^n − 1 (62 and
63). So each Johnson counter inverts twice per 2^n counts:

| count | `&Q[5:1]` | Johnson state (= PEN2) during this count |
|-------|-----------|-------------------------------------------|
| 61    | 0         | 0                                          |
| 62    | 1         | 0  → inverts at the end of this count      |
| 63    | 1         | 1  → inverts at the end of this count      |
| 0     | 0         | 0                                          |

Hence every PEN2 copy equals `&Q[n-1:0]` at all times, yet it is a flip-flop
output with no logic in front of its loads. The expensive AND of the low bits
has moved to the Johnson counters' enable, which has a whole count of slack,
and the AND itself is again a backward chain (`Q[5]&Q[4]&Q[3]&Q[2]` is already
stable when the late `Q[1]` and `cnt` arrive).

C3's ripple carry chain has N − n − 1 AND gates, but it is evaluated only when
PEN2 is high, once every 2^n counts, so it is a multicycle path of 2^n clock
periods.

`prescaled_counter` contains two concurrent assertions of these invariants:
`pen1 == q[0]` and `pen2 == {m{&q[n-1:0]}}` on every clock.

## Backward carry propagation in C2

Bit `Q[i]` of C2 toggles when `PEN1 & cnt & Q[i-1] & … & Q[1]`. In
`sub_counter2` each bit has its own chain, written so that the accumulation
starts at the highest operand and ends with `Q[1]` and then `cnt`. A
conventional counter shares a single chain between bits, which is cheaper but
puts the lowest bit at the start of a long chain. The per-bit chains cost
about n²/2 AND gates, which is small because C2 has only n − 1 ≤ 6 bits for
N ≤ 128. A synthesis tool will restructure the gates anyway; the structure
matters for reading the design and for a gate-level implementation that keeps
it.

## The rate divider

`clk_div` holds a 33-bit counter that runs 0 … div−1 and wraps. The wrap
decision is `count >= div-1` rather than `==`, so lowering `div` while the
counter is above the new limit wraps at once instead of running through all
2^33 states. It produces:

* `tick`: high in one cycle out of every `div` (while enabled). In the top
  level this is the counter's count enable, so the count advances at
  f_clk / div. Any `div` ≥ 1 works; `div = 0` behaves like 1.
* `clk_out`: a registered divided clock, high for ceil(div/2) of every `div`
  cycles, rising in the cycle where the divider's count is 0. It toggles only
  for `div` ≥ 2.

Because the divider drives the counter through a clock enable, the whole
design runs on one clock, and the counter's timing analysis is unchanged by
the rate setting.

## Top-level interface

`vclk_counter_top #(N = 64, L = 16, CW = 33)`

| Port      | Dir | Width | Meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | source clock (in a system, from a PLL) |
| `rst`     | in  | 1     | asynchronous, active-high reset; clears count, divider and enables |
| `cnt`     | in  | 1     | count enable; low freezes the divider and the count |
| `div`     | in  | CW    | division ratio; may change at any time |
| `q`       | out | N     | the count |
| `tick`    | out | 1     | high in the cycles at whose end the count advances |
| `clk_out` | out | 1     | divided clock |
| `pen1`    | out | 1     | PEN1, for observation |
| `pen2`    | out | m     | the m PEN2 copies, for observation |

Timing: `q` changes on the rising edge that ends a cycle in which `tick` is
high. `tick` is combinational from `cnt`, `div` and the divider register; all
other outputs are flip-flop outputs.

Parameters: `N` is the count width (at least 4; the architecture targets
8 … 128), `L` the maximum number of C3 flip-flops per PEN2 copy, `CW` the
divider width. Everything else (n, C2 and C3 widths, m) is derived in
`vcnt_pkg`.

## Files

| File | Contents |
|------|----------|
| `rtl/vcnt_pkg.sv` | sizing functions: n, C2 and C3 widths, m |
| `rtl/johnson_1bit.sv` | 1-bit Johnson counter (PEN generator) |
| `rtl/sub_counter1.sv` | C1: bit 0 and PEN1 |
| `rtl/sub_counter2.sv` | C2: backward-carry counter and the m PEN2 Johnson counters |
| `rtl/sub_counter3.sv` | C3: ripple-carry counter with grouped enables |
| `rtl/prescaled_counter.sv` | the N-bit counter (C1 + C2 + C3), with invariant assertions |
| `rtl/clk_div.sv` | programmable integer divider |
| `rtl/vclk_counter_top.sv` | top level: divider + counter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_vclk_counter_top_full.sv` | the top at its default size |

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>` before `$finish`; each has a watchdog.
With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/vcnt_pkg.sv tb/tb_vclk_counter_top.sv \
        --top-module tb_vclk_counter_top -o sim
    ./obj_dir/sim

Substitute any other testbench name. What they cover:

* `tb_johnson_1bit`, `tb_sub_counter1`: random enables against a reference.
* `tb_sub_counter2`: C2 with 5 bits and 4 PEN2 copies; the testbench plays C1.
  Checks `q` = count[5:1] and every PEN2 copy = `&count[5:0]` each cycle.
* `tb_sub_counter3`: a 10-bit, L = 4 instance through several wraps and a
  58-bit instance, with random `cnt` and PEN2.
* `tb_prescaled_counter`: N = 8, 12 (L = 4), 64 and 128 side by side, random
  count enable, count, PEN1 and PEN2 checked every cycle.
* `tb_clk_div`: ratios 0, 1, 2, 3, 4, 5, 7, 10, 255 with random enable; tick
  position and spacing, `clk_out` level, and the immediate wrap when the ratio
  is lowered.
* `tb_vclk_counter_top`: N = 16, L = 4, 8-bit divider; ratio changes, pauses
  and a full wrap of the count. It counts and requires each mechanism: divider
  ticks, pauses, ratio changes, PEN1 and PEN2 enables, carries into each of
  the three C3 enable groups, the wrap and `clk_out` edges.
* `tb_vclk_counter_top_full`: default parameters (64 bits, 4 PEN2 copies,
  33-bit divider). Counts about 4.2 million times at ratios 1, 4 and 3 with
  pauses, checking every cycle, until the carry reaches bit 22 (the second C3
  enable group). It runs in a few seconds. The top 40 bits are never reached
  in simulation; they use the same logic as bits 6 … 22 of C3.

## Departures and open points

* **Rate coupling.** The divided rate reaches the counter as a clock enable
  (`tick`), not as a derived clock on the counter's clock pin. The count
  sequence at f_clk/div is the same, and the design stays in one clock
  domain; `clk_out` is still available.
* **Divider internals.** Only the divider's purpose (any integer ratio) and a
  rough list of its parts (33-bit count, incrementer, less-than and equality
  compares, reset multiplexer, output storage element) are given by the
  original. The compare rules, the `en` input, the `tick` output, the
  treatment of `div = 0` and the use of a flip-flop rather than a latch for
  `clk_out` are this design's.
* **Fine delay-line phase control and PLL.** The original mentions an adaptive
  delay line of inverters and gates for fine phase control of the divided
  clock, and a PLL as the clock source. Neither is specified beyond that, and
  neither is logic, so neither is built: `clk` is an input.
* **Count enable in PEN2 and C3.** `cnt` is ANDed into the PEN2 enable and into
  C3's toggle terms. The original's PEN2 enable is `&Q[n-1:1]` alone. With
  `cnt` permanently high the two are identical; with pauses, the extra term
  stops the Johnson counters from toggling twice while the count stands at
  2^n − 2 or 2^n − 1.
* **Number of PEN2 copies.** m = ceil((N−n)/L) is used. A floor form of the
  same formula gives too few copies (3 instead of 4 for N = 64) to keep each at
  L loads.
* **Reset.** Asynchronous, active high, to zero everywhere. The original only
  requires the Johnson counters to start at 0.
* **Run-time size changes.** The architecture is described as configurable to
  any counter size. Here the size is the build-time parameter `N`; no run-time
  resizing is built.
* **Other top-level registers.** A synthesised view of the original top shows
  a state flip-flop, a multiplexer and an output register whose roles are not
  described; they are not reproduced.
* No timing, area or frequency figures are claimed for this RTL; the
  constant-delay property is structural and was not measured here.
