# Clock-gated synchronous up/down counter

In an ordinary synchronous counter every flip-flop is clocked on every
cycle, although most bits do not change. On an up count, bit 0 changes every
cycle, bit 1 every second cycle, and bit 7 only once in 128. This counter
clocks only the flip-flops that are about to change. Each bit is a toggle
flip-flop, so giving a bit a clock pulse and flipping it are the same thing.
All of the counting logic therefore works out, cycle by cycle, which bits get a
pulse. Counted over a full 8-bit cycle, the flip-flops receive 510 clock
pulses instead of 2048.

The RTL here models an 8-bit up/down counter that was designed as a 45 nm
transistor-level circuit. That circuit also uses two leakage-reducing
inverter styles (LECTOR and stacked inverters). The RTL keeps the
architecture: which block decides what, and which signals pass between them.
It replaces the dynamic circuits with static logic and latch-based clock gates
that give the same cycle behaviour.

## The toggle rule

Counting up, bit *i* flips when all bits below it are 1. Counting down, it
flips when all bits below it are 0. Both rules become the same rule if each
bit is first passed through a multiplexer that selects Q when counting up
and QB (the complement) when counting down. Bit *i* then flips when the
selected values of all lower bits are 1. Input `up` drives those
multiplexers: 1 counts up, 0 counts down. It may change on any cycle.

## Lower section: the local clock generator (`lcg`)

Bits 0-3 are served by `lcg`. After the Q/QB multiplexers, a Manchester-style
carry chain runs from bit 0 upward. A stage passes the carry on when its
selected bit is 1 and stops it otherwise. The carry arriving at stage *i* is
bit *i*'s toggle request. Bit 0 has no lower bits, so its request is always
on. The carry leaving stage 3 is `co`, the real carry into the higher
section. In the RTL the chain is a set of active-low nodes, each restored by
an inverter cell (`lector_inv`).

## Higher section: pre-evaluation and selection (`lcpe`, `lcs`)

Had the carry chain simply continued through bits 4-7, the last bit's
decision would wait for a carry through all eight stages. Instead the upper
four bits are split into two steps.

* **`lcpe`, the pre-evaluator**, looks only at the section's own bits. For
  each section bit *k* it computes two conditions:
  * `ci[k]`: counting up, and section bits 0..k-1 all 1.
  * `cib[k]`: counting down, and section bits 0..k-1 all 0.

  It also computes `pall`, the same test over the whole section. None of
  these depend on the lower section, so they settle early.
* **`lcs`, the selector**, waits for the real carry `ci_in` from the lower
  section. It issues a pulse to bit *k* when `ci_in` is high and `ci[k]` or
  `cib[k]` is high. Its carry out is `ci_in AND pall`.

The late-arriving carry therefore passes through one gate per bit, not a
chain. In the reference circuit the pre-evaluator is dynamic
(precharge/evaluate) logic. Here it is written as the Boolean value that
logic evaluates to. Each condition is formed as an active-low node and
restored by a `stack_inv` cell, like a domino stage.

Further 4-bit sections can be chained by raising `HI_SECTIONS`. Each section
adds one `lcpe`/`lcs` pair, fed by the carry out of the section below. The
default is one section, giving 8 bits.

## Forming the local clocks (`local_clock_gate`)

This is the part that needs care. A toggle request is computed from the
flip-flop outputs, and those outputs change right after the clock edge that
the request gated. If the request were simply ANDed with the clock, a bit
that has just flipped could change its own request, or a neighbour's, while
the clock is still high. That would cut a pulse short or add a second one.

Each local clock therefore comes from a latch and an AND gate:

```
en_latched follows en while ck is low, holds while ck is high
lclk       = ck AND en_latched
```

Requests are computed and settle while `ck` is low. At the rising edge the
latch closes, so each local clock gives one complete high pulse in that
cycle, or none. Whatever the flip-flops then do cannot disturb the pulses.
This is the usual integrated-clock-gate structure. For synthesis, map
`local_clock_gate` onto the target library's clock-gating cell, and declare
the local clocks as generated clocks of `ck`. The latches reported by
synthesis (one per bit) are these gates and are intended.

Timing this imposes:

* `up` must be stable while `ck` is low, before the rising edge.
* The whole request path must settle within the low phase of `ck`. In the
  worst case this is the flip-flop clock-to-Q delay, then the `lcg` chain,
  then the `lcs` gate.

## Storage (`tff`)

Each bit is a rising-edge toggle flip-flop with outputs Q and QB, plus an
asynchronous active-low reset to 0. In the reference circuit the flip-flop is
a compact 16-transistor cell with keeper devices. In RTL it is one
flip-flop.

## Leakage cells (`lector_inv`, `stack_inv`)

In the reference circuit, LECTOR inverters are used in the clock generator
and stacked inverters in the pre-evaluator and the selector:

* **LECTOR inverter**: two PMOS in series (240 nm / 45 nm) and two NMOS in
  series (120 nm / 45 nm). Two of the four transistors are leakage-control
  devices, so in either output state one transistor sits near cut-off.
* **Stacked inverter**: one PMOS, with two series NMOS whose gates are both on
  the input.

Their purpose, lower standby current, does not exist in RTL. The modules
carry only their logic function, inversion. They are kept as separate
modules so that the netlist shows where the cells belong. They stand where
this RTL places them: the carry-restoring stages of `lcg` and the output
stages of `lcpe`/`lcs`. The reference schematics do not show their exact
positions clearly.

## Top level: `cg_updown_counter`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `ck`    | in  | 1     | global clock |
| `rst_n` | in  | 1     | asynchronous active-low reset, count to 0 |
| `up`    | in  | 1     | 1 = count up, 0 = count down |
| `q`     | out | WIDTH | count, bit 0 least significant |
| `lclk`  | out | WIDTH | local clock of each bit (for observing the gating) |
| `co`    | out | 1     | carry out: count is all ones (up) or all zeros (down) |

`WIDTH = LCG_BITS + SECTION_BITS * HI_SECTIONS`. The defaults are 4, 4 and 1,
set in `counter_pkg`, which gives 8 bits. The count takes one step per
rising edge of `ck` and wraps in both directions. After reset, a down count
starts 1111 1111, 1111 1110, ...; an up count starts 0000 0001, 0000 0010,
....

## Where this RTL departs from the reference circuit

* **Dynamic logic.** The precharge/evaluate logic is written as static
  logic. The latch-based clock gate supplies the hold behaviour that the
  dynamic nodes and their keepers provide in the circuit.
* **CI/CIB.** The reference names the pre-evaluator outputs CI0-CI3 and
  CIB0-CIB3 but does not define them separately. Here CI is the up-count
  condition and CIB the down-count condition, which is why the pre-evaluator
  takes `up` and the selector does not.
* **Selector style.** The reference leaves open whether the selector is built
  in domino or in pass-transistor logic. Here it is static AND-OR logic.
* **Added for usability.** The reset, the `lclk` and `co` ports, the `pall`
  signal and the `HI_SECTIONS` chaining parameter were added for this RTL.
* **Not reproducible.** The reference circuit's figures of merit cannot be
  reproduced in RTL: 46.25 uW against 83.15 uW for a conventional
  clock-gated counter, 87.92 ps propagation delay, and 254 transistors.

## Files

| file | content |
|------|---------|
| `rtl/counter_pkg.sv` | default section sizes, direction type |
| `rtl/cg_updown_counter.sv` | top level |
| `rtl/lcg.sv` | local clock generator, lower bits |
| `rtl/lcpe.sv` | pre-evaluator, one higher section |
| `rtl/lcs.sv` | selector, one higher section |
| `rtl/tff.sv` | toggle flip-flop |
| `rtl/local_clock_gate.sv` | latch + AND clock gate |
| `rtl/lector_inv.sv`, `rtl/stack_inv.sv` | inverter cells |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_count_sequences.sv` | full 256-count up run and down run at the default size |
| `tb/tb_cg_updown_counter_16b.sv` | 16-bit build (three higher sections), full cycles both ways |

## Simulating

Each testbench checks its outputs against values it computes itself. It ends
with a line `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/counter_pkg.sv tb/tb_cg_updown_counter.sv --top-module tb_cg_updown_counter
./obj_dir/Vtb_cg_updown_counter
```

Replace the testbench name to run any other test. What the tests cover:

* **`tb_cg_updown_counter`** runs the default 8-bit counter. It counts up
  through a wrap, then down through a wrap, then switches direction at random
  with a reset in the middle. After every edge it checks the count. It also
  checks that each local clock pulsed exactly when its bit changed, so a
  missing or extra pulse fails. It counts each mechanism: up and down steps,
  direction changes, wraps each way, pulses from the higher section's
  selector, suppressed clocks and carry out. It fails if any of them never
  occurred.
* **`tb_lcg`** and **`tb_lcpe`** are exhaustive over their inputs.
* **`tb_lcs`** and **`tb_lcg`** also change the inputs while `ck` is high and
  check that the pulses neither change nor glitch.
