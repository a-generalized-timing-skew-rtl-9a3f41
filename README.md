# Skew-free multi-phase clock generation platform

A time-interleaved (TI) sampled-data system runs N slow paths in turn to
make one fast one: an N-path switched-capacitor sample-and-hold in front of
an ADC, an N-input output multiplexer behind a DAC, or both in an N-path
filter. Each path needs its own clock phase, and any difference in *when*
the paths sample is timing skew. Timing skew puts spurious image tones at
multiples of fs/N and limits dynamic range. If the phases come from a ring
of flip-flops, every flip-flop's delay lands in the sampling instants of
its path.

This platform keeps the flip-flops out of the instants that matter. A
ring counter only opens a **window** for each path. The **edge** that
actually samples or transfers charge is always one edge of a delayed copy
of the master clock, and that one wire serves every path. All N critical
edges are therefore exactly one master period apart, however the ring
counter's flip-flops are mismatched. The same building blocks, wired three
ways, serve:

| generator | module | for | critical edges (taken from the master clock) |
|---|---|---|---|
| edge-driven clocking, A/D | `clkgen_ad` | TI sample-and-hold, decimators | falling edge of every pre-phase |
| edge-driven clocking, D/A | `clkgen_da` | TI output multiplexer, interpolators, N-path filters | rising edge of both phases, falling edge of the pre-phase |
| edge-driven switching | `clkgen_eds` | systems with one common sampling switch | every edge of the full-rate clock `phi_s` |

The top, `clkgen_platform`, runs all three side by side from one master
clock input. The default build has four phases and is timed for a 160 MHz
master clock. That is the configuration the design was evaluated in: a
4-path system at 160 MS/s processing a 75 MHz tone.

## Phases, pre-phases and which edge is critical

Switched-capacitor paths use two non-overlapping clocks per path: a
post-phase `phi[m]` and a pre-phase `phi_p[m]` that drives the switch on
the capacitor's other plate. The pre-phase opens slightly earlier, so that
charge injection from the post-phase switch does not depend on the signal.

* **A/D (sample-and-hold).** The sample is taken when the pre-phase switch
  opens, so the pre-phase **falling** edge is the sampling instant.
* **D/A (output multiplexer).** Charge moves to the output when the switch
  closes, so the post-phase **rising** edge (or both rising edges) is
  critical.
* **N-path filter.** It has both an input sampler and an output
  multiplexer, so both kinds of edge are critical.
* **Edge-driven switching.** A common switch, shared by all paths and
  driven by the full-rate clock `phi_s`, opens slightly before any path
  switch. The common switch then decides every sampling instant, and the
  per-path phases only have to change while `phi_s` is low. No pre-phases
  are needed.

Optionally the pre-phase also rises a little earlier than the post-phase.
The `DA_PS` delay provides this spacing.

## Building blocks

### Master-slave flip-flop with master output (`ms_dff_m`)

This is a positive-edge D flip-flop made of two transparent latches.
The master follows D while CLK is low; the slave follows the master while
CLK is high. The master latch is also brought out as output `M`. In the
ring counter, D changes just after a rising edge, so `M` takes the new
value at the next falling edge. That is half a clock period before `Q`
does. The generators use this early copy to split each window into its
first and second half. The flip-flop has asynchronous active-low set and
clear.

### Self-starting mod-N ring counter (`ring_counter`)

N `ms_dff_m` stages on one clock circulate a single 0. Slave output
`slave[m]` is low for one clock period every N periods, and stage m+1
follows stage m one period later. These negative pulses are the windows
(envelopes) of the N phases. `master[m]` is the same pulse half a period
earlier.

Self-start: stage 1 loads 0 only when stages 1..N-1 all hold 1, and 1
otherwise; the other stages shift. Extra zeros leave through stage N, and
no new zero enters while one is still in stages 1..N-1. From any
power-up state the ring therefore holds exactly one zero within N clocks,
so no reset is needed. The per-stage set and clear pins are brought out
(tied high in the generators) so that a test can load any state.

### Edge Decision Block (`edb`)

An AND-OR-INVERT gate:

    out = not(A and B) and not C

C is the window (a slave output, active low). Inside the window the output
is high until the clock edge that makes A and B both high, and that edge
pulls it low. With C tied to 0 the block is a NAND. `clkgen_eds` uses it
that way for `phi_s`, so that `phi_s` passes through the same gate as the
phases and their delays match.

### Delay cells (`delay_line`)

Fixed delays of the master clock (d0, dpre, d1, d2) and of the pre/post
spacing (da). d2 is inverting. In silicon these are analog delay elements.
Here they are behavioural transport delays: every edge reappears exactly
`DELAY_PS` later, including pulses shorter than the delay.

## The three generators in detail

Notation: `r_k` is the k-th rising edge of the master clock and T its
period. Stage m's slave window runs from `r_k + D1 + ds` to
`r_{k+1} + D1 + ds`, where `ds` is the ring counter's clock-to-output
delay (zero in this RTL). Its master output is high only in the second
half of that window.

Derived clocks:

| name | source |
|---|---|
| `pre_clk` | clk delayed by `D0_PS` |
| `post_clk` | `pre_clk` delayed by `DPRE_PS` (A/D only) |
| `post_dff_clk` | clk **inverted** and delayed by `D2_PS` |
| ring counter clock | clk delayed by `D1_PS` |

### A/D generator (`clkgen_ad`)

| output | EDB A | EDB B | EDB C |
|---|---|---|---|
| `phi_p[m]` | `pre_clk` | `master[m]` | `slave[m]` |
| `phi[m]` | `post_clk` | `master[m]` | `slave[m]` delayed by `DA_PS` |

The hard part is the window. In its first half, `pre_clk` is already high
while the slave is low, exactly as in the second half, so a plain
`not slave and not pre_clk` cannot tell the halves apart. The master
output can: it is low in the first half, so the EDB output there is held
high. In the second half the master is high, and the next rising edge of
`pre_clk` pulls `phi_p[m]` low. That edge, the sampling instant, belongs
to `pre_clk` and not to any flip-flop. `phi[m]` is built the same way from
`post_clk`, so it falls `DPRE_PS` after the pre-phase.

Edge times:

| output | rises | falls |
|---|---|---|
| `phi_p[m]` | `r_k + D1 + ds` | `r_{k+1} + D0` (critical) |
| `phi[m]` | `r_k + D1 + ds + DA` | `r_{k+1} + D0 + DPRE` |

The non-overlap between consecutive post-phases is `D1 + ds - D0 - DPRE`,
plus `DA`.

The delays must satisfy `D0 + DPRE < D1 + ds` and `D1 + ds - D0 < T/2`.

### D/A and N-path generator (`clkgen_da`)

| output | EDB A | EDB B | EDB C |
|---|---|---|---|
| `phi_p[m]` | `pre_clk` | `post_dff_clk` | `slave[m]` |
| `phi[m]` | `not master[m]` | `post_dff_clk` delayed by `DA_PS` | `slave[m]` |

`pre_clk` and `post_dff_clk` are both high only in a short slot, from
`r_k + D0` to `r_k + D2`. The window opens inside the slot.

* The slot's end (the falling edge of `post_dff_clk`) raises `phi_p[m]`.
* The next slot's start (the rising edge of `pre_clk`) drops `phi_p[m]`.
* For `phi[m]`, the inverted master is high only in the first half of the
  window. So the falling edge of `post_dff_clk` (plus `DA`) raises
  `phi[m]`, and no later pulse can drop it before the window closes.

Edge times:

| output | rises | falls |
|---|---|---|
| `phi_p[m]` | `r_k + D2` (critical) | `r_{k+1} + D0` (critical) |
| `phi[m]` | `r_k + D2 + DA` (critical) | `r_{k+1} + D1 + ds` |

The non-overlap is `D2 - D1 - ds`, plus `DA`.

The delays must satisfy `D0 < D1 + ds < D2` and `D2 + DA < D1 + ds + T/2`.

### Edge-driven switching generator (`clkgen_eds`)

| output | EDB A | EDB B | EDB C |
|---|---|---|---|
| `phi_s` | `post_dff_clk` delayed by `DA_PS` | `pre_clk` | 0 |
| `phi[m]` | `not master[m]` | `post_dff_clk` | `slave[m]` |

`phi_s` is low from `r_k + D0` to `r_k + D2 + DA` in every period. The
path phases are those of the D/A generator without the `DA` spacing: each
rises at `r_k + D2` and falls at `r_{k+1} + D1 + ds`. That fall lies
inside the `phi_s` low pulse, because `D0 < D1 + ds < D2 + DA`. The
instant that counts is the falling edge of `phi_s`.

### Default timing

Defaults are `D0 = 200`, `DPRE = 150`, `D1 = 600`, `D2 = 900` and
`DA = 100` ps, with `T = 6250` ps. Offsets are after a master rising edge;
"next" means one master period later.

| generator | signal | rises | falls | high for |
|---|---|---|---|---|
| A/D | `phi_p` | 600 | next + 200 | 5850 |
| A/D | `phi` | 700 | next + 350 | 5900 |
| D/A | `phi_p` | 900 | next + 200 | 5550 |
| D/A | `phi` | 1000 | next + 600 | 5850 |
| switching | `phi` | 900 | next + 600 | 5950 |
| switching | `phi_s` (low pulse) | 1000 | 200 | low for 800 |

Non-overlap between consecutive phases at the defaults:

| generator | post-phases | pre-phases |
|---|---|---|
| A/D | 350 ps | 400 ps |
| D/A | 400 ps | 700 ps |
| switching | 300 ps | none |

Changing the clock frequency or the number of paths only requires the
delay orderings above to hold. `N` can be any value of 2 or more.

## Interface of the top (`clkgen_platform`)

Parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | number of paths |
| `D0_PS` | 200 | delay from clk to `pre_clk` |
| `DPRE_PS` | 150 | delay from `pre_clk` to `post_clk` |
| `D1_PS` | 600 | delay from clk to the ring counter clock |
| `D2_PS` | 900 | inverting delay from clk to `post_dff_clk` |
| `DA_PS` | 100 | pre/post rising-edge spacing |

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | accurate master clock |
| `ad_phi`, `ad_phi_p` | out | N | A/D post- and pre-phases |
| `da_phi`, `da_phi_p` | out | N | D/A / N-path post- and pre-phases |
| `eds_phi` | out | N | switching-scheme phases |
| `eds_phi_s` | out | 1 | common sampling clock (active low pulse) |

Phase m is on bit m-1. All phases are active high. There is no reset: the
outputs are valid from N + 1 master periods after the clock starts. All
times are in picoseconds (every file has `` `timescale 1ps/1ps ``).

Shared defaults live in `rtl/clkgen_pkg.sv`.

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/clkgen_pkg.sv tb/tb_clkgen_platform.sv --top-module tb_clkgen_platform
    ./obj_dir/Vtb_clkgen_platform

Testbenches:

| testbench | what it checks |
|---|---|
| `tb_edb` | the gate's truth table |
| `tb_delay_line` | transport delay and inversion with random pulses, including pulses shorter than the delay |
| `tb_ms_dff_m` | both latches against a reference model, async set/clear, and M leading Q by half a period |
| `tb_ring_counter` | N = 4 and N = 5 from every one of the 2^N states: one zero within N clocks, then correct rotation, master outputs half a period early |
| `tb_clkgen_ad`, `tb_clkgen_da`, `tb_clkgen_eds` | every edge position against the table above, phase order, pulse width, non-overlap and pulse counts (see below) |
| `tb_clkgen_platform` | the top at its defaults from random power-up for 200 periods (see below) |
| `tb_ti_sampling` | the evaluation workload (see below) |

Extra detail on the larger testbenches:

* **Generator testbenches.** Each runs three instances: the defaults, a
  five-phase generator, and one with a longer ring-counter delay `D1`.
  The longer `D1` stands in for slow or mismatched flip-flops. The
  critical edges must be unchanged in that instance; only the non-critical
  ones move.
* **`tb_clkgen_platform`.** All three generators together, checked edge by
  edge and against each other. It counts each mechanism and requires each
  to occur:
  * self-start of each ring counter
  * A/D sampling and post-phase edges
  * D/A rising edges
  * `phi_s` pulses
  * phase edges enclosed by `phi_s`
* **`tb_ti_sampling`.** A 4-path, 160 MS/s system with a 75 MHz tone. It
  collects the critical instants of each generator and checks that they
  form a uniform grid, with the paths taking turns. It then samples an
  ideal sine at those instants and checks that a 256-point DFT shows no
  images at 5, 35 or 45 MHz. A control run moves one path by 13 ps: the
  images must then appear, which shows the measurement can detect skew.

`phase_checker` is the edge monitor shared by the generator testbenches.

## What to trust and where this departs from a circuit

* **Zero-delay logic.** The flip-flops, gates and inverters have no delay,
  so `ds = 0`, and all timing comes from the delay cells. The edge tables
  above are exact in simulation. In silicon, the critical edges would also
  carry one EDB delay, and the same EDB delay applies to every path. The
  testbench with a longer `D1` is the stand-in for flip-flop delay and
  mismatch.
* **Delay values are this design's own.** Only the orderings are
  essential. The defaults are one valid set for 160 MHz with margins of
  hundreds of picoseconds.
* **Synthesis.** The delay cells are behavioural, and synthesis removes
  them. A synthesized generator is then not meaningful: `phi_s`, for
  instance, becomes the constant `not(clk and not clk)`. Only `edb`,
  `ms_dff_m` and `ring_counter` are synthesizable logic. A real
  implementation needs matched custom delay cells in place of
  `delay_line`.
* **Latches.** `ms_dff_m` is deliberately two latches, because the master
  output exists only in that structure. Lint reports the ring of latches
  as a loop. The loop is never transparent end to end, because the two
  latches of a stage are never open together.
* **Own choices:**
  * the ring counter's self-start rule
  * the set/clear pins of the ring counter and their priority (clear
    first)
  * placing the three generators side by side in one top
  * no reset
* **Not modelled:**
  * the analog loads (sample-and-hold, multiplexer, common switch)
  * the master clock source
  * dummy loads that balance wiring
  * jitter
  * transistor-level mismatch, so the SNR values of a circuit-level
    simulation cannot be reproduced here
