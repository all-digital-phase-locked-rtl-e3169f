# Spread-spectrum clock generator on an all-digital PLL

A 1.2 GHz clock spreads its emissions over a band if its frequency sweeps
slowly down and back. Serial-ATA III and USB 3.0 expect this sweep as a
triangle: 5000 ppm down-spread at 30–33 kHz. This design gets there without
touching the oscillator's control path. An all-digital PLL (ADPLL) locks a
20-phase ring oscillator to 10 × a 120 MHz reference. A 20:1 multiplexer sits
between the oscillator phases and the feedback divider. Moving the multiplexer
one phase earlier shortens one divider period by 1/20 of an oscillator period.
The loop then answers by slowing the oscillator. If the phase steps are made
at an average rate of A/32 per reference cycle, the locked frequency is

    f_dco = f_ref · (N − A/(P·M)) … as a relative shift:  Δf/f = −A / (N·P·M)

with N = 10 (divider), P = 20 or 10 (phases in use) and M = 32 (modulator
modulus). A triangular profile moves A between 0 and A_max. With
A_max = 32 (20 phases) or 16 (10 phases), the peak shift is exactly
−5000 ppm.

The RTL has two layers:

* **The ADPLL:** phase/frequency detector, loop filter, dither modulator,
  oscillator and divider. Apart from the oscillator, it is all synthesizable
  logic.
* **The spreading path:** profile generator, sigma-delta modulator, MUX
  control and phase multiplexer. It is all synthesizable and runs on the
  divided clock.

The oscillator (`dco`) is a behavioural model with real-valued delays. It
stands in for a custom ring of tri-state-inverter delay cells.

## The loop: two-speed bang-bang control

`pfd` is a tri-state phase/frequency detector. Whichever rising edge arrives
first raises its flag: `up` for the reference, `dw` for the divided clock.
The second edge clears both flags. A phase threshold detector adds one more
bit of information:

* `up` is sampled on the falling edge of the reference (Q1).
* `dw` is sampled on the falling edge of the divided clock (Q2).
* `fast = Q1 | Q2`.

A flag still high half a cycle after it was raised means the phase error is
beyond ±π. In effect this is a one-bit time-to-digital converter.

`dlf` acts once per divided-clock cycle. It uses `fast` to choose which of
two saturating counters to move:

| `fast` | reference first (UP) | divided clock first (DW) |
|---|---|---|
| 1: frequency acquisition | coarse + 1 | coarse − 1 |
| 0: phase acquisition | fine − 1 | fine + 1 |

The codes act on the oscillator in opposite directions. A higher coarse code
adds drive strength and raises the frequency. A higher fine code adds load and
lowers it. So UP always speeds the oscillator up. Both codes reset to
mid-range: coarse 1000, fine 100.

**Seeing a DW decision.** This is the subtle point of the loop filter. The
filter is clocked by the divided clock's rising edge, and that same edge is
what raises `dw`. A register on that edge therefore never sees the DW pulse it
starts. `up` is fine, because a pending UP is still high at that edge.
`dlf` handles DW in two ways:

* A toggle flip-flop clocked by the reference flips whenever a reference edge
  finds `dw` high. The next divided edge reads this as "divided clock led".
* A `dw` that is already high at a divided edge (the divided clock led twice
  in a row) counts the same way.

This capture scheme is this implementation's own.

**Behaviour once locked.** The loop has only an integrating path, so the fine
code settles into a bounded limit cycle, typically 4 to 6 codes wide. It does
not sit on one value. `fast` stays low and the coarse code stays frozen. The
average oscillator frequency is exactly 10 × f_ref. The simulations show:

* From reset at 120 MHz, lock needs fine tuning only.
* After a step to a 100 MHz reference (the 1 GHz point), the loop needs
  frequency acquisition, and the coarse code stops moving about 25 reference
  cycles after the step.

The design target is lock within 240 reference cycles.

## Finer than one fine code: the dither modulator

One fine code changes the period by about 13 ps. `dither_sdm` refines this:

* A 3-bit accumulator adds the fine code to itself on every oscillator cycle.
* Its carry is the dither bit F0, which adds a small load to the first of the
  ten delay stages only (about 1.3 ps of period).
* Over 8 oscillator cycles F0 is high exactly `fine` times.
* An adder's carry can glitch while it settles, so the carry is resampled on
  the falling oscillator edge and only that clean copy drives F0.

## The oscillator model

`dco` is a ring of ten differential stages with one crossed connection.
Each edge travels around the ring twice per period. The ten true outputs and
their ten complements give 20 phases spaced by period/20. `phases[k]` lags
`phases[k-1]`, and `phases[0]` follows `phases[19]`.

The period is linear in the codes:

    T = 833.33 ps − 22.68·(C − 6) + 13.02·(F − 3) + 1.30·F0

* The gains are the average values measured for the circuit.
* The anchor is 1.2 GHz at coarse 0110 / fine 011.
* The F0 delay is added to stage 1 only.
* While `en` is low every stage is held low, so the ring restarts cleanly.

Simplifications of the model:

* The linear model spans about 0.98–1.69 GHz. The transistor-level circuit
  spans 0.888–1.526 GHz at the typical corner.
* Jitter, process corners and supply effects are not modelled.
* With this model the loop locks at coarse 0101 with the fine code cycling.
  The reference design locks at coarse 0110, fine 001.

## The spreading path

Everything here is clocked by the divided clock F_DIV (120 MHz when locked).

`profile_gen` makes the triangle. A prescaler counts 120 divided cycles in
10-phase mode or 60 in 20-phase mode. At each prescaler wrap, a 6-bit
up/down counter steps A one code along 0, 1, …, A_max, A_max−1, …, 1, 0.

| mode (`select`) | A_max | prescale | triangle period | peak shift |
|---|---|---|---|---|
| 0: 10 phases | 16 | 120 | 2·16·120 = 3840 ref cycles | 16/(10·10·32) = 5000 ppm |
| 1: 20 phases | 32 | 60  | 2·32·60 = 3840 ref cycles | 32/(10·20·32) = 5000 ppm |

At 120 MHz, 3840 reference cycles is 31.25 kHz. `ssc_switch = 0` holds A at
0, and the output is then a plain clock.

`ssc_sdm` is a first-order sigma-delta modulator. A 6-bit adder sums A and a
5-bit residue, so the modulus is M = 32. The residue keeps sum bits 4..0:

* Sum bit 5 is `overflow0`, worth one phase step.
* The adder's carry is `overflow1`, worth two phase steps. It can only fire
  for A > 32, so it is idle in normal use.

A first-order modulator is used deliberately. Its output is never negative,
so the phase only ever rotates one way. A higher-order modulator produces
−1 steps, which would spread upwards.

`mux_ctrl` first remaps the overflows for the mode:

    overflow1_new = overflow1 | (overflow0 & ~select)
    overflow0_new = overflow0 & select

In 10-phase mode only the even phases 0, 2, …, 18 are used, so one step is
two 1/20 steps. The 5-bit phase select then moves back by
`2·overflow1_new + overflow0_new` positions, modulo 20. If an odd phase is
left over when switching into 10-phase mode, it is first moved back by one.

`phase_mux` is a plain 20:1 multiplexer feeding the divider.

**Why the switch does not glitch.** The divider's output rises on a rising
edge of its input, so the select changes right after a rising edge of the
current phase. The new phase is *earlier*, so it is already high, and stays
high for another half period minus 1/20. The multiplexer output therefore
sees no extra edge. This holds for steps of one or two phases. It is also why
this design only down-spreads: moving to a later phase at that moment would
cut a pulse short.

## Clocks, resets and timing

| domain | clock | blocks |
|---|---|---|
| oscillator | `phases[0]` (rising and falling edges) | `dither_sdm` |
| feedback | selected phase | `freq_div` (/2 toggle flop, then /5 three-flop ring) |
| loop | F_DIV rising edge | `dlf`, `profile_gen`, `ssc_sdm`, `mux_ctrl` |
| reference | F_REF rising and falling edges | `pfd`, DW capture in `dlf` |

Domain crossings between these clocks are not synchronised, as in the
original circuit. In a phase-locked loop the edges keep a fixed relation.

* `rst_n` is asynchronous and active low, everywhere. It also stops the
  oscillator.
* The modulator overflows are registered, so a phase step follows its
  overflow by one F_DIV cycle.
* The PFD clears its flags in zero time in RTL. A real circuit has a reset
  path delay, and with it a small dead zone. The bang-bang loop does not
  depend on either.

## Where the RTL departs from the reference design

* **Oscillator.** A behavioural model with a linear period law. See the
  oscillator section for its range and lock point.
* **Loop filter.** The DW capture, the saturation at the code ends and the
  reset codes are this design's own.
* **Divider.** The /5 ring's feedback gate is taken as a NAND of the second
  and third flip-flops. With the drawn connections, that is the basic gate
  that makes the ring divide by 5; the output is high for 6 of every 10
  input cycles.
* **Which overflow bit is which.** The two overflow bits are assigned so
  that code "01" means one phase step, which matches the MUX control truth
  table.
* **Select counter.** The phase select as a modulo-20 counter, and the use
  of even phases in 10-phase mode, are this design's reading of the control
  circuit.
* **Direction of rotation.** Each step selects an earlier phase: the
  divided clock then leads, DW slows the oscillator, and the output
  down-spreads. This matches f = f_ref·(N − A/P). One passage of the
  reference description gives the opposite PFD response, which is
  inconsistent with its own loop-filter rules.
* **Not modelled.** Pads, the three separate supply domains, jitter, power
  and spectra.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pfd` | UP/DW set and clear for either edge order; Q1, Q2 and Fast for errors beyond half a period; coincident edges |
| `tb_dlf` | 3000 random PFD outcomes against a saturating-counter model, both modes, both capture paths |
| `tb_dither_sdm` | the 001 sequence (carry on the 8th cycle); exactly `fine` ones per 8 cycles for all codes |
| `tb_dco` | period against the formula for all coarse and fine codes and F0; 20 phases spaced by period/20; monotonic tuning |
| `tb_freq_div` | period of 10 input cycles, 6 high; output edges on input rising edges |
| `tb_profile_gen` | two full triangles per mode against A(t) = tri(⌊t/PRESC⌋); peak held PRESC cycles; 3840-cycle period |
| `tb_ssc_sdm` | random A against a modulo-32 model; exactly A steps per 32 cycles |
| `tb_mux_ctrl` | the 8-row remapping table; modulo-20 arithmetic including wrap; even phases only in 10-phase mode |
| `tb_phase_mux` | random phases and selects |
| `tb_dither_resolution` | oscillator plus dither modulator: mean period = T(C, F, 0) + 1.30 ps · F/8 for every fine code |
| `tb_adpll` | lock at 120 MHz and after a step to 100 MHz within 240 cycles; 10 DCO cycles per reference cycle |
| `tb_sscg` | end to end at default parameters (see below) |

`tb_sscg` runs the whole generator with default parameters:

* lock at 1 GHz (100 MHz reference), then at 1.2 GHz;
* one full triangle in 20-phase mode and one in 10-phase mode;
* spreading switched off again.

Over each triangle the oscillator made 38297 cycles. The expected count is
38400·(1 − 0.0025) = 38304, since the mean shift is half the peak. In a window
around each peak it made 5374 and 5971 cycles, against 5374.9 and 5972.3
predicted from the profile values in that window. This shows the 5000 ppm
peak is reached in both modes. The test also counts how often Fast, coarse
and fine steps, F0 dithering, profile peaks, single and double phase steps,
select wrap-around and both switch settings occurred, and requires each at
least once. The whole run simulates about 85 µs in a few seconds.

## Simulating

Every file sets `` `timescale 1ps/1fs ``, which the oscillator model needs
for its sub-picosecond delays. Compile the package first. For example, for
the full generator:

    verilator --binary --timing -Irtl -Itb rtl/sscg_pkg.sv tb/tb_sscg.sv \
              --top-module tb_sscg -o tb_sscg
    ./obj_dir/tb_sscg

Any other testbench works the same way with its own name. `rtl/` holds one
module or package per file, and verilator finds the rest via `-Irtl`.
`ZERODLY` warnings from `dco.sv` are expected: its delays are computed at
run time and are never zero.

## Files

| file | content |
|---|---|
| `rtl/sscg_pkg.sv` | widths, code types, the DCO control-word struct, reset codes |
| `rtl/sscg.sv` | top: ADPLL plus the spreading path |
| `rtl/adpll.sv` | the loop; the divider input is a port so the MUX can sit in front of it |
| `rtl/pfd.sv`, `rtl/dlf.sv`, `rtl/dither_sdm.sv`, `rtl/freq_div.sv` | loop blocks |
| `rtl/dco.sv` | behavioural 20-phase oscillator |
| `rtl/profile_gen.sv`, `rtl/ssc_sdm.sv`, `rtl/mux_ctrl.sv`, `rtl/phase_mux.sv` | spreading path |

Parameters of `sscg` (A_max and the prescale values for each mode) and of
`dco` (anchor period and gains) default to the design values. Changing
A_max changes the deviation; changing the prescale changes the modulation
rate.
