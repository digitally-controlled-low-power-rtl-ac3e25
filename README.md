# Digital buck controller with per-cycle efficiency optimization

A battery-powered load draws a current that changes all the time, so a DC-DC
converter tuned for one operating point spends most of its life off its
efficiency peak. This controller re-tunes the power stage of a 5 V to 1.8 V,
1 MHz, 5 W synchronous buck converter **in every switching period**, not after
the load has settled. The idea: in peak current programmed mode the digital
current reference `i_c[n]` that the voltage loop produces *is* a measurement of
the load, available one period ahead. The same number therefore drives three
optimizers:

| load (peak reference)                 | what switches                              | what is tuned                         |
|---------------------------------------|--------------------------------------------|---------------------------------------|
| below 0.1 A (`i_c` < 72)              | high side only, pulses skipped (PFM)       | high-side gate at full swing          |
| 0.1 A to 1 A (`i_c` 72 .. 251)        | one segment, synchronous                   | gate swing of that segment (8 levels) |
| 1 A to 1.5 A (`i_c` 252 .. 351)       | one segment                                | full swing                            |
| 1.5 A to 2.2 A (`i_c` 352 .. 491)     | two segments                               | full swing                            |
| above 2.2 A (`i_c` >= 492)            | three segments                             | full swing                            |

Light loads lose most in gate drive, heavy loads in conduction. Fewer segments
and a smaller gate swing cut gate-drive loss, while more segments and a full
swing cut on-resistance. Only one of the three segments has a scalable swing,
which keeps the power stage and its drivers simple.

The RTL is the digital part of the converter. The ADC, its reference, the DAC
filter, the current comparator, the gate drivers and the power stage are
analog and lie outside it. The testbench of the top level models them.

## Signal flow

```
 vout ─► windowed ADC ─ e[n] (4 b) ─► digital_compensator ─ i_c[n] (10 b) ─┬─► sigma_delta_dac ─ dac_bit ─► RC ─ v_c ─┐
                                                                           │                                         │
                            ┌──────────────────────────────────────────────┤                    inductor current ─► comparator ─ cmp
                            ▼                   ▼                          ▼                                         │
                     pfm_controller    gate_swing_controller       segment_selector                                  │
                      pfm_mode,          pulse_sl, gating of         seg_en, gating of                                │
                      pulse_en           segment 1                   segments 2, 3                                    │
                            │                   ▲                          ▲                                         │
                            └──────► cpm_modulator ── hs_on / ls_on ───────┘◄────────────────────────────────────────┘
```

All of it runs on one clock. The defaults assume 100 MHz, which gives a switching period
of 100 clocks (`PERIOD`). Within a period:

| counter | event |
|---------|-------|
| 0       | `cycle_start`: PFM mode, `seg_en` and `pulse_sl` latch the current `i_c`; the modulator decides whether this period has a pulse |
| 1       | high-side switch on |
| ≥ 4     | comparator may end the pulse (leading-edge blanking of 4 clocks); at counter 90 the pulse ends anyway (maximum duty) |
| +2      | dead time, then the low-side switch on (not in PFM) |
| 97      | last low-side clock; 2 dead clocks follow |
| 96      | `adc_sample`: the compensator takes `e[n]`; `i_c` is new from counter 97 and is used from the next period start |

So the optimizers always act on the reference computed just before the period
they configure. Segment and swing changes happen while both switches are off.

## Blocks

All blocks share `rtl/dcdc_pkg.sv`. Its types are `ic_t` (10 bits, 5 mA per LSB,
5.12 A full scale), `err_t` (4-bit signed, positive when the output is low),
`psl_t` (6-bit pulse width, all ones = full swing) and `gating_t`.

* **`digital_compensator`**: a PI law, `I += KI·e/16`, `i_c = I + KP·e`,
  with KP = 20 and KI = 16. The integrator and the output are clamped to
  0 .. 1023. The controller only needs *a* compensator; the gains were
  tuned against the testbench plant, for a crossover of about 40 kHz.
* **`sigma_delta_dac`**: a first-order modulator, i.e. an accumulator whose
  carry is the output bit. Over any 1024 clocks the number of ones equals
  `i_c`. An RC filter outside turns the stream into the current limit.
* **`cpm_modulator`**: the period counter and a four-state FSM (off, high
  side, dead time, low side). It skips a period when `pulse_en` is low and
  keeps the low side off when `ls_dis` is high. Its strobes `cmp_trip` and
  `dmax_trip` say how each pulse ended. An assertion forbids both switches on
  at once.
* **`pfm_controller`**: enters PFM below `PFM_ENTER` = 72 and leaves at
  `PFM_EXIT` = 120. In PFM it allows a pulse only while `e[n] > 0`, so the
  pulse rate follows the load. The wide hysteresis is needed because PFM
  pulses are triangles from zero: the same load needs a higher peak than in
  continuous conduction.
* **`gate_swing_controller`**: looks `i_c` up in 8 thresholds (72 + 22.5·i)
  and takes the matching pulse width (4 + 2·i clocks). From 252 up it gives
  `PSL_FULL`. It drives segment 1 through a `gate_pulse_gen`. In PFM the high
  side of segment 1 is forced to full swing.
* **`segment_selector`**: sets `seg_en` to 001 / 011 / 111 from two
  thresholds. Segments 2 and 3 always switch at full swing, through their
  own `gate_pulse_gen`.
* **`gate_pulse_gen`** (helper): the gate-charge sequencer, described below.
* **`dcdc_controller_top`**: wires the blocks together and holds `e[n]` for
  the PFM decision.

## Gate swing by gate charge

This is the least obvious part. Each power switch has a driver made of two
transistors that `gating_t` controls one by one:

| signal   | conducts → power gate goes | effect                 |
|----------|----------------------------|------------------------|
| `p_pmos` | high-side gate to Vin      | high-side switch off   |
| `p_nmos` | high-side gate down        | high-side switch on    |
| `n_pmos` | low-side gate up           | low-side switch on     |
| `n_nmos` | low-side gate to ground    | low-side switch off    |

A switch is turned off the usual way: the "off" transistor conducts for the
whole off-time. To turn it on, the "on" transistor conducts for only
`pulse_sl` clocks (t_NMOS for the high side, t_PMOS for the low side). After
that, both driver transistors of that gate are off and the gate floats with
the charge it got. A short pulse gives a small gate swing and a small gate
charge, which lowers the gate-drive loss (proportional to the swing). A
longer pulse gives a larger swing and a lower on-resistance. `PSL_FULL`
keeps the pulse for the whole on-time, as a normal driver does. No extra
supply or capacitor is needed; the swing comes from timing alone.

In `gate_pulse_gen` each driver runs an IDLE → CHARGE → FLOAT FSM.
`gating_t` is combinational from `hs_on`/`ls_on` and the FSM state, so a
gate starts moving in the same clock as its command. Assertions check that a
driver never pulls its gate both ways.

The mapping from pulse width to gate voltage depends on the driver
transistors and the power-switch gate capacitance. The widths here (4 to 18
clocks of 10 ns) are placeholders sized for that kind of RC. **Set
`SWING_TH`/`SWING_PW` from the actual stage's loss model.**

## How far to trust it, and where it departs

These parts follow the converter as described:
- the block split;
- the mixed-signal peak current mode loop, with a digital voltage loop and an analog comparator;
- driving all three optimizers from `i_c[n]` in every period;
- three segments, with only one having a scalable swing;
- PFM below 0.1 A, with the low side disabled and full high-side swing;
- a 4-bit `e[n]`, a 3-bit segment enable, and a pulse select wider than 4 bits.

These are this design's own choices:
- the clock rate;
- all widths and LSB sizes;
- the PI law and its gains;
- the DAC order;
- dead time, blanking and maximum duty;
- every threshold and pulse-width value (the published optimum thresholds
  were not available, so they are spread evenly over the stated ranges);
- mapping load thresholds to peak-current codes by adding half the ripple (0.26 A);
- the PFM hysteresis and pulse-skipping rule;
- the gating order of the swing driver.

The PI compensator is linear, and the windowed ADC clips the error at
±70 mV. A large load step is therefore corrected mainly by the integrator,
at about 7 codes (35 mA) per period. Steps of about 1 A recover within
about 10 periods with a dip of 160 mV. A 2 A step in one go droops by about
0.8 V, as seen in closed-loop simulation with the lossless model. If large
steps matter, give the compensator a larger gain for out-of-window codes.

Not included: the baseline "steady-state estimation" optimizer, against which
the per-cycle scheme is compared. It is not part of this design.

## Simulation

Each block has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_dcdc_controller_top -y rtl -y tb +libext+.sv \
  rtl/dcdc_pkg.sv tb/tb_dcdc_controller_top.sv -o sim
obj_dir/sim
```

`tb_dcdc_controller_top` runs the top at its default parameters in closed
loop. It uses a lossless behavioural model of the power stage
(L = 2.2 µH, C = 40 µF, 5 V), the DAC RC filter (2 µs), the comparator and a
windowed ADC (10 mV per code). It starts from 0 V and steps the load through
0.5, 1, 0.05, 0.3, 1.3, 1.8, 2.6, 1.6 and 0.5 A, with an input sag to 1.9 V.
In every settled window except the sag, it checks that the output stays
within 40 mV of 1.8 V and that the optimizers picked the expected mode.
`tb/gate_drive_model.sv` turns segment 1's gating into gate voltages,
charging each gate through the conducting driver transistor with a 60 ns
time constant. The testbench uses it to check the gate swing itself:
- below 4.5 V at 0.5 A (about 4.05 V in the run; 3.15 V at 0.3 A);
- at least 0.2 V more at 1 A (about 4.9 V);
- high side driven for its whole on-time in PFM.

It also checks that every period's `pulse_sl` and `seg_en` come from the
`i_c` present at that period's start. It also counts:
- comparator-ended and duty-limited pulses;
- PFM entries and skipped periods;
- scaled and full swing, and floating gates;
- use of 1, 2 and 3 segments.

A mechanism that never happens counts as a failure.

`tb_load_step_train` applies square-wave loads at 2, 5, 10 and 20 kHz:
0.5 ↔ 1.6 A (one segment with scaled swing ↔ two segments) and
1.6 ↔ 2.6 A (two ↔ three segments). It checks that each new configuration
arrives within the half period and before the error first returns to zero,
i.e. during the transient, not after it. Measured: 3 to 10 periods after the
step, with the output within 160 mV. It also reports mode changes per ms. One run is about 3 ms of
converter time and takes well under a second.

Because the plant model has no losses, the testbench cannot show efficiency.
Efficiency and energy savings are properties of the power stage, not of this
logic.
