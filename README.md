# Hysteresis current control for a five-level flying-capacitor inverter

A single-phase multilevel inverter can put five voltages on its load:
+2Vdc, +Vdc, 0, -Vdc and -2Vdc. Controlling the load current with a
classic hysteresis band is harder than on a two-level inverter, for three
reasons: a single band does not say *which* pair of levels to switch
between, several switch states give the same level, and those states charge
or discharge the flying capacitors that create the intermediate levels.

This RTL is the digital half of a controller that handles all three with
very little logic, small enough for a 128-macrocell CPLD:

* **Level by hysteresis.** Two comparators tell whether the load current is
  above or below a band of ±Ei around the reference. Each time the current
  leaves the band the output level moves one step: down if it left upwards,
  up if it left downwards. Inside the band nothing switches.
* **Band change by time-out.** If one step was not enough and the current
  stays out of the band for a time-error period Et, the level moves one
  more step in the same direction, and again every Et after that. This
  replaces the stack of extra comparator bands that a purely
  magnitude-based multilevel controller would need.
* **Switch state by capacitor balance.** The level is mapped to a switch
  state that is one switch away from the previous one (an adjacent state).
  Where several adjacent states give the level, the one that pushes the
  flying capacitor back towards Vdc is chosen. The choice uses one
  comparator bit for the capacitor voltage and one for the sign of the load
  current.

## Signal flow

```
 analog (outside)             hcc_top
 ----------------   +-------+   +---------------+   +---------------+   +--------------------------+
 i-iref > +Ei  ---->|       |-->| level_counter |-->| level_decoder |-->| simple_state_transition  |--> sw_simple[2:0]
 i-iref < -Ei  ---->| sync2 |   |  up/down, sat |   |  one-hot sel  |   |  (3 switches, Table A)   |
 Vca > Vdc     ---->|       |   +---------------+   +---------------+   +--------------------------+
 i > 0         ---->|       |      ^  | leave/out_of_band             +--------------------------+
 Vca_a,Vcb_b   ---->|       |      |  v                        sel -->| fc_state_transition      |--> sw_fc[3:0]
                    +-------+   +-------------+                       |  (4 switches, Table B)   |
                                | error_timer |--> et_expired         +--------------------------+
                                +-------------+
```

| File | Role |
|---|---|
| `rtl/hcc_pkg.sv` | level type, switch-state constants, level and capacitor-effect functions of both topologies |
| `rtl/sync2.sv` | two-flop synchroniser for the comparator bits |
| `rtl/error_timer.sv` | resettable time-error timer, one pulse per `ET_CYCLES` out of band |
| `rtl/level_counter.sv` | up/down level counter driven by band exits and timer pulses |
| `rtl/level_decoder.sv` | signed level to one-hot select lines |
| `rtl/simple_state_transition.sv` | switch states of the three-switch structure |
| `rtl/fc_state_transition.sv` | switch states of the four-switch flying-capacitor bridge |
| `rtl/hcc_top.sv` | the controller |

## The level counter and the time-error timer

The level is a signed 3-bit number in units of Vdc. The counter sees the
band comparators after the synchroniser and steps:

| event | step |
|---|---|
| `above` rises (current crosses the upper band) | -1 |
| `below` rises (current crosses the lower band) | +1 |
| `timeout` while `above` is held | -1 |
| `timeout` while `below` is held | +1 |
| step beyond ±2 | none (saturates) |

Note that a level is not tied to a band. The same crossing of the upper band
may take the output from +2Vdc to +Vdc or from 0 to -Vdc. The pair of levels
used for tracking follows the reference on its own: as more voltage is
needed, the current falls out of the lower band even at the higher level of
the pair, so the next crossing raises the pair by one.

The timer is cleared while the current is inside the band and in the cycle
it leaves, counts while it is out, and at `ET_CYCLES` pulses `et_expired`
and restarts. So the first extra step comes `ET_CYCLES` cycles after the
band step, and each later one `ET_CYCLES` after that.

**Choosing Et.** The smallest time in which the current can cross from one
band to the next is set by the largest current slope:
`Et = Delta * L / (2Vdc + Vback)`, where Delta is the band spacing, L the load
inductance and Vback the back emf. A shorter Et reacts sooner; a longer Et
lets the error grow (see the long-Et test below). The default
`ET_CYCLES = 2600` is a deliberately long 2.6 ms at a 1 MHz clock. For a
10 mH load, a 0.2 A spacing, a 60 V bus and 25 V back emf, the formula gives
about 24 cycles.

A level change of n steps therefore takes up to n·Et when the controller
has to search for it by time-out. This is inherent to the feedback-only
scheme.

## Switch states of the simple structure

This is the structure the controller's single capacitor bit is made for.
One leg has a flying capacitor between S1 and S2, across a 2Vdc bus. The
other leg is a plain two-level leg (S3). Vout/Vdc = S1 + S2 - 2·S3.

Table A:

| S1 S2 S3 | Vout | Vca for i>0 |
|---|---|---|
| 110 | +2Vdc | — |
| 100 | +Vdc | rises |
| 010 | +Vdc | falls |
| 000 | 0 | — |
| 111 | 0 | — |
| 101 | -Vdc | rises |
| 011 | -Vdc | falls |
| 001 | -2Vdc | — |

`simple_state_transition` holds the state in flip-flops. When the held
state does not give the decoded level, it loads:

* ±2Vdc: 110 or 001;
* ±Vdc: the "rises" state if the capacitor is low and i>0, or high and
  i<0; the "falls" state otherwise;
* 0: 000 if coming from a positive level, 111 if coming from a negative
  one.

Every step between neighbouring levels is then one switch change, except
000→101/011 and 111→010/100. This structure cannot avoid those four: they
occur only when the output crosses zero, about twice per fundamental period.
The state does not change while the level holds, even if the capacitor bit
does. The capacitor is corrected at switching instants only, so there are no
extra switchings.

## Switch states of the four-switch bridge

Both legs of this bridge carry a flying capacitor (S1/S2 leg a, S3/S4
leg b). Vout/Vdc = S1 + S2 - S3 - S4. For i>0:

* S1 alone on charges capacitor a, and S2 alone discharges it;
* S4 alone on charges capacitor b, and S3 alone discharges it.

Negative current reverses both effects. All 16 states are usable (Table B is
the 16-row expansion of these two rules). Every single-switch change moves
the output one level, so this bridge needs no non-adjacent transitions.

`fc_state_transition` changes exactly one switch per clock edge, towards
the target level. Among the candidate switches it scores each resulting
state: +1 for each capacitor moved towards Vdc, -1 for each moved away. It
takes the best. Ties are broken by a scan order that alternates at every
change (S1 first, then S4 first). Without that, leg a would always win when
the two capacitors want opposite things, and capacitor b drifts. This
scoring rule is this design's own. The selection principle (adjacent state
with the right capacitor effect) is the scheme's.

## Interface and timing of `hcc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (1 MHz assumed for the defaults), asynchronous active-low reset |
| `cmp_above` | in | 1 | current error above +Ei |
| `cmp_below` | in | 1 | current error below -Ei |
| `cap_high` | in | 1 | simple structure: Vca above Vdc |
| `fc_cap_a_high`, `fc_cap_b_high` | in | 1 | bridge: capacitor a / b above Vdc |
| `i_pos` | in | 1 | load current positive |
| `level` | out | 3 | signed output level |
| `sw_simple` | out | 3 | {S1,S2,S3} |
| `sw_fc` | out | 4 | {S1,S2,S3,S4} |
| `et_expired` | out | 1 | time-error pulse |

Parameters: `N_LEVELS = 5` (the mappers are written for five levels) and
`ET_CYCLES = 2600`.

Timing:

* A comparator change that is set up before clock edge k is in the
  synchroniser output after edge k+1.
* It moves `level` at edge k+2 and the gate outputs at edge k+3.
* Reset gives level 0 and all switches off.

Dead time between complementary gates is not generated here. It belongs in
the gate drivers.

Only one of `sw_simple` and `sw_fc` drives a given power stage. Both are
produced from the same level, so either topology can be used.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line:

* `tb_error_timer`: the pulse position against a reference count, under
  random enable/clear.
* `tb_level_counter`: directed band/time-out/saturation cases, then 5000
  random cycles against a reference of the stepping rules.
* `tb_level_decoder`: every level.
* `tb_simple_state_transition`: random level walks with random capacitor and
  current bits. Checks the reached level, the capacitor direction, the
  allowed transitions, the zero-state rule, and that the state holds.
* `tb_fc_state_transition`: the same walks against a literal 16-state table.
  Checks one switch per change and the best balance score.

The closed-loop testbenches use `tb/hcc_env.sv`, a behavioural model of:

* the simple power stage (bus 60 V, so Vdc = 30 V) on an R-L load
  (10 mH, 5 Ω) with a 25 V back emf, integrated once per clock;
* the four comparators, with a 200 mA band;
* the two capacitors of the bridge, charged by the same current.

The reference is 1.3 A at 50 Hz. It runs for two periods. At 5 ms and 25 ms
the reference and the back emf reverse at a peak, which no single level step
can correct. The environment:

* checks the level against a reference model every cycle;
* checks both gate vectors and their transitions;
* checks current tracking and capacitor balance;
* fails any mechanism that never occurred: band steps, time-out steps,
  saturation, zero-crossing transitions, charging and discharging states,
  both zero states, and every level.

* `tb_hcc_top_eq5` sets Et from the formula (24 cycles). The error stays
  within 0.22 A outside the reversals, the mean error is about 0.1 A, and
  all capacitors stay within ±12 % of Vdc.
* `tb_hcc_top` runs the controller at its default parameters (Et = 2.6 ms).
  Here the reversals show the long-Et behaviour: after the first step the
  current keeps running away until the timer expires. The bridge capacitors,
  parked in one state meanwhile, drift by up to about 30 %. Saturation does
  not occur at this Et, so it is reported but not required.

To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  rtl/hcc_pkg.sv tb/tb_hcc_top_eq5.sv --top-module tb_hcc_top_eq5 -o sim
./obj_dir/sim
```

## Where this RTL departs from, or goes beyond, the scheme

* The comparators, the power stage and the load are analog. They appear
  only as the behavioural model in `tb/hcc_env.sv`.
* The timer period is a count of the controller clock (`ET_CYCLES`), not a
  separately clocked timer. The clock frequency (1 MHz for the defaults) is
  an assumption.
* The two-flop synchroniser and the saturation at ±2 are this design's own
  additions. So is holding the switch state until the level changes, which
  is a reading of "decide at the next switching time".
* The scheme's logic has one capacitor bit, which fits the simple
  structure. The four-switch bridge mapper and its two capacitor inputs are
  an extension built from the bridge's switch-state table.
* The magnitude-only multiband controller, which the time-error scheme is
  compared against, is not included.
* Load values (L, R, C, back emf) in the testbenches are illustrative
  choices. Only the bus voltage, band, reference and the 2.6 ms period come
  from the scheme's experimental setup.
