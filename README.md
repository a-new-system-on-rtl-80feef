# BNF braking controller on a single programmable chip

This design brakes a car behind another car without a rule-based fuzzy
controller and without a general-purpose computer. The whole controller
fits in a small FPGA. It is built around one number, the **braking nervous
factor** (BNF):

    N(v, D) = v^2 / (2 g mu D)

Here `v` is the speed at which the car closes on the car in front (m/s), `D`
is the gap between them (m), `g` = 9.8 m/s^2 and `mu` = 0.8 is the tyre–road
friction. `v^2 / (2 g mu)` is the distance the car needs to stop. N is
therefore the fraction of the gap that braking would use up. At N = 1 (100 %)
the brake must be pressed to the bottom, position `B_F` = 63. Below that,
the brake scales with N.

The chip does three things with N:

* it **brakes like a driver would** by turning N into a brake position;
* it **learns from the driver**: when the driver brakes at least as hard as
  N asks for, it stores the driver's brake for that situation (distance,
  speed) in an on-chip experience database; when the driver brakes too
  little, it discards that braking and stores its own BNF brake instead;
* it **drives autonomously**: when the cars are closing, nobody presses the
  brake and auto navigation is enabled, it commands the brake from its
  experience, or from N when it has no experience of the situation.

A separate **automatic calibration** core shapes the brake command while the
gap keeps shrinking. It is meant to make braking smoother than repeated full
braking.

## Block diagram

```
            sensor_event ──┐
  scenario_rom ──(event)───┴─► brake_controller ──► brake_muxout (actuator)
                                 │   │  └─ brake_decision
                         bnf_unit ◄──┘  │
                                        ▼
                              experience_db (2048 x {valid, brake})
  nervous_factor_out, brake_position ─► auto_calibration ─► brake_calibration
```

| module | role |
|---|---|
| `bnf_pkg` | event word type, relation codes, action codes, constants |
| `scenario_rom` | 8 built-in test scenarios at addresses 1..8 |
| `bnf_unit` | N in percent and the BNF brake position |
| `experience_db` | learned brake per {distance, speed}, cleared after reset |
| `brake_decision` | full brake / learn / abandon / autonomous, combinational |
| `brake_controller` | per-event state machine, owns the output registers |
| `auto_calibration` | the calibration core |
| `sopc_top` | wires them together |

## The event word

Everything the chip knows about a moment of driving is one 20-bit event
(`bnf_pkg::event_t`), packed MSB first:

| bits | field | meaning |
|---|---|---|
| 19 | `trans` | transmission engaged (0: car standing, brake fully) |
| 18:17 | `relation` | 11 gap steady, 10 leaving, 01 closing, 00 stopped |
| 16:11 | `distance` | gap D in metres, 0..63 |
| 10:6 | `speed` | closing speed v in m/s, 0..31 |
| 5:0 | `brake` | driver's brake position, 0..63 |

Events come from the on-chip scenario ROM or, with `use_sensors` high, from
the `sensor_event` port. An external ADC front end is expected to drive that
port. Its converter and protocol are not part of this RTL.

## From N to a brake position (`bnf_unit`)

All arithmetic is integer. With g and mu kept in tenths (98 and 8),

    N%  = ceil( 10000 * v^2 / (1568 * D) )   saturated at 100
    B   = ceil(  6300 * v^2 / (1568 * D) )   saturated at 63

`B` is computed from the exact ratio, not from the rounded percentage.
Rounding up was chosen because it reproduces every value of the reference
simulation: 9 m/s at 62 m gives N = 9 % and B = 6, and 7 m/s gives 6 % and 4.
`v = 0` gives 0, and `D = 0` with `v > 0` gives a full nervous factor. The
two divisions are combinational and their results are registered: one
cycle after `en`.

## What happens to one event (`brake_controller`, `brake_decision`)

The controller is a state machine. Its states are named after the
original design's controller states (`BRAKE_EN1`..`BRAKE_EN8`, `WE1`,
`EXP1`):

| state | work |
|---|---|
| INIT | wait for the database to finish clearing |
| BRAKE_EN1 | ROM address out |
| BRAKE_EN2 | latch the event; transmission off → full brake, event ends |
| BRAKE_EN3 | start the BNF unit |
| BRAKE_EN4 | latch `nervous_factor_out`, `brake_position` |
| BRAKE_EN5 | latch the database entry for {distance, speed} |
| BRAKE_EN6 | latch the decision |
| BRAKE_EN7 | drive `brake_out_opt`, `auto_drive`, `action` |
| BRAKE_EN8 | autonomous → EXP1, otherwise → WE1 |
| WE1 | write the database (learn or abandon) |
| EXP1 | load `brake_muxout`, the actuator command |
| NEXT | `event_done` pulse, next ROM address or next sensor event |
| DONE | after the last ROM scenario; `use_sensors` restarts |

The decision, in priority order:

1. transmission off → **full brake**: N = 100 %, every brake output 63;
2. `auto_nav_enable`, cars closing, driver brake 0 → **autonomous**: the
   stored brake if the entry is valid, otherwise the BNF brake;
3. driver brake ≥ BNF brake → **learn**: store the driver's brake;
4. otherwise → **abandon** the driver's braking and store the BNF brake.

`brake_out_opt` is the brake that was selected. `brake_muxout`, the actuator
command, changes only at full brake and in autonomous mode. At all other
times it holds its last value, because then the driver is braking. Every
stored value is at least the BNF brake of its situation. Recalling
experience therefore never brakes less than N asks for.

Timing: a full-brake event takes 3 clock cycles. Every other event takes 10.
After reset the database sweep takes 2^11 = 2048 cycles.

### The built-in scenarios

| addr | event | N % | BNF B | opt | muxout | what happens |
|---|---|---|---|---|---|---|
| 1 | transmission off | 100 | 63 | 63 | 63 | full brake at ignition |
| 2 | steady, v 0 | 0 | 0 | 0 | 63 (held) | normal run, learns 0 |
| 3 | closing, v 1, driver 2 | 1 | 1 | 2 | 63 | learns 2 |
| 4 | closing, v 5, driver 3 | 3 | 2 | 3 | 63 | learns 3 |
| 5 | closing, v 9, driver 8 | 9 | 6 | 8 | 63 | learns 8 |
| 6 | closing, v 9, driver 2 | 9 | 6 | 6 | 63 | too little: stores 6 |
| 7 | closing, v 9, no driver | 9 | 6 | 6 | 6 | autonomous, from experience |
| 8 | closing, v 7, no driver | 6 | 4 | 4 | 4 | autonomous, no experience: BNF |

The gap is 62 m throughout. Scenario 7 shows why scenario 6 overwrites the
entry: the learned 8 was replaced by 6 once the driver proved unreliable.

## Experience database (`experience_db`)

The database is addressed directly by `{distance, speed}`: 2^11 words of
`{valid, brake}`, 14 336 bits. That is well within the 49 152 RAM bits of
the FPGA the design was first built on. The direct organisation is this
implementation's choice. Block RAM has no reset, so after reset the module
writes every word empty. `ready` is low for the 2048 cycles this takes.
Reads are synchronous. A read of a word that is being written returns the
old word.

## Automatic calibration (`auto_calibration`)

This is the least obvious part. Its behaviour was reconstructed from four
reference traces, not from a full specification. At each sample (once per
event, on `event_done`):

* `nout1 <= N` and `nout2 <= nout1`, a two-deep history of N;
* if the cars are closing and N rose above `nout1`, the current BNF brake
  position is captured, **alternately** into `aa` (B_n) and `bb` (B_n+1);
* if the cars are closing and N is steady or falling, nothing changes and
  the calibrated brake **holds**;
* if the cars are not closing, `aa` and `bb` are cleared, which
  **releases** the calibration.

The calibrated brake is `nadd = aa + bb`. `brake_calibration` is `nadd`
saturated at 63. The sum of the two latest brake positions while N rises
is how the accumulation of brake increments shows in the reference traces:

| case | N | BNF B | nadd |
|---|---|---|---|
| N rising | 5 → 7 → 9 | 5, 6 | 0 → 5 → 11 |
| N steady | 12 | 8 | 16 (8 + 8) |
| N falling | 12 → 8 | 6 | 16 held |
| cars stop closing | → 0 | 0 | 0 |

**Departure.** The original equations ask that, when N falls, the brake
follow N again (`B = B_F N / N_f`). The reference traces and their
description instead keep the brake. This RTL keeps it.

In the original the calibration core has its own clock and reset. Here it
runs on the system clock with a sampling strobe (`tick`), so no multi-bit
value crosses clock domains. Its reset is the system reset.
`brake_calibration` is a separate output. `brake_muxout` is the uncalibrated
command, as in the reference simulation of the controller.

## How far to trust it

Taken from the original: the equations for N and B, the constants (g, mu,
B_F, the 0–100 % scale), the event word and its relation codes, the eight
scenarios, the decision flow (full brake, learn, abandon, autonomous), the
state names and the WE1/EXP1 branches, the signal names and every value in
the reference traces. All of these are reproduced by the testbenches.

This implementation's own choices:

* rounding up;
* the exact autonomous and safe-braking conditions;
* per-event (not sticky) learning;
* the database organisation and its clearing sweep;
* the work done in each controller state and the 3/10-cycle event timing;
* the alternating `aa`/`bb` capture and the saturation of the calibrated
  brake;
* the sensor-event port and `use_sensors`;
* the halt after the last scenario.

Not included: the ADC interface and the sensors (only the digitised event
port), the car and the brake actuator. Also left out is the fuzzy PD
controller that the design was compared against.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/bnf_pkg.sv tb/tb_sopc_top.sv --top tb_sopc_top -Mdir obj -o sim
./obj/sim
```

Use the same command for `tb_scenario_rom`, `tb_bnf_unit` (exhaustive over
all 2048 inputs), `tb_experience_db`, `tb_brake_decision`,
`tb_brake_controller` and `tb_auto_calibration`. The latter replays the four
calibration traces.

`tb_sopc_top` runs the design at its default size. It first plays the eight
ROM scenarios and checks every traced value, including the calibrated
brake (0, 0, 1, 3, 8, 8, 8, 8). It then switches to 600 random sensor
events, which it checks against a reference model. That model has its own
integer search for N and B, a shadow database and its own calibration
history. The testbench counts each mechanism and fails if one never occurs:
database clearing, full brake, learning, abandoning, autonomous braking from
experience and from BNF, calibration rise, hold and release, the mode switch
and disabled auto navigation. It finishes in well under a second.

The controller carries assertions: the database is written only after
clearing and only for driver-handled events, and the actuator is loaded only
in autonomous mode.

## Changing it

* `bnf_unit` parameters `B_F`, `N_FULL`, `G_X10`, `MU_X10` change the brake
  scale, the percent scale and the physics constants.
* `sopc_top #(DB_AW)` must stay equal to distance width + speed width (11).
  The event field widths live in `bnf_pkg`.
* To use other scenarios, edit the table function in `scenario_rom` and
  `NUM_SCEN`. `ROM_AW` sizes the ROM.
