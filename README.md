# Stepwise shutdown safety logic

A nuclear plant protection system has a hard, expensive last resort: the full
shutdown. The *stepwise shutdown* logic sits in front of it. It watches the same
process variables with tighter limits and, when one of them goes out of range,
pushes the process towards a safer state in short, repeated steps: a 3 s control
action, then a pause, then another 3 s action if the disturbance is still there,
and so on until the process has recovered or the real shutdown takes over. An
operator can also trigger a step by hand from the control room.

This repository is a synthesizable SystemVerilog implementation of that logic,
with self-checking testbenches. Two wirings of the timing logic are provided.
Wiring **B** is the working design and the default. Wiring **A** is an earlier
variant with a subtle fault: under one timing of the manual trip its output
freezes at 0. It is kept, selectable by a parameter, so that the fault can be
reproduced and studied.

## Inputs: four criteria from redundant signals

Every field signal arrives twice (two redundancies) and every copy carries a
*fault status* bit from the I/O platform. Signals are named `XYZ`: X is the
redundancy, Y the signal group, Z the signal number within the group.

| criterion | signals | voting | extra |
|---|---|---|---|
| reactor temperature | 111, 112, 211, 212 (analogue) | second maximum > 125 C, i.e. 2 out of 4 | – |
| reactor over-pressure | 121, 221 (binary) | 1 out of 2 | – |
| high reactor water inflow | 131, 231 (binary) | 1 out of 2 | must hold 5 s |
| manual trip from the control room | 141, 241 (binary) | 1 out of 2 | own 3 s pulse (B) |

Fault status handling: a copy marked faulty is ignored. For the binary votes it
counts as 0; for the temperature its value is replaced by 0 before the second
maximum is taken. When all copies of a measurement are faulty the measurement
reads 0 (no trip). One consequence worth knowing: with three of the four
temperatures faulty, the temperature criterion can no longer trip.

Temperatures are unsigned 16-bit numbers in units of 0.1 C, so the limit is
`1250`. Binary signals are `bin_sig_t {value, fault}`, temperatures
`ana_sig_t {value, fault}` (see `rtl/ssd_pkg.sv`).

## The timing logic

All four criteria are ORed. What happens next is the core of the design and the
part that is easy to get wrong.

```
 temp ─┐
 press ┼─ OR ─ any ─┬─ AND ─ arm ─► [3 s pulse] ──ctl──┬─────────────── OR ─► shutdown
 inflow┤            │   ▲ (inverted)                   │                ▲
 man_p ┘            │   └──────── [15 s pulse] ◄───────┘                │
                    │                                                   │
 manual vote ─► [3 s pulse] ─ man_p ─────────────────────────────────────┘
                                           (wiring B)
```

* A **time pulse** block (`time_pulse`) reacts to a *rising edge* of its input
  by giving a pulse of fixed length. It cannot be retriggered: an edge that
  arrives while the pulse runs is lost.
* When a criterion appears, `arm` rises, the 3 s **control pulse** `ctl` starts
  and drives the output. The rising edge of `ctl` also starts the 15 s pulse.
* The 15 s pulse blocks `arm` through the inverted AND input. After the 3 s
  control the logic therefore waits out the rest of the 15 s (a 12 s pause).
* When the 15 s pulse ends and a criterion still holds, `arm` rises again and
  the next 3 s control follows. A held criterion gives 3 s of action every 15 s.
* In wiring B an immediate assertion (`a_arm_serves`) checks the central
  safety property at every step. When a criterion is present and the 15 s
  pulse is idle, the control pulse must be on in the next step. Wiring A breaks
  this property.
* **Wiring B** gives the manual trip its own 3 s pulse. It goes straight to the
  output OR, so a manual trip acts immediately, even in the middle of a pause,
  and it never touches the 15 s pulse. It also enters the criteria OR, so a
  manual trip in the idle state starts a regular control cycle.

### Wiring A and its freeze fault

In wiring A the manual vote enters the criteria OR directly, and its rising
edge resets the 15 s pulse. The intent is to cut the pause short. The output
is `ctl` alone.

The flaw appears when the manual trip comes *during* the 3 s control pulse:

1. the reset clears the 15 s pulse, so `arm` goes back to 1;
2. that rising edge of `arm` reaches the 3 s block while it is still running,
   and is lost;
3. the 3 s pulse ends, and the 15 s block gets no new rising edge, so it stays idle;
4. `arm` now stays at 1 for as long as any criterion holds. With no further
   rising edge, the control pulse never starts again. The output is stuck at 0
   until every criterion has cleared.

`tb_shutdown_timing_a` and `tb_stepwise_shutdown` show both the intended
behaviour (a manual trip in the pause shortens it) and the freeze. Wiring B
has no resettable delay and does not have the fault.

## Time base and cycle-level timing

All timers count *time steps*. `time_base` divides the clock into a one-cycle
strobe `tick` every `CLK_PER_TICK` cycles. Every register of the timing logic
advances only on a clock edge with `tick = 1`. The defaults are a 1 MHz clock and
a 10 ms step, so the pulses are 300 and 1500 steps and the inflow delay is
500 steps.

Cycle-exact behaviour, in steps:

* `time_pulse`: an input edge seen at step *k* gives `out = 1` at steps
  *k+1 … k+P*. The block compares its input with the previous step's value.
  The step counter runs 1…P and returns to 0 after its last step.
* `on_delay`: the output is 1 from the *D*-th step after the input rose, if the
  input stayed 1. It falls in the same step as the input.
* With a criterion held, control pulses last exactly 3 s. They start
  1500 + 2 steps apart (15.02 s at the default step): each of the two pulse
  blocks in the loop adds one step. At coarse steps this matters. At 1 s steps
  the period is 17 s, not 15 s.
* After reset the previous-input registers hold 0. A criterion that is already
  present when reset is released therefore starts a control pulse (fail-safe).

Field inputs must be synchronous to `clk`. No input synchronizers are included.

## Parameters (top: `stepwise_shutdown`)

| parameter | default | meaning |
|---|---|---|
| `VARIANT` | `VARIANT_B` | timing wiring, `VARIANT_A` for the faulty variant |
| `CLK_PER_TICK` | 10000 | clocks per time step (1 MHz clock assumed) |
| `TICK_MS` | 10 | length of a time step in ms |
| `SHORT_PULSE_MS` | 3000 | control pulse and manual pulse |
| `LONG_PULSE_MS` | 15000 | control period |
| `INFLOW_DELAY_MS` | 5000 | switch-on delay of the inflow criterion |
| `TEMP_LIMIT` | 1250 | 125.0 C |

Durations must be whole multiples of `TICK_MS`. Besides `shutdown`, the top brings
out each criterion, the OR, the three pulses and the selected temperature, for
display and test. `manual_pulse` is 0 in wiring A.

## What is taken from the original description and what is not

Taken from it: the four criteria and their signal numbers, 2-out-of-4 selection
through a second maximum, the 125 C limit, 1-out-of-2 voting, the 5 s inflow
delay, the 3 s / 15 s time pulse blocks and both wirings. Also taken: the
discrete-step time-pulse behaviour (rising-edge start, counter 1…P,
non-retriggerable), the rising-edge reset of wiring A, and the rule that a
measurement with all copies faulty reads 0.

This design's own choices: the clock rate and the clock divider; the
temperature encoding; ignoring a single faulty copy, including replacing a
faulty temperature by 0; no hysteresis on the limit monitor; reset giving
priority over a simultaneous start in `time_pulse`; asynchronous active-low
reset; and the one-step latency per pulse block described above.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Expected values come from an independent
reference model (`tb/ssd_ref_pkg.sv`). It uses count-down timers, counts
measurements above the limit instead of sorting them, and keeps its own edge
registers.

| testbench | what it shows |
|---|---|
| `tb_vote_1oo2`, `tb_limit_max`, `tb_second_max4`, `tb_temperature_module` | exhaustive, boundary and random checks of the combinational voting |
| `tb_time_base`, `tb_on_delay`, `tb_time_pulse`, `tb_inflow_module` | step strobe, delays and pulse lengths to the step, lost edges, reset edges |
| `tb_shutdown_timing_b` | period of 15 + 2 steps, 3-step pulses, manual trip during the pause, 5000 random steps |
| `tb_shutdown_timing_a` | pause shortened by a manual trip, output freeze, recovery, random steps |
| `tb_stepwise_shutdown` | both wirings side by side against the model, with 1 s steps. Twelve named mechanisms must each occur at least once (see file header). |
| `tb_stepwise_shutdown_full` | the top at its defaults (1 MHz, 10 ms). Two control pulses 15.02 s apart, each exactly 3,000,000 cycles, a manual trip in the pause, the 5 s inflow delay, and the 2-out-of-4 temperature trip. About 55 s of plant time, roughly 30 s of simulation. |
| `tb_single_failure` | the single-failure criterion under three failure models (below) |

### Single-failure behaviour

`tb_single_failure` drives wiring B from a random plant process. In each
measurement at most one copy is failed at a time, and failures come and go at
random. The three failure models:

1. detected failure, random value;
2. undetected failure, the copy keeps its last value;
3. undetected failure, random value.

The test checks that no failure prevents a required shutdown: a held
criterion is answered within one period, and every manual trip reaches the
output. It also checks that models 1 and 2 never trip without a real demand.
Under model 3 a single undetected binary copy at 1 does trip the 1-out-of-2
vote. This is a failure in the safe direction and is inherent to 1-out-of-2
voting; the test requires that it is seen.

Note that in wiring B a *held* manual trip gives a single 3 s pulse. Repeated
steps come only from the process criteria.

### Running a testbench

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ssd_pkg.sv tb/ssd_ref_pkg.sv tb/tb_stepwise_shutdown.sv \
    --top-module tb_stepwise_shutdown -o sim
obj_dir/sim
```

Replace the testbench name for any other test. All testbenches except
`tb_stepwise_shutdown_full` finish in well under a second.

## Files

* `rtl/ssd_pkg.sv`: types (`temp_t`, `bin_sig_t`, `ana_sig_t`, `variant_e`) and `ms_to_ticks`
* `rtl/time_base.sv`: step strobe
* `rtl/second_max4.sv`, `rtl/limit_max.sv`, `rtl/temperature_module.sv`: temperature criterion
* `rtl/vote_1oo2.sv`: 1-out-of-2 vote (pressure, manual trip, inflow)
* `rtl/on_delay.sv`, `rtl/inflow_module.sv`: inflow criterion
* `rtl/time_pulse.sv`: time pulse block
* `rtl/shutdown_timing_b.sv`, `rtl/shutdown_timing_a.sv`: the two wirings
* `rtl/stepwise_shutdown.sv`: top level
* `tb/`: testbenches and the reference model
