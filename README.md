# Position controller with timed motor steps and error sum

This is a small, synchronous controller that moves a mechanism to a
programmed position without a proportional drive. The motor is either on or
off. The controller measures how far the mechanism is from the target, then
runs the motor for a fixed time picked from four classes of error size:
10, 8, 6 or 4 seconds. After that time it measures again, and it repeats
until the error is zero. It then signals "position reached" and waits for the
next command. While it works it keeps a running sum of every error it
measured. One output shows either the last error or that sum, and a button
switches between the two.

Everything is plain synchronous logic: two state machines, a cycle counter,
two 8-bit registers and a 16-bit accumulator.

## Interface (`controllore`)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `CLK`      | in  | 1  | clock, rising edge |
| `RESET`    | in  | 1  | asynchronous reset of everything, active high |
| `PROGR`    | in  | 1  | program: stores `POS_REF`, starts a run if idle, clears the error sum, resets the display to "last error" |
| `BUTTON`   | in  | 1  | switches `ERROR` between last error and error sum (level-sensitive, see below) |
| `POS_REF`  | in  | 8  | target position |
| `POS_CORR` | in  | 8  | measured (current) position |
| `ERROR`    | out | 16 | last measured error (zero-extended), or the error sum |
| `PRENDI`   | out | 1  | one-cycle pulse: target reached ("take") |
| `MON`      | out | 1  | motor on |

Parameters of the top: `TICKS_PER_SEC` (default 1000), `CNT_W` (14), and the
error thresholds `TH10`/`TH8`/`TH6` (196/128/64).

## The measure-and-move loop (`position_fsm`)

The main state machine has eight states:

```
IDLE --PROGR--> LEGGI --> COMPARA --error==0--> FINE --> IDLE
                  ^          |
                  |          +--error>=196--> ATTIVA10 --10 s--+
                  |          +--error>=128--> ATTIVA8  -- 8 s--+
                  |          +--error>=64 --> ATTIVA6  -- 6 s--+
                  |          +--otherwise --> ATTIVA4  -- 4 s--+
                  +--------------------------------------------+
```

* **LEGGI** ("read") forms `error = POS_REF_CK - POS_CORR`. `POS_REF_CK` is
  the target stored at the last `PROGR`. The subtraction is 8-bit unsigned,
  modulo 256. The state raises `enable_reg`, which loads the error register
  and adds the error to the sum.
* **COMPARA** ("compare") clears the timer. It then branches on the *stored*
  error, which is the value loaded one edge earlier.
* **ATTIVAn** ("activate") drives `MON` and lets the timer count. It leaves
  in the cycle in which the timer's n-second flag is high.
* **FINE** ("end") raises `PRENDI` for one cycle.

All outputs are Moore outputs, decoded from the state alone. `PROGR` only
starts a run from IDLE. In any other state it still reloads the target
register, so a run that is already going heads for the new target from its
next measurement. It also clears the sum and the display state.

### Timing of one round

| state    | cycles |
|----------|--------|
| LEGGI    | 1 |
| COMPARA  | 1 |
| ATTIVAn  | n × `TICKS_PER_SEC` exactly (counter 0 … n·T−1) |

A round with a non-zero error therefore takes 2 + n·T cycles, where
T is `TICKS_PER_SEC`. A run that starts with zero error goes
IDLE → LEGGI → COMPARA → FINE → IDLE. The edge that samples `PROGR` enters
LEGGI, and `PRENDI` is high in the third cycle from there.

### The unsigned error

The error is not an absolute value, and it has no sign. If the mechanism is
*past* the target, the difference wraps: target 30 with position 40 gives an
error of 246, which is a 10-second run. The loop only makes sense with a
mechanism that moves one way and wraps round, or with a motor that never
overshoots. The RTL keeps this as specified. If you need a bidirectional
drive, add a direction output and use the magnitude of the signed
difference.

The first threshold is 196, not 192. The four classes are therefore
0–63, 64–127, 128–195 and 196–255.

## The seconds timer (`seconds_timer`)

The timer is a 14-bit counter. `reset_timer` (high in COMPARA) clears it,
and `en_timer` (high in the ATTIVA states) advances it. Four comparators
give `secN = (count == N·TICKS_PER_SEC − 1)`.

* The default is `TICKS_PER_SEC = 1000`, that is a 1 kHz clock: 10 s is
  10000 cycles, and 9999 fits in 14 bits.
* `TICKS_PER_SEC = 1` makes one clock one second. Use it for quick
  simulations. The unit testbenches use 1, and the end-to-end testbench
  uses 2.
* With a faster clock, raise both `TICKS_PER_SEC` and `CNT_W`. An
  elaboration-time assertion checks that 10 s fits in the counter.

## Error sum and display (`error_accumulator`, `display_fsm`)

Every measurement (each LEGGI cycle) adds the 8-bit error, zero-extended,
into a 16-bit sum. The sum wraps modulo 65536. `PROGR` clears it, so the sum
covers the run since the last programming, including the final zero
measurement.

The display machine has two states. USCITA1 drives `ERROR` with the stored
error, and USCITA2 drives it with the sum. `ERROR` is combinational from the
state and the registers, so it has no extra latency. `BUTTON` is sampled as
a level: while it is high the display flips on **every** clock edge. A
physical push button therefore needs a debouncer and a one-pulse edge
detector in front of this input. `PROGR` and `RESET` return the display to
USCITA1.

## Departures from the original description

* **Resets.** The original clears the timer with an asynchronous reset
  driven by `RESET or reset_timer`. It also clears the sum and the display
  machine asynchronously with `RESET or PROGR`. Here only `RESET` is
  asynchronous. `reset_timer` and `PROGR` are synchronous clears with
  priority over the other inputs of those registers. The timer behaves the
  same, because COMPARA always lasts one cycle. The sum and the display are
  equal from the first clock edge with `PROGR` high. They differ only during
  that first cycle, when the original already shows zero.
* **Timer scale.** The original counts one clock as one second in its
  simulations. Its hardware values are 10000 cycles for 10 s. The default
  here is the hardware value, and `TICKS_PER_SEC` selects either.
* The target and error registers are one parameterised `load_reg`,
  instantiated twice.
* The original leaves open several details. Clear-over-enable priority,
  the wrapping of the sum and the enum state encoding are this design's
  choices.

## Files

RTL (`rtl/`):

| file | contents |
|------|----------|
| `ctrl_pkg.sv` | widths (`POS_W` = 8, `SUM_W` = 16) and the two state enums |
| `load_reg.sv` | register with load enable: target and error registers |
| `seconds_timer.sv` | cycle counter and the 10/8/6/4 s flags |
| `position_fsm.sv` | main state machine and the error subtractor; assertions that at most one of motor/clear/read/done is active and that the timer runs exactly with the motor |
| `error_accumulator.sv` | 16-bit error sum |
| `display_fsm.sv` | selects last error or sum for `ERROR` |
| `controllore.sv` | top: wires the above |

The top-level nets `c_count`, `state` and `show_sum` drive no output. They
name the timer count and the two state registers for waveform viewing. A
lint tool reports them as unused.

Testbenches (`tb/`), each self-checking, ending with a
`TB_RESULT checks=N failures=M` line and guarded by a cycle watchdog:

| file | what it checks |
|------|----------------|
| `tb_load_reg.sv` | random load/hold against a reference register, asynchronous reset |
| `tb_seconds_timer.sv` | count and flags at 1 and 3 cycles per second, random clear/enable, exact interval lengths |
| `tb_position_fsm.sv` | every state's outputs, the error value in LEGGI, motor time per error class at the boundaries 0/1/63/64/127/128/195/196/255 and at 200 random points, wrapped error, `PROGR` ignored while busy, reset |
| `tb_error_accumulator.sv` | random sums against a reference, 16-bit wrap, clear priority, reset |
| `tb_display_fsm.sv` | toggling, clear and reset, combinational output |
| `tb_controllore.sv` | end to end at 2 cycles/s with a motor model and a cycle-accurate reference model (`ctrl_ref_model.sv`, `motor_plant.sv`): all four motor times, immediate finish at zero error, wrapped error, re-programming mid-run, button held high, reset mid-run; each counted and required |
| `tb_controllore_full.sv` | default parameters (1000 cycles/s): a full run from 0 to 200, about 940,000 cycles, compared with the reference model every cycle; first motor period exactly 10000 cycles |

The motor model advances the position by one step per 4 s of motor time.
Each period restarts the count, so 4 s and 6 s periods move one step, and
8 s and 10 s periods move two. With this model the error never overshoots,
and the loop converges.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_controllore \
    -y rtl -y tb +libext+.sv rtl/ctrl_pkg.sv tb/tb_controllore.sv
./obj_dir/Vtb_controllore
```

Replace the top module and file name for any other testbench. Each one
finishes in about a second. To lint the design:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/ctrl_pkg.sv rtl/controllore.sv
```

## How far to trust it

Each block has been compared with a reference written separately from the
RTL. The whole controller has been compared with a cycle-accurate model,
cycle by cycle, at both the reduced and the default timer scale.

Each testbench, the end-to-end one included, was also run against a copy of its module with one
deliberate bug, and it failed every time. The bugs were: load enable
ignored, the 6 s flag decoding the 8 s count, `>` instead of `>=` on the
128 threshold, the display ignoring `PROGR`, the sum dropping the top bit of
the error, and the sum not cleared by `PROGR`.

The design lints cleanly apart from the unused observation nets and the
note that `RESET` feeds assertions synchronously. It elaborates in Yosys and
maps to 80 word-level cells and 55 flip-flops at the default size.
