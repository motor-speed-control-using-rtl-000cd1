# Triple-redundant DC motor speed controller for SRAM FPGAs

A DC motor speed loop is simple: every sampling interval, count the encoder
pulses and turn the count into a speed. A PID law then gives a new PWM duty
cycle for the H-bridge. On an SRAM-based FPGA, though, a radiation-induced soft error in
the processor running that loop can drive the motor anywhere. This design
runs the loop on **three identical controllers in lockstep**. Everything they
write to the motor hardware passes through a **majority voter**, so one
faulty controller is outvoted (masked). A **manager** marks the faulty
controller and asks for its recovery while the other two keep the motor
regulated. If a **second** failure occurs before that, it switches the motor
drive off (fail-safe).

The RTL here is the hardware around the controllers:

| module | role |
|---|---|
| `motor_ctrl_tmr_top` | the subsystem: voter, manager, and the shared peripherals |
| `tmr_voter` | bitwise 2-of-3 majority of the controllers' write buses, with disagreement flags |
| `tmr_manager` | first-failure marking and recovery handshake, second-failure fail-safe |
| `pwm` | PWM generator for the H-bridge enable input |
| `mycounter` | encoder pulse counter from which the speed is computed |
| `fit_timer` | fixed-interval timer, one interrupt per 100 ms sampling interval |
| `motor_pkg` | shared constants and the controller write-bus type `ctrl_bus_t` |

The controllers themselves are 32-bit soft processors running the control
program, and they are not part of the RTL. The same goes for their serial
link to the host application, the clock manager, and the L298N driver with
its geared motor. Their connections are ports of `motor_ctrl_tmr_top`. The
testbenches hold behavioural models of the controllers and the motor
(`tb/ctrl_model.sv`, `tb/motor_model.sv`), so the loop can be closed in
simulation.

## Structure

```
            ctrl_bus[0] ctrl_bus[1] ctrl_bus[2]     (from controllers 1..3)
                 │           │           │
                 └─────┬─────┴─────┬─────┘
                   ┌───▼───────────▼───┐ disagree, no_majority ┌─────────────┐
                   │     tmr_voter     ├──────────────────────►│ tmr_manager ├─► failed_mask, recover_req,
                   └─────────┬─────────┘                       └──────┬──────┘   fail_count
                  voted bus  │                                 fail_safe
             ┌───────────────┼───────────────┐                        │
    pwm_we,  │ pwm_width     │ cnt_clear     │                        │
       ┌─────▼─────┐   ┌─────▼─────┐   ┌─────▼─────┐                  │
       │    pwm    │◄──┼───────────┼───┼── enable = !fail_safe ◄──────┘
       └─────┬─────┘   │ mycounter │   │ fit_timer │
             ▼         └─────┬─────┘   └─────┬─────┘
          pwm_out       enc_count         fit_irq      (both go to all three controllers)
        (to L298N)    ▲ from enc_a
```

The controllers are triplicated. The peripherals are single copies that all
three controllers share, and they read the same `enc_count` and `fit_irq`.

## One control step

Each controller runs the same program, a small state machine:

* **Wait**: idle until an event arrives.
* **Configuration**: on a host command, takes new PID gains, sampling time and setpoint, then returns to Wait. In the model only the setpoint is taken; the gains are parameters.
* **Start**: on a host command, clears the counter and the PID memory, then returns to Wait.
* **Execution**: on each `fit_irq` while running, does one step of the speed loop, described below, then returns to Wait.
* **Stop**: on a host command, writes width 0, then returns to Wait.

One Execution step, as `tb/ctrl_model.sv` performs it:

1. `fit_timer` pulses `fit_irq` for one cycle every `INTERVAL` cycles (100 ms).
2. The controller raises `cnt_clear`. On that same clock edge it reads
   `enc_count`, which is the number of pulses in the window that just ended. The
   counter restarts on that edge, so no pulse falls between reading and
   clearing.
3. It computes the speed: rpm = count · 60 / (PPR · 0.1 s). It then applies the PID law
   and writes the new high time with `pwm_we`/`pwm_width`.
4. `pwm` takes the new width at the start of its next period.

At the defaults, 120 rpm gives about 75 pulses per window. This assumes an encoder
with 374 pulses per output revolution. The 32-bit counter cannot overflow in practice.

## Voting and fault handling

This is the part that needs the most care.

**What is voted.** Each controller drives one `ctrl_bus_t`, 18 bits wide:
`{pwm_we, pwm_width[15:0], cnt_clear}`. `tmr_voter` forms the bitwise
majority `(a&b)|(a&c)|(b&c)`, which is purely combinational. The voted bus
drives the peripherals and is captured on the next clock edge. With healthy
controllers in lockstep the three buses are identical in every cycle, so any
difference is an error. The voter reports:

* `disagree[i]`: bus *i* differs from the voted word.
* `no_majority`: no two buses are equal.

**First failure.** The manager checks, cycle by cycle, that exactly one module
disagrees and that none is already marked. When both hold, it sets
`failed_mask[i]` and `recover_req[i]` and increments `fail_count`, which
saturates at 255. The voter keeps masking the module. While the module stays marked, its
repeated disagreement is not counted again. The motor keeps running on the
other two controllers.

**Recovery.** Bringing the failed controller back into step is the
controllers' job. In the testbench models, recovery simply means that the
injected error has ended. The controller reports completion with a pulse on
`recover_done[i]`, and the mark clears on the next edge. A `recover_done`
for a module that is not marked is ignored.

**Second failure.** The manager sets `fail_safe` when any of these happens:

* a module other than the marked one disagrees;
* two modules disagree in the same cycle;
* no two modules agree.

It then holds `fail_safe` until reset. While `fail_safe` is set,
`pwm.enable` is low and `pwm_out` stays low, so the motor coasts to a stop.

**Limits worth knowing.**

* Only the controllers are redundant. The voter, the manager and the
  peripherals are single copies, so an upset in their own flip-flops is not
  masked.
* With three inputs, a bitwise majority always produces a word. When
  `no_majority` is set, that word is a mix of bits and must not be trusted;
  the manager goes fail-safe in that case.
* The voter compares write strobes and data only. A controller that fails
  silently, by writing exactly what the others write, cannot be seen. That
  holds for any output-comparison scheme.
* The design does not include scrubbing of the FPGA configuration memory,
  which repairs upsets in the configuration itself.

## The peripherals

**`pwm`**
* A counter runs from 0 to `PERIOD-1`. The output is high while the
  counter is below the active width, so the duty cycle is `width/PERIOD`.
  At the defaults, widths 2500, 1250 and 3750 give 50 %, 25 % and 75 %. A
  width of `PERIOD` or more gives a constant high.
* Writes go to a holding register. It is copied into the active width on
  the last cycle of a period, so no period is cut short.
* `period_start` marks the first cycle of each period.
* `enable` low holds the output low without stopping the counter.

**`mycounter`**
* Passes encoder channel A through a two-flop synchronizer and counts its
  rising edges. An edge shows in `count` three cycles after it arrives.
* `clear` restarts the count. An edge detected in the same cycle as `clear`
  becomes the first count of the new window.
* Only speed is measured. Direction (quadrature) is not decoded.

**`fit_timer`**
* A counter wraps every `INTERVAL` cycles.
* `irq` is a registered one-cycle pulse. The first pulse comes on the
  `INTERVAL`-th clock edge after reset.

## Parameters

| parameter | default | origin |
|---|---|---|
| `motor_ctrl_tmr_top.FIT_MS` | 100 | the 100 ms sampling interval of the original design |
| `motor_ctrl_tmr_top.CLK_HZ` | 100 000 000 | assumed (the usual 100 MHz board oscillator) |
| `motor_ctrl_tmr_top.PWM_FREQ_HZ` | 20 000 | assumed |
| `fit_timer.INTERVAL` | 10 000 000 | `CLK_HZ/1000·FIT_MS` |
| `pwm.PERIOD` | 5000 | `CLK_HZ/PWM_FREQ_HZ` |
| `motor_pkg::PWM_WIDTH_W` | 16 | assumed |
| `motor_pkg::COUNT_W` | 32 | the controllers' 32-bit word |
| `tmr_manager.CNT_W` | 8 | assumed |

## Relation to the original design

These parts follow the original design:

* the division into soft-processor controllers, a fixed-interval timer, a PWM
  core and a pulse counter;
* the 100 ms interrupt-driven loop and the PID computation of the PWM width;
* triplicated processors with voting, continued operation after a first
  failure, and detection of a second failure;
* the controller state machine (Wait, Configuration, Start, Execution, Stop).

The original uses vendor cores for the processors, timer and redundancy
logic. `fit_timer`, `tmr_voter` and `tmr_manager` are functional
equivalents written from what those cores are stated to do, not copies of
their internals. These choices are this design's own:

* what exactly is voted, namely the peripheral write bus;
* the recovery handshake, and the rule for what counts as a second failure;
* fail-safe switching the PWM off;
* the peripheral register interface, which is a plain write strobe and data
  rather than a processor bus;
* PWM double-buffering, counting rising edges only, and the clock and PWM
  frequencies.

To get the simpler, non-redundant variant, drive all three `ctrl_bus`
inputs from one controller.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/motor_pkg.sv rtl/*.sv tb/ctrl_model.sv tb/motor_model.sv \
  tb/motor_ctrl_tmr_top_tb.sv --top-module motor_ctrl_tmr_top_tb -Mdir obj
./obj/Vmotor_ctrl_tmr_top_tb
```

Unit testbenches need only `rtl/motor_pkg.sv`, the module itself and the testbench.

| testbench | what it checks |
|---|---|
| `pwm_tb` | the 50/25/75 % settings as well as 0 %, 100 % and over-range widths, cycle by cycle; that a write takes effect at the next period boundary; that `enable` low holds the output low |
| `pwm_duty_tb` | the 50 %, 25 % and 75 % settings at the default 5000-cycle period, measured over whole periods |
| `mycounter_tb` | random pulse trains; the three-cycle latency; clears, including a clear in the same cycle as an edge |
| `fit_timer_tb` | the first interrupt and the exact spacing of later ones; the one-cycle pulse width |
| `tmr_voter_tb` | single, double and random corruption against a bit-by-bit reference |
| `tmr_manager_tb` | the first failure and recovery on each module; no re-counting; counter saturation; every kind of second failure; that fail-safe holds until reset |
| `motor_ctrl_tmr_top_tb` | the closed loop, with time compressed (the clock stands for 1 MHz, the interval is 4000 cycles, the PWM period 100 cycles): 120 rpm, a masked first failure with recovery, a step to 80 rpm, stop and restart, then a second failure reaching fail-safe. It checks every PWM period, counter window and timer interval, and that each mechanism occurred. It runs in under a second. |
| `motor_ctrl_tmr_full_tb` | the 120 rpm run at the default parameters: 25 real 100 ms intervals (250 million cycles), with a soft error masked at the end. It runs in about two minutes. |

The motor model assumes the following. These numbers are not measured data.

| motor model parameter | value |
|---|---|
| no-load speed at 100 % duty | 200 rpm |
| mechanical time constant | 100 ms |
| encoder resolution | 374 pulses per output revolution |

The controller model uses these PI gains:

| controller model gain | value |
|---|---|
| Kp | 0.002 duty/rpm |
| Ki | 0.02 duty/(rpm·s) |
| Kd | 0 |

The controller model also includes anti-windup. With these values the loop
settles to within one encoder pulse per window of 120 rpm.
