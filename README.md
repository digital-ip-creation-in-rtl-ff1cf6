# Motor-control, safety and bus IP cores in SystemVerilog

This is a small library of digital cores for driving power electronics from
an FPGA or ASIC: PWM with dead time, a soft-start ramp with a pulse-density
output, a three-phase space-vector PWM source, a microstepping stepper
driver, a sensored BLDC speed drive, an 8-bit PID controller, a quadrature
encoder interface, a windowed watchdog and an I2C master. The cores are
independent of each other. The top module `esim_ip_top` places them side
by side so that the whole set can be built and tested in one run. Each core
keeps its own ports, prefixed with the core's name.

The cores follow the behaviour described for the digital IP library of the
eSim mixed-signal IP report. That source says what each core does and shows
its pins and waveforms, but rarely gives the inner arithmetic or widths.
Where it is silent, this RTL makes its own choices. Each file's header comment
says which parts follow the source and which are choices made here. The
section "Departures and open points" lists the choices that matter most.

All logic is synchronous to the rising clock edge, with an asynchronous
active-low reset `rst_n`. Every core except SVPWM runs on `clk`, assumed to
be 10 MHz. SVPWM runs on `sv_clk`, assumed to be 5 MHz. Timings quoted below
(10 kHz, 1 us, 100 kHz) assume those clocks.

## Gate-drive conventions and safety

All gate outputs are active high, with one exception: the top switches of the
stepper H-bridges are P-channel parts, so `tl` and `tr` are active low. Four
safety rules hold in every core, and the testbenches check each of them on
every clock:

* **Dead band.** No leg ever has its top and bottom switch on in the same
  clock. When a leg changes over, both switches stay off for a programmable
  number of clocks.
* **Enable and fault.** `enable` low, or `fault_n` low, turns every switch
  off. For `advanced_pwm` and the BLDC gates this happens combinationally, in
  the same cycle.
* **Invalid sensor input.** The BLDC commutator treats Hall codes 000 and 111
  as faults. It raises `hall_error` and turns all six gates off.
* **Illegal encoder input.** The QEI does not count a double transition (A and
  B changing together). It sets a sticky `error` flag instead.

## The cores

### Complementary PWM (`advanced_pwm`)

A counter runs from 0 to `period` inclusive. It advances once every
`PRESCALE` clocks, so one PWM period is `PRESCALE * (period + 1)` clocks.
`PRESCALE` is a parameter, with default 1, because the core's pin set has
no prescaler input. The figures below are for `PRESCALE = 1`. Dead time is
always counted in clocks. The ideal output is `cnt < duty_cycle`. Dead time is a
turn-on delay: after each change of the ideal signal, the output that is due
to turn on waits `dead_time` clocks. `pwm_h` is therefore high for
`duty - dead` clocks per period and `pwm_l` for `period + 1 - duty - dead`
clocks.

Two edge cases:
* `duty_cycle = 0` gives a constant low-side drive.
* `duty_cycle > period` gives a constant high-side drive.

This module is also the PWM stage inside the stepper driver and the BLDC drive.

### Soft start and sigma-delta modulator

`soft_start_limiter` moves `safe_duty_out` one LSB towards `target_duty` every
`ramp_rate_delay + 1` clocks, in either direction. `sd_modulator` is a
first-order error-feedback modulator:
* it adds the 8-bit input to an 8-bit accumulator every clock;
* the carry is the output bit.

In any 256 consecutive clocks, the number of ones is exactly the input code.
`soft_start_sub` chains the two, so a load sees a pulse-density drive whose
average ramps up slowly instead of stepping.

### Space-vector PWM (`svpwm_*`)

This is the most involved core. `svpwm_ref_gen` produces a rotating reference:
* a 32-bit phase accumulator (`PHASE_STEP = 42950` gives 50 Hz at 5 MHz)
  addresses a 64-entry Q15 sine table;
* `v_beta = sin` and `v_alpha = cos` (the same table read a quarter turn
  later).

The table is `SINE_Q15[k] = round(32767 * sin(2*pi*k/64))` in
`ip_tables_pkg`.

The core `svpwm` works entirely with one projection, defined in `svpwm_pkg`:

    proj(j) = v_beta*cos(60j) - v_alpha*sin(60j)   ( = m*sin(theta - 60j) )

Full scale, 32767, is the radius of the circle inscribed in the inverter
hexagon. The largest sinusoidal output the inverter can make, Vdc/sqrt(3)
per phase, is therefore the full-scale reference. The projection drives
each stage of the core:

* **Sector (`svpwm_sector_id`).** The reference lies in sector k, covering
  [60k, 60k+60) degrees, exactly when `proj(k) >= 0` and `proj(k+1) < 0`.
  This needs no division and no arctangent.
* **Dwell times (`svpwm_dwell_time`).** The times are in half-carrier counts:
  * `T2 = Ts*proj(k)` is the time on vector k+1;
  * `T1 = -Ts*proj(k+1)` is the time on vector k;
  * `T0 = Ts - T1 - T2`.

  `Ts = HALF_PERIOD = 250`, and the results are clamped to `[0, Ts]`.
* **Switching (`svpwm_pwm_gen`).** The carrier counts up and down, 0 to
  N-1 and back, so one carrier period is `2*HALF_PERIOD = 500` clocks, which
  is 10 kHz at 5 MHz. Each phase is on while `cnt < on`, where
  `on = T0/2 + (T1 if the phase is high in vector k) + (T2 if high in vector
  k+1)`.

  This gives the usual symmetric seven-segment sequence, with the zero time
  split evenly between 000 and 111. New on-times are loaded once per period,
  at the top of the carrier (`period_start`).
* **Dead time (`svpwm_dead_time`).** Each phase's ideal signal becomes a
  high/low gate pair with exactly `DEAD = 3` clocks (600 ns) of both-off
  after every edge.

The resulting phase duties equal the min-max (third-harmonic) modulation
`0.5 + (v_x - (max+min)/2)/sqrt(3)`. The testbench `svpwm_tb` uses that
formula as its independent reference. `svpwm_subcircuit` connects the
reference generator to the core.

### Stepper driver (`stepper_indexer*`, `hbridge_router`)

`stepper_indexer` keeps an 8-bit microstep phase, which gives 256 microsteps
per electrical cycle. The phase moves on each rising edge of the
synchronised `step` input, in the direction set by `dir`. The step size
depends on `step_mode`:
* `0`: one microstep (1/256 of a cycle);
* `1`: a half step (32 microsteps, 45 degrees);
* `2` or `3`: a full step (64 microsteps, 90 degrees).

From the reset phase, full steps energise one coil at a time, and half
steps alternate between one and two coils. The coil duties are
looked up in a 65-entry quarter-wave table, `QSIN_U8[i] = round(255 *
sin(pi/2 * i/64))`, which yields |sin| and |cos| values. Bit 7 of the phase,
and of the phase plus 64, gives each coil's polarity.

`hbridge_router` steers one complementary PWM pair onto the four gates of
an H-bridge:
* The PWM chops one diagonal, while the other low-side switch stays on.
* A new polarity is taken only while `pwm_h` is low, so current never
  reverses in the middle of a pulse.
* When the bridge is disabled, every switch is off (tops high, bottoms low).

`stepper_indexer_sub` combines one indexer, two `advanced_pwm`
(`PWM_PERIOD = 255`, `DEAD_TIME = 10`, 1 us) and two routers.

### BLDC speed drive (`bldc_drive`, `bldc_commutator`, `pid_core`)

`pid_core` is a clocked PID on 16-bit unsigned setpoint and feedback with
8-bit unsigned gains. Each clock it computes:
* the error `e = sp - fb`;
* the integral, held in a 32-bit accumulator and clamped to `±I_LIMIT`
  (anti-windup);
* `u = kp*e + ki*I + kd*(e - e_prev)`.

The output is `u >>> SHIFT`, saturated to `0 .. 2^OUT_W - 1` and registered.
`enable` low clears the integral and the output.

`bldc_drive` passes the controller output, clamped to the PWM period, as the
throttle of an `advanced_pwm` at 10 kHz (`PWM_PERIOD = 999`). The PWM drives
`bldc_commutator`, whose table maps Hall code to energised pair:

| Hall | 001 | 011 | 010 | 110 | 100 | 101 |
|------|-----|-----|-----|-----|-----|-----|
| high side (chopped) | A | A | B | B | C | C |
| low side (held on)  | B | C | C | A | A | B |

The Hall inputs pass through a two-flop synchroniser. After every Hall change,
all gates stay off for `dead_time + 1` clocks. The same `dead_time` input also
delays each turn-on of the chopping signal in the PWM stage. The speed feedback is a port,
because the source does not say how speed is measured.

### PID release (`pid_release`)

This is the same controller at 8-bit width, with `sp`, `fb` and `out` pins and
the gains fixed as parameters. The defaults are `KP = 128`, `KI = 2`,
`KD = 0` and `SHIFT = 8`. They were tuned so that the PI zero cancels a
first-order RC load with a 64-clock time constant, so the output settles
without overshoot.

### Quadrature encoder interface (`qei`)

A, B and index each pass through a two-flop synchroniser. The decoder counts
every edge (4x decoding):
* it counts up along 00-10-11-01 (A leads B) and down along the reverse;
* the 16-bit position wraps from `max_count` to 0 going up, and from 0 to
  `max_count` going down;
* a rising index edge clears the position, and takes priority over a count;
* `direction` shows the direction of the last step.

Edges must be at least two clocks apart.

### Windowed watchdog (`wwdt`)

One tick counter measures the time since the last accepted feed. A feed is
a rising edge on `feed` with the key `8'hA5` on `key`. The result depends on
the count at that moment:

| count at feed | result |
|---|---|
| `< window_open` | fatal, cause 1 (early clear) |
| `window_open .. window_close` | accepted, count restarts |
| `> window_close` | fatal, cause 2 (late clear) |
| any count, wrong key | fatal, cause 3 |

Without a feed, `ewi` (early warning) rises at `timeout - timeout/4`, and
the watchdog fails with cause 4 when the count reaches `timeout`. The
intended setting is a window from 25 % to 75 % of the timeout.

`wdt_reset` is sticky. It clears on `rst_n` or when `enable` is lowered,
which also re-arms the watchdog.

### I2C master (`i2c_master`)

The master runs one single-byte transaction per `start` pulse:
1. START, then the 7-bit address with the R/W bit;
2. the slave's acknowledge (ACK_WAIT);
3. one data byte, written or read;
4. for a read, the master's NACK;
5. STOP.

Each bit takes four quarter periods of `CLK_DIV = 25` clocks, which gives
100 kHz SCL at 10 MHz. SDA is sampled at the end of the SCL high phase.
SCL and SDA are open drain: `*_oe = 1` pulls the line low, and `*_i` reads the
line. The master waits while a slave holds SCL low (clock stretching). A
NACK at either acknowledge sets `ack_error` and the master goes straight to
STOP. `done` pulses for one clock at the end.

## Departures and open points

* **Widths, tables and encodings** are this design's choices wherever the
  source gives none. This covers the sine tables, the Q15 format, the Hall
  table order, the watchdog key and cause codes, and the PID scaling.
* **Stepper indexer.** The source also describes the indexer as a ring
  counter with four phase outputs, A to D. This design follows its block
  diagram instead: a microstepping phase accumulator driving two H-bridges.
  The full-step and half-step configurations are step sizes of that
  accumulator.
* **SVPWM input.** The source mentions a magnitude-and-angle input to the
  SVPWM core. Its block diagram feeds the core alpha/beta components, and
  this design follows the diagram: the inputs are `v_alpha` and `v_beta`.
* **SVPWM sequence.** The symmetric switching sequence comes from comparing
  an up/down carrier with per-phase on-times, not from an explicit state
  machine. The gate pattern is the same.
* **PWM prescaler.** It is the build-time parameter `PRESCALE`, not an input.
* **Watchdog window.** The source builds the window from two counters. Here
  one counter is compared with two bounds, which gives the same boundaries.
  The early-warning point of 75 % of the timeout is a choice made here.
* **BLDC feedback.** The BLDC drive's speed feedback and the PID gains are
  inputs. The source's closed-loop demonstrations use analog parts that are
  not part of this RTL.
* **Not included.** The analog side of every core: ADC/DAC bridges, power
  stages, motor models, RC filters and the comparator. The cores' ports are
  the points where those parts connect.
* **Clock rates.** 10 MHz for `clk` is assumed. Only the SVPWM 5 MHz clock
  comes from the source.

## Simulating

Each core has a self-checking testbench, `tb/<core>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
`tb/esim_ip_top_tb.sv` runs every core at its default parameters, about
22 ms of simulated time. It counts each mechanism: dead bands, fault
shutdowns, sector steps, commutations, Hall errors, throttle saturation,
encoder wraps, watchdog faults and I2C clock stretching. `tb/i2c_slave_model.sv`
is a behavioural slave used by the I2C tests.

With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/ip_tables_pkg.sv rtl/svpwm_pkg.sv tb/esim_ip_top_tb.sv
    ./obj_dir/Vesim_ip_top_tb

Replace the last file with any other testbench to run that core alone. The
two packages must come first on the command line.

Some tests shorten their runs by overriding parameters: the SVPWM tests use
`HALF_PERIOD = 50` and a faster rotation, and the BLDC test uses a larger
`SHIFT`. The stepper-driver test and the top-level test use full-size
defaults.
