# DEBRA — an emergency-brake alert with a built-in performance meter

A brake lamp tells the driver behind that you are braking, but not *how hard*.
This design adds that missing information. A two-axis accelerometer is
mounted in the car. When the car decelerates harder than 0.3 g, the centre
high-mounted stop lamp flashes at 10 Hz instead of staying on, and the
flashing lasts one second after the hard braking ends. At the same time a
radio module broadcasts a warning. A car with the same equipment that
receives the warning plays a spoken "warning" to its driver.

The accelerometer is there anyway, so it also drives a small performance
meter. A dashboard display and four buttons run timed trials:

- 0-60 mph;
- quarter mile;
- braking to a stop;
- a free-running stopwatch.

The meter works by integrating the measured acceleration twice in fixed
point. It needs no wheel-speed or GPS input.

Everything below is synthesizable SystemVerilog for the FPGA part of the
system. The same RTL also holds the text PROM that feeds the display. The
radio module, the accelerometer, the LCD, the sound PROM with its DAC, the
lamp relay and the power supply are separate parts. The top level brings out
their signals as ports.

```
 buttons ──┐                                   ┌─> lamp_off (relay: high = lamp dark)
 accel X ──┤ synchronizer ─> transform ─┬─> pulser
 accel Y ──┘   (2-FF + 25us   (duty → g,  ├─> rf_tx (ask radio to broadcast)
               lockout)       rotation)  └─> perf ──> counter (BCD stopwatch)
                                             │           │
                                             └─ mode/status/time ─> lcd_ctrl ─> lcd_prom ─> LCD
 rf_rx (packet received) ───────────────────────────────> sound_ctrl ─> sound PROM address
```

## Files

| file | contents |
|---|---|
| `rtl/debra_pkg.sv` | shared types: `accel_t` (12-bit, 1024 = 1 g), `mode_e`, `status_e`, `buttons_t`, BCD digits, PROM map constants, `us_to_cycles()` |
| `rtl/synchronizer.sv` | two-flip-flop synchronisers; a 25 µs lockout debounce on the two accelerometer lines |
| `rtl/divider.sv` | 32-bit sequential restoring divider, one quotient bit per clock |
| `rtl/transform.sv` | measures the duty cycle, converts it to g, calibrates the rest orientation, computes braking/acceleration, sets the hard-brake flag |
| `rtl/pulser.sv` | 10 Hz lamp flasher with 1 s hold-over |
| `rtl/counter.sv` | three-digit BCD stopwatch, 0.1 s steps up to 99.9 s |
| `rtl/perf.sv` | trial controller with the velocity and distance integrators |
| `rtl/lcd_prom.sv` | the display's text PROM (a ROM computed by constant functions) |
| `rtl/lcd_ctrl.sv` | streams PROM addresses to an HD44780-type 2×40 LCD |
| `rtl/sound_ctrl.sv` | steps the sound PROM's address at 16 kHz after a received warning |
| `rtl/debra_top.sv` | the top level |

Every file opens with a comment on how it works and what its timing is.

## From duty cycle to g (transform)

This block is the least obvious part of the design.

**The sensor's output.** The accelerometer (an ADXL202-class part) has no
digital bus. For each axis it gives a square wave with a period of about
1.7 ms. The fraction of the period that the wave is high encodes the
acceleration:

- 0 g reads about 53 % duty on the parts this was built for;
- every 1 g moves the duty by 12.5 %.

**Measuring one axis.** Each axis has two 15-bit counters. Both restart on
a rising edge. One counts every clock, which gives the period. The other
counts only while the line is high. On the next rising edge the high count
is shifted left by 13 (×8192), and the shifted count and the period go to a
32-bit divider:

```
quotient = high * 8192 / period          0 .. 8192 for 0 .. 100 % duty
reading  = quotient - 4342               1/1024 g, saturated to -2048..2047
```

Dividing by the measured period, and not by a fixed constant, makes the
reading immune to drift in the sensor's period. 12.5 % of 8192 is 1024, so
one g is exactly 1024 counts. The offset 4342 is 53 % of 8192. A 15-bit
counter holds 32 767 clocks, which covers the 17 000-clock period at
10 MHz with room to spare.

The divider is a plain restoring divider. It takes 32 clocks, and each axis
has its own. A new reading appears 34 clocks after the clock that samples
the rising edge. A period only counts as complete after a full high and low
phase, so the first edge after reset only starts the counters.

**Finding "down".** The sensor's mounting angle is unknown. Press the reset
button with the car at rest on level ground. 0.1 s later, when both axes
have been measured, the block stores the readings as `xr`, `yr`: the
gravity vector in sensor axes. From then on the force along the car is the
component of the current reading perpendicular to gravity:

```
braking = (x*yr - y*xr) >>> 10     (1/1024 g, saturated to 12 bits)
accel   = -braking
hard_brake = braking > 307         (0.3 g)
```

This is a 2-D cross product. With gravity at 1 g (1024 counts), it gives the
longitudinal force in the same units as the axis readings. Before the
orientation is stored, `braking`, `accel` and `hard_brake` are held at 0.

Which sign means "braking" depends on how the sensor is mounted. The RTL
uses the formula as written: a positive x with gravity along +y is braking.

## Lamp flasher and radio request (pulser)

`hard_brake` restarts a 1 s hold timer on every clock that it is high.
While the timer runs, `lamp_off` toggles every 50 ms (10 Hz), and each burst
starts with the lamp dark. `lamp_off` drives an inverting relay in series
with the lamp. When the pulser is idle the output is low, so the lamp
follows the brake pedal as in a normal car. `rf_tx` is simply `hard_brake`:
it is the level that tells the radio module to broadcast.

## Performance trials (perf + counter)

**Units.** The velocity accumulator is 24 bits and signed. Once a
millisecond it adds the 12-bit acceleration, so its unit is g·ms/1024. Its
range is ±8.19 g·s, about ±180 mph.

The distance accumulator is 31 bits and unsigned. Once a millisecond it adds
the velocity divided by 32 (`vel >>> 5`, the top 19 bits). Dropping the five
low bits keeps the sum inside 31 bits over a quarter mile; a quarter mile is
1.31·10⁹ of the 2.15·10⁹ available counts.

The velocity is signed, so slowing down during a trial (for example a stop
at a traffic light during a 0-30 run) is integrated correctly.

The two targets follow from these units, with g = 9.80665 m/s²:

| target | formula | value |
|---|---|---|
| 60 mph (`SPEED_MPH`) | v[m/s] · 1024 · 1000 / g | 2 800 766 |
| ¼ mile (`DIST_MM`) | d[m] · 1024 · 10⁶ / (32 · g) | 1 312 859 335 |

Set `SPEED_MPH = 30` to get the 0-30 trial.

**Sequence.** A trial button selects its trial:

1. While the button is held, the stopwatch is zeroed, the display mode
   changes and the status is WAIT.
2. After release, the trial waits for its trigger.
3. On the trigger, the integrators are cleared, the stopwatch starts and the
   status becomes RUN.
4. On the stop condition, the stopwatch stops and the status becomes DONE.

| trial | trigger | stop condition |
|---|---|---|
| 0-60 | acceleration > 0.2 g (205) | velocity ≥ target |
| quarter mile | acceleration > 0.2 g | distance ≥ target |
| braking | deceleration > 0.1 g (102) | deceleration back to ≤ 0.1 g (car at rest) |
| free run | button release | never; pressing again restarts it |

The integrators run only while a trial runs.

**The stopwatch (counter)** counts tenths of a second in three BCD digits
and stops at 99.9 s. Priority is zero, then start, then stop.

## Display by address streaming (lcd_ctrl + lcd_prom)

The FPGA never drives character codes. A byte-wide PROM sits between the
FPGA and the LCD. The FPGA drives the PROM address plus the LCD's RS and E
lines, and the PROM's data pins drive the LCD's data bus. Writing a byte
takes three steps:

1. Present the address (1 clock).
2. Hold for 42 µs.
3. Pulse E for 1 µs.

At 10 MHz that is 431 clocks per byte. Writing a line of text is just
stepping through 40 consecutive addresses, so the state machine stays tiny.
RS selects the register: 0 sends a command, 1 sends a character.

PROM map (byte addresses):

| address | contents |
|---|---|
| 0x00 | 0xFE, the blank character |
| 0x05–0x08 | commands 0x38 (8-bit, 2 lines), 0x0C (display on), 0x01 (clear), 0x80 (line 1) |
| 0x09–0x12 | digits '0'–'9' |
| 0x13, 0x14 | ':' and '.' |
| 0x15 | command 0xC0 (line 2) |
| 0x40 + 64·k | text k, 40 characters padded with 0xFE |

The eight texts:

| k | text |
|---|---|
| 0 | System Ready |
| 1 | Press a button to start |
| 2 | 0-60 Acceleration time trial |
| 3 | Braking time trial |
| 4 | Quarter mile time trial |
| 5 | Free running time trial |
| 6 | Start Acceleration to start trial |
| 7 | Start Deceleration to start trial |

The ROM is computed by constant functions in the RTL, so no data file is
needed.

**Start-up.** After reset the controller waits 15 ms. It then sends 0x38,
0x0C and 0x01, and waits 2 ms for the clear to finish.

**Repaint.** After start-up it repaints forever. Each frame has 82 bytes:

- cursor to line 1;
- line 1: the mode title;
- cursor to line 2;
- line 2, one of:
  - "Press a button to start" in the ready mode;
  - the matching "Start … to start trial" text while a trial waits for its trigger;
  - otherwise the time as `dd.d`, with a leading zero shown as blank.

One frame takes 82 × 431 clocks, about 3.5 ms. Mode, status and time are sampled at the start of a
frame, so a frame never mixes two states.

## Spoken warning (sound_ctrl)

The recording sits in an external 64 K × 8 PROM whose data pins drive a DAC
directly. The radio raises its packet-received pin (`rf_rx`) asynchronously.
`sound_ctrl` synchronises that pin. On its rising edge it steps the PROM
address from 0 through 65 535, one step every CLK_HZ/16 000 clocks (625 at
10 MHz), which plays 4.1 s at 16 kHz. An edge during playback is ignored.
Address 0 is the idle position and is assumed to hold silence.

## Input synchroniser

Every button and both accelerometer lines pass through two flip-flops. The
accelerometer lines are also debounced. After each accepted edge the output
is frozen for 25 µs (250 clocks), so ringing on an edge gives one clean
transition. The real signal never changes faster than about 500 µs. The
buttons are not debounced, because the trial controller acts on levels. The
synchronised reset button is the synchronous reset of every other block.

## Top-level ports (debra_top)

| port | dir | meaning |
|---|---|---|
| `clk` | in | system clock, `CLK_HZ` (default 10 MHz) |
| `btn_raw` | in | `buttons_t` {freerun, quarter, sixty, brake, reset}, asynchronous, active high |
| `accel_x_pwm`, `accel_y_pwm` | in | accelerometer duty-cycle outputs |
| `rf_rx` | in | radio module: warning packet received |
| `rf_tx` | out | radio module: broadcast a warning (= hard braking) |
| `lamp_off` | out | relay drive; high turns the centre brake lamp off |
| `lcd_data[7:0]` | out | LCD data bus (the text PROM's output) |
| `lcd_rs`, `lcd_rw`, `lcd_en` | out | LCD control; RW is tied low (write only) |
| `sound_addr[15:0]`, `sound_playing` | out | sound PROM address; playback active |
| `calibrated`, `lamp_flashing`, `accel`, `mode`, `status`, `time_bcd` | out | status outputs for debugging or a second display |

All timing constants are derived from the `CLK_HZ` parameter, so the design
can be simulated at a low clock rate with unchanged behaviour in
milliseconds. Other parameters: `transform.BRAKE_THRESH`,
`transform.ZERO_G_OFFSET`, `transform.CAL_DELAY_MS`, `pulser.FLASH_HZ`,
`pulser.HOLD_MS`, `perf.SPEED_MPH`, `perf.DIST_MM`, `perf.ACCEL_START`,
`perf.BRAKE_START`, `sound_ctrl.SAMPLE_HZ`, `lcd_ctrl.SETUP_US`,
`synchronizer.LOCKOUT_US`.

## Where this RTL departs from the original design, and what it decides itself

- **Brake threshold.** The design is specified at 0.3 g, which is 307
  counts. Earlier code of the original used 300 and 400 counts.
- **Flash rate and hold-over.** These are 10 Hz and 1 s, as specified. The
  original code toggled every 2²⁰ clocks and held for 10⁶ clocks (0.1 s).
- **Stopwatch prescaler.** The stopwatch counts tenths, as specified. The
  original code's prescaler stepped every 10 ms.
- **Duty-cycle conversion.** The divider method is used. One version of the
  original replaced the divider with a fixed `count × 31 / 64` scaling.
- **Debounce length.** It is 25 µs exactly. The original counted 255 clocks.
- **Trial targets.** They are computed from the units. The original's 60 mph
  constant was 2 773 089, about 1 % lower. Its quarter-mile constant agrees
  to within one count.
- **Trigger thresholds.** 0.2 g and 0.1 g are rounded to 1/1024 g (205 and
  102). The original used 200 and 100.
- **Saturation.** Readings and `braking` saturate instead of wrapping.
- **Distance accumulator.** It is unsigned, because a quarter mile does not
  fit a signed 31-bit value.
- **Register select.** It follows the HD44780 convention: RS = 1 for
  characters.
- **Own choices.** The PROM layout with fixed 64-byte text slots, the
  continuous repaint, the E pulse width, the power-up and clear waits, the
  button priority (free run, quarter, 0-60, braking), and playing the whole
  sound PROM are this design's.
- **Buttons.** The original listed a 0-30 button. The 0-30 trial here is a
  parameter setting of the 0-60 trial, because the display has five modes and
  no 0-30 mode. The free-run button is synchronised like the others.

## Not included

- The radio. A CC1010 module runs its own firmware: broadcast packets with
  acknowledgement and up to four retries. The FPGA only sees one request pin
  and one packet-received pin.
- The accelerometer, the LCD, the sound PROM and its DAC, the relay and the
  power supplies, which are analog or off-the-shelf parts.
- Calibrating different sensors. The 0 g offset (4342) belongs to one
  batch of sensors. It is a parameter.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. Two behavioural models
stand in for parts outside the FPGA:

- `tb/adxl202_model.sv` is the accelerometer. Its duty cycle comes from an
  acceleration in milli-g, with a 1.7 ms period and ringing on the edges.
- `tb/hd44780_model.sv` is the LCD. It checks the 42 µs set-up and the
  enable timing, executes the commands and keeps the text of both lines.

| testbench | what it shows |
|---|---|
| `tb_synchronizer` | latency, one clean edge from a ringing input, buttons not debounced |
| `tb_divider` | random and corner-case quotients and remainders, 32-clock latency |
| `tb_transform` | readings against the formula for several duty cycles, calibration delay, threshold, reading latency |
| `tb_pulser` | every clock of a burst against a reference: 10 Hz phase, 1 s hold-over, restart |
| `tb_counter` | BCD carries, 0.1 s step, hold at 99.9 s, priorities |
| `tb_perf` | each trial's trigger and stop, integrator values, target times |
| `tb_lcd_prom` | the whole map against an independent table |
| `tb_lcd_ctrl` | start-up, frame contents for each mode/status, 42 µs timing (through the LCD model) |
| `tb_sound_ctrl` | 625-clock sample period, full 64 K sweep, ignored re-trigger |
| `tb_debra_top` | end to end at `CLK_HZ` = 200 kHz: calibration, hard brake, lamp bursts, hold-over, all four trials, received warning, display text; counts each mechanism |
| `tb_debra_full` | the top at its default parameters (10 MHz): calibration, a hard brake (10 Hz flashing, 1 s hold-over, radio request), the braking-trial time read from the LCD model, a received warning with its 625-clock sample period |
| `tb_trial_workloads` | two tests at 10 kHz: a 0-30 bench test at 1 g (shows 1.3 s; 30 mph / 1 g is 1.37 s), and a road test that starts at 15 mph, stops at a light and reaches 45 mph |

To run a testbench with Verilator 5 (the package must come first):

```
verilator --binary --timing --assert --top-module tb_debra_top \
    rtl/debra_pkg.sv $(ls rtl/*.sv | grep -v debra_pkg) \
    tb/adxl202_model.sv tb/hd44780_model.sv tb/tb_debra_top.sv
./obj_dir/Vtb_debra_top
```

For another testbench, change the top module and the last file. The two
models are needed only by `tb_lcd_ctrl`, `tb_debra_top` and `tb_debra_full`.
`tb_debra_top` runs in a few seconds and `tb_debra_full` in about ten.
