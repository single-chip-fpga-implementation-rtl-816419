# Sensorless PMSM speed-control IC

This is a complete digital controller for a permanent-magnet synchronous
motor (PMSM) that has no position sensor. It finds the rotor angle from
the phase voltages and currents alone. Every 50 µs it works out how much the
stator flux linkage of each phase has changed. It weights those changes by
the back-EMF shape of the other phases, and that gives the rotor's angle
increment for the sample. The increment includes a correction term that
pulls an angle that has drifted back toward the true one.

Around this estimator sit the rest of the controller:
- a speed PI loop at 2 kHz;
- two phase-current PI loops at 20 kHz;
- a sinusoidal PWM generator with deadtime;
- a serial interface to an external 12-bit A/D converter;
- a start-up sequencer that finds the rotor's starting angle with test voltage pulses and then accelerates the motor in open loop;
- a UART register interface through which a host sets every gain and limit.

Everything runs from one 40 MHz clock. The design is written so that each
arithmetic block uses a single multiplier and a single adder, stepped by a
small state machine.

## Units used throughout

Understanding the design depends on these units, so learn them first.

| Quantity | Representation |
|---|---|
| Electrical angle | 0..7999 counts per electrical revolution (13 bits) |
| Back-EMF functions ea, eb, ec | Q9 signed: 512 = 1.0, from a 500-entry sine table |
| Current sample / PWM period | 50 µs (20 kHz): symmetric PWM, period register 1000 (2000 clocks) |
| Speed sample | every 10th current sample (2 kHz) |
| Speed | angle counts per speed sample. For a 12-pole motor, 1 count = 2.5 rpm, so 2000 rpm = 800 |
| Duties Da, Db, Dc | signed, in PWM timer counts about the half period (±PWM_PER/2) |
| Currents | signed A/D codes after offset removal and a Q8 gain |
| Speed and current PI gains | Q10 |

Table index = angle / 16. Phase b lags phase a by 2667 counts (120°) and
phase c leads by 2667 counts: ea = sin θ, eb = sin(θ − 120°),
ec = sin(θ + 120°). Table entry n is round(512·sin(2πn/500)), stored in
`rtl/sine_q9.hex`.

## The position estimator (`sensorless_estimator`)

This is the hardest part of the design. For each phase x, over one sample:

    dpsi_x  = A·(C·Dx − ix) − (ix(k) − ix(k−1))
    dtheta  = α·ŵ − B·(dpsi_a·eb + dpsi_b·ec + dpsi_c·ea)
    θ(k)    = θ(k−1) + dtheta   (mod 8000)

- **Terms of the flux equation.** `C·Dx` is the phase voltage worked out
  from the duty applied in the period that just ended; no phase voltage is
  measured. `A` folds in the sample time over the inductance. The resistive
  drop goes in through `−ix`.
- **Phase pairing.** The flux increment of each phase is multiplied by the
  back-EMF function of the *next* phase (a by eb, b by ec, c by ea). For a
  sinusoidal machine, this sum is zero when the estimated angle is right.
  When the estimate is off, the sum is proportional to the sine of the
  error. `B` sets how hard that error is corrected.
- **Feed-forward term.** `α·ŵ` is the nominal increment at the present
  estimated speed. Without the correction term the angle would simply
  integrate speed.
- **Constants.** A = 100 (Q11), B = 193 (Q10), C = 53 (Q3) and α = 105 (Q14).
  They come from the motor's resistance, inductance and back-EMF constant,
  and the sample time. They are registers, so another motor needs only new
  values.
- **Sign of B.** The derivation makes B negative, since its denominator
  carries −0.75·K_E. The register holds B's magnitude, and the hardware
  subtracts the product. If you derive B for another motor, write |B|.
- **Fixed-point widths.** These are chosen to keep truncation small:
  - C·D is kept in Q3.
  - The flux increments and dtheta are Q14.
  - Each product with e is shifted right by 9 and the product with B by 10.
  - The angle accumulator carries 14 fraction bits below the 13-bit angle.
- **Schedule.** The work is one 32×16 multiplier with a per-step shift and
  one 32-bit adder. They run over the 15 steps S0..S14, and `done` comes 16
  clocks after `start`. The order is: the three C·D products and the current
  subtractions; the three A products and the current-difference
  subtractions; the three e products and their sum; α·ŵ; ×B; the final
  subtraction; and the position accumulation.
- **Second sine lookup.** Each period a second back-EMF lookup on the new θ̂
  gives the e values the estimator uses in the following period.

The speed ŵ is the wrapped difference of θ̂ over one speed sample
(`speed_calc`), in the range −4000..3999.

## Start-up (`startup_ctrl`, `init_pos_detect`)

The estimator can start only once it has a starting angle and some speed.
Start-up therefore runs in three phases, and `mode` shows which one is
active.

1. **Detect** (`init_pos_detect`). Twelve test voltage vectors, 30° apart,
   are applied one per 1 ms slot (INTERVAL = 40000 clocks). That takes 12 ms.
   - Each vector is applied for V1_TIME clocks on odd slots and V2_TIME
     clocks on even slots.
   - At the end of the pulse one DC-link current sample is taken. The
     winding inductance saturates a little more when a vector lines up with
     the magnet, so the vector pointing at the rotor gives the highest
     current peak.
   - The index n of that vector becomes the start angle (n·8000 + 6)/12.
   - Gate patterns {S6..S1}, in hex, for vectors 0..11:
     16, 06, 26, 24, 25, 21, 29, 09, 19, 18, 1A, 12.
     S1/S2 drive phase a, S3/S4 phase b and S5/S6 phase c, upper switch
     first. Odd vectors (1, 3, ..., 11) drive all three phases; even vectors
     leave one phase open. That is why odd and even vectors have separate
     on-times, V1_TIME and V2_TIME.
2. **Open loop.** The control angle turns at a speed that rises by OL_ACCEL
   (Q8 counts per sample) every speed sample. The current command is fixed
   at OL_ISTART. Meanwhile the estimator already runs from the detected
   angle.
3. **Closed loop.** When the open-loop speed reaches OL_SWITCH (default 200
   = 500 rpm), control switches to θ̂ and ŵ.
   - The speed PI integrator is preset to OL_ISTART, so the current command
     does not jump.
   - The speed ramp is preset to the present speed.
   - The ramp then moves toward SPD_TGT by ACCEL/DECEL counts per speed
     sample, limited to SLOW..SHIGH.

## One control period (`control_sequencer`)

Each PWM period start triggers these steps in order:
- A/D conversion of ia (CH0), then ib (CH1);
- offset and gain scaling, with ic = −(ia + ib);
- estimator;
- back-EMF lookup;
- on every 10th period, the speed sample and (in closed loop) the speed PI;
- current controller;
- duty load.

The new duties are loaded into the PWM shadow registers and take effect at
the next period start. The sequence takes about 1040 clocks of the 2000 in
a period; most of that is the two 491-clock A/D frames. A period start that
arrives while the sequence is still running is counted in `overruns`.

Timing of each block, from `start` to `done`:
- speed PI: 6 clocks;
- current controller: 12 clocks;
- estimator: 16 clocks;
- back-EMF generator: 5 clocks (hold θ steady meanwhile).

## Control loops

- **Speed PI** (`speed_controller`): 16 bits with Q10 gains SKP and SKI.
  - The integrator is a(k) = Lim(Ki·e + a(k−1)); this is the anti-windup.
  - The output is u = Lim(Kp·e + a(k)).
  - Both limits are SLIM.
- **Current controllers** (`current_controller`): first the references
  ia* = I*·ea >> 9 and ib* = I*·eb >> 9.
  - Each phase then runs the same PI structure with CKP, CKI and CLIM.
  - Dc = Lim(−Da − Db).
  - The 11 steps (S0..S10) share one multiplier and one adder.
- **PWM** (`spwm_modulator`, `pwm_generator`, `deadtime_gen`): a 12-bit timer.
  - It runs as a sawtooth (CTRL[1] = 0) or a triangle (CTRL[1] = 1), from 0
    up to PWM_PER.
  - The upper gate is TCNT < compare, and the lower gate is the complement.
  - The compare value is the duty + PWM_PER/2, clamped.
  - Each of the six gates has a 7-bit deadtime delay on its rising edge.
    That allows 0..127 clocks, up to 3.175 µs.
  - CTRL[0] (run) enables the gates.

## External interfaces

**A/D converter** (ADS7844-style, `adc_serial_if`). Each conversion is one
24-clock frame at 2 MHz (CLK_DIV = 10).
- ADC_CS is low for the whole frame.
- The control byte S, A2..A0, MODE = 0, SGL = 1, PD = 00 is shifted out on
  ADC_DIN.
- The 12 result bits are read on ADC_DOUT in clocks 9..20.
- The result is ready 491 system clocks after the request.
- Channel 2 is the DC-link current, used during detection.

**Host UART** (`host_reg_if`): 8N1 at 115200 baud (BAUD_DIV = 347 clocks per
bit).
- Write: three bytes {0, addr[6:0]}, data[15:8], data[7:0].
- Read: one byte {1, addr[6:0]}. The reply is the high byte, then the low
  byte.

| Addr | Name | Reset | Addr | Name | Reset |
|---|---|---|---|---|---|
| 00 | CTRL [0] run, [1] symmetric | 2 | 0D | EST_A | 100 |
| 01 | PWM_PER | 1000 | 0E | EST_B (magnitude) | 193 |
| 02 | DEADTIME | 40 | 0F | EST_C | 53 |
| 03 | SPD_TGT | 800 | 10 | EST_ALPHA | 105 |
| 04 | SHIGH | 2800 | 11 | V1_TIME | 8000 |
| 05 | SLOW | 200 | 12 | V2_TIME | 8000 |
| 06 | ACCEL | 8 | 13 | OFFS_A | 2048 |
| 07 | DECEL | 8 | 14 | OFFS_B | 2048 |
| 08 | SKP | 2048 | 15 | ISCALE (Q8) | 256 |
| 09 | SKI | 64 | 16 | OL_ISTART | 300 |
| 0A | SLIM | 1500 | 17 | OL_ACCEL | 10 |
| 0B | CKP | 1024 | 18 | OL_SWITCH | 200 |
| 0C | CKI | 128 | | | |

Read-only registers:
- 0x20 is θ̂.
- 0x21 is ŵ.
- 0x22 is the status word: init_pos in bits [7:4] and mode in bits [1:0].

## What follows the source design and what does not

The following come from the published design:
- the block structure;
- the angle scaling of 8000 counts;
- the 500-point Q9 table;
- the estimator equation and its constants;
- the estimator and current-loop step schedules;
- the 12-bit PWM with a 7-bit deadtime;
- the twelve-vector detection with 1 ms slots and its counter structure;
- the three start-up phases;
- 16-bit Q10 speed PI;
- the 20 kHz and 2 kHz loop rates;
- the 40 MHz clock.

These choices are this design's own:
- all widths not given by the source;
- the Q10 format of the current gains;
- the UART protocol and the register map;
- the A/D frame timing and channel assignment;
- the duty-to-compare mapping and the shadow registers;
- the open-loop ramp law and hand-over;
- the speed-ramp law;
- the start-angle mapping for the detected vector;
- the sign handling of B;
- the sequencing order.

Points worth knowing:
- The source's real value of C (6.347) does not match its 16-bit value
  53/8 = 6.625. The RTL uses 53.
- The source's detection circuit diagram also has a comparator that fires
  50 clocks before the end of each 1 ms slot, next to the A/D chip-select
  logic. Its prose says the current is sampled at the end of the voltage
  pulse. This design follows the prose: one sample per vector, taken when
  the slot counter reaches V1_TIME or V2_TIME.
- The source draws the current-reference multipliers as a separate block.
  Here they are the first steps of the current controller.
- The host-side GUI, the inverter, the motor and the A/D converter itself
  are outside the chip and are not RTL.
- Each testbench drives its block directly, except the top-level test,
  which checks the design as a whole.

## Verification

Every block has a self-checking testbench in `tb/` that compares it with an
independent reference model. Each prints `TB_RESULT checks=N failures=M`.

The top-level test, `tb_sensorless_ic_top`, runs the chip with every
parameter at its default. It models:
- the A/D converter (`tb/ads7844_model.sv`);
- a motor whose DC-link current peaks for the vector aligned with the rotor;
- phase currents that follow the back-EMF of a rotor turning at a fixed
  electrical speed.

It programs registers over the UART and runs detection, open loop, the
hand-over and the closed loop. In closed loop it requires:
- the right detected vector;
- θ̂ tracking the model rotor within a few tens of counts;
- ŵ matching the model speed.

It counts every mechanism at least once, and fails if one never happens:
- each test vector;
- DC-link samples;
- phase samples;
- open-loop and closed-loop periods;
- the hand-over;
- speed PI runs and command ramp steps;
- both PWM modes;
- deadtime gaps;
- current-limit saturation;
- register reads;
- control-sequence overruns. There must be none at 20 kHz with the
  triangle PWM. The sawtooth period with the same PWM_PER is half as long,
  which makes the sequence overrun.

The test simulates about 46 ms. To keep it short, the host lowers the
hand-over speed and the speed target to 80 counts per speed sample
(200 rpm). The mechanical dynamics of the motor are not modelled: the model
rotor turns at a set speed. The speed loop therefore runs and saturates, but
its regulation of a real load is not tested.

The estimator test (`tb_sensorless_estimator`) first checks every output
bit against an integer model. It then feeds the flux increments of a rotor
turning at 20 and at 80 counts per sample; 80 counts per sample is 2000 rpm
for a 12-pole motor. The estimate starts 20 counts off the true angle and
must stay within 67 counts (3 electrical degrees). The largest error seen
at 80 counts per sample is 39 counts.

To run a testbench with plain Verilator, run it from the project root. The
sine table is loaded by the relative path `rtl/sine_q9.hex`.

    verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
        rtl/pmsm_pkg.sv tb/tb_sensorless_estimator.sv \
        --top-module tb_sensorless_estimator
    ./obj_dir/Vtb_sensorless_estimator

Some testbenches override parameters to stay short: for example, the
detection test uses a 400-clock slot, and the UART test 16 clocks per bit.
Everything else is at its default.
