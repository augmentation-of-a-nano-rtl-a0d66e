# FPGA fabric controller for a CubeSat electrical power system

A 1-U CubeSat has about 2 to 3 W of solar power and very little board area. In
this power system a single mixed-signal FPGA replaces the usual power-management
microcontroller and most of its peripheral parts. The FPGA measures the solar
array, battery and bus voltages and currents through its on-chip analogue front
end. It drives the gates of three dc-dc converters and the enable of the battery
charger. This repository holds that control as synthesizable SystemVerilog. It
runs on one 30 MHz clock and contains:

* a **perturb-and-observe maximum power point tracker**. It sets the duty cycle
  of the boost converter between the solar array and the 4.2 V battery node;
* a **battery charge controller**. It starts a charge cycle when the sun is up
  and the cell is below 4.05 V, and ends it at 4.2 V;
* two **proportional bus regulators**, one for the 5 V boost converter and one
  for the 3.3 V buck converter;
* three **7-bit PWM generators** at clk/128 (234 kHz);
* a **charger status probe** on the LTC4054's CHRG pin;
* a **telemetry line** sent once a second over a 9600-baud serial port.

```
 solar array (1s3p) ──► MPPT boost ──► 4.2 V node ──► LTC4054 ──► Li-ion cell
        │ V                 ▲  │ I          │            ▲  │ CHRG
        ▼                   │  ▼            ├─► 5 V boost ─┼──┼──► 5 V bus ──► V
  ┌─────────────────────────┴──────────────┐└─► 3.3 V buck ┼──┼──► 3.3 V bus ► V
  │ analogue front end: 6 channels, 12 bit │               │  │
  └───────────────┬────────────────────────┘               │  │
                  │ adc frame + adc_valid (every 47.067 us) │  │
  ┌───────────────▼─────────────────────────────────────────┴──┴──────────────┐
  │ eps_top                                                                   │
  │  charge_ctrl ── charge ──► chg_en ─────────────────────────┘  │           │
  │       └─ & mppt_switch ─► po_mppt ─► pwm_gen ─► pwm_out (MPPT gate)       │
  │  bus_regulator (5 V)  ─► pwm_gen ─► pwm_5v_out                            │
  │  bus_regulator (3.3 V)─► pwm_gen ─► pwm_3_3v_out                          │
  │  chrg_status ◄─ chrg_in, ─► chrg_out/chrg_oe (800k / 2k network) ◄────────┘
  │  telemetry_fmt ─► uart_tx ─► uart_txd (9600 8N1)                          │
  └───────────────────────────────────────────────────────────────────────────┘
```

The converters, the charger IC, the analogue front end and the clock generator
are outside this RTL. The top, `eps_top`, takes their results as ports:
`adc`/`adc_valid` for measurements, `clk` for the 30 MHz clock, and
`chrg_in`/`chrg_out`/`chrg_oe` for the charger status pin.

## Measurements as codes

All controllers work on raw 12-bit codes. They never convert to volts
(`eps_pkg`):

| channel | struct field | scale | landmarks |
|---|---|---|---|
| solar array voltage | `solar_v` | 7.5 mV/code | 3.88 V = 517 |
| MPPT converter output current | `mppt_i` | 250 uA/code | 726 mA = 2904, full scale 1.02375 A |
| battery voltage | `bat_v` | 7.5 mV/code | 4.05 V = 540, 4.2 V = 560 |
| battery current | `bat_i` | 250 uA/code | measured but not used by the logic |
| 3.3 V bus | `bus33_v` | 7.5 mV/code | 3.3 V = 440 |
| 5 V bus | `bus5_v` | 7.5 mV/code | 5 V = 667 |

The current scale is fixed by the monitors' range. 4095 codes × 250 uA is
exactly the 1.02375 A full scale of a current monitor across a 50 mOhm sense
resistor. The voltage scale is this design's own reading of a bipolar prescaler
set to ±15 V: 30.72 V over 4096 codes, with negative readings clamped to zero
before they reach the fabric. If your front end scales differently, change
`VOLT_LSB_UV` and the thresholds that `mv_to_vcode()` derives from it.
`telemetry_fmt` hard-codes 7.5 mV and 250 uA in its decimal conversion (see
below).

The analogue front end delivers a frame every 47.067 us. That is one pass of its
sample sequence: 10.667 + 10.667 + 12.733 + 12.733 us of conversions plus 0.267 us
to restart. At 30 MHz this is 1412 clocks. `adc_valid` is a one-clock strobe.
Every controller samples the frame on that strobe and updates its output one
clock later.

## Maximum power point tracking (`po_mppt`)

A solar array has one operating point of maximum power. That point moves with
irradiance and temperature. Between the array and the battery sits a boost
converter. A larger duty makes it draw more current from the array, which pulls
the array voltage down. Tracking means finding the duty that maximises V × I.

Perturb-and-observe works as follows. Move the duty one step. Measure again. If
power went up, the step was in the right direction; if it went down, it was not.
This design judges the direction by the change in current, not in voltage:

| dP | dI | action |
|---|---|---|
| > 0 | > 0 | duty + 1 (draw more current) |
| < 0 | < 0 | duty + 1 |
| > 0 | < 0 | duty − 1 (draw less current) |
| < 0 | > 0 | duty − 1 |
| = 0 or | = 0 | hold |

Read the first row as "more current gave more power, so draw still more". Read
the second row as "less current cost power, so go back up". For a boost
converter, more current means lower voltage. The table is therefore equivalent
to the more common voltage-based form with the signs of dV flipped.

The details that matter when you use or change it:

* **Update rate.** The tracker acts once every `UPDATE_FRAMES` = 85 frames,
  which is 4.0 ms. The converter and the array have time to settle between steps.
  Each update compares the latest frame with the frame of the previous update.
  It then stores P and I, even when it does not move. A refused step therefore
  does not freeze the reference.
* **Step and limits.** The step is one duty LSB (1/128, 0.78 %). The tracker
  refuses a step that would land on or beyond `DUTY_MIN`/`DUTY_MAX`. With the
  default 0 and 127, the duty stays within 1..126.
* **Speed.** At one step per 4 ms, a change of N duty LSBs takes at least
  N × 4 ms. The end-to-end testbench's array model peaks at duty 60. Starting
  from the default of 10, it reaches ±2 of the peak in about 192 ms. A drop to
  dim sun moves the peak to 40, and the tracker follows in about 76 ms. The
  hardware this design is modelled on settled in 194 ms and 347 ms.
* **Steady state.** At the peak the tracker keeps stepping. The duty dithers
  by one or two LSBs around the maximum. This ripple is inherent to P&O. A
  smaller step reduces it but slows tracking.
* **When it runs.** The tracker runs only while `Charge = 1` **and**
  `mppt_switch = 1`. Otherwise the duty returns to `DUTY_INIT` = 10 at the next
  update. 10 is round(0.076 × 127), the duty that boosts 3.88 V to 4.2 V. On
  re-enable, tracking starts from there. `mppt_switch` is the mode switch that
  lets the spacecraft turn tracking off altogether.

## Battery charge control (`charge_ctrl`) and charger status (`chrg_status`)

The cell is a single Li-ion cell. The LTC4054 charger does the constant-current /
constant-voltage charging itself. The fabric only decides *when* to charge, with
one flag:

* `Charge` 0 → 1: the solar current is above zero (the array sees the sun) and
  the battery is below 4.05 V (about 10 % depth of discharge);
* `Charge` 1 → 0: the battery reaches 4.2 V.

Once set, `Charge` holds through any loss of solar current until the stop
voltage. `Charge` drives `chg_en`, which switches the charger's PROG resistor
through a MOSFET. It also gates the tracker. The hysteresis keeps the cell near
full without short charge cycles: after a full charge the cell must sag
150 mV before charging restarts.

The charger reports its state on an open-drain CHRG pin, which has three states.
The board ties the CHRG node to the supply through 800 kOhm and to an FPGA
output through 2 kOhm, and reads the node on an FPGA input. `chrg_status`
alternates two phases of `SETTLE_CYCLES` = 1024 clocks:

| phase | drive | strong pull-down (charging) | weak ~20 uA (standby) | open (lockout) |
|---|---|---|---|---|
| 1 | released (`chrg_oe` = 0) | low | low | high |
| 2 | 2 k driven high | low | high | high |

It decodes at the end of phase 2, once every 68 us, into `CHG_CHARGING`,
`CHG_STANDBY` or `CHG_SHUTDOWN`. Until the first probe completes, the status is
`CHG_UNKNOWN`. `chrg_out` is constant 1: the pin is only ever driven high,
through `chrg_oe`.

## Bus regulation (`bus_regulator`) and PWM (`pwm_gen`)

Each distribution converter has a proportional controller on its measured
output voltage:

    duty = DUTY_NOM + (VREF − v_bus) / 16        (arithmetic shift, floor)

The result is limited to 0..127 and recomputed every frame. `DUTY_NOM` is the
open-loop duty: 20 (0.16 × 127) for the 4.2 → 5 V boost, and 100 (0.785 × 127)
for the 4.2 → 3.3 V buck. The proportional term only corrects for load and
losses. The gain of one duty LSB per 120 mV of error is deliberately low. At
5 V, one duty LSB moves the boost output by about 47 mV (6 codes). Higher gains
lock the loop into a two-step limit cycle wider than ±1 %. Being a pure P
controller, it leaves a small steady-state error under load: error =
load drop / (1 + loop gain).

`pwm_gen` compares a free-running 7-bit counter with the duty value. The
output is high while `duty >= count`, so a value v gives (v+1)/128 high time.
Value 20 gives 16.4 %, 100 gives 78.9 %, 127 gives 100 %, and 0 still gives one
clock in 128. The output is registered. The counter resets to 63.

## Telemetry (`telemetry_fmt`, `uart_tx`)

Once a second (`PERIOD_CYCLES`), the formatter snapshots the current frame, the
`Charge` flag and the BCD date/time inputs. It then sends a 51-byte line:

    DDMMYYYY:HHMMSS:B.BB:C:S.SS:I.III:P.PPP:T.TT:F.FF\r\n
    12042013:145943:4.01:1:3.68:0.653:2.405:3.43:4.94

The fields are, in order: battery volts, Charge, solar volts, solar amps, solar
watts (S × I), 3.3 V bus and 5 V bus. Conversion is integer arithmetic with
round-to-nearest:

* centivolts = (3·code + 2)/4;
* milliamps = (code + 2)/4;
* milliwatts = (15·V·I + 4000)/8000;
* shift-and-add-3 to BCD.

Fields saturate at 9.99 and 9.999. The line is 53 ms long at 9600 baud, well
inside the period. `uart_tx` sends 8N1, LSB first, at round(CLK_HZ/BAUD) = 3125
clocks per bit. Its valid/ready handshake accepts the next byte in the last
clock of the stop bit, so bytes go out back to back. An assertion checks that
the offered byte stays stable until it is taken.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `eps_top` | `CLK_HZ` | 30 000 000 | fabric clock, sets the UART divider |
| | `MPPT_UPDATE_FRAMES` | 85 | frames per tracking step (4.0 ms) |
| | `MPPT_DUTY_DEFAULT` | 10 | duty while not tracking |
| | `BUS5_DUTY_NOM` / `BUS33_DUTY_NOM` | 20 / 100 | open-loop duties |
| | `CHRG_SETTLE_CYCLES` | 1024 | CHRG probe phase length |
| | `TELEM_PERIOD_CYCLES` | 30 000 000 | telemetry period (1 s) |
| `po_mppt` | `DUTY_MIN`, `DUTY_MAX`, `DELTA_D` | 0, 127, 1 | step limits and size |
| `charge_ctrl` | `V_START`, `V_STOP`, `I_MIN` | 540, 560, 0 | 4.05 V, 4.2 V, zero current |
| `bus_regulator` | `VREF`, `KP_NUM`, `KP_SHIFT` | 667, 1, 4 | reference and gain KP_NUM/2^KP_SHIFT |
| `pwm_gen` | `WIDTH`, `RESET_COUNT` | 7, 63 | counter width, counter value in reset |

The `events` output of the top carries one-clock pulses for each controller
action: charge start/stop, tracker update/up/down, regulator clamps, CHRG probe
done and telemetry line done. They are there for monitoring and for the
testbench.

## What follows the original design and what is this design's own

The following come from the original design:

* the 30 MHz clock and the 7-bit PWM with its compare rule and reset count;
* the P&O decision table and refusal of a step at the limits;
* the default and nominal duties;
* the 4.05 V / 4.2 V charge rule and the flag that latches through a cycle;
* the proportional bus control;
* the CHRG resistor network;
* the telemetry fields and serial settings.

These are choices made here:

* **Firmware moved into logic.** In the original, a microcontroller core ran the
  tracker, the charge rule and the telemetry in software. It wrote the 7-bit PWM
  values to GPIOs and used a hard UART. Here all of that is fabric logic.
  `mppt_switch` replaces the GPIO that enabled tracking.
* **Tracker timing.** The 4 ms update interval, the one-LSB step and the 0/127
  limits.
* **Regulator gain.** One LSB per 120 mV, per-frame update, reset to the
  nominal duty.
* **Code scaling.** The 7.5 mV voltage code.
* **Charge stop test.** The stop happens on *reaching* 4.2 V, not on exceeding
  it. A CC-CV charger holds the cell at exactly 4.2 V, so a strict test might
  never fire.
* **CHRG probe.** The released phase and the three-state decode follow the
  charger's CHRG pin behaviour. The original only describes driving the pin high
  and reading it.
* **Telemetry details.** The 1 s period, rounding, saturation and CR LF ending.
  The power field is formed from unrounded codes, so it can differ from the
  product of the printed voltage and current in the last digit.
* **Unused measurement.** The battery current is measured but unused. No rule
  that uses it was specified.

No parameter was scaled down: every default is the value worked out for the
real system.

## Size

A generic synthesis to 3-input LUTs gives about 2200 LUTs and 310 flip-flops
for `eps_top`. That is about 2500 logic tiles, a little over half of a
4608-tile SmartFusion A2F200 fabric. When the tracker, charge rule and
telemetry ran as firmware, the fabric held only the PWM counter, about 120
tiles. Most of the added logic is the telemetry formatter: about 1000 of the
coarse cells before mapping, for its decimal conversion, a 12 x 12
multiplier and a divide by 8000. If fabric is short, that block is the one to move back into
software.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/eps_pkg.sv tb/tb_po_mppt.sv \
              --top-module tb_po_mppt -o sim && ./obj_dir/sim

Replace `tb_po_mppt` with any of the following:

| testbench | what it covers |
|---|---|
| `tb_pwm_gen` | high time (v+1)/128 for 0/32/64/95/127, 20, 100 and random values; 128-clock period; reset count |
| `tb_po_mppt` | clock-by-clock comparison with a reference model of the decision table, limits, disabled behaviour; convergence on a synthetic array |
| `tb_charge_ctrl` | a full charge cycle, hysteresis, eclipse during a cycle, random frames against a model |
| `tb_bus_regulator` | duty formula and clamping against a model; closed loop on ideal converters within ±1 % |
| `tb_chrg_status` | all three charger states through a model of the resistor network; probe timing |
| `tb_uart_tx` | 300 random bytes back to back and with gaps; 3125-clock bit time at the default rate |
| `tb_telemetry_fmt` | byte-exact lines against text built in real arithmetic, with consumer stalls and saturation; two recorded readings reproduced |
| `tb_eps_top` | the whole controller at default parameters: 1.1 s of simulated time |

`tb_eps_top` closes the loop with simple numeric models of the array, the
converters, the battery and the charger. It tracks bright and dim sun, turns
the MPPT switch off and on, shorts the 5 V bus, fills the battery, and checks
hysteresis, eclipse and restart. It decodes the telemetry line from the serial
pin. It also counts every mechanism and fails if one never happened. It takes
about 40 s of wall time.

The array model is synthetic, not a fitted solar cell: current = k·D, voltage
= 600 − D²/c codes. The tracking times it reports show the algorithm's speed on
that curve, not on real cells.
