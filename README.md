# Pulse plating power supply: FPGA control logic

A precision electroplating supply must hold its output voltage (0 to 7 V) accurately,
because the plating current density, and with it the quality of the coating, follows
from that voltage. The power stage here is simple: MOSFET **Q1** switches the input onto a
filter capacitor C, and MOSFET **Q2** pulses the capacitor voltage onto the plating load
through a precision resistor. The FPGA sets the capacitor voltage through Q1's duty cycle,
shapes the plating pulse through Q2's width and duty cycle, and measures the load current
with an AD9215 10-bit ADC. It closes the loop from current to voltage: it computes the
voltage the measured current implies and corrects Q1 until that voltage matches the set
point.

This RTL implements that logic in SystemVerilog. It is written around one 50 MHz clock.

## The duty-cycle convention

Every "duty cycle" in this design is the **ratio period / pulse width**, an integer of 1 or
more. It is not the usual on-fraction. A Q1 setting of width 5 us and duty 150 means a
5 us pulse every 750 us. Duty 1 means the switch is always on. Larger values mean less
energy into the capacitor, so **the output voltage falls as the duty value rises**. The
convention lets the pulse generator be built from plain counters, with no multiplier or
divider.

## The regulation loop (`voltage_regulator`)

This block holds most of the design's reasoning. It rests on two relations of the power
stage, both fitted from bench measurements and both built in as parameters.

1. **Duty cycle to voltage:** `V = 1e5 / (a + b*D)` mV, with `a = 16.155` and
   `b = 0.0318`. This is the fit for a 50 us Q1 pulse and Q2 duty 10.
2. **Current to voltage:** `V = c + r*Ieq` (mV, mA), with `c = 474.5 mV` and
   `r = 60.4 ohm`. `c` is the drop across the diode and switches. `r` is the 51 ohm load
   plus about 10 ohm in series. `Ieq` is the *equivalent current*: the mean current times
   the Q2 duty value, which is the current that flows while Q2 is on.

The loop runs in these steps:

1. **Start.** When `enable` rises, or the set point changes, the first relation is
   inverted to give a starting duty cycle.

   `D0 = round((1e5 / Vset - a) / b)`, clamped to 1..65535.

   In fixed point this is `(FIT_K - FIT_A*V + FIT_B*V/2) / (FIT_B*V)`, where `FIT_K = 1e9`,
   `FIT_A = 161550` and `FIT_B = 318` (the fit's numbers scaled by 1e4). A set point of 0
   gives 65535, the lowest voltage the supply can reach.
2. **Settle.** Wait until the Q1 gate runs the new value (`q1_applied`; the pulse
   generator takes it at its next period start), then `SETTLE_CYCLES` (1 ms) more for the
   output to settle.
3. **Measure.** Restart the current averager (`avg_clear`) and wait for the next 300-sample
   average. The output now includes only samples taken after the output settled.
4. **Compute the voltage.** The second relation gives the voltage in units of 1e-4 mV/300,
   so no intermediate rounding is needed:

   `V*1e4*300 = 4745*1000*300 + 604*125*sum*q2_duty`

   Here `sum` is the 300-sample sum of ADC codes and 125 uA is the current per ADC code.
   The set point is scaled the same way, and the difference is divided by `1e4*300` to
   give the error in mV.
5. **Compare.** If `|error| <= TOL_MV` (50 mV), the loop raises `locked` and goes back to
   step 3 without touching the duty cycle. It keeps watching.
6. **Adjust.** Otherwise it moves the duty cycle by

   `step = max(1, |error_mV| * D >> 12)`

   It moves up if the voltage is too high and down if it is too low, clamps the result to
   1..65535, and goes back to step 2.

Why this step rule works: V is roughly proportional to 1/D, so a relative change of D by
err/V cancels the error. The rule uses 4096 mV in place of V. Below about 4 V the steps
are therefore too small, and the loop approaches the set point from one side without
overshooting. In the end-to-end test it needs 6 to 10 steps for errors of about 1 to 1.5 V.

A single 48-bit sequential divider (`seq_divider`) does both divisions. Each takes 49
clocks.

**Resolution and tolerance.** With 125 uA per code and Q2 duty 10, one ADC code is worth
about 75 mV of output. The 50 mV tolerance band is 100 mV wide, wider than one code, so
some duty value always lands inside it. If you narrow `TOL_MV` below half a code's worth,
the loop can hunt between two duty values.

**Loop timing.** One step takes the rest of the current Q1 period, then `SETTLE_CYCLES`,
then 300 us of averaging, then about 120 clocks of arithmetic. With short Q1 periods that
is about 1.3 ms. With long Q1 periods (50 us x duty 7000 = 350 ms), the capacitor
averages over fewer pulses per millisecond, so `SETTLE_CYCLES` should be raised to cover a
few periods.

## Pulse generation (`pulse_gen`)

Each gate signal comes from three counters:

- a prescaler that makes 1 us ticks (`CYC_PER_US = 50`);
- a microsecond counter that splits time into slots one pulse width long;
- a slot counter that runs from 0 to duty-1.

The output is high during slot 0. The period is exactly `width_us * duty * 50` clocks and
the high time is `width_us * 50` clocks. Widths and duty values are 16 bits, so periods
can reach seconds without a wide counter.

New settings are taken only at the start of a period. `period_start` marks that moment and
`active_cfg` shows what is running. A change never cuts a pulse short. Width or duty 0
counts as 1. The top has two instances: Q1 (voltage) and Q2 (plating pulse). They run
independently, with no phase relation between them.

## Current sampling (`ad9215_capture`, `current_averager`)

The AD9215 is clocked directly by the 50 MHz system clock (`ad_clk`). Its 10-bit
offset-binary output passes through two registers. One code in 50 is then kept, which
gives a 1 MHz sample stream. The current is never negative, so the code is used as an
unsigned magnitude. The out-of-range pin is carried with each sample. The top turns it
into a sticky `adc_over_range` flag.

`current_averager` sums 300 samples and then divides by 300. It produces a new average
every 300 us:

- `avg` is the truncated mean. A steady 50 mA reading comes out near code 400.
- `avg_sum` is the full sum, which the loop uses.

`avg_valid` follows the 300th sample by 21 clocks. `clear` drops the partial window and
any result still being divided.

## Serial reports (`serial_comm`, `uart_tx`)

The link runs at 9600 baud, 8 data bits, no parity, 1 stop bit. Each average is sent as
two bytes, high byte first: `{6'b0, avg[9:8]}`, then `avg[7:0]`. A terminal that shows
bytes in binary then shows the code directly, for example `00000011 00110011` for 819.

A pair takes 2.08 ms, but averages come every 300 us. The latest value overwrites any
value still waiting, so the PC always gets a recent reading, about one average in seven.
Only the transmit direction exists.

## Top level (`plating_supply_top`)

| Group | Pins |
|---|---|
| Mode | `run` enables everything. When it is low, both gates are off and the ADC is powered down. `closed_loop` = 1 regulates to `v_set_mv`; 0 takes the Q1 duty from `q1_duty_manual` (open loop, for measuring the duty-to-voltage curve). |
| Settings | `q1_width_us`, `q2_width_us`, `q2_duty` are read by each pulse train at its next period. |
| Power stage | `q1_gate`, `q2_gate` go to the gate driver chip. |
| ADC | `ad_clk`, `ad_pdwn`, `ad_data[9:0]`, `ad_otr` |
| Host | `txd` |
| Status | `q1_duty`, `locked`, `v_meas_mv`, `avg_valid`, `avg_current`, `adc_over_range`, `n_adjust_up`, `n_adjust_down`, `n_lock`, `n_sent` |

The gate driver, the MOSFETs, the capacitor and load, and the ADC itself are outside the
FPGA. They appear only as pins.

Shared constants and types (`CLK_HZ`, field widths, `pulse_cfg_t`) are in `plating_pkg`.

## What is taken from the supply's description and what is chosen here

Taken from the description:

- the 50 MHz clock;
- the period/width duty convention;
- the Q1/Q2 roles;
- the AD9215 at 50 MHz, read at 1 MHz;
- the 300-value average;
- 9600 8N1 serial;
- the four units (voltage regulation, pulse control, current sampling, serial);
- the loop's sequence: start from the duty-voltage curve, compute the real voltage from the
  current, compare, and adjust by an amount that depends on the difference;
- both fitted relations, including all their coefficients.

Chosen here, because the description does not give them:

- **Current scale** of 125 uA per ADC code. The sense resistor and ADC gain are not given.
  This puts full scale at 128 mA, just above the highest equivalent current measured
  (about 102 mA). That is the mean current the sense circuit sees when Q2 is always on.
  Change `I_LSB_UA` in `voltage_regulator` to match the real sense circuit.
- **Tolerance and settling:** 50 mV tolerance and 1 ms settling time.
- **Step law:** the step rule above.
- **Measurement definitions:** the ADC code is taken as the mean (ammeter) current, which
  the loop multiplies by the Q2 duty value.
- **Serial byte format** and the newest-value-wins policy.
- **Control details:** load-at-period-start in the pulse generators; the `clear` input of
  the averager; the open-loop/closed-loop switch; `run`; the status counters; the sticky
  over-range flag.
- **Which fit to use.** Only the fits for the main condition (Q1 50 us, Q2 duty 10) are
  built in. Fits were also measured for a 1 us Q1 pulse with Q2 duty 10, 5 and 2. For
  another operating condition, set `FIT_A`, `FIT_B`, `LIN_C_X10` and `LIN_R_X10`.

Not built: the analog power stage and the ADC chip. Receiving on the serial port is also
not built, because nothing is specified to be received.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. All of them pass.

| Testbench | What it checks |
|---|---|
| `tb_pulse_gen` | High time and period in clocks for 5 us/150, 100 us/5 and 1 us/7; duty 1 always on; settings change only at period start; disable. |
| `tb_seq_divider` | 200 random and edge-case divisions against `/` and `%`; latency of W+1 clocks; divide by zero. |
| `tb_ad9215_capture` | Sample spacing of 50 clocks, capture delay, out-of-range flag, power-down. |
| `tb_current_averager` | Averages and sums against a reference, 21-clock latency, `clear` mid-window and during the divide. |
| `tb_uart_tx`, `tb_serial_comm` | A receiver model decodes the line. Byte values, stop bit, frame length, byte order and the newest-value policy are checked. |
| `tb_voltage_regulator` | Starting duty against the inverted curve. Immediate lock when the plant matches the curve. Steps down and steps up against plants that follow other fitted curves. Final voltage within the band. Reported voltage against the current relation. Set-point restart. Clamps at 0 and 7 V. Loop timing. |
| `tb_duty_sweep` | The whole design in open loop on the two bench workloads. First the Q1 5 us/150 and Q2 100 us/5 gate timing. Then a Q1 duty sweep from 1 to 7000 (Q1 1 us, Q2 50 us/10) against the fitted plant: averaged current within one code, gate duty, readings falling with duty, serial reports. |
| `tb_plating_supply_top` | The whole design at its default parameters, in open loop, then closed loop at 3000 mV and 4000 mV, then over-range, then stop. Details below. |

The top-level testbench surrounds the design with a behavioural AD9215
(`tb/ad9215_model.sv`, with a 5-clock pipeline) and a steady-state power-stage model
(`tb/plating_plant_model.sv`). The plant reads the duty values off the actual gate
waveforms. The test counts each mechanism and fails if one never happens: open loop,
lock, step down, step up, restart, serial report, over-range. It simulates about
1.4 million clocks (27 ms) in a few seconds.

The plant models are steady-state only. They capture neither the capacitor's dynamics
nor the switching ripple, so the loop's behaviour during transients is not verified.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/plating_pkg.sv tb/tb_plating_supply_top.sv --top-module tb_plating_supply_top
./obj_dir/Vtb_plating_supply_top
```

Swap in any other `tb_*` name to run that testbench. The testbenches pass their checks
through a 64-bit compare task, so Verilator reports width-extension warnings, and
`-Wno-fatal` keeps those from stopping the build. Signals are two-state, and every
register has a reset.
