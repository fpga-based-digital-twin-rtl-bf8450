# Embedded digital twin of a voltage-regulated flyback converter

A flyback DC/DC converter is regulated by a PI controller on an FPGA. Next to
that physical control loop, the same FPGA runs a *digital twin*: a second copy
of the PI controller closed around a small fixed-point model of the converter,
fed with the same setpoint and gains. In fault-free operation the twin's output
voltage tracks the measured one. The difference between the two is the useful
signal: a 15-sample moving average of it stays near zero while the plant
behaves, and leaves its band when something goes wrong. The case this RTL is
built to show is a lost ADC connection. No data has to leave the chip for this
comparison; a serial line only reports the values to a host for display.

The RTL follows a published FPGA digital-twin study of a flyback converter
(12 MHz Spartan-7 board, 10 us sampling time). That study gives the plant
model, the PI structure, the block diagram and the signal types. It leaves many
implementation details open. This README says which parts come from that
description and which are choices made here. Section "Departures and choices"
collects them.

## Structure

```
 sample_timer: tick every 120 clocks (10 us) drives all three paths below

 sw ──► setpoint_selector ──► SP  (to both loops)

 physical loop:
   ADC ◄──adc_start── adc_reader ◄──adc_done, adc_data── ADC
                          │
                          PV
                          ▼
   error_calc (SP−PV) ──e──► pi_controller ──MV──► pwm_generator ──► gate

 digital twin (flyback_dt):
   error_calc (SP−PV_DT) ──► pi_controller ──MV_DT──► flyback_model ──► PV_DT
        ▲                                                                │
        └──────────────── PV_DT of the previous sample ◄─────────────────┘

 monitoring:
   PV, PV_DT ──► dt_asset_error ──► error, 15-sample average, event_warning
   SP, PV, PV_DT, error, MV, MV_DT, P, I ──► serial_logger ──► uart_tx ──► uart_txd
```

| module | role |
|---|---|
| `dt_top` | top level; wires everything, one sampling strobe for both loops |
| `dt_pkg` | `pv_t` (int16), `mv_t` (uint8), the log record `log_rec_t`, `sat16()` |
| `sample_timer` | strobe every `TS_CLKS` = 120 clocks (10 us at 12 MHz) |
| `setpoint_selector` | synchronises 3 switches, SP = 4 + 5·code volts |
| `adc_reader` | one conversion request per strobe, scales the 12-bit code to volts |
| `error_calc` | e = SP − PV, saturated to int16 |
| `pi_controller` | PI law with a kp/kp_div proportional gain and a forward-Euler integrator |
| `sdiv_seq` | signed sequential divider used by the PI |
| `flyback_model` | second-order IIR: the identified converter transfer function |
| `flyback_dt` | the twin: error_calc + pi_controller + flyback_model, closed with a unit delay |
| `pwm_generator` | 256-clock PWM, pulse width = MV |
| `dt_asset_error` | PV_asset − PV_DT, 15-sample moving average, threshold warning |
| `serial_logger`, `uart_tx` | ASCII log line per record over 115200-baud 8N1 |

## Top-level interface (`dt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 12 MHz clock; synchronous active-low reset |
| `sw` | in | 3 | setpoint switches (asynchronous) |
| `kp`, `kp_div`, `ki` | in | int16 | PI gains, shared by the physical loop and the twin |
| `event_thr` | in | int16 | warning threshold on the moving-average error, volts |
| `adc_start` | out | 1 | one-clock conversion request, once per sampling period |
| `adc_done`, `adc_data` | in | 1, 12 | conversion result, `adc_data` valid while `adc_done` is high |
| `pwm` | out | 1 | MOSFET gate |
| `uart_txd` | out | 1 | 115200-baud 8N1 log line |
| `event_warning` | out | 1 | twin-versus-asset warning |
| `pv_asset`, `pv_dt`, `dt_err_avg` | out | int16 | measured PV, twin PV, moving-average error |
| `dt_error`, `dt_p_action`, `dt_i_action` | out | int16 | the twin's own control error and PI actions |
| `monitor` | out | `log_rec_t` | the record that the serial line reports, refreshed every period |
| `sample_tick` | out | 1 | sampling strobe |

Parameters: `CLK_HZ` (12 000 000), `TS_CLKS` (120 clocks per sample) and
`BAUD` (115 200). Changing `TS_CLKS` changes the loop timing, but not the
10 us integrator constant or the model. Both were identified for 10 us, so
`TS_CLKS` should stay equal to CLK_HZ · 10 us.

## The twin model

### Converter model (`flyback_model`)

The converter is represented by a discrete transfer function from duty command
to output voltage. It was identified around a 30 % duty cycle and discretised
with the Tustin method at t_s = 10 us:

```
        0.2781 z² + 0.5561 z + 0.2781
P(z) = ───────────────────────────────
           z² + 0.6723 z + 0.9396
```

The module evaluates it as a direct-form-I recursion

```
y[n] = b0·u[n] + b1·u[n−1] + b2·u[n−2] − a1·y[n−1] − a2·y[n−2]
```

with these fixed-point formats:

* The coefficients are Q16 integers: B0 = B2 = 18226, B1 = 36445, A1 = 44060,
  A2 = 61578. Each is the printed coefficient times 2^16, rounded.
* The input is u = MV · GAIN_Q / 256. GAIN_Q = 256 (gain 1.0) by default; see
  the departures below.
* The state holds u and y with `YF` = 8 fractional bits in 40-bit registers.
  The 80-bit accumulator is shifted right by 16.
* The output `pv` is y rounded to whole volts and saturated to int16, the type
  the twin uses for voltages.

The poles sit at radius √0.9396 ≈ 0.969 and about 110° apart, so the model
rings strongly at roughly 30 kHz. The DC gain is 1.1123 / 2.6119 ≈ 0.426 V per
MV count (with GAIN_Q = 1.0). An MV of 100 therefore settles at 42.6 V, which
the unit testbench checks. Compared with the floating-point recursion, the
output stays within one volt over long random input runs.

### PI controller (`pi_controller`)

The control law is `u = kp·e + ki·t_s/(z−1)·e`:

* **Proportional action.** p = trunc(e·kp / kp_div). The gain is a ratio of
  two int16 inputs so that gains below one can be set. The product e·kp (32
  bits) is divided by kp_div in a sequential divider, one bit per clock. A zero
  divisor gives p = 0.
* **Integral action.** This is the forward-Euler form of `K·Ts/(z−1)`. The
  register `acc` holds Σ ki·e over the *previous* samples, and
  i = floor(acc · TS_Q / 2^32), where TS_Q = 42950 ≈ 10 us · 2^32. After i is
  read, ki·e of the present sample is added. `acc` is clamped so that i never
  leaves int16. This only prevents wrap-around; it is not a tuned anti-windup
  scheme.
* **Output.** MV = clamp(p + i, MV_MIN = 3, MV_MAX = 217). The limits are duty
  cycles of 0.01 and 0.85 of full scale, applied to an 8-bit pulse width.

Timing: `out_valid` comes 35 clocks after `in_valid`. That is 32 clocks of
division plus latch and update stages. `in_valid` pulses that arrive while
`busy` is high are ignored.

Example gains that behave well with this plant: kp = 1, kp_div = 8, ki = 1000.
With these, a step settles in about a thousand samples (10 ms) without
overshoot. In the model, a proportional gain of 1/4 (with ki = 2000) already
excites the 30 kHz resonance and the loop oscillates. The twin test also uses
kp = 0 with ki = 5000, and a setpoint of 120 V, which needs more than MV_MAX
(120 / 0.426 = 282 counts) and drives the output into saturation.

### Closing the twin loop (`flyback_dt`)

Each strobe starts one twin step:

1. At clock 0 the tick arrives. `error_calc` forms SP − PV_DT, using the
   PV_DT of the *previous* step; this is the unit delay in the feedback path.
2. At clock 1 the PI starts.
3. At clock 36 the plant steps with the new MV, and PV_DT updates at
   clock 37.

The step finishes in 37 of the 120 clocks. The twin has no measured input at
all: it sees only SP and the gains, exactly as the physical controller does.

## One sampling period

`sample_timer` pulses `sample_tick` every 120 clocks. In `dt_top`, each tick
triggers the following:

* **Physical loop.** `adc_reader` pulses `adc_start`. When the ADC returns
  `adc_done` with a 12-bit code, PV = code · 960 / 2^16 (60 V full scale). The
  new PV goes through `error_calc` and `pi_controller`, and the new MV reaches
  `pwm_generator`. The PWM takes a new width only at the start of a 256-clock
  period, so a change never truncates a pulse. With an ADC latency of L clocks,
  MV is ready roughly L + 38 clocks after the tick. The loop keeps up as long as this
  is below 120.
* **Twin.** `flyback_dt` steps, as described above.
* **Comparison.** `dt_asset_error` takes the PV and PV_DT present at the tick.
  These are the results of the previous period for both loops, so the two are
  compared at the same point in time. One clock later it outputs:
  * the error PV − PV_DT;
  * the new window average;
  * the warning.
* **Logging.** In that same clock the record is offered to the serial logger.
  The logger takes it if it is idle and drops it otherwise.

The PWM period (256 clocks) is longer than the sampling period (120 clocks),
and the two are not synchronised. The gate therefore applies only the MV in
force at each PWM period start, which is about every second controller
output. The behavioural plant in the system tests sees the same effect, and
the loop is stable with it. A PWM period of at most 120 clocks would apply
every output, but MV would then need rescaling.

## Event detection (`dt_asset_error`)

The error is `err = PV_asset − PV_DT`. It is positive when the measurement
reads above the twin. The last 15 errors sit in a shift window with a running
32-bit sum. The module outputs:

* `avg`: sum / 15, truncated toward zero.
* `warning`: high while |sum| > 15 · `thr`, an exact comparison with no
  division.

The threshold is an input. It is meant to be set from the spread of the
error in healthy steady state; a six-sigma band is the intended policy.

The end-to-end test shows a disconnected ADC, which reads 0 V:

* The asset controller keeps integrating toward its setpoint until MV sits at
  MV_MAX.
* The twin is unaffected.
* The average quickly leaves ±thr and `warning` rises.
* After reconnection, the asset overshoots because of the wound-up integrator.
  It then settles, and the warning clears.

With a 10 us strobe, the window spans 150 us. Making the window slower
(averaging logged or decimated samples) only needs a slower `in_valid`.

## Serial log format

A record (`dt_pkg::log_rec_t`) becomes one ASCII line of 49 bytes:

```
SSSSS AAAAA DDDDD EEEEE MMMMM NNNNN PPPPP IIIII\r\n
```

The fields, in order:

1. setpoint
2. measured PV
3. twin PV
4. twin-versus-asset error
5. asset MV
6. twin MV
7. asset P action
8. asset I action

Each field is five characters:

* A value ≥ 0 is zero-padded decimal, e.g. `00004`.
* A negative value is `-` plus four digits, e.g. `-0014`. Magnitudes above
  9999 print as 9999.

Digits are produced by repeated subtraction of powers of ten while the UART
is idle. At 115200 baud a line takes 4.25 ms, so roughly one record in 425 is
logged. The `monitor` output port carries the same record on every strobe.

## Departures and choices

Taken from the reference design:

* the 12 MHz clock;
* t_s = 10 us;
* the transfer function and its coefficients;
* the PI structure (kp/kp_div, ki, forward-Euler integrator, output
  saturation);
* the 0.01 and 0.85 duty limits;
* int16 process values;
* the block set and the wiring of the top;
* the sign of the twin-versus-asset error;
* the 15-sample moving average;
* the eight logged quantities and the 5-digit text fields.

Chosen here, because the description does not fix them:

* **MV width.** MV is an *unsigned* 8-bit pulse width. The reference types the
  asset MV as a signed 8-bit value and the twin MV as 16 bits. Here both are
  8-bit, and the twin MV is zero-extended where a 16-bit value is needed.
* **Model input gain.** A gain block sits in front of the transfer function,
  but its value is unknown. `GAIN_Q` defaults to 1.0. To match a real board,
  set it from a measured operating point: V = GAIN · 0.426 · MV at steady
  state.
* **PWM.** The period is 256 clocks (46.9 kHz). The converter's transformer is
  rated for 250–600 kHz, which an 8-bit counter at 12 MHz cannot reach. Change
  `PERIOD` and the MV scaling together if needed.
* **ADC.** Only the digital side is modelled: a start/done handshake, 12-bit
  code, 60 V full scale. On the real board the ADC is the FPGA's analog block
  behind a resistive divider, and `adc_reader` is the place to adapt to its
  interface.
* **Setpoints.** The setpoint map is SP = 4 + 5·code V for a 3-bit switch
  code, with a two-flop synchroniser and no debouncing.
* **Gains.** One set of gains (`kp`, `kp_div`, `ki`) is shared by the physical
  controller and the twin, and it is a top-level input.
* **No "error sign" stage.** The reference block diagram shows a stage named
  "error sign" between the error calculator and the controller, without saying
  what it does. It is not built; the signed error goes straight to the PI.
* **Moving average in hardware.** In the reference, the averaging was done
  on the host from logged data. Here it is computed in hardware on every
  strobe, and the warning policy is a plain threshold on the average.
* **One UART.** The reference shows three serial outputs (twin output, asset
  output, twin error) but one USB-serial bridge. They are merged into one
  line per record on one UART at 115200 baud, 8N1.
* **Integrator clamp.** The PI integrator is clamped at the int16 limit of
  its output.

Not built, because they are not logic:

* the power stage itself;
* the ADC's analog front end;
* the board oscillator and switches;
* the USB-serial bridge;
* the host display.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are
computed in the testbench itself:

| testbench | what it checks |
|---|---|
| `tb_setpoint_selector` | all switch codes, mapping and 3-clock delay |
| `tb_error_calc` | random and extreme operands, saturation, 1-clock timing |
| `tb_pi_controller` | 600 updates against an integer model of the PI; 35-clock latency; both MV limits and the integrator clamp reached; zero divisor |
| `tb_flyback_model` | 1500 steps against the floating-point recursion (±1 V), DC gain |
| `tb_flyback_dt` | 6000 twin steps bit-exact against a model of the whole loop; settles on 4/24/39/14 V; saturation for an unreachable 120 V setpoint; step takes 37 of the 120 clocks |
| `tb_pwm_generator` | high time and period length for widths 0…255; mid-period changes wait for the next period |
| `tb_adc_reader` | handshake with random ADC delays, scaling, hold behaviour |
| `tb_dt_asset_error` | error, moving average and warning against a queue model, including a lost-sensor stretch |
| `tb_uart_tx` | 100 bytes decoded by a behavioural receiver, 1040-clock frame |
| `tb_serial_logger` | 30 random records decoded and compared with the expected text; records offered while busy are dropped |
| `tb_dt_top` | whole design at default parameters, see below |
| `tb_dt_sensor_fault` | whole design: the setpoint sequence 4, 24, 34, 39, 34, 14, 4, 14 V, then an ADC interruption and reconnection; reports settling error, detection delay and recovery |

`tb_dt_top` runs the complete design at its default parameters for 12,500
sampling periods (125 ms of board time). Its plant is `tb/flyback_asset_model.sv`,
a behavioural converter with the same dynamics and three differences from the
twin: 3 % more gain, ±0.3 V of measurement noise, and a switch that
disconnects the ADC. The test does the following:

* It steps the switches through 4, 24, 39 and 14 V and checks that both loops
  settle within 1 V with no warning.
* It disconnects the ADC and checks that:
  * MV saturates;
  * the warning rises;
  * the twin stays on its setpoint.
* It reconnects the ADC and checks that the asset recovers and the warning
  clears.
* Along the way it checks that:
  * every PWM period has MV as its high time;
  * there is one ADC request per period;
  * every serial line is well formed;
  * the error field of each line equals PV minus PV_DT of the same line.

Each mechanism is counted and must occur at least once.

`tb_dt_sensor_fault` runs the monitoring experiment as a sequence: eight setpoint
steps, then a 2000-sample ADC interruption at 14 V. With the default
threshold of 3 V, the results are:

* In every settled setpoint, measurement and twin agree to the volt, and no
  warning appears.
* The interruption is flagged 5 samples after the disconnection.
* On reconnection, the wound-up integrator drives the output to about 59 V
  before it settles again. The warning covers this transient and then
  clears.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dt_pkg.sv \
    rtl/*.sv tb/uart_rx_model.sv tb/flyback_asset_model.sv tb/tb_dt_top.sv \
    --top-module tb_dt_top -Mdir obj_tb_dt_top
./obj_tb_dt_top/Vtb_dt_top
```

For a unit testbench, list `rtl/dt_pkg.sv`, the module and its submodules (or
simply `rtl/*.sv`), plus `tb/uart_rx_model.sv` for the UART and logger
benches. Each run takes a few seconds at most.

## How far to trust it

* The twin reproduces the stated transfer function and PI law exactly in
  fixed point, and is tested bit-exact against an independent model.
* The closed-loop numbers apply to this plant model only: gains, MV scaling
  and model gain have not been calibrated against a physical board.
* The physical loop has been tested only against a behavioural plant whose
  dynamics equal the twin's. A real flyback stage is nonlinear and differs
  more from the twin.
* Nothing has been checked on hardware for timing closure. All arithmetic is
  single-cycle except the divider. The widest paths are the 80-bit
  multiply-accumulate of the plant model and the 64-bit integral scaling,
  which are evaluated once per 120 clocks but not declared as multicycle
  paths.
