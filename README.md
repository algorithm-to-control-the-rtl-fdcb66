# Digital feedback controller for an FMC high-voltage supply channel

A DC-to-HVDC converter module turns a low control voltage into up to a
few kilovolts. On its own, such a module is a poor voltage source. Its output
depends on the load current, a low-impedance or capacitive load can push it
beyond its safe operating limit, and nothing stops it from drawing more current
than allowed. This design closes the loop in an FPGA. It reads the HV output
voltage and the module's input current through ADCs. It computes a new
control voltage and writes it to the DAC that drives the module. It does this
once per loop period, typically 0.1 s.

The control law is an integrator with four additions:

* a **set-point limiter** clips the requested voltage to a per-module maximum;
* a **rate limiter** in front of the integrator caps the ramp speed in V/s;
* a **current limiter** with hysteresis steps in while the current is too
  high: the target becomes the measured voltage minus a small fraction of it,
  so the output walks down until the current drops back below the limit;
* an optional **proportional term** adds speed at the cost of stability margin.

All arithmetic is signed fixed point, Q16.16: 16 integer bits, 16 fraction
bits, one LSB = 15.3 µV or 15.3 µA. All coefficients are run-time inputs, so
software can retune the loop while it runs.

The RTL describes one channel. A dual-channel board uses two instances.

## The control law

```
                     HV_MAX_SET_POINT
 set point ──────────[ clip ±max ]───────── sp_lim ──┐
                                                     │  current limit?
 I ADC ─[scale]─ I ──[ hysteresis relay ]────────────┼──────────┐
                                                     │          ▼
 V ADC ─[scale]─ V ──┬──[ V − V·g ]─── lim_v ────────┴──▶[ select ]── target
                     │                                             │
                     └──────────────────────────────────(−)──(+)───┘
                                                         │ error
                          [ × error gain ]──[ clip ±max rate ]── e  (V/s)
                                                         │
                   integ += e·T ──▶ (+ Kp·e) ──▶ × inverse module gain ──▶ DAC
```

Each update uses one voltage sample and one current sample:

| quantity | formula | unit |
|---|---|---|
| `sp_lim` | `clip(set_point, −max, +max)` | V |
| `lim_v` | `V − V·g` (g = 1/50 removes 2 %) | V |
| `target` | `lim_v` while limiting, else `sp_lim` | V |
| `error` | `target − V` | V |
| `e` | `clip(error · error_gain, −max_rate, +max_rate)` | V/s |
| `integ` | `integ + e · T`, T = loop period | V |
| `pi` | `integ + Kp · e` | V |
| `drive` | `pi · inv_gain` | V at the DAC |
| DAC code | `clip(round(drive / 2.5 V · 65536), 0, 65535)` | LSB |

### How the rate limit works

The integrator state is the high voltage the loop asks for. Each update moves
it by `e · T`. Far from the target, `e` sits at the rate limit. With
max_rate = 1000 V/s and T = 0.1 s the request rises by 100 V per update, so a
1500 V step takes about 1.5 s as a straight ramp. Within `max_rate /
error_gain` of the target (100 V for a gain of 10), `e` becomes proportional
to the error. The ramp then slows down and the output settles without a
large overshoot.

`error_gain · T` is the integrator's loop gain per update. If the module's
response is fast compared with T, a value of 1 gives near one-step settling.
Values much above 1 make the loop oscillate.

### How the current limit works

The current limiter is a relay. It turns on when the current reaches
`hyst_high` and turns off only when the current has fallen to `hyst_low`.
While it is on, the target is `V − V·g`. The error is therefore `−g·V`, and
the output drops at `g · V · error_gain` V/s, capped by the rate limit. Once the
current falls to `hyst_low`, the relay releases. The loop then ramps back up
towards the user set point until the current reaches `hyst_high` again. The
output therefore settles into a sawtooth around the voltage at which the
load draws the maximum current, and the load still gets about that current.
The hysteresis band, the rate limit and the module's lag set the sawtooth's
depth. Peaks can pass that voltage by a few percent before the next sample
sees the current.

### `inv_gain`

`inv_gain` converts the requested HV into the drive voltage. It only needs to
be roughly the inverse of the module-plus-driver gain: the integrator removes
any mismatch. With the drive assumed here (2.5 V DAC, ×3 amplifier, module at
2000 V for 7.5 V), the gain is 800 V per DAC volt, so `inv_gain ≈ 1/800`.
Q16.16 stores small gains coarsely. For example, 1/3000 becomes 22/65536, which is
0.7 % off. The integrator absorbs this error too.

## Number format

Quantities are `hvfb_pkg::fxp_t`, a signed 32-bit Q16.16 value. The range is
±32768, which covers volts up to a few kV, rates in V/s and gains up to
hundreds.

* Additions, subtractions and products **saturate** at the range ends instead
  of wrapping.
* Products are **rounded** to the nearest LSB.
* To widen the format, change `FXP_INT_BITS` and `FXP_FRAC_BITS` in
  `hvfb_pkg.sv`. Every module follows, including the setting ports.

The ADC scalers read a code as a two's-complement fraction of `2^N`
and multiply it by a full-scale gain:
`V = code / 2^24 · SETTING_HV_VOLTAGE_MONITOR_GAIN` (default 4 × 1750 V) and
`I = code / 2^12 · SETTING_HV_CURRENT_MONITOR_GAIN` (default 5 A).

## One loop update, cycle by cycle

The loop does not run freely. An external timer pulses
`fb_loop_calculate_and_update_output_i` for one clock every loop period. This
lets software change the period, or stop the loop by withholding the pulse.
The loop period must also be given as the parameter
`FEEDBACK_LOOP_PERIOD_IN_S`, because the integrator multiplies by it.

Each trigger starts a five-step sequence in `hvfb_loop_sequencer`:

| cycle after trigger | step | what is registered |
|---|---|---|
| 1 | LIMIT | current-limiter state; snapshot of the measured voltage |
| 2 | ERROR | clipped set point, limited voltage, target, error, rate-limited error |
| 3 | INTEGRATE | integrator and integrator + Kp·e |
| 4 | SCALE | drive = (integrator + Kp·e) · inv_gain |
| 5 | OUTPUT | DAC code |
| 6 | — | `hv_lv_set_point_ready_o` is high for one cycle with the new code |

The sequencer ignores a trigger that arrives while an update is running
(`fb_loop_busy_o = 1`).

The ADC inputs are independent of the loop. Each `*_ready_i` strobe
updates the scaled value one cycle later, and an update uses whatever values
are current when it starts.

Settings are plain inputs, read while the update runs. The register bank that
holds them lives outside this core.

`fb_loop_enabled_i = 0`:

* clears the integrator, the current limiter, the monitoring registers and
  the DAC code;
* drops `hv_enable_pwm_ctrl_o`.

Triggers are still answered with a ready strobe and code 0, so the DAC is
driven to zero. Re-enabling starts the ramp again from 0 V.

`hv_enable_pwm_ctrl_o` is a level: the module supply's PWM runs at a
fixed duty cycle outside the controller.

## Interface of `hv_feedback_algo_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i`, `rst_i` | in | 1 | clock, synchronous active-high reset |
| `fb_loop_enabled_i` | in | 1 | loop on/off |
| `fb_loop_calculate_and_update_output_i` | in | 1 | one-cycle trigger per loop period |
| `fb_loop_busy_o` | out | 1 | update in progress |
| `setting_hv_set_point_i` | in | 32 | requested HV, V |
| `setting_hv_max_set_point_i` | in | 32 | clip bound, V (e.g. 1750) |
| `setting_fb_loop_hv_error_gain_i` | in | 32 | error gain, 1/s (e.g. 10) |
| `setting_fb_loop_hv_max_rate_i` | in | 32 | ramp limit, V/s (e.g. 500–2000) |
| `setting_fb_loop_hv_module_inv_gain_i` | in | 32 | inverse module gain (e.g. 1/800) |
| `setting_fb_loop_hv_current_limit_hyst_high_i` | in | 32 | limiter on, A |
| `setting_fb_loop_hv_current_limit_hyst_low_i` | in | 32 | limiter off, A |
| `setting_fb_loop_hv_gain_to_hv_monitor_when_in_cur_limt_i` | in | 32 | fraction g removed while limiting (e.g. 1/50) |
| `setting_fb_loop_kp_i` | in | 32 | proportional gain, s (0 = off) |
| `internal_state_*` | out | 32 | set point, V, I, limited voltage, limited error, clipped set point, target, error, drive |
| `internal_state_fb_current_limiter_status` | out | 1 | 1 while limiting |
| `hv_voltage_monitor_data_i` / `_ready_i` | in | 24 / 1 | voltage ADC |
| `hv_current_monitor_data_i` / `_ready_i` | in | 12 / 1 | current ADC |
| `hv_enable_pwm_ctrl_o` | out | 1 | HV enable level |
| `hv_lv_set_point_data_o` / `_ready_o` | out | 16 / 1 | DAC code and strobe |

All settings are Q16.16. To convert a real value, use `round(value · 65536)`, or
call `hvfb_pkg::fxp_from_real` in a testbench.

Parameters: `SETTING_HV_VOLTAGE_MONITOR_GAIN` (7000.0),
`SETTING_HV_CURRENT_MONITOR_GAIN` (5.0), `FEEDBACK_LOOP_PERIOD_IN_S` (0.1),
`DAC_FULL_SCALE_V` (2.5), `VMON_BITS` (24), `IMON_BITS` (12), `DAC_BITS` (16).

## Files

| file | contents |
|---|---|
| `rtl/hvfb_pkg.sv` | Q16.16 type, saturating/rounding helpers, sequencer state type |
| `rtl/hvfb_input_scaler.sv` | ADC code to volts/amps |
| `rtl/hvfb_current_limiter.sv` | hysteresis relay |
| `rtl/hvfb_setpoint_select.sv` | set-point clip, current-limit target, selection |
| `rtl/hvfb_error_rate_limiter.sv` | error, error gain, rate limit |
| `rtl/hvfb_pi_core.sv` | integrator, proportional term, inverse module gain |
| `rtl/hvfb_dac_encoder.sv` | drive voltage to 16-bit DAC code |
| `rtl/hvfb_loop_sequencer.sv` | trigger-driven step sequencer, ready strobe |
| `rtl/hv_feedback_algo_top.sv` | one controller channel |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus the package |
| `tb/tb_hv_functional_workload.sv` | closed-loop run with the alternative gains and load above |
| `tb/hv_plant_model.sv` | behavioural DAC + HV module + load + ADC model (simulation only) |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Example with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/hvfb_pkg.sv tb/tb_hv_feedback_algo_top.sv --top-module tb_hv_feedback_algo_top
./obj_dir/Vtb_hv_feedback_algo_top
```

`tb_hv_feedback_algo_top` runs the controller at its default parameters in a
closed loop with `hv_plant_model`. The model has a first-order module
response, about 0.2 s, and an input current proportional to the output
voltage. Triggers come every 100 clocks.

At every update, a real-valued reference of the control law computes the
expected DAC code from the same ADC readings. The testbench checks the code
against it to within 2 LSB, and checks that the ready strobe comes 6 cycles
after the trigger. The test runs these scenarios:

* a 1500 V ramp at 1000 V/s;
* a 2000 V request clipped to 1750 V;
* a ramp down to 0 V;
* an over-current load with 0.3/0.28 A thresholds at 500 V/s; the output must
  hover between 850 and 1080 V, below the 1000 V at which the load reaches
  0.3 A;
* a run with Kp = 0.01;
* triggers during an update;
* disable and restart;
* DAC saturation.

The test counts each of these mechanisms and requires every one to occur. The
whole run takes a fraction of a second.

`tb_hv_functional_workload` runs a second configuration, as a board
bring-up would:

* monitor gains of 3 × 1750 V and 0.3 A;
* error gain 10, rate limit 2000 V/s;
* inverse gain 1/3000, deliberately far from the module's 1/800;
* current thresholds 50/48 mA and a 33 kΩ load.

Set points of 500 V and 1000 V are reached within 1 %. A 1700 V request would
draw 51.5 mA, so the current limiter takes over. It holds the output in a
sawtooth of roughly 1580–1670 V around the 1650 V at which the load draws
50 mA.

The unit testbenches compare each block with independent real-valued or 64-bit
integer arithmetic over random and corner inputs.

## Design choices not fixed by the control law

These are the points where this RTL had to choose. They are the first places
to look when adapting it to a board.

* **ADC scaling:** a code is read as a two's-complement fraction of `2^N`
  times a full-scale gain. ADC offsets are not removed.
* **DAC format:** an unsigned 16-bit code over 0–2.5 V, rounded and clipped.
* **Set-point clip:** symmetric, ±max.
* **Relay polarity and timing:** `status = 1` means limiting. The relay is
  evaluated once per loop update, not on every ADC sample.
* **Proportional gain:** `setting_fb_loop_kp_i` is a run-time input.
* **Update schedule:** five one-cycle steps with fixed latency. Triggers during
  an update are dropped. One voltage snapshot serves the whole update.
* **Windup:** the only anti-windup is fixed-point saturation. The integrator
  can, for example, keep pushing while the DAC is clipped.
* **Disable:** disabling clears everything and still answers triggers with
  code 0.
* **Reset:** synchronous and active-high. All state resets to zero.

## Not included

* The analog chain: DAC, drive amplifier, HV module, voltage divider, the
  current-sense amplifier and the HV-enable PWM. `hv_plant_model` stands in
  for them in simulation only.
* The register bank that holds the settings, the loop-period timer, and
  any memory that records the monitoring outputs. These belong to the host
  FPGA design. The core only brings out the internal states.
* ADC offset suppression.
* Turning the correction off once the voltage has settled, to reduce the
  ripple the loop itself causes. This is a possible refinement, not part of
  this RTL.
