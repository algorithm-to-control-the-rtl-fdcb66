// hv_feedback_algo_top: one channel of the digital HV supply controller.
//
// The controller closes a voltage loop around a DC-to-HVDC converter module.
// Each loop update (started by fb_loop_calculate_and_update_output_i):
//   1. the measured current updates the hysteresis current limiter and the
//      measured voltage is frozen for the rest of the update;
//   2. the target is the user set point clipped to the safe maximum, or,
//      while the current limiter is active, the measured voltage minus a
//      fraction of it; error = target - measured voltage, times the error
//      gain, clipped to +/- the maximum voltage rate (V/s);
//   3. the integrator adds error * loop period; the proportional term is
//      added;
//   4. the result (HV volts) is multiplied by the inverse module gain to get
//      the low-voltage drive;
//   5. the drive is converted to a 16-bit DAC code, and
//      hv_lv_set_point_ready_o pulses with the new code one cycle later.
// ADC readings are converted to volts and amps whenever their ready strobes
// arrive, independent of the loop.
//
// Ports follow the published controller entity: 32-bit Q16.16 settings
// (changeable at any time, used at the next update), the internal states
// brought out for monitoring, a 24-bit voltage ADC, a 12-bit current ADC
// and a 16-bit DAC output. Additions of this design: setting_fb_loop_kp_i
// (proportional gain, 0 = pure integrator) and fb_loop_busy_o.
//
// fb_loop_enabled_i = 0 clears the integrator, the current limiter and all
// loop outputs, and drops hv_enable_pwm_ctrl_o; triggers then still produce a
// ready strobe with DAC code 0 so the DAC is driven to zero. The HV enable is
// a plain level: the PWM of the HV enable runs at a fixed duty cycle outside
// this controller.
//
// Timing: ready pulses 6 clock cycles after the trigger; triggers during an
// update are ignored. The loop period parameter must match the trigger
// period supplied from outside.
module hv_feedback_algo_top
  import hvfb_pkg::*;
#(
  parameter real SETTING_HV_VOLTAGE_MONITOR_GAIN = 4.0 * 1750.0,
  parameter real SETTING_HV_CURRENT_MONITOR_GAIN = 5.0,
  parameter real FEEDBACK_LOOP_PERIOD_IN_S       = 0.1,
  parameter real DAC_FULL_SCALE_V                = 2.5,
  parameter int  VMON_BITS                       = 24,
  parameter int  IMON_BITS                       = 12,
  parameter int  DAC_BITS                        = 16
) (
  input  logic                 clk_i,
  input  logic                 rst_i,
  // loop control
  input  logic                 fb_loop_enabled_i,
  input  logic                 fb_loop_calculate_and_update_output_i,
  output logic                 fb_loop_busy_o,
  // settings (Q16.16)
  input  fxp_t                 setting_hv_set_point_i,
  input  fxp_t                 setting_hv_max_set_point_i,
  input  fxp_t                 setting_fb_loop_hv_error_gain_i,
  input  fxp_t                 setting_fb_loop_hv_max_rate_i,
  input  fxp_t                 setting_fb_loop_hv_module_inv_gain_i,
  input  fxp_t                 setting_fb_loop_hv_current_limit_hyst_high_i,
  input  fxp_t                 setting_fb_loop_hv_current_limit_hyst_low_i,
  input  fxp_t                 setting_fb_loop_hv_gain_to_hv_monitor_when_in_cur_limt_i,
  input  fxp_t                 setting_fb_loop_kp_i,
  // internal states for monitoring (Q16.16)
  output fxp_t                 internal_state_hv_voltage_set_point,
  output fxp_t                 internal_state_hv_voltage_in_volts,
  output fxp_t                 internal_state_hv_current_in_amps,
  output fxp_t                 internal_state_fb_limited_voltage,
  output fxp_t                 internal_state_fb_limited_error,
  output fxp_t                 internal_state_fb_set_point_limited,
  output fxp_t                 internal_state_fb_selected_set_voltage,
  output fxp_t                 internal_state_fb_error,
  output fxp_t                 internal_state_fb_integrated_error,
  output logic                 internal_state_fb_current_limiter_status,
  // ADCs
  input  logic [VMON_BITS-1:0] hv_voltage_monitor_data_i,
  input  logic                 hv_voltage_monitor_ready_i,
  input  logic [IMON_BITS-1:0] hv_current_monitor_data_i,
  input  logic                 hv_current_monitor_ready_i,
  // HV module drive
  output logic                 hv_enable_pwm_ctrl_o,
  output logic [DAC_BITS-1:0]  hv_lv_set_point_data_o,
  output logic                 hv_lv_set_point_ready_o
);

  // ---------------------------------------------------------------- inputs
  fxp_t hv_volts, hv_amps;
  logic hv_volts_valid, hv_amps_valid;

  hvfb_input_scaler #(
    .ADC_BITS       (VMON_BITS),
    .FULL_SCALE_GAIN(SETTING_HV_VOLTAGE_MONITOR_GAIN)
  ) u_vmon (
    .clk_i  (clk_i),
    .rst_i  (rst_i),
    .data_i (hv_voltage_monitor_data_i),
    .ready_i(hv_voltage_monitor_ready_i),
    .value_o(hv_volts),
    .valid_o(hv_volts_valid)
  );

  hvfb_input_scaler #(
    .ADC_BITS       (IMON_BITS),
    .FULL_SCALE_GAIN(SETTING_HV_CURRENT_MONITOR_GAIN)
  ) u_imon (
    .clk_i  (clk_i),
    .rst_i  (rst_i),
    .data_i (hv_current_monitor_data_i),
    .ready_i(hv_current_monitor_ready_i),
    .value_o(hv_amps),
    .valid_o(hv_amps_valid)
  );

  // ------------------------------------------------------------- sequencer
  seq_state_t seq_state;
  logic step_limit, step_error, step_integrate, step_scale, step_output;
  logic clear;

  hvfb_loop_sequencer u_seq (
    .clk_i           (clk_i),
    .rst_i           (rst_i),
    .trigger_i       (fb_loop_calculate_and_update_output_i),
    .state_o         (seq_state),
    .step_limit_o    (step_limit),
    .step_error_o    (step_error),
    .step_integrate_o(step_integrate),
    .step_scale_o    (step_scale),
    .step_output_o   (step_output),
    .ready_o         (hv_lv_set_point_ready_o),
    .busy_o          (fb_loop_busy_o)
  );

  assign clear = !fb_loop_enabled_i;

  // ------------------------------------------------ step 1: limiter, snapshot
  logic current_limit;
  fxp_t v_snap;

  hvfb_current_limiter u_climit (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .clear_i    (clear),
    .update_i   (step_limit),
    .current_i  (hv_amps),
    .hyst_high_i(setting_fb_loop_hv_current_limit_hyst_high_i),
    .hyst_low_i (setting_fb_loop_hv_current_limit_hyst_low_i),
    .limit_o    (current_limit)
  );

  always_ff @(posedge clk_i) begin
    if (rst_i || clear)  v_snap <= FXP_ZERO;
    else if (step_limit) v_snap <= hv_volts;
  end

  // -------------------------------------- step 2: target, error, rate limit
  fxp_t sp_limited, lim_voltage, selected, error, lim_error;
  fxp_t sp_limited_q, lim_voltage_q, selected_q, error_q, lim_error_q;

  hvfb_setpoint_select u_sel (
    .set_point_i        (setting_hv_set_point_i),
    .max_set_point_i    (setting_hv_max_set_point_i),
    .measured_voltage_i (v_snap),
    .cl_gain_i          (setting_fb_loop_hv_gain_to_hv_monitor_when_in_cur_limt_i),
    .current_limit_i    (current_limit),
    .set_point_limited_o(sp_limited),
    .limited_voltage_o  (lim_voltage),
    .selected_o         (selected)
  );

  hvfb_error_rate_limiter u_err (
    .selected_i        (selected),
    .measured_voltage_i(v_snap),
    .error_gain_i      (setting_fb_loop_hv_error_gain_i),
    .max_rate_i        (setting_fb_loop_hv_max_rate_i),
    .error_o           (error),
    .limited_error_o   (lim_error)
  );

  always_ff @(posedge clk_i) begin
    if (rst_i || clear) begin
      sp_limited_q  <= FXP_ZERO;
      lim_voltage_q <= FXP_ZERO;
      selected_q    <= FXP_ZERO;
      error_q       <= FXP_ZERO;
      lim_error_q   <= FXP_ZERO;
    end else if (step_error) begin
      sp_limited_q  <= sp_limited;
      lim_voltage_q <= lim_voltage;
      selected_q    <= selected;
      error_q       <= error;
      lim_error_q   <= lim_error;
    end
  end

  // ------------------------------------------- steps 3-4: PI core and scale
  fxp_t integ, pi_hv, drive;

  hvfb_pi_core #(
    .LOOP_PERIOD_S(FEEDBACK_LOOP_PERIOD_IN_S)
  ) u_pi (
    .clk_i          (clk_i),
    .rst_i          (rst_i),
    .clear_i        (clear),
    .update_i       (step_integrate),
    .scale_i        (step_scale),
    .limited_error_i(lim_error_q),
    .kp_i           (setting_fb_loop_kp_i),
    .inv_gain_i     (setting_fb_loop_hv_module_inv_gain_i),
    .integ_o        (integ),
    .pi_hv_o        (pi_hv),
    .drive_o        (drive)
  );

  // ------------------------------------------------------ step 5: DAC code
  hvfb_dac_encoder #(
    .DAC_BITS        (DAC_BITS),
    .DAC_FULL_SCALE_V(DAC_FULL_SCALE_V)
  ) u_dac (
    .clk_i  (clk_i),
    .rst_i  (rst_i),
    .clear_i(clear),
    .load_i (step_output),
    .drive_i(drive),
    .code_o (hv_lv_set_point_data_o)
  );

  always_ff @(posedge clk_i) begin
    if (rst_i) hv_enable_pwm_ctrl_o <= 1'b0;
    else       hv_enable_pwm_ctrl_o <= fb_loop_enabled_i;
  end

  // ------------------------------------------------------------ monitoring
  assign internal_state_hv_voltage_set_point      = setting_hv_set_point_i;
  assign internal_state_hv_voltage_in_volts       = hv_volts;
  assign internal_state_hv_current_in_amps        = hv_amps;
  assign internal_state_fb_limited_voltage        = lim_voltage_q;
  assign internal_state_fb_limited_error          = lim_error_q;
  assign internal_state_fb_set_point_limited      = sp_limited_q;
  assign internal_state_fb_selected_set_voltage   = selected_q;
  assign internal_state_fb_error                  = error_q;
  assign internal_state_fb_integrated_error       = drive;
  assign internal_state_fb_current_limiter_status = current_limit;

  // Loop steps only run inside an update, one at a time.
  a_one_step: assert property (@(posedge clk_i) disable iff (rst_i)
    $onehot0({step_limit, step_error, step_integrate, step_scale, step_output}));

endmodule
