// tb_hv_functional_workload: the controller with the monitor gains and loop
// settings of the reference functional test, in closed loop with a
// resistive 33 kohm load (45 mA at 1500 V):
//   voltage monitor gain 3 x 1750 V, current monitor gain 0.3 A,
//   max set point 1750 V, error gain 10, max rate 2000 V/s,
//   inverse module gain 1/3000, current limit 0.050 A / 0.048 A,
//   1/50 reduction while limiting, 100 clocks per loop, plant update every
//   20 clocks with a 0.1 step constant.
// Three set points are applied in turn: 500 V and 1000 V must be reached
// within 1 %; 1700 V asks for 51.5 mA, so the current limiter must take over
// and keep the output between 1500 V and 1700 V, in a sawtooth around the
// 1650 V where the load draws 50 mA. The inverse gain deliberately differs from the real
// module gain (1/800); the integrator has to absorb the mismatch. Ready must
// follow every trigger after 6 clocks.
module tb_hv_functional_workload;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic en = 1'b0, trig = 1'b0, busy;
  fxp_t s_sp, s_max, s_gain, s_rate, s_invg, s_hhi, s_hlo, s_clg, s_kp;
  fxp_t m_sp, m_v, m_i, m_lv, m_le, m_spl, m_sel, m_err, m_int;
  logic m_cl;
  logic [23:0] vdata;
  logic [11:0] idata;
  logic vrdy, irdy, hv_en, dac_rdy;
  logic [15:0] dac;

  hv_feedback_algo_top #(
    .SETTING_HV_VOLTAGE_MONITOR_GAIN(3.0 * 1750.0),
    .SETTING_HV_CURRENT_MONITOR_GAIN(0.3),
    .FEEDBACK_LOOP_PERIOD_IN_S      (0.1)
  ) dut (
    .clk_i(clk), .rst_i(rst),
    .fb_loop_enabled_i(en), .fb_loop_calculate_and_update_output_i(trig), .fb_loop_busy_o(busy),
    .setting_hv_set_point_i(s_sp), .setting_hv_max_set_point_i(s_max),
    .setting_fb_loop_hv_error_gain_i(s_gain), .setting_fb_loop_hv_max_rate_i(s_rate),
    .setting_fb_loop_hv_module_inv_gain_i(s_invg),
    .setting_fb_loop_hv_current_limit_hyst_high_i(s_hhi),
    .setting_fb_loop_hv_current_limit_hyst_low_i(s_hlo),
    .setting_fb_loop_hv_gain_to_hv_monitor_when_in_cur_limt_i(s_clg),
    .setting_fb_loop_kp_i(s_kp),
    .internal_state_hv_voltage_set_point(m_sp), .internal_state_hv_voltage_in_volts(m_v),
    .internal_state_hv_current_in_amps(m_i), .internal_state_fb_limited_voltage(m_lv),
    .internal_state_fb_limited_error(m_le), .internal_state_fb_set_point_limited(m_spl),
    .internal_state_fb_selected_set_voltage(m_sel), .internal_state_fb_error(m_err),
    .internal_state_fb_integrated_error(m_int), .internal_state_fb_current_limiter_status(m_cl),
    .hv_voltage_monitor_data_i(vdata), .hv_voltage_monitor_ready_i(vrdy),
    .hv_current_monitor_data_i(idata), .hv_current_monitor_ready_i(irdy),
    .hv_enable_pwm_ctrl_o(hv_en), .hv_lv_set_point_data_o(dac), .hv_lv_set_point_ready_o(dac_rdy));

  hv_plant_model #(
    .CLK_PER_UPDATE(20), .ALPHA(0.1), .HV_PER_DAC_V(7.5 / 2.5 * 2000.0 / 7.5),
    .VMON_FS(3.0 * 1750.0), .IMON_FS(0.3)
  ) plant (
    .clk_i(clk), .rst_i(rst), .dac_code_i(dac), .dac_ready_i(dac_rdy), .hv_enable_i(hv_en),
    .vmon_data_o(vdata), .vmon_ready_o(vrdy), .imon_data_o(idata), .imon_ready_o(irdy));

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  int n_cl_edges = 0;
  logic cl_prev = 1'b0;
  real vmin, vmax;

  task automatic loop_step();
    int lat;
    @(negedge clk);
    trig = 1'b1;
    @(negedge clk);
    trig = 1'b0;
    lat = 1;
    while (!dac_rdy && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 6, $sformatf("ready latency %0d", lat));
    if (m_cl != cl_prev) n_cl_edges++;
    cl_prev = m_cl;
    repeat (100 - lat - 1) @(negedge clk);
    if (plant.vout > vmax) vmax = plant.vout;
    if (plant.vout < vmin) vmin = plant.vout;
  endtask

  initial begin
    s_max  = fxp_from_real(1750.0);
    s_gain = fxp_from_real(10.0);
    s_rate = fxp_from_real(2000.0);
    s_invg = fxp_from_real(1.0 / 3000.0);
    s_hhi  = fxp_from_real(0.050);
    s_hlo  = fxp_from_real(0.048);
    s_clg  = fxp_from_real(1.0 / 50.0);
    s_kp   = '0;
    s_sp   = fxp_from_real(500.0);
    repeat (5) @(posedge clk);
    rst = 1'b0;
    plant.amps_per_volt = 1.0 / (1500.0 * 22.0);
    en = 1'b1;

    // set point 1
    for (int k = 0; k < 60; k++) loop_step();
    check(plant.vout > 495.0 && plant.vout < 505.0, $sformatf("set point 1: %f V", plant.vout));
    // set point 2
    s_sp = fxp_from_real(1000.0);
    for (int k = 0; k < 60; k++) loop_step();
    check(plant.vout > 990.0 && plant.vout < 1010.0, $sformatf("set point 2: %f V", plant.vout));
    check(n_cl_edges == 0, "no current limit below 50 mA");
    // set point 3: over-current
    s_sp = fxp_from_real(1700.0);
    for (int k = 0; k < 40; k++) loop_step();
    vmin = 1.0e9;
    vmax = 0.0;
    for (int k = 0; k < 60; k++) loop_step();
    $display("set point 3: %f .. %f V, limiter edges %0d", vmin, vmax, n_cl_edges);
    check(vmax < 1700.0 && vmin > 1500.0, "current-limited output stays between 1500 V and 1700 V");
    check(n_cl_edges >= 4, "over-current detected and released repeatedly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
