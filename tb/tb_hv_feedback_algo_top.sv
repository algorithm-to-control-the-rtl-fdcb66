// tb_hv_feedback_algo_top: closed-loop test of one controller channel at its
// default parameters, against the behavioural HV module and load model.
//
// A loop trigger is sent every 100 clocks (one loop period of 0.1 s); the
// plant model advances every 20 clocks. At every trigger a real-valued
// reference of the control law (limiter, clip, selection, error gain, rate
// limit, integrator, proportional term, inverse gain, DAC conversion) is
// stepped with the same ADC readings the controller sees, and the DAC code
// that arrives with the ready strobe is compared with it (within 2 LSB). The
// ready strobe must come exactly 6 clocks after the trigger.
//
// Phases: ramp to 1500 V at the 1000 V/s rate limit; a 2000 V request
// clipped to the 1750 V maximum; ramp down to 0 V; an over-current load with
// 0.3/0.28 A thresholds and a 500 V/s rate (the voltage must hover just
// below the 1000 V where the current limit is reached); a run with the
// proportional term; triggers during an update; loop disabled and
// re-enabled. Each mechanism is counted and must occur at least once.
module tb_hv_feedback_algo_top;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  localparam int LOOP_CLKS = 100;

  // DUT signals
  logic en = 1'b0, trig = 1'b0, busy;
  fxp_t s_sp, s_max, s_gain, s_rate, s_invg, s_hhi, s_hlo, s_clg, s_kp;
  fxp_t m_sp, m_v, m_i, m_lv, m_le, m_spl, m_sel, m_err, m_int;
  logic m_cl;
  logic [23:0] vdata;
  logic [11:0] idata;
  logic vrdy, irdy, hv_en, dac_rdy;
  logic [15:0] dac;

  hv_feedback_algo_top dut (
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

  hv_plant_model plant (
    .clk_i(clk), .rst_i(rst), .dac_code_i(dac), .dac_ready_i(dac_rdy), .hv_enable_i(hv_en),
    .vmon_data_o(vdata), .vmon_ready_o(vrdy), .imon_data_o(idata), .imon_ready_o(irdy));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  function automatic real r(fxp_t x);
    return real'(x) / 65536.0;
  endfunction

  // Last ADC codes delivered before the current cycle.
  logic [23:0] last_v = '0;
  logic [11:0] last_i = '0;
  always @(posedge clk) begin
    if (!rst && vrdy) last_v <= vdata;
    if (!rst && irdy) last_i <= idata;
  end

  // Mechanism counters
  int n_rate_limited = 0, n_sp_clipped = 0, n_cl_on = 0, n_cl_off = 0;
  int n_prop = 0, n_busy_ignored = 0, n_disabled = 0, n_updates = 0, n_dac_clipped = 0;

  // Reference model state
  real ref_integ = 0.0;
  bit  ref_cl = 1'b0;
  localparam real T = 6554.0 / 65536.0;

  function automatic real clampr(real x, real lo, real hi);
    return (x > hi) ? hi : (x < lo) ? lo : x;
  endfunction

  // One loop update: trigger, step the reference, check latency and code.
  task automatic loop_step(bit extra_trigger);
    logic [23:0] vc;
    logic [11:0] ic;
    real v, i, spl, lv, sel, le, pi, drive, ideal;
    int expc, lat;
    bit was_cl;
    @(negedge clk);
    vc = vrdy ? vdata : last_v;
    ic = irdy ? idata : last_i;
    trig = 1'b1;
    @(negedge clk);
    trig = 1'b0;
    // reference of the control law
    v = $floor(real'(signed'(vc)) * 7000.0 * 65536.0 / (2.0 ** 24)) / 65536.0;
    i = real'(signed'(ic)) * 5.0 / 4096.0;
    was_cl = ref_cl;
    if (!en) begin
      ref_cl = 1'b0;
      ref_integ = 0.0;
      expc = 0;
      n_disabled++;
    end else begin
      if (!ref_cl && i >= r(s_hhi)) ref_cl = 1'b1;
      else if (ref_cl && i <= r(s_hlo)) ref_cl = 1'b0;
      if (ref_cl && !was_cl) n_cl_on++;
      if (!ref_cl && was_cl) n_cl_off++;
      spl = clampr(r(s_sp), -r(s_max), r(s_max));
      if (spl != r(s_sp)) n_sp_clipped++;
      lv = v - v * r(s_clg);
      sel = ref_cl ? lv : spl;
      le = clampr((sel - v) * r(s_gain), -r(s_rate), r(s_rate));
      if (le == r(s_rate) || le == -r(s_rate)) n_rate_limited++;
      ref_integ = ref_integ + le * T;
      pi = ref_integ + r(s_kp) * le;
      if (s_kp != 0 && le != 0.0) n_prop++;
      drive = pi * r(s_invg);
      ideal = drive / 2.5 * 65536.0;
      if (ideal <= 0.0) expc = 0;
      else if (ideal >= 65535.0) begin
        expc = 65535;
        n_dac_clipped++;
      end else expc = int'(ideal + 0.5);
    end
    // wait for ready, counting cycles after the trigger was sampled
    lat = 1;
    while (!dac_rdy && lat < 20) begin
      if (extra_trigger && lat == 2) begin
        trig = 1'b1;
        check(busy, "busy during update");
        n_busy_ignored++;
      end
      @(negedge clk);
      trig = 1'b0;
      lat++;
    end
    check(lat == 6, $sformatf("ready latency %0d, expected 6", lat));
    check(int'(dac) - expc <= 2 && expc - int'(dac) <= 2,
          $sformatf("DAC code %0d, reference %0d (V=%f I=%f cl=%0b)", dac, expc, v, i, ref_cl));
    check(m_cl == ref_cl, "current limiter status");
    n_updates++;
    @(negedge clk);
    check(!dac_rdy, "ready is one cycle");
    // fill the rest of the loop period; no ready may appear
    for (int c = lat + 1; c < LOOP_CLKS; c++) begin
      @(negedge clk);
      if (dac_rdy) check(1'b0, "spurious ready (ignored trigger started an update)");
    end
  endtask

  task automatic run_loops(int n);
    for (int k = 0; k < n; k++) loop_step(k % 7 == 3);
  endtask

  function automatic bit in_range(real x, real lo, real hi);
    return x >= lo && x <= hi;
  endfunction

  initial begin
    real vmax, vmin;
    s_sp   = fxp_from_real(1500.0);
    s_max  = fxp_from_real(1750.0);
    s_gain = fxp_from_real(10.0);
    s_rate = fxp_from_real(1000.0);
    s_invg = fxp_from_real(1.0 / 800.0);
    s_hhi  = fxp_from_real(0.5);
    s_hlo  = fxp_from_real(0.48);
    s_clg  = fxp_from_real(1.0 / 50.0);
    s_kp   = '0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(dac == 0 && !hv_en && !dac_rdy && !busy, "idle after reset");
    en = 1'b1;
    @(negedge clk);

    // 1: ramp to 1500 V at 1000 V/s, no current limit (0.45 A < 0.5 A)
    plant.amps_per_volt = 0.0003;
    run_loops(8);
    check(hv_en, "HV enable follows loop enable");
    check(in_range(plant.vout, 450.0, 750.0), $sformatf("ramp rate: %f V after 0.8 s", plant.vout));
    run_loops(32);
    check(in_range(plant.vout, 1485.0, 1515.0), $sformatf("settled at %f V, set 1500 V", plant.vout));
    check(m_cl == 1'b0, "no current limit in phase 1");

    // 2: 2000 V request clipped to 1750 V (lighter load)
    plant.amps_per_volt = 0.0002;
    s_sp = fxp_from_real(2000.0);
    run_loops(40);
    check(in_range(plant.vout, 1732.0, 1768.0), $sformatf("clipped set point: %f V", plant.vout));
    check(m_spl == s_max, "set point limited to maximum");

    // 3: ramp down to 0 V
    s_sp = fxp_from_real(0.0);
    run_loops(40);
    check(plant.vout < 20.0, $sformatf("ramp down: %f V", plant.vout));

    // 4: over-current load, thresholds 0.3/0.28 A, 500 V/s
    plant.amps_per_volt = 0.0003;   // 0.3 A at 1000 V
    s_hhi  = fxp_from_real(0.3);
    s_hlo  = fxp_from_real(0.28);
    s_rate = fxp_from_real(500.0);
    s_sp   = fxp_from_real(1500.0);
    run_loops(40);
    vmax = 0.0;
    vmin = 1.0e9;
    for (int k = 0; k < 40; k++) begin
      loop_step(1'b0);
      if (plant.vout > vmax) vmax = plant.vout;
      if (plant.vout < vmin) vmin = plant.vout;
    end
    check(vmax < 1080.0 && vmin > 850.0,
          $sformatf("current-limited voltage stays near 1000 V: %f..%f", vmin, vmax));
    check(n_cl_on >= 2 && n_cl_off >= 2, "limiter entered and left repeatedly");

    // 5: proportional term, normal load
    s_hhi = fxp_from_real(0.5);
    s_hlo = fxp_from_real(0.48);
    s_rate = fxp_from_real(1000.0);
    s_kp  = fxp_from_real(0.01);
    s_sp  = fxp_from_real(800.0);
    run_loops(40);
    check(in_range(plant.vout, 790.0, 810.0), $sformatf("with Kp settled at %f V", plant.vout));

    // 6: disable: outputs to zero, trigger still answered with code 0
    en = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(!hv_en && dac == 0 && m_int == 0 && m_le == 0, "disable clears outputs");
    run_loops(5);
    check(dac == 0, "disabled updates give code 0");
    // re-enable: start again from zero
    en = 1'b1;
    s_sp = fxp_from_real(500.0);
    run_loops(30);
    check(in_range(plant.vout, 493.0, 507.0), $sformatf("restart settled at %f V", plant.vout));

    // 7: DAC saturation: ask for more than the DAC can give
    s_invg = fxp_from_real(1.0 / 100.0);
    run_loops(1);
    check(dac == 16'hFFFF, "DAC code saturates");
    s_invg = fxp_from_real(1.0 / 800.0);

    $display("mechanisms: updates=%0d rate_limited=%0d sp_clipped=%0d cl_on=%0d cl_off=%0d prop=%0d busy_ignored=%0d disabled=%0d dac_clipped=%0d",
             n_updates, n_rate_limited, n_sp_clipped, n_cl_on, n_cl_off, n_prop, n_busy_ignored,
             n_disabled, n_dac_clipped);
    check(n_rate_limited > 0, "rate limit happened");
    check(n_sp_clipped > 0, "set point clip happened");
    check(n_cl_on > 0 && n_cl_off > 0, "current limiter happened");
    check(n_prop > 0, "proportional term used");
    check(n_busy_ignored > 0, "trigger during update happened");
    check(n_disabled > 0, "disabled loop happened");
    check(n_dac_clipped > 0, "DAC clip happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
