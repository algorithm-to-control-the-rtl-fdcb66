// tb_hvfb_pi_core: feeds random rate-limited errors into the PI core and
// tracks integrator, PI output and drive with a real-valued reference
// (integ += e*T with T the 0.1 s period as stored in Q16.16; pi = integ +
// kp*e; drive = pi*inv_gain). Also checks that nothing moves without
// update/scale, that clear zeroes the state, and a pure-integrator ramp:
// 15 updates at 1000 V/s give 1500 V.
module tb_hvfb_pi_core;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic clear = 1'b0, update = 1'b0, scale = 1'b0;
  fxp_t e, kp, ig, integ, pi_hv, drive;

  hvfb_pi_core #(.LOOP_PERIOD_S(0.1)) dut (
    .clk_i(clk), .rst_i(rst), .clear_i(clear), .update_i(update), .scale_i(scale),
    .limited_error_i(e), .kp_i(kp), .inv_gain_i(ig),
    .integ_o(integ), .pi_hv_o(pi_hv), .drive_o(drive));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real r(fxp_t x);
    return real'(x) / 65536.0;
  endfunction

  function automatic bit near(real a, real b, real tol);
    return (a - b) < tol && (b - a) < tol;
  endfunction

  real ref_integ = 0.0;
  localparam real T = 6554.0 / 65536.0;   // 0.1 s in Q16.16

  task automatic run_update(real err);
    real ep, pi_ref;
    @(negedge clk);
    e = fxp_from_real(err);
    ep = r(e);
    update = 1'b1;
    @(negedge clk);
    update = 1'b0;
    ref_integ = ref_integ + ep * T;
    pi_ref = ref_integ + r(kp) * ep;
    scale = 1'b1;
    @(negedge clk);
    scale = 1'b0;
    check(near(r(integ), ref_integ, 2e-3), $sformatf("integ %f exp %f", r(integ), ref_integ));
    check(near(r(pi_hv), pi_ref, 2e-3), $sformatf("pi %f exp %f", r(pi_hv), pi_ref));
    check(near(r(drive), pi_ref * r(ig), 2e-3), $sformatf("drive %f exp %f", r(drive), pi_ref * r(ig)));
  endtask

  initial begin
    e = '0;
    kp = '0;
    ig = fxp_from_real(1.0 / 800.0);
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // pure integrator ramp at the rate limit
    for (int i = 0; i < 15; i++) run_update(1000.0);
    check(near(r(integ), 1500.0, 0.1), "15 x 100 V = 1500 V");
    // hold: no update, no change
    @(negedge clk); e = fxp_from_real(500.0);
    repeat (5) @(negedge clk);
    check(near(r(integ), ref_integ, 2e-3), "integrator holds without update");
    // proportional term and random errors
    kp = fxp_from_real(0.01);
    ig = fxp_from_real(1.0 / 3000.0);
    for (int i = 0; i < 200; i++)
      run_update(real'($urandom_range(0, 4000)) - 2000.0);
    // clear
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(integ == 0 && pi_hv == 0 && drive == 0, "clear zeroes state");
    ref_integ = 0.0;
    run_update(-100.0);
    check(near(r(integ), -10.0 * 6554.0 / 65536.0 * 10.0, 1e-3), "negative error integrates down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
