// tb_hvfb_current_limiter: sweeps the current up and down across the two
// thresholds (0.3 A / 0.28 A) and applies random currents, comparing the
// limiter state with a reference relay model; also checks that the state
// only changes on update and that clear forces it low.
module tb_hvfb_current_limiter;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic clear = 1'b0, update = 1'b0;
  fxp_t cur, hi, lo;
  logic lim;

  hvfb_current_limiter dut (
    .clk_i(clk), .rst_i(rst), .clear_i(clear), .update_i(update),
    .current_i(cur), .hyst_high_i(hi), .hyst_low_i(lo), .limit_o(lim));

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

  bit ref_state = 1'b0;

  task automatic step(real amps);
    @(negedge clk);
    cur = fxp_from_real(amps);
    update = 1'b1;
    if (!ref_state && amps >= 0.3) ref_state = 1'b1;
    else if (ref_state && amps <= 0.28) ref_state = 1'b0;
    @(negedge clk);
    update = 1'b0;
    check(lim == ref_state, $sformatf("current %f: limit %0b exp %0b", amps, lim, ref_state));
  endtask

  initial begin
    hi = fxp_from_real(0.3);
    lo = fxp_from_real(0.28);
    cur = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i <= 40; i++) step(0.2 + 0.0025 * i);   // up to 0.3
    check(lim == 1'b1, "limit reached at 0.3 A");
    for (int i = 40; i >= 0; i--) step(0.2 + 0.0025 * i);   // back down
    check(lim == 1'b0, "limit released");
    step(0.29); check(lim == 1'b0, "0.29 A from below stays off");
    step(0.31); check(lim == 1'b1, "0.31 A turns on");
    step(0.29); check(lim == 1'b1, "0.29 A from above stays on");
    // no update: current above threshold must not change a released state
    step(0.1);
    @(negedge clk); cur = fxp_from_real(1.0);
    repeat (3) @(negedge clk);
    check(lim == 1'b0, "no change without update");
    step(0.5);
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(lim == 1'b0, "clear forces off");
    ref_state = 1'b0;
    for (int i = 0; i < 300; i++) step(real'($urandom_range(0, 400)) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
