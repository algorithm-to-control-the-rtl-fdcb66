// tb_hvfb_error_rate_limiter: random set points, measured voltages, gains
// and rate limits; error and limited error are compared with the real-valued
// reference clamp(gain*(sp - v), -rate, rate). Both the clipped and the
// unclipped regions are exercised and counted.
module tb_hvfb_error_rate_limiter;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  int n_clipped = 0, n_linear = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fxp_t sel, vm, gain, rate, err, lerr;

  hvfb_error_rate_limiter dut (
    .selected_i(sel), .measured_voltage_i(vm), .error_gain_i(gain), .max_rate_i(rate),
    .error_o(err), .limited_error_o(lerr));

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

  initial begin
    real e, ge, el;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      sel  = fxp_from_real(real'($urandom_range(0, 1750)) + real'($urandom_range(0, 999)) / 1000.0);
      vm   = fxp_from_real(real'($urandom_range(0, 1750)));
      if (i % 3 == 0) vm = sel - fxp_t'($urandom_range(0, 600000)) + fxp_t'(300000);
      gain = fxp_from_real(real'($urandom_range(1, 200)) / 10.0);
      rate = fxp_from_real(real'($urandom_range(100, 2000)));
      #1;
      e  = r(sel) - r(vm);
      ge = e * r(gain);
      el = (ge > r(rate)) ? r(rate) : (ge < -r(rate)) ? -r(rate) : ge;
      if (el == ge) n_linear++; else n_clipped++;
      check(err == sel - vm, "error exact");
      check((r(lerr) - el) < 1e-4 && (el - r(lerr)) < 1e-4,
            $sformatf("limited error got %f exp %f", r(lerr), el));
    end
    check(n_clipped > 50 && n_linear > 50, "both regions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
