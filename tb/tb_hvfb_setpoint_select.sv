// tb_hvfb_setpoint_select: random set points, maxima, measured voltages and
// current-limit fractions; the three outputs are compared with the clip,
// V - V*g and the switch computed in real arithmetic (within 2 LSB of each
// rounded operand's effect).
module tb_hvfb_setpoint_select;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fxp_t sp, mx, vm, g, spl, lv, sel;
  logic limit;

  hvfb_setpoint_select dut (
    .set_point_i(sp), .max_set_point_i(mx), .measured_voltage_i(vm), .cl_gain_i(g),
    .current_limit_i(limit), .set_point_limited_o(spl), .limited_voltage_o(lv), .selected_o(sel));

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

  function automatic bit near(real a, real b);
    return (a - b) < 1e-4 && (b - a) < 1e-4;
  endfunction

  initial begin
    real rsp, rmx, rvm, rg, espl, elv;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      sp = fxp_from_real(real'($urandom_range(0, 4000)) - 2000.0 + real'($urandom_range(0, 999)) / 1000.0);
      mx = fxp_from_real(real'($urandom_range(100, 2000)));
      vm = fxp_from_real(real'($urandom_range(0, 2500)) + real'($urandom_range(0, 999)) / 1000.0);
      g  = fxp_from_real(real'($urandom_range(0, 100)) / 1000.0);
      limit = 1'($urandom);
      #1;
      rsp = r(sp); rmx = r(mx); rvm = r(vm); rg = r(g);
      espl = (rsp > rmx) ? rmx : (rsp < -rmx) ? -rmx : rsp;
      elv  = rvm - rvm * rg;
      check(near(r(spl), espl), $sformatf("clip %f to %f got %f", rsp, rmx, r(spl)));
      check(near(r(lv), elv), $sformatf("limited voltage %f got %f", elv, r(lv)));
      check(sel == (limit ? lv : spl), "selection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
