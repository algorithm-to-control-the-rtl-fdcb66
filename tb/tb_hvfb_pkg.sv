// tb_hvfb_pkg: checks the saturating Q16.16 helpers of hvfb_pkg against
// 64-bit integer and real reference arithmetic: add/sub with saturation,
// rounded multiply with saturation, clamp, negation and real conversion.
module tb_hvfb_pkg;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat64(longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    fxp_t a, b, r;
    longint ea, eb, exp_v;
    real ra, rb;
    @(posedge clk);
    // known constants
    check(fxp_from_real(1.0) == 32'sh0001_0000, "from_real 1.0");
    check(fxp_from_real(-2.5) == -32'sh0002_8000, "from_real -2.5");
    check(fxp_from_real(0.1) == 32'sd6554, "from_real 0.1 rounds to 6554");
    check(fxp_mul(fxp_from_real(1500.0), fxp_from_real(0.02)) == 32'sd1966500,
          "1500 * 0.02 (0.02 is 1311 LSB)");
    check(fxp_add(FXP_MAX, fxp_from_real(1.0)) == FXP_MAX, "add saturates high");
    check(fxp_sub(FXP_MIN, fxp_from_real(1.0)) == FXP_MIN, "sub saturates low");
    check(fxp_mul(fxp_from_real(300.0), fxp_from_real(200.0)) == FXP_MAX, "mul saturates high");
    check(fxp_mul(fxp_from_real(-300.0), fxp_from_real(200.0)) == FXP_MIN, "mul saturates low");
    check(fxp_neg(FXP_MIN) == FXP_MAX, "neg of min");
    check(fxp_clamp(fxp_from_real(5.0), fxp_from_real(-1.0), fxp_from_real(2.0)) == fxp_from_real(2.0), "clamp hi");
    check(fxp_clamp(fxp_from_real(-5.0), fxp_from_real(-1.0), fxp_from_real(2.0)) == fxp_from_real(-1.0), "clamp lo");
    check(fxp_clamp(fxp_from_real(0.5), fxp_from_real(-1.0), fxp_from_real(2.0)) == fxp_from_real(0.5), "clamp pass");
    // random add/sub/mul
    for (int i = 0; i < 2000; i++) begin
      a = fxp_t'($urandom);
      b = fxp_t'($urandom);
      if (i % 2 == 0) begin  // moderate magnitudes for multiply
        a = a >>> ($urandom_range(8, 20));
        b = b >>> ($urandom_range(8, 20));
      end
      ea = longint'(a);
      eb = longint'(b);
      check(longint'(fxp_add(a, b)) == sat64(ea + eb), $sformatf("add %0d %0d", ea, eb));
      check(longint'(fxp_sub(a, b)) == sat64(ea - eb), $sformatf("sub %0d %0d", ea, eb));
      ra = real'(ea) / 65536.0;
      rb = real'(eb) / 65536.0;
      r = fxp_mul(a, b);
      if (ra * rb >= 32767.9 || ra * rb <= -32767.9) begin
        check(r == ((ra * rb > 0.0) ? FXP_MAX : FXP_MIN), "mul saturation random");
      end else begin
        exp_v = longint'($floor(ra * rb * 65536.0 + 0.5));
        check(longint'(r) == exp_v, $sformatf("mul %f * %f got %0d exp %0d", ra, rb, r, exp_v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
