// tb_hvfb_input_scaler: drives random ADC codes into a 24-bit voltage and a
// 12-bit current scaler and compares the result with code/2^N*gain computed
// in real arithmetic (within 2 LSB), plus the one-cycle valid timing and
// holding of the value between strobes.
module tb_hvfb_input_scaler;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [23:0] vcode;
  logic [11:0] icode;
  logic vrdy = 1'b0, irdy = 1'b0;
  fxp_t vval, ival;
  logic vvalid, ivalid;

  hvfb_input_scaler #(.ADC_BITS(24), .FULL_SCALE_GAIN(7000.0)) u_v (
    .clk_i(clk), .rst_i(rst), .data_i(vcode), .ready_i(vrdy), .value_o(vval), .valid_o(vvalid));
  hvfb_input_scaler #(.ADC_BITS(12), .FULL_SCALE_GAIN(5.0)) u_i (
    .clk_i(clk), .rst_i(rst), .data_i(icode), .ready_i(irdy), .value_o(ival), .valid_o(ivalid));

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

  function automatic real expect_val(longint code, int bits, real gain);
    return real'(code) / (2.0 ** bits) * gain;
  endfunction

  initial begin
    real ev, ei;
    longint sv, si;
    vcode = '0; icode = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    check(vval == 0 && ival == 0 && !vvalid, "zero after reset");
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      vcode = 24'($urandom);
      icode = 12'($urandom);
      if (i < 4) begin   // corners
        vcode = (i == 0) ? 24'h7FFFFF : (i == 1) ? 24'h800000 : (i == 2) ? 24'h000001 : 24'hFFFFFF;
        icode = (i == 0) ? 12'h7FF : (i == 1) ? 12'h800 : (i == 2) ? 12'h001 : 12'hFFF;
      end
      sv = longint'(signed'(vcode));
      si = longint'(signed'(icode));
      vrdy = 1'b1; irdy = 1'b1;
      @(negedge clk);
      vrdy = 1'b0; irdy = 1'b0;
      check(vvalid && ivalid, "valid one cycle after ready");
      ev = expect_val(sv, 24, 7000.0);
      ei = expect_val(si, 12, 5.0);
      check((real'(vval) / 65536.0 - ev) < 3e-5 && (ev - real'(vval) / 65536.0) < 3e-5,
            $sformatf("voltage code %0d got %f exp %f", sv, real'(vval) / 65536.0, ev));
      check((real'(ival) / 65536.0 - ei) < 3e-5 && (ei - real'(ival) / 65536.0) < 3e-5,
            $sformatf("current code %0d got %f exp %f", si, real'(ival) / 65536.0, ei));
      // new code without ready must not change the value
      vcode = ~vcode;
      @(negedge clk);
      check(!vvalid, "valid is a single pulse");
      check((real'(vval) / 65536.0 - ev) < 3e-5 && (ev - real'(vval) / 65536.0) < 3e-5, "value held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
