// tb_hvfb_dac_encoder: drives voltages below, inside and above the 0..2.5 V
// DAC range and compares the registered code with round(v/2.5*65536)
// (within 2 LSB) or the clip values; checks that the code only changes on
// load and that clear sets it to 0.
module tb_hvfb_dac_encoder;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic clear = 1'b0, load = 1'b0;
  fxp_t drive;
  logic [15:0] code;

  hvfb_dac_encoder #(.DAC_BITS(16), .DAC_FULL_SCALE_V(2.5)) dut (
    .clk_i(clk), .rst_i(rst), .clear_i(clear), .load_i(load), .drive_i(drive), .code_o(code));

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

  task automatic apply(real v);
    real ideal;
    int  expc;
    @(negedge clk);
    drive = fxp_from_real(v);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    ideal = real'(drive) / 65536.0 / 2.5 * 65536.0;
    if (ideal <= 0.0) expc = 0;
    else if (ideal >= 65535.0) expc = 65535;
    else expc = int'(ideal + 0.5);
    check(int'(code) - expc <= 2 && expc - int'(code) <= 2,
          $sformatf("drive %f V: code %0d exp %0d", v, code, expc));
  endtask

  initial begin
    drive = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(code == 0, "zero after reset");
    apply(-1.0);  check(code == 16'h0000, "negative clips to 0");
    apply(3.0);   check(code == 16'hFFFF, "above range clips to all ones");
    apply(2.5);   check(code == 16'hFFFF, "full scale clips to all ones");
    apply(1.25);  check(code == 16'h8000, "half scale");
    apply(1.875); check(code == 16'hC000, "three quarters");
    for (int i = 0; i < 500; i++) apply(real'($urandom_range(0, 30000)) / 10000.0 - 0.2);
    // hold without load
    apply(1.0);
    @(negedge clk); drive = fxp_from_real(2.0);
    repeat (3) @(negedge clk);
    check(int'(code) >= 26212 && int'(code) <= 26216, "holds without load");
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(code == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
