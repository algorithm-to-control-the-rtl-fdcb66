// tb_hvfb_loop_sequencer: sends triggers at random spacings, including
// triggers while an update is running, and checks the step order, that each
// step lasts one cycle, that ready follows the trigger by exactly 6 cycles,
// and that triggers during busy start nothing.
module tb_hvfb_loop_sequencer;
  import hvfb_pkg::*;

  int checks = 0, failures = 0;
  int n_ignored = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic trig = 1'b0;
  seq_state_t st;
  logic s_lim, s_err, s_int, s_scl, s_out, ready, busy;

  hvfb_loop_sequencer dut (
    .clk_i(clk), .rst_i(rst), .trigger_i(trig), .state_o(st),
    .step_limit_o(s_lim), .step_error_o(s_err), .step_integrate_o(s_int),
    .step_scale_o(s_scl), .step_output_o(s_out), .ready_o(ready), .busy_o(busy));

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

  initial begin
    logic [4:0] seen [6];
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !ready, "idle after reset");
    for (int n = 0; n < 100; n++) begin
      repeat ($urandom_range(0, 5)) @(negedge clk);
      trig = 1'b1;
      @(negedge clk);
      trig = 1'b0;
      for (int c = 1; c <= 6; c++) begin
        // a second trigger during the update must be ignored
        if (c == 2 && n % 3 == 0) begin
          trig = 1'b1;
          n_ignored++;
        end
        seen[c-1] = {s_lim, s_err, s_int, s_scl, s_out};
        check((c <= 5) == busy, $sformatf("busy at step %0d", c));
        check(ready == (c == 6), $sformatf("ready at cycle %0d after trigger", c));
        @(negedge clk);
        trig = 1'b0;
      end
      check(seen[0] == 5'b10000 && seen[1] == 5'b01000 && seen[2] == 5'b00100 &&
            seen[3] == 5'b00010 && seen[4] == 5'b00001 && seen[5] == 5'b00000,
            "step order");
      check(!ready && !busy, "back to idle, no extra update");
    end
    check(n_ignored > 10, "busy triggers exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
