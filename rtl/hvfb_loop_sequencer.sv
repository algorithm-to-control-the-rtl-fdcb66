// hvfb_loop_sequencer: runs one feedback-loop update per trigger pulse.
//
// The loop is not free-running: a timer outside the controller sends a
// one-cycle trigger every loop period (0.1 s by default), so the user can
// change the period or stop the loop. On a trigger this state machine walks
// the datapath through five steps, one clock each, and then strobes ready_o
// for one cycle together with the new DAC code:
//   IDLE -> LIMIT -> ERROR -> INTEGRATE -> SCALE -> OUTPUT -> IDLE
// ready_o is high exactly 6 cycles after the cycle the trigger was sampled.
// Triggers that arrive while an update is in progress are ignored
// (busy_o = 1). Splitting the update into these steps is this design's
// choice; only the external trigger and the ready strobe are given.
module hvfb_loop_sequencer
  import hvfb_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_i,
  input  logic       trigger_i,
  output seq_state_t state_o,
  output logic       step_limit_o,
  output logic       step_error_o,
  output logic       step_integrate_o,
  output logic       step_scale_o,
  output logic       step_output_o,
  output logic       ready_o,
  output logic       busy_o
);

  seq_state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      SEQ_IDLE:      if (trigger_i) state_d = SEQ_LIMIT;
      SEQ_LIMIT:     state_d = SEQ_ERROR;
      SEQ_ERROR:     state_d = SEQ_INTEGRATE;
      SEQ_INTEGRATE: state_d = SEQ_SCALE;
      SEQ_SCALE:     state_d = SEQ_OUTPUT;
      SEQ_OUTPUT:    state_d = SEQ_IDLE;
      default:       state_d = SEQ_IDLE;
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state_q <= SEQ_IDLE;
      ready_o <= 1'b0;
    end else begin
      state_q <= state_d;
      ready_o <= (state_q == SEQ_OUTPUT);
    end
  end

  assign state_o          = state_q;
  assign step_limit_o     = (state_q == SEQ_LIMIT);
  assign step_error_o     = (state_q == SEQ_ERROR);
  assign step_integrate_o = (state_q == SEQ_INTEGRATE);
  assign step_scale_o     = (state_q == SEQ_SCALE);
  assign step_output_o    = (state_q == SEQ_OUTPUT);
  assign busy_o           = (state_q != SEQ_IDLE);

  // The ready strobe lasts one cycle and only ends an update.
  a_ready_single: assert property (@(posedge clk_i) disable iff (rst_i) ready_o |=> !ready_o);
  a_ready_after_output: assert property (@(posedge clk_i) disable iff (rst_i)
                                         ready_o |-> $past(state_q) == SEQ_OUTPUT);

endmodule
