// hvfb_current_limiter: hysteresis comparator on the measured current.
//
// While the HV module draws more than the allowed current, the controller
// stops following the user set point and instead regulates slightly below
// the voltage it measures. This block decides when that happens. It is a
// relay with two thresholds: limit_o rises when the current reaches
// hyst_high_i and falls only when the current has dropped to hyst_low_i, so
// a current near one threshold does not make it chatter on every sample.
// Both thresholds are run-time settings in amps (Q16.16).
//
// Timing: the state is evaluated once per loop update, on the cycle update_i
// is high, and the new limit_o is visible the next cycle. clear_i (loop
// disabled) and reset force limit_o low. limit_o = 1 means "limiting"; this
// polarity is this design's choice.
module hvfb_current_limiter
  import hvfb_pkg::*;
(
  input  logic clk_i,
  input  logic rst_i,
  input  logic clear_i,
  input  logic update_i,
  input  fxp_t current_i,
  input  fxp_t hyst_high_i,
  input  fxp_t hyst_low_i,
  output logic limit_o
);

  always_ff @(posedge clk_i) begin
    if (rst_i || clear_i) begin
      limit_o <= 1'b0;
    end else if (update_i) begin
      if (!limit_o && current_i >= hyst_high_i)     limit_o <= 1'b1;
      else if (limit_o && current_i <= hyst_low_i)  limit_o <= 1'b0;
    end
  end

endmodule
