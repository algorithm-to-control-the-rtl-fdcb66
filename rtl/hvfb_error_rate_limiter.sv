// hvfb_error_rate_limiter: loop error, error gain and voltage-rate limit.
//
// error         = selected set point - measured voltage          [V]
// limited_error = clamp(error * error_gain, -max_rate, +max_rate) [V/s]
//
// The limited error is what the integrator accumulates, so max_rate_i is the
// fastest the output voltage may ramp (e.g. 1000 V/s), and error_gain_i sets
// how quickly the ramp slows down near the target. The structure follows
// the published controller model; the gain and the rate are run-time
// settings in Q16.16.
//
// Purely combinational.
module hvfb_error_rate_limiter
  import hvfb_pkg::*;
(
  input  fxp_t selected_i,
  input  fxp_t measured_voltage_i,
  input  fxp_t error_gain_i,
  input  fxp_t max_rate_i,
  output fxp_t error_o,
  output fxp_t limited_error_o
);

  fxp_t gained;

  always_comb begin
    error_o         = fxp_sub(selected_i, measured_voltage_i);
    gained          = fxp_mul(error_o, error_gain_i);
    limited_error_o = fxp_clamp(gained, fxp_neg(max_rate_i), max_rate_i);
  end

endmodule
