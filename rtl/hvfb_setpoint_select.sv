// hvfb_setpoint_select: chooses the voltage the loop regulates towards.
//
// Normally this is the user's set point, clipped to the module's safe
// maximum (+/- max_set_point_i). When the current limiter is active the
// target becomes the measured voltage reduced by a fraction of itself,
//   limited_voltage = V_meas - V_meas * cl_gain_i,
// e.g. cl_gain_i = 1/50 removes 2 %, so the output voltage is walked down
// until the current falls below the limit. All values are Q16.16 volts
// (cl_gain_i is a plain ratio).
//
// The clipping, the reduction and the switch follow the published
// controller model. The symmetric clip range (-max..+max) is this design's
// choice; only a maximum is given.
//
// Purely combinational.
module hvfb_setpoint_select
  import hvfb_pkg::*;
(
  input  fxp_t set_point_i,
  input  fxp_t max_set_point_i,
  input  fxp_t measured_voltage_i,
  input  fxp_t cl_gain_i,
  input  logic current_limit_i,
  output fxp_t set_point_limited_o,
  output fxp_t limited_voltage_o,
  output fxp_t selected_o
);

  always_comb begin
    set_point_limited_o = fxp_clamp(set_point_i, fxp_neg(max_set_point_i), max_set_point_i);
    limited_voltage_o   = fxp_sub(measured_voltage_i, fxp_mul(measured_voltage_i, cl_gain_i));
    selected_o          = current_limit_i ? limited_voltage_o : set_point_limited_o;
  end

endmodule
