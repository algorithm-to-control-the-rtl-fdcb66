// hvfb_pi_core: proportional-integral core of the HV feedback loop.
//
// The integrator accumulates the rate-limited error once per loop update,
// scaled by the loop period, so its state is the HV voltage the loop asks
// the module for:
//   integ   <= integ + limited_error * LOOP_PERIOD_S          [V]
//   pi_hv    = integ_new + kp * limited_error                  [V]
//   drive    = pi_hv * inv_gain                                [V, low side]
// inv_gain_i is the inverse of the HV module gain (e.g. 1/3000 V/V) and
// turns the requested HV into the low-voltage drive for the DAC. kp_i is the
// optional proportional term (0 disables it). The integrator gives the loop
// its small steady-state error; the limited error caps the ramp rate.
//
// Timing: update_i (one cycle) advances the integrator and registers pi_hv;
// scale_i (a later cycle) registers drive_o from the stored pi_hv. clear_i
// (loop disabled) and reset zero all state. The integrator saturates at the
// Q16.16 range; no other anti-windup is applied, a choice of this design.
// The loop period is an elaboration-time constant, as in the published core
// (0.1 s by default).
module hvfb_pi_core
  import hvfb_pkg::*;
#(
  parameter real LOOP_PERIOD_S = 0.1
) (
  input  logic clk_i,
  input  logic rst_i,
  input  logic clear_i,
  input  logic update_i,
  input  logic scale_i,
  input  fxp_t limited_error_i,
  input  fxp_t kp_i,
  input  fxp_t inv_gain_i,
  output fxp_t integ_o,
  output fxp_t pi_hv_o,
  output fxp_t drive_o
);

  localparam fxp_t PERIOD = fxp_from_real(LOOP_PERIOD_S);

  fxp_t integ_next;

  always_comb integ_next = fxp_add(integ_o, fxp_mul(limited_error_i, PERIOD));

  always_ff @(posedge clk_i) begin
    if (rst_i || clear_i) begin
      integ_o <= FXP_ZERO;
      pi_hv_o <= FXP_ZERO;
      drive_o <= FXP_ZERO;
    end else begin
      if (update_i) begin
        integ_o <= integ_next;
        pi_hv_o <= fxp_add(integ_next, fxp_mul(kp_i, limited_error_i));
      end
      if (scale_i) drive_o <= fxp_mul(pi_hv_o, inv_gain_i);
    end
  end

endmodule
