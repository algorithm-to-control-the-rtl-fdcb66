// hvfb_pkg: shared number format and helpers of the HV feedback controller.
//
// Every internal quantity of the controller (volts, amps, gains, rates) is a
// signed fixed-point number with 16 integer bits and 16 fraction bits
// (Q16.16, one LSB = 2^-16 = 15.3 uV or 15.3 uA). The 16/16 split and the
// 32-bit word follow the published controller; to widen the format, change
// FXP_INT_BITS / FXP_FRAC_BITS here and every module follows.
//
// Arithmetic saturates at the ends of the range instead of wrapping, and
// products are rounded to the nearest LSB (ties towards +infinity). Both are
// this design's choices, made to behave like a saturating/rounding
// fixed-point library.
//
// The package also holds the state type of the loop sequencer.
package hvfb_pkg;

  localparam int FXP_INT_BITS  = 16;
  localparam int FXP_FRAC_BITS = 16;
  localparam int FXP_W         = FXP_INT_BITS + FXP_FRAC_BITS;

  typedef logic signed [FXP_W-1:0]   fxp_t;
  typedef logic signed [FXP_W:0]     fxp_ext_t;   // one guard bit for add/sub
  typedef logic signed [2*FXP_W-1:0] fxp_prod_t;  // full product

  localparam fxp_t FXP_MAX  = {1'b0, {(FXP_W-1){1'b1}}};
  localparam fxp_t FXP_MIN  = {1'b1, {(FXP_W-1){1'b0}}};
  localparam fxp_t FXP_ZERO = '0;
  localparam fxp_t FXP_ONE  = fxp_t'(1) <<< FXP_FRAC_BITS;

  // Loop sequencer: one state per datapath step of a loop update.
  typedef enum logic [2:0] {
    SEQ_IDLE,       // waiting for the loop trigger
    SEQ_LIMIT,      // current limiter update, voltage snapshot
    SEQ_ERROR,      // set point selection, error, gain and rate limit
    SEQ_INTEGRATE,  // integrator and proportional term
    SEQ_SCALE,      // HV-to-LV inverse module gain
    SEQ_OUTPUT      // DAC code load
  } seq_state_t;

  // Real constant to fixed point, rounded (elaboration time only).
  function automatic fxp_t fxp_from_real(input real r);
    return fxp_t'(longint'(r * (2.0 ** FXP_FRAC_BITS)));
  endfunction

  function automatic fxp_t fxp_sat_ext(input fxp_ext_t x);
    if (x > fxp_ext_t'(FXP_MAX)) return FXP_MAX;
    if (x < fxp_ext_t'(FXP_MIN)) return FXP_MIN;
    return fxp_t'(x);
  endfunction

  function automatic fxp_t fxp_add(input fxp_t a, input fxp_t b);
    return fxp_sat_ext(fxp_ext_t'(a) + fxp_ext_t'(b));
  endfunction

  function automatic fxp_t fxp_sub(input fxp_t a, input fxp_t b);
    return fxp_sat_ext(fxp_ext_t'(a) - fxp_ext_t'(b));
  endfunction

  function automatic fxp_t fxp_mul(input fxp_t a, input fxp_t b);
    fxp_prod_t p;
    p = fxp_prod_t'(a) * fxp_prod_t'(b);
    p = p + (fxp_prod_t'(1) <<< (FXP_FRAC_BITS - 1));
    p = p >>> FXP_FRAC_BITS;
    if (p > fxp_prod_t'(FXP_MAX)) return FXP_MAX;
    if (p < fxp_prod_t'(FXP_MIN)) return FXP_MIN;
    return fxp_t'(p);
  endfunction

  function automatic fxp_t fxp_clamp(input fxp_t x, input fxp_t lo, input fxp_t hi);
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

  // Negation that maps the most negative value to the most positive one.
  function automatic fxp_t fxp_neg(input fxp_t x);
    return fxp_sat_ext(-fxp_ext_t'(x));
  endfunction

endpackage
