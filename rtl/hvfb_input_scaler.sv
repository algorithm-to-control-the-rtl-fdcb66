// hvfb_input_scaler: converts a raw ADC code into physical units (Q16.16).
//
// The controller reads the HV output voltage from a 24-bit ADC and the
// module's input current from a 12-bit ADC. This block turns such a code
// into volts or amps: value = code / 2^ADC_BITS * FULL_SCALE_GAIN, where the
// code is two's complement and FULL_SCALE_GAIN is the physical value that
// corresponds to 2^ADC_BITS LSBs. The defaults (24 bits, 4 x 1750 V) are the
// published controller's voltage-monitor settings; the current monitor uses
// 12 bits and a gain of 5.0. Reading the gain as "full scale over 2^N" is
// this design's interpretation; it matches the quoted monitor LSB sizes
// (310 uV and 76 uA per LSB) to within a few percent.
//
// Timing: the result is registered. One cycle after ready_i is high, value_o
// holds the new reading and valid_o pulses for one cycle. value_o keeps the
// last reading in between and is 0 after reset.
module hvfb_input_scaler
  import hvfb_pkg::*;
#(
  parameter int  ADC_BITS        = 24,
  parameter real FULL_SCALE_GAIN = 4.0 * 1750.0
) (
  input  logic                clk_i,
  input  logic                rst_i,
  input  logic [ADC_BITS-1:0] data_i,
  input  logic                ready_i,
  output fxp_t                value_o,
  output logic                valid_o
);

  localparam fxp_t GAIN = fxp_from_real(FULL_SCALE_GAIN);
  localparam int   PW   = ADC_BITS + FXP_W;

  logic signed [PW-1:0] product;
  logic signed [PW-1:0] scaled;

  // |code / 2^ADC_BITS| <= 1/2, so the scaled value always fits in fxp_t.
  always_comb begin
    product = PW'(signed'(data_i)) * PW'(GAIN);
    scaled  = product >>> ADC_BITS;
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      value_o <= FXP_ZERO;
      valid_o <= 1'b0;
    end else begin
      valid_o <= ready_i;
      if (ready_i) value_o <= fxp_t'(scaled);
    end
  end

endmodule
