// hvfb_dac_encoder: low-voltage drive value to DAC code.
//
// The loop's output is a voltage in Q16.16. The DAC that sets the HV
// module's input takes an unsigned DAC_BITS-bit code spanning
// 0 .. DAC_FULL_SCALE_V, so
//   code = clip(round(drive / DAC_FULL_SCALE_V * 2^DAC_BITS), 0, 2^DAC_BITS - 1).
// Negative drive gives code 0, drive at or above full scale gives all ones.
// The 16-bit code width is the published controller's; the unsigned code
// and the 2.5 V full scale are this design's assumptions (the board amplifies
// the DAC output by 7.5/2.5 before the HV module).
//
// Timing: code_o is registered on the cycle load_i is high; clear_i (loop
// disabled) and reset set it to 0.
module hvfb_dac_encoder
  import hvfb_pkg::*;
#(
  parameter int  DAC_BITS         = 16,
  parameter real DAC_FULL_SCALE_V = 2.5
) (
  input  logic                clk_i,
  input  logic                rst_i,
  input  logic                clear_i,
  input  logic                load_i,
  input  fxp_t                drive_i,
  output logic [DAC_BITS-1:0] code_o
);

  // 2^GUARD / full scale, kept with 32 guard bits so that the scale factor
  // is exact to far below one DAC LSB.
  localparam int     GUARD = 32;
  localparam longint KFS   = longint'((2.0 ** GUARD) / DAC_FULL_SCALE_V);
  localparam int     SH    = FXP_FRAC_BITS + GUARD - DAC_BITS;
  localparam int     PW    = FXP_W + GUARD + 2;

  logic signed [PW-1:0] product;   // drive * 2^(FRAC+GUARD) / full scale
  logic signed [PW-1:0] code_wide; // rounded code before clipping
  logic [DAC_BITS-1:0]  code_next;

  always_comb begin
    product   = PW'(drive_i) * PW'(KFS);
    code_wide = (product + (PW'(1) <<< (SH - 1))) >>> SH;
    if (drive_i <= FXP_ZERO)                              code_next = '0;
    else if (code_wide >= (PW'(1) <<< DAC_BITS) - PW'(1)) code_next = '1;
    else                                                  code_next = code_wide[DAC_BITS-1:0];
  end

  always_ff @(posedge clk_i) begin
    if (rst_i || clear_i) code_o <= '0;
    else if (load_i)      code_o <= code_next;
  end

endmodule
