// hv_plant_model: behavioural model (testbench only, not synthesizable
// logic) of the analog side of one HV channel: DAC, drive amplifier,
// DC-to-HVDC module, load and the two monitor ADCs.
//
// The DAC code latched on dac_ready_i sets the DAC output
// (code / 2^16 * DAC_FS_V); the drive amplifier and module turn it into a
// target HV of HV_PER_DAC_V volts per DAC volt (7.5/2.5 * 2000/7.5 = 800),
// limited to HV_MAX. Every CLK_PER_UPDATE clocks the output moves a fraction
// ALPHA towards that target (first-order lag), or towards 0 V when the HV
// enable is low. The module's input current is proportional to the output
// voltage, amps_per_volt (a variable the testbench changes to emulate
// lighter or heavier loads). After each update both ADCs deliver a new
// two's-complement code with a one-cycle ready strobe: voltage as
// vout / VMON_FS * 2^24, current as iin / IMON_FS * 2^12.
module hv_plant_model #(
  parameter int  CLK_PER_UPDATE = 20,
  parameter real ALPHA          = 0.1,
  parameter real DAC_FS_V       = 2.5,
  parameter real HV_PER_DAC_V   = 800.0,
  parameter real HV_MAX         = 2000.0,
  parameter real VMON_FS        = 4.0 * 1750.0,
  parameter real IMON_FS        = 5.0
) (
  input  logic        clk_i,
  input  logic        rst_i,
  input  logic [15:0] dac_code_i,
  input  logic        dac_ready_i,
  input  logic        hv_enable_i,
  output logic [23:0] vmon_data_o,
  output logic        vmon_ready_o,
  output logic [11:0] imon_data_o,
  output logic        imon_ready_o
);

  real vout = 0.0;
  real iin = 0.0;
  real target = 0.0;
  real amps_per_volt = 0.0003;
  logic [15:0] dac_q;
  int cnt;

  always @(posedge clk_i) begin
    vmon_ready_o <= 1'b0;
    imon_ready_o <= 1'b0;
    if (rst_i) begin
      vout = 0.0;
      iin = 0.0;
      dac_q <= '0;
      cnt <= 0;
      vmon_data_o <= '0;
      imon_data_o <= '0;
    end else begin
      if (dac_ready_i) dac_q <= dac_code_i;
      if (cnt == CLK_PER_UPDATE - 1) begin
        cnt <= 0;
        target = hv_enable_i ? real'(dac_q) / 65536.0 * DAC_FS_V * HV_PER_DAC_V : 0.0;
        if (target > HV_MAX) target = HV_MAX;
        vout = vout + ALPHA * (target - vout);
        iin = vout * amps_per_volt;
        vmon_data_o <= 24'(longint'(vout / VMON_FS * (2.0 ** 24)));
        imon_data_o <= 12'(longint'(iin / IMON_FS * (2.0 ** 12)));
        vmon_ready_o <= 1'b1;
        imon_ready_o <= 1'b1;
      end else begin
        cnt <= cnt + 1;
      end
    end
  end

endmodule
