// cv_frontend: BEHAVIOURAL MODEL of the continuous-time analog
// capacitance-to-voltage converter of one channel (not a digital circuit;
// integer arithmetic stands in for the analog quantities). The charge from a
// capacitance change dc under the constant mass bias Vb is integrated on
// Cint:  vo = Vb * dc / Cint.  gain_sel models the PMOS switch that adds a
// second capacitor to Cint, halving the gain, so the same ASIC can serve MEMS
// elements of different sensitivity. Vb = 5 V - 1.65 V = 3.35 V follows the
// document; the Cint values are this model's. The PMOS feedback resistor only
// sets a high-pass corner far below the drive frequency and the anti-alias
// filter after it passes the band of interest, so neither is modelled.
// Units: dc in attofarad, vo in microvolt, both signed 32-bit. No delay.
module cv_frontend #(
  parameter int VB_MV      = 3350,  // mass bias minus VCM, mV
  parameter int CINT_LO_FF = 2000,  // integrating capacitor, fF, gain_sel = 0
  parameter int CINT_HI_FF = 4000   // gain_sel = 1
) (
  input  logic signed [31:0] dc_af,
  input  logic               gain_sel,
  output logic signed [31:0] vo_uv
);
  logic signed [63:0] num;
  always_comb begin
    // V*aF/fF = mV * aF / fF  -> uV
    num   = 64'(dc_af) * 64'(VB_MV);
    vo_uv = 32'(num / 64'(gain_sel ? CINT_HI_FF : CINT_LO_FF));
  end
endmodule
