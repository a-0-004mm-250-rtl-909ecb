// Behavioural model (not synthesizable) of the capacitively tuned ring DCO.
// The real oscillator is a 4-stage differential ring loaded by switched
// capacitor banks: a 4-bit binary-weighted coarse bank set by the AFC, a
// 256-unit thermometer fine bank set by the row/column controller, one
// proportional unit driven by the bang-bang decision and one fractional
// unit driven by the dithered accumulator. This model turns the same inputs
// into a clock whose frequency is
//   F0 + KC*coarse + KF*(ones(fine_therm) + frac) +/- KP (when prop_en)
// with UP (prop = 1) speeding the oscillator up. The port list follows the
// published block diagram; the gains and the polarity (a higher code means a
// faster DCO) are assumptions of this model, chosen so that the range spans
// the 0.7-1.8 GHz tuning range reported for the design.
module ring_dco #(
  parameter real F0_MHZ = 700.0,
  parameter real KC_MHZ = 75.0,
  parameter real KF_MHZ = 0.5,
  parameter real KP_MHZ = 2.0
) (
  input  logic [3:0]   coarse,
  input  logic [255:0] fine_therm,
  input  logic         prop,      // 1: UP (faster), 0: DN (slower)
  input  logic         prop_en,
  input  logic         frac,
  output logic         clk_out
);
  timeunit 1ps; timeprecision 1fs;

  real f_mhz;

  always_comb begin
    f_mhz = F0_MHZ + KC_MHZ * real'(coarse)
          + KF_MHZ * (real'($countones(fine_therm)) + (frac ? 1.0 : 0.0));
    if (prop_en) f_mhz = f_mhz + (prop ? KP_MHZ : -KP_MHZ);
  end

  initial clk_out = 1'b0;
  always begin
    #(1.0e6 / (2.0 * f_mhz));
    clk_out = ~clk_out;
  end
endmodule
