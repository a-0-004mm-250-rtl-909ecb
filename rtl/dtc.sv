// Behavioural model (not synthesizable) of the one-bit digital-to-time
// converter in the loop feedback. Each input edge passes either straight or
// through a delay element T_DT, chosen by a MUX steered by the previous
// output bit: with d = 1 edge A is delayed (the pair's difference
// T(b) - T(a) drops by T_DT), with d = 0 edge B is delayed (it grows by
// T_DT). Subtracting the fed-back value by re-timing the input edges is the
// published design's method; the 60 ps T_DT is an assumption of this model, chosen so the 100 ps peak-to-peak test input is inside the loop's +/-T_DT full scale.
module dtc #(
  parameter real TDT_PS = 60.0
) (
  input  logic a_in,
  input  logic b_in,
  input  logic d,
  output logic a_out,
  output logic b_out
);
  timeunit 1ps; timeprecision 1fs;

  logic a_dly, b_dly;

  initial begin
    a_dly = 1'b0;
    b_dly = 1'b0;
  end
  always @(a_in) a_dly <= #(TDT_PS) a_in;
  always @(b_in) b_dly <= #(TDT_PS) b_in;

  assign a_out = d ? a_dly : a_in;
  assign b_out = d ? b_in  : b_dly;
endmodule
