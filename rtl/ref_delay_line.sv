// Behavioural model (not synthesizable): reference delay line of the
// gain-boosting bang-bang PFD. Three cascaded buffers turn the reference
// into an early copy E_FREF, the nominal FREF and a late copy L_FREF, each
// one buffer delay apart, so FREF-to-E_FREF and L_FREF-to-FREF set the
// half-width of the "locked" phase window. The cascade of three buffers
// follows the published schematic; the 1 ns buffer delay is a choice of this
// model (the published design gives no value).
module ref_delay_line #(
  parameter real BUF_DELAY_PS = 1000.0
) (
  input  logic ref_in,
  output logic e_fref,
  output logic fref,
  output logic l_fref
);
  timeunit 1ps; timeprecision 1fs;

  initial begin
    e_fref = 1'b0;
    fref   = 1'b0;
    l_fref = 1'b0;
  end
  always @(ref_in) e_fref <= #(BUF_DELAY_PS) ref_in;
  always @(e_fref) fref   <= #(BUF_DELAY_PS) e_fref;
  always @(fref)   l_fref <= #(BUF_DELAY_PS) fref;
endmodule
