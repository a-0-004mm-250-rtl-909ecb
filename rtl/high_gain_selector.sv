// High-gain mode selector of the gain-boosting bang-bang PFD.
// Very_Early is set when FFEED has already arrived (C) but FREF has not (B)
// at the moment the early reference copy E_FREF rises; Very_Late is set when
// FREF has arrived and FFEED has not at the moment the late copy L_FREF
// rises. High Gain is asserted when either holds, i.e. when the feedback
// edge lies outside the window E_FREF..L_FREF, as the published design
// specifies. Choices of this design: the flags are sampled directly on the
// E_FREF/L_FREF edges instead of through separate "arrived" flip-flops, and
// each flag holds until the same edge of the next reference period instead
// of being cleared by a reset pulse, so the integrator can sample it at any
// time in the second half of the period.
// Interface: b/c come from the core PFD; outputs are levels updated once per
// reference period.
module high_gain_selector (
  input  logic e_fref,
  input  logic l_fref,
  input  logic b,
  input  logic c,
  input  logic rst_n,
  output logic very_early,
  output logic very_late,
  output logic high_gain
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge e_fref or negedge rst_n)
    if (!rst_n) very_early <= 1'b0;
    else        very_early <= c & ~b;

  always_ff @(posedge l_fref or negedge rst_n)
    if (!rst_n) very_late <= 1'b0;
    else        very_late <= b & ~c;

  assign high_gain = very_early | very_late;
endmodule
