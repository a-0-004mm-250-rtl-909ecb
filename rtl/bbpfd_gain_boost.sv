// Bang-bang PFD with gain-boosting circuit: the core PFD, which decides
// UP/DN from the order of FREF and FFEED, and the high-gain mode selector,
// which asks the integrator for a larger step while FFEED lies outside the
// E_FREF..L_FREF window. The three reference copies come from a delay line
// outside this block. Outputs are levels, valid from the later of the FREF
// and FFEED edges (and L_FREF) of a period until the next comparison.
module bbpfd_gain_boost
  import dpll_pkg::*;
(
  input  logic          e_fref,
  input  logic          fref,
  input  logic          l_fref,
  input  logic          ffeed,
  input  logic          rst_n,
  output pfd_decision_t dec,
  output logic          very_early,
  output logic          very_late
);
  timeunit 1ps; timeprecision 1fs;

  logic b, c, a_reset;

  bbpfd_core u_core (
    .fref, .ffeed, .rst_n, .b, .c, .a_reset, .up(dec.up), .dn(dec.dn)
  );

  high_gain_selector u_hgs (
    .e_fref, .l_fref, .b, .c, .rst_n, .very_early, .very_late,
    .high_gain(dec.high_gain)
  );
endmodule
