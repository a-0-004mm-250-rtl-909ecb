// Shared constants of the bang-bang digital PLL.
// The coarse width (4b binary), the 256-step thermometer fine bank, the 6-bit
// fraction, the 8/9 prescaler, the gain of 16 in high-gain mode and the
// 12-bit LFSR follow the published design; the row/column split of the
// fine bank (16 x 16) and the LFSR taps are choices of this implementation.
package dpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned COARSE_W   = 4;    // binary-weighted coarse bank
  localparam int unsigned FINE_W     = 8;    // fine code 0..255
  localparam int unsigned FINE_UNITS = 256;  // thermometer fine capacitors
  localparam int unsigned FRAC_W     = 6;    // fractional bits of the integrator
  localparam int unsigned HIGH_GAIN  = 16;   // integral step in high-gain mode
  localparam int unsigned PRESCALE_N = 8;    // dual-modulus prescaler N/(N+1)
  localparam int unsigned LFSR_N     = 12;   // Galois LFSR length

  // One bang-bang decision: early/late of the feedback edge.
  typedef struct packed {
    logic up;         // reference leads: DCO too slow
    logic dn;         // feedback leads: DCO too fast
    logic high_gain;  // phase error outside the E_FREF..L_FREF window
  } pfd_decision_t;
endpackage
