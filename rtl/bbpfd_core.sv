// Core bang-bang phase/frequency detector with its asynchronous reset.
// Two edge flip-flops (B for FREF, C for FFEED) are set by their input edge
// and cleared together by A_RESET once both have arrived. A second pair of
// flip-flops records the order of arrival: B1 samples B on the rising edge
// of C (FREF came first -> UP) and C1 samples C on the rising edge of B
// (FFEED came first -> DN). A set/reset latch holds the last decision, so UP
// and DN are complementary levels that change only when a new comparison
// completes. This structure follows the published schematic.
// Choices of this design: the schematic clears B1/C1 with a short PD pulse
// derived from the reset chain; in zero-delay RTL that pulse would have no
// width, so B1/C1 simply keep their sample until the next comparison, which
// gives the same latch output. A_RESET is the AND of B and C (plus the global
// reset) without the delay of the analog reset chain.
// Circuit warnings: the decision latch is intentional (it is the SR latch of
// the schematic), and B/C are reset by a signal derived from their own
// outputs, which is how an asynchronous PFD works.
// Interface: fref/ffeed are the compared clocks; b/c expose the edge flags
// for the high-gain selector; up/dn are valid after the later of the two
// edges of a reference period.
module bbpfd_core (
  input  logic fref,
  input  logic ffeed,
  input  logic rst_n,
  output logic b,
  output logic c,
  output logic a_reset,
  output logic up,
  output logic dn
);
  timeunit 1ps; timeprecision 1fs;

  logic b1, c1, up_l;

  assign a_reset = (b & c) | ~rst_n;

  always_ff @(posedge fref or posedge a_reset)
    if (a_reset) b <= 1'b0;
    else         b <= 1'b1;

  always_ff @(posedge ffeed or posedge a_reset)
    if (a_reset) c <= 1'b0;
    else         c <= 1'b1;

  // order-of-arrival samplers
  always_ff @(posedge c or negedge rst_n)
    if (!rst_n) b1 <= 1'b0;
    else        b1 <= b;

  always_ff @(posedge b or negedge rst_n)
    if (!rst_n) c1 <= 1'b0;
    else        c1 <= c;

  // decision latch: set by B1, reset by C1, holds when neither differs
  always_latch
    if (!rst_n)        up_l = 1'b0;
    else if (b1 != c1) up_l = b1;

  assign up = up_l;
  assign dn = ~up_l;
endmodule
