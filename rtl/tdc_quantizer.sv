// Single-bit time quantizer of the delta-sigma TDC.
// A flip-flop clocked by the rising edge of edge_b samples the level of
// edge_a: the result is 1 when edge_a rose first, i.e. when the time
// difference T(edge_b) - T(edge_a) is positive. This is the sign
// decision of the published single-bit quantizer; building it as one
// arbiting flip-flop (and the reset) is this design's choice. edge_a must
// still be high when edge_b rises (pulse longer than the largest
// difference). The bit is held until the next sample and feeds the
// digital-to-time converter as the previous output.
module tdc_quantizer (
  input  logic edge_a,
  input  logic edge_b,
  input  logic rst_n,
  output logic dout
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge edge_b or negedge rst_n)
    if (!rst_n) dout <= 1'b0;
    else        dout <= edge_a;
endmodule
