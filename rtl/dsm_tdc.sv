// Behavioural model (time-domain parts not synthesizable) of the
// first-order delta-sigma time-to-digital converter.
// Each sample is a pair of rising edges (in_a, in_b) whose time difference
// x = T(in_b) - T(in_a) is the input. The DTC shifts the pair by -T_DT or
// +T_DT according to the previous output bit; the time accumulator adds
// the shifted difference to its stored sum; the quantizer outputs the sign
// of the new sum. The loop keeps the sum bounded, so the density of ones
// in dout equals (1 + x/T_DT)/2 and the quantization error is shaped to
// high frequencies (first order). The wake edge of the accumulator's adder
// is in_a delayed by TWAKE. Structure follows the published design; all
// delay values are assumptions. dout is updated about TWAKE+TD after in_a
// and must settle before the next sample's edges.
module dsm_tdc #(
  parameter real TD_PS    = 1000.0,
  parameter real TOFF_PS  = 300.0,
  parameter real TDT_PS   = 60.0,
  parameter real TWAKE_PS = 5000.0,
  parameter real PW_PS    = 2000.0
) (
  input  logic in_a,
  input  logic in_b,
  input  logic rst_n,
  output logic dout
);
  timeunit 1ps; timeprecision 1fs;

  logic ia, ib, awk1, sum1, sum2;

  dtc #(.TDT_PS(TDT_PS)) u_dtc (.a_in(in_a), .b_in(in_b), .d(dout), .a_out(ia), .b_out(ib));

  initial awk1 = 1'b0;
  // wake pulse for the adder, TWAKE after the (re-timed) A edge
  always @(posedge ia) begin
    #(TWAKE_PS);
    awk1 = 1'b1;
    #(PW_PS);
    awk1 = 1'b0;
  end

  time_accumulator #(.TD_PS(TD_PS), .TOFF_PS(TOFF_PS), .PW_PS(PW_PS)) u_acc (
    .in_a(ia), .in_b(ib), .awk1, .out1(sum1), .out2(sum2)
  );

  tdc_quantizer u_q (.edge_a(sum1), .edge_b(sum2), .rst_n, .dout);
endmodule
