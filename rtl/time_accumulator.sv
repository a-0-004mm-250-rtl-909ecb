// Behavioural model (not synthesizable) of the time-difference accumulator.
// Two TDAs feed each other. TDA2 adds the identity (a zero time
// difference, one edge on both lines) to the output of TDA1, so it only
// stores it: a one-sample time register, the z^-1 of the loop. TDA1 adds the
// new input pair to the pair released by TDA2. Per sample: the IN_A edge
// wakes TDA2, which releases the previous sum; the input pair and that sum
// enter TDA1; the wake edge awk1 (after all four edges have arrived)
// releases the new sum on out1/out2, which TDA2 stores again, with awk1 as
// its zero-difference edge.
// The structure and the use of IN_A as TDA2's wake edge follow the
// published schematic; the separate, later wake edge for TDA1 is a choice
// of this model. Result: T(out2) - T(out1) = sum of all input differences.
module time_accumulator #(
  parameter real TD_PS   = 1000.0,
  parameter real TOFF_PS = 300.0,
  parameter real PW_PS   = 2000.0
) (
  input  logic in_a,
  input  logic in_b,
  input  logic awk1,
  output logic out1,
  output logic out2
);
  timeunit 1ps; timeprecision 1fs;

  logic reg1, reg2;   // stored sum released by TDA2

  tda #(.TD_PS(TD_PS), .TOFF_PS(TOFF_PS), .PW_PS(PW_PS)) u_tda1 (
    .in1_a(in_a), .in1_b(in_b), .in2_a(reg1), .in2_b(reg2), .awk(awk1),
    .out1, .out2
  );

  tda #(.TD_PS(TD_PS), .TOFF_PS(TOFF_PS), .PW_PS(PW_PS)) u_tda2 (
    .in1_a(out1), .in1_b(out2), .in2_a(awk1), .in2_b(awk1), .awk(in_a),
    .out1(reg1), .out2(reg2)
  );
endmodule
