// Behavioural model (not synthesizable) of a time-difference adder (TDA).
// Each operand is an edge pair whose time difference is dT = T(b) - T(a).
// Two GDB cells share one wake edge AWK. Cell 1 gets operand 1 straight
// (IN = a1, HLD = b1 delayed by TOFF); cell 2 gets operand 2 crossed
// (IN = b2, HLD = a2 delayed by TOFF), which negates it. TOFF keeps both
// stored intervals positive. After AWK the outputs satisfy
//   T(out2) - T(out1) = dT1 + dT2,
// so two signed time differences are added, as the published design shows.
// TD, TOFF and the pulse width are assumptions of this model.
module tda #(
  parameter real TD_PS   = 1000.0,
  parameter real TOFF_PS = 300.0,
  parameter real PW_PS   = 2000.0
) (
  input  logic in1_a,
  input  logic in1_b,
  input  logic in2_a,
  input  logic in2_b,
  input  logic awk,
  output logic out1,
  output logic out2
);
  timeunit 1ps; timeprecision 1fs;

  logic hld1, hld2;

  initial begin
    hld1 = 1'b0;
    hld2 = 1'b0;
  end
  always @(in1_b) hld1 <= #(TOFF_PS) in1_b;   // offset delay T_off
  always @(in2_a) hld2 <= #(TOFF_PS) in2_a;   // crossed operand

  gdb_cell #(.TD_PS(TD_PS), .PW_PS(PW_PS)) u_gdb1 (.in_e(in1_a), .hld(hld1), .awk, .out(out1));
  gdb_cell #(.TD_PS(TD_PS), .PW_PS(PW_PS)) u_gdb2 (.in_e(in2_b), .hld(hld2), .awk, .out(out2));
endmodule
