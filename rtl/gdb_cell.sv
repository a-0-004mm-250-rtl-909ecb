// Behavioural model (not synthesizable) of a gated delay-buffer (GDB) cell.
// In silicon the cell is a gated inverter (GI) driving a load capacitor and
// a second inverter: a rising edge on IN starts discharging the middle node,
// a rising edge on HLD freezes it (the GI is cut from its supplies), and a
// rising edge on AWK resumes the discharge, so OUT rises at
//   T_OUT = T_AWK + TD - (T_HLD - T_IN).
// The cell thus stores the time difference between IN and HLD and gives
// back its complement at any later moment, as the published design
// describes. This model computes exactly that; the hold interval is clamped
// to 0..TD (a node that would discharge completely stays at the rail).
// The cell re-arms after OUT fires; inputs are positive pulses and only the
// rising edges matter. TD and the output pulse width are assumptions.
module gdb_cell #(
  parameter real TD_PS = 1000.0,
  parameter real PW_PS = 2000.0
) (
  input  logic in_e,
  input  logic hld,
  input  logic awk,
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  realtime t_in, t_hld;
  real     held_ps;

  initial begin
    out   = 1'b0;
    t_in  = 0.0;
    t_hld = 0.0;
  end

  always @(posedge in_e) t_in  = $realtime;
  always @(posedge hld)  t_hld = $realtime;

  always @(posedge awk) begin
    held_ps = t_hld - t_in;
    if (held_ps < 0.0)   held_ps = 0.0;
    if (held_ps > TD_PS) held_ps = TD_PS;
    #(TD_PS - held_ps);
    out = 1'b1;
    #(PW_PS);
    out = 1'b0;
  end
endmodule
