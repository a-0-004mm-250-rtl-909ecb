// Integral path (INT) of the bang-bang loop filter.
// Once per reference period the UP/DN decision adds or subtracts a step to
// a FRAC_W-bit fraction of one fine-capacitor unit. The step is 1 normally
// and HIGH_GAIN (16) while the PFD reports high-gain mode, which is how the
// published design shortens the lock time. When the fraction wraps past its
// top or bottom the block emits a one-cycle OverF or UnderF pulse that moves
// the integer fine code held by the row/column controller; the fraction
// itself goes on to the PRNG-dithered accumulator.
// Choices of this design: the clock (the caller uses the falling FREF edge,
// half a period after the comparison), the enable that holds the integrator
// until the AFC has finished, registered OverF/UnderF, and the sign
// convention (UP raises the code, and a higher code means a faster DCO).
module loop_integrator
  import dpll_pkg::*;
#(
  parameter int unsigned FW   = FRAC_W,
  parameter int unsigned GAIN = HIGH_GAIN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  pfd_decision_t dec,
  output logic [FW-1:0] frac,
  output logic          ovf,
  output logic          unf
);
  timeunit 1ps; timeprecision 1fs;

  logic [FW:0] step;
  logic [FW:0] sum_up;   // extra bit catches the carry
  logic [FW:0] sum_dn;   // extra bit catches the borrow

  assign step   = dec.high_gain ? (FW+1)'(GAIN) : (FW+1)'(1);
  assign sum_up = {1'b0, frac} + step;
  assign sum_dn = {1'b0, frac} - step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frac <= '0;
      ovf  <= 1'b0;
      unf  <= 1'b0;
    end else if (en) begin
      if (dec.up) begin
        frac <= sum_up[FW-1:0];
        ovf  <= sum_up[FW];
        unf  <= 1'b0;
      end else begin
        frac <= sum_dn[FW-1:0];
        ovf  <= 1'b0;
        unf  <= sum_dn[FW];
      end
    end else begin
      ovf <= 1'b0;
      unf <= 1'b0;
    end
  end
endmodule
