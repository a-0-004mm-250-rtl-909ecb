// Reference pre-divider: FREF = FIN / ratio.
// A down-counter on FIN reloads with ratio-1 and the output is high for the
// first ceil(ratio/2) input cycles of every output period; ratio 1 passes FIN
// through. The published design only names this block; the counter form,
// the duty cycle and the programmable ratio are choices of this design.
// Timing: FREF rises one FIN rising edge after the counter wraps.
module pre_div #(
  parameter int unsigned W = 8
) (
  input  logic         fin,
  input  logic         rst_n,
  input  logic [W-1:0] ratio,   // 0 and 1 both mean divide by 1
  output logic         fref
);
  timeunit 1ps; timeprecision 1fs;

  logic [W-1:0] cnt;
  logic         div_q;
  logic [W-1:0] half;

  assign half = (ratio + W'(1)) >> 1;

  always_ff @(posedge fin or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else begin
      if (cnt == '0) cnt <= (ratio > W'(1)) ? ratio - W'(1) : '0;
      else           cnt <= cnt - W'(1);
      // output high while the counter is in the upper half of its range
      div_q <= (cnt == '0) ? 1'b1 : ((ratio - cnt) < half);
    end
  end

  assign fref = (ratio > W'(1)) ? div_q : fin;
endmodule
