// Output divider: Fout = DCO / ratio.
// A down-counter on the DCO clock reloads with ratio-1 every output period;
// the output is high for the first ceil(ratio/2) DCO cycles. Ratio 1 passes
// the DCO clock through. The published design only names this block; the
// counter form and programmable ratio are choices of this design.
module output_div #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] ratio,   // 0 and 1 both mean divide by 1
  output logic         fout
);
  timeunit 1ps; timeprecision 1fs;

  logic [W-1:0] cnt;
  logic [W-1:0] hi_cycles;
  logic         q;

  assign hi_cycles = (ratio + W'(1)) >> 1;

  // cnt counts up 0..ratio-1; the output is high while cnt < hi_cycles
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      q   <= 1'b0;
    end else begin
      if (cnt >= ratio - W'(1)) begin
        cnt <= '0;
        q   <= 1'b1;
      end else begin
        cnt <= cnt + W'(1);
        q   <= (cnt + W'(1)) < hi_cycles;
      end
    end
  end

  assign fout = (ratio > W'(1)) ? q : clk;
endmodule
