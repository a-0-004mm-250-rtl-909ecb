// Dual-modulus prescaler, divide by N or N+1 (8/9 in the published design).
// A counter on the DCO clock runs 0..N-1, or 0..N when the modulus control
// `mc` is high at the end of the count. The output is high for the first N/2
// input cycles of each output period, so its rising edge marks the start of
// a count. The modulus is sampled at the last count of a period, so mc may
// change any time in the first N-1 input cycles after the output rises.
// The counter form and duty cycle are choices of this design.
module dual_mod_prescaler
  import dpll_pkg::*;
#(
  parameter int unsigned N = PRESCALE_N
) (
  input  logic clk,     // DCO clock
  input  logic rst_n,
  input  logic mc,      // 1: divide by N+1, 0: divide by N
  output logic pclk
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_nx;
  logic          last;

  assign last   = mc ? (cnt >= CW'(N)) : (cnt >= CW'(N - 1));
  assign cnt_nx = last ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      pclk <= 1'b0;
    end else begin
      cnt  <= cnt_nx;
      pclk <= (cnt_nx < CW'(N / 2));
    end
  end
endmodule
