// PRNG-randomised first-order accumulator of the fractional path.
// The FRAC_W-bit fraction from the integrator is randomised by adding the
// dither read as +1 or -1 LSB, and the result is accumulated modulo
// 2^FRAC_W; the carry is the one-bit fractional input of the DCO. Because the
// dither averages to zero over its period, the density of ones at the
// output equals frac / 2^FRAC_W while the periodic pattern of a plain
// accumulator is broken up. The accumulator, the 1-bit output and the
// 6-bit randomised fraction follow the published design. Choices of this
// design: the dither is applied as +/-1 LSB, and the randomised value is
// clamped at zero (for frac = 0 the mean is then +0.5 LSB instead of 0).
// Timing: clocked by the dual-modulus prescaler output; the carry is
// registered, so frac_out changes one clock after the sum crosses 2^FRAC_W.
module frac_accum
  import dpll_pkg::*;
#(
  parameter int unsigned FW = FRAC_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [FW-1:0] frac,
  input  logic          dither,
  output logic          frac_out,
  output logic [FW-1:0] acc
);
  timeunit 1ps; timeprecision 1fs;

  logic [FW:0]   rnd;   // randomised fraction, 0 .. 2^FW
  logic [FW:0]   sum;  // at most 2^(FW+1)-1, so one carry bit

  always_comb begin
    if (dither)          rnd = {1'b0, frac} + 1'b1;
    else if (frac != '0) rnd = {1'b0, frac} - 1'b1;
    else                 rnd = '0;
  end

  assign sum = {1'b0, acc} + rnd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      frac_out <= 1'b0;
    end else begin
      acc      <= sum[FW-1:0];
      frac_out <= sum[FW];
    end
  end
endmodule
