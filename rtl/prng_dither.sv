// Pseudo-random dither generator (PRNG) of the fractional path.
// A Galois LFSR of N bits starts from the seed 1000...0. A comparator spots
// the seed each time the LFSR comes back to it (every 2^N-1 clocks) and
// toggles a flip-flop, which selects through a MUX either the LFSR's LSB or
// its inverse as the dither bit. The sequence therefore lasts 2*(2^N-1)
// clocks and holds exactly as many ones as zeros, so the dither (read as
// +1/-1) averages to zero. Structure, seed and N = 12 follow the published
// design; the feedback polynomial x^12 + x^6 + x^4 + x + 1 is a standard
// maximal-length one chosen by this design.
// Timing: one new dither bit per rising edge of clk (the divided clock of the
// dual-modulus prescaler); rst_n clears the select flip-flop and reloads
// the seed.
module prng_dither
  import dpll_pkg::*;
#(
  parameter int unsigned       N    = LFSR_N,
  parameter logic [N-1:0]      TAPS = N'(12'h829)   // bits 11,5,3,0
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         dither,
  output logic [N-1:0] state,
  output logic         sel
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic [N-1:0] SEED = {1'b1, {(N-1){1'b0}}};

  logic at_seed;

  assign at_seed = (state == SEED);   // comparator

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEED;
      sel   <= 1'b0;
    end else begin
      state <= (state >> 1) ^ (state[0] ? TAPS : '0);
      if (at_seed) sel <= ~sel;
    end
  end

  assign dither = sel ? ~state[0] : state[0];
endmodule
