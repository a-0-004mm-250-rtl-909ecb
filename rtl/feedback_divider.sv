// Pulse-swallow feedback divider: FFEED = DCO / (N*P + S).
// The dual-modulus prescaler (N/N+1) drives two counters on its output
// clock. The program counter P counts P prescaler periods per output period
// and restarts the swallow counter S at its wrap; while the swallow count is
// below S the prescaler is told to divide by N+1. One output period is thus
// S periods of N+1 plus P-S periods of N input cycles. The three counters and
// their connections follow the published block diagram; widths, the output
// duty cycle (high for the first half of the P count) and the requirement
// S <= P are choices of this design.
// The prescaler clock is brought out because the fractional accumulator and
// the PRNG run on it.
module feedback_divider
  import dpll_pkg::*;
#(
  parameter int unsigned N  = PRESCALE_N,
  parameter int unsigned PW = 8
) (
  input  logic          dco_clk,
  input  logic          rst_n,
  input  logic [PW-1:0] p_val,   // program count P (>= 2)
  input  logic [PW-1:0] s_val,   // swallow count S (<= P)
  output logic          pclk,    // prescaler output
  output logic          ffeed,
  output logic          mc       // modulus control (1: N+1)
);
  timeunit 1ps; timeprecision 1fs;

  logic [PW-1:0] p_cnt;
  logic [PW-1:0] s_cnt;
  logic          p_wrap;

  dual_mod_prescaler #(.N(N)) u_presc (.clk(dco_clk), .rst_n, .mc, .pclk);

  assign p_wrap = (p_cnt >= p_val - 1'b1);

  // divide-by-P program counter
  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      p_cnt <= '0;
      ffeed <= 1'b0;
    end else begin
      p_cnt <= p_wrap ? '0 : p_cnt + 1'b1;
      ffeed <= p_wrap ? 1'b1 : ((p_cnt + 1'b1) < (p_val >> 1));
    end
  end

  // divide-by-S swallow counter, restarted by the program counter
  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n)        s_cnt <= '0;
    else if (p_wrap)   s_cnt <= '0;
    else if (s_cnt != '1) s_cnt <= s_cnt + 1'b1;
  end

  assign mc = (s_cnt < s_val);
endmodule
