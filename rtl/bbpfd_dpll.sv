// Bang-bang digital PLL with AFC, gain-boosted BB-PFD and PRNG-dithered
// fractional tuning.
// Signal flow: FIN -> pre-divider -> reference delay line (E_FREF, FREF,
// L_FREF) -> BB-PFD, which compares FREF with the divided DCO clock FFEED.
// Its UP/DN level drives one proportional capacitor of the DCO directly and
// the integrator (INT), whose 6-bit fraction carries into the 8-bit fine
// code held by the row/column controller (thermometer-decoded to the 256
// fine capacitors). The fraction is also randomised by the PRNG and
// accumulated; the carry toggles one fractional capacitor, refining the
// frequency step below one fine unit. The accumulator and PRNG run on the
// 8/9 prescaler output of the pulse-swallow divider. At start-up the AFC
// picks the 4-bit coarse code; only then are the integrator and the
// proportional path enabled. While the feedback edge lies outside the
// E_FREF..L_FREF window the integral step is 16 instead of 1.
// This structure follows the published block diagram. Choices of this
// design: the loop filter updates on the falling FREF edge, the
// proportional path is held off until the AFC is done, and all ratios are
// run-time inputs. The DCO and the delay line are behavioural models, so
// this module simulates but only its digital sub-blocks synthesize.
// Divide ratio FFEED = DCO / (8*p_val + s_val), with s_val <= p_val.
module bbpfd_dpll
  import dpll_pkg::*;
#(
  parameter real BUF_DELAY_PS = 1000.0,
  parameter int unsigned AFC_WIN = 64,
  parameter int unsigned INT_GAIN = HIGH_GAIN
) (
  input  logic                fin,
  input  logic                rst_n,
  input  logic [7:0]          pre_ratio,
  input  logic [7:0]          p_val,
  input  logic [7:0]          s_val,
  input  logic [7:0]          out_ratio,
  output logic                fout,
  output logic                dco_clk,
  output logic                fref,
  output logic                ffeed,
  output logic [COARSE_W-1:0] coarse,
  output logic [FINE_W-1:0]   fine_code,
  output logic [FRAC_W-1:0]   frac,
  output logic                afc_done,
  output logic                up,
  output logic                high_gain,
  output logic                ovf,
  output logic                unf,
  output logic                frac_bit,
  output logic                dither,
  output logic                mc,
  output logic                prng_sel
);
  timeunit 1ps; timeprecision 1fs;

  logic                  fref_div, e_fref, l_fref, fref_n, pclk;
  logic                  very_early, very_late;
  pfd_decision_t         dec;
  logic [FINE_UNITS-1:0] fine_therm;
  logic [15:0]           row_full_unused;
  logic [15:0]           col_on_unused;
  logic [LFSR_N-1:0]     lfsr_state_unused;
  logic [FRAC_W-1:0]     acc_unused;

  pre_div #(.W(8)) u_pre_div (.fin, .rst_n, .ratio(pre_ratio), .fref(fref_div));

  ref_delay_line #(.BUF_DELAY_PS(BUF_DELAY_PS)) u_dly (
    .ref_in(fref_div), .e_fref, .fref, .l_fref
  );

  bbpfd_gain_boost u_pfd (
    .e_fref, .fref, .l_fref, .ffeed, .rst_n, .dec, .very_early, .very_late
  );

  assign up        = dec.up;
  assign high_gain = dec.high_gain;
  assign fref_n    = ~fref;

  afc #(.WIN(AFC_WIN)) u_afc (
    .fin, .rst_n, .ratio(pre_ratio), .ffeed, .coarse, .done(afc_done)
  );

  loop_integrator #(.GAIN(INT_GAIN)) u_int (
    .clk(fref_n), .rst_n, .en(afc_done), .dec, .frac, .ovf, .unf
  );

  row_col_ctrl u_rowcol (
    .clk(fref_n), .rst_n, .ovf, .unf, .code(fine_code), .therm(fine_therm),
    .row_full(row_full_unused), .col_on(col_on_unused)
  );

  prng_dither u_prng (
    .clk(pclk), .rst_n, .dither, .state(lfsr_state_unused), .sel(prng_sel)
  );

  frac_accum u_acc (
    .clk(pclk), .rst_n, .frac, .dither, .frac_out(frac_bit), .acc(acc_unused)
  );

  ring_dco u_dco (
    .coarse, .fine_therm, .prop(dec.up), .prop_en(afc_done), .frac(frac_bit),
    .clk_out(dco_clk)
  );

  feedback_divider u_fbdiv (
    .dco_clk, .rst_n, .p_val, .s_val, .pclk, .ffeed, .mc
  );

  output_div #(.W(8)) u_outdiv (.clk(dco_clk), .rst_n, .ratio(out_ratio), .fout);
endmodule
