// Timing blocks of a low-power SoC: a bang-bang digital PLL and a
// first-order delta-sigma TDC, side by side. The two share no signal; each
// keeps its own ports. The PLL's internal state (coarse/fine codes, AFC
// status, decisions) is brought out for observation.
module timing_soc_top
  import dpll_pkg::*;
(
  // digital PLL
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
  output logic                prng_sel,
  // delta-sigma TDC
  input  logic                tdc_in_a,
  input  logic                tdc_in_b,
  input  logic                tdc_rst_n,
  output logic                tdc_dout
);
  timeunit 1ps; timeprecision 1fs;

  bbpfd_dpll u_dpll (
    .fin, .rst_n, .pre_ratio, .p_val, .s_val, .out_ratio, .fout, .dco_clk,
    .fref, .ffeed, .coarse, .fine_code, .frac, .afc_done, .up, .high_gain,
    .ovf, .unf, .frac_bit, .dither, .mc, .prng_sel
  );

  dsm_tdc u_tdc (.in_a(tdc_in_a), .in_b(tdc_in_b), .rst_n(tdc_rst_n), .dout(tdc_dout));
endmodule
