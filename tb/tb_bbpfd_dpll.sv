// Lock test of the bang-bang DPLL: FIN = 26 MHz, no pre-division, feedback
// ratio 8*6 + 1 = 49, so the DCO must settle at 1.274 GHz. Checks:
//  - the fine code holds its reset value until the AFC has finished;
//  - the AFC finishes with the coarse code that brings the DCO closest from
//    below (code 7 for this DCO model);
//  - high-gain mode is used during acquisition and then falls silent;
//  - after lock the mean FFEED period over 200 reference periods equals
//    the FREF period within 0.05 %, and every feedback edge lies within
//    +/-1 ns of FREF (inside the high-gain window);
//  - the DCO period averages to the reference period / 49;
//  - the fine code moved (OverF/UnderF seen), the prescaler used both
//    moduli, the fractional carry toggled and the PRNG select flipped.
module tb_bbpfd_dpll;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  localparam real TREF = 1.0e6 / 26.0;   // ps

  logic fin = 1'b0, rst_n = 1'b1;
  logic fout, dco_clk, fref, ffeed, afc_done, up, high_gain, ovf, unf, frac_bit, dither, mc, prng_sel;
  logic [3:0] coarse;
  logic [7:0] fine_code;
  logic [5:0] frac;
  int checks = 0, failures = 0;

  bbpfd_dpll dut (
    .fin, .rst_n, .pre_ratio(8'd1), .p_val(8'd6), .s_val(8'd1), .out_ratio(8'd1),
    .fout, .dco_clk, .fref, .ffeed, .coarse, .fine_code, .frac, .afc_done, .up,
    .high_gain, .ovf, .unf, .frac_bit, .dither, .mc, .prng_sel
  );

  always #(TREF / 2.0) fin = ~fin;

  int n_hg = 0, n_ovf = 0, n_unf = 0, n_frac = 0, n_mc = 0, n_sel = 0, n_ref = 0;
  always @(posedge fref) if (afc_done) begin n_ref++; if (high_gain) n_hg++; end
  always @(posedge fref) begin if (ovf) n_ovf++; if (unf) n_unf++; end
  always @(posedge frac_bit) n_frac++;
  always @(posedge mc) n_mc++;
  always @(prng_sel) n_sel++;
  // the fine code must stay at its reset value while the AFC searches
  int n_early_fine = 0;
  always @(posedge fref) if (!afc_done && fine_code !== 8'd32) n_early_fine++;

  initial begin
    #(1000.0 * 1000 * 1000 * 2);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_fref, t_ffeed;
  always @(posedge fref)  t_fref  = $realtime;
  always @(posedge ffeed) t_ffeed = $realtime;

  initial begin
    realtime t0, t1, tafc, tlock;
    real err, maxerr;
    int quiet, ncyc;
    #100 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    wait (afc_done);
    tafc = $realtime;
    $display("AFC done at %0.2f us, coarse=%0d", tafc / 1.0e6, coarse);
    checks++;
    if (coarse !== 4'd7) failures++;
    checks++;
    if (n_early_fine != 0) begin
      failures++;
      $display("fine code moved during the AFC search (%0d periods)", n_early_fine);
    end
    // lock: 64 consecutive reference periods without high-gain mode
    quiet = 0;
    ncyc = 0;
    while (quiet < 64 && ncyc < 5000) begin
      @(negedge fref);
      ncyc++;
      if (high_gain) quiet = 0; else quiet++;
    end
    tlock = $realtime;
    $display("lock after %0.2f us (%0d reference periods after AFC), fine code %0d",
             (tlock - tafc) / 1.0e6, ncyc, fine_code);
    checks++;
    if (quiet < 64) failures++;
    // settle a little more, then measure
    repeat (200) @(posedge fref);
    @(posedge ffeed);
    t0 = $realtime;
    maxerr = 0.0;
    for (int i = 0; i < 200; i++) begin
      @(negedge fref);
      err = t_ffeed - t_fref;
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
    end
    @(posedge ffeed);
    t1 = $realtime;
    $display("mean FFEED period %f ps (FREF %f ps), max |phase error| %0.1f ps",
             (t1 - t0) / 200.0, TREF, maxerr);
    checks++;
    if ((t1 - t0) / 200.0 > TREF * 1.0005 || (t1 - t0) / 200.0 < TREF * 0.9995) failures++;
    checks++;
    if (maxerr > 1000.0) failures++;
    t0 = $realtime;
    repeat (49 * 100) @(posedge dco_clk);
    t1 = $realtime;
    $display("mean DCO frequency %f MHz", 1.0e6 * 4900.0 / (t1 - t0));
    checks++;
    if (1.0e6 * 4900.0 / (t1 - t0) < 1274.0 * 0.998 || 1.0e6 * 4900.0 / (t1 - t0) > 1274.0 * 1.002) failures++;
    $display("high-gain periods=%0d ovf=%0d unf=%0d frac carries=%0d mc pulses=%0d prng flips=%0d",
             n_hg, n_ovf, n_unf, n_frac, n_mc, n_sel);
    checks++;
    if (n_hg == 0 || n_ovf == 0 || n_unf == 0 || n_frac == 0 || n_mc == 0 || n_sel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
