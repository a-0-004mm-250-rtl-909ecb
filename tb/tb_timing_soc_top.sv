// End-to-end test of timing_soc_top with its default parameters.
// DPLL: FIN = 26 MHz, no pre-division, feedback ratio 8*6+1 = 49, output
// divider 2. The PLL must run its AFC search, acquire lock in high-gain
// mode and settle at 1.274 GHz (Fout 637 MHz).
// TDC, running at the same time: 10 MS/s edge pairs carrying a 100 kHz,
// 100 ps peak-to-peak sine; every output bit is compared with a
// discrete-time first-order delta-sigma reference (T_DT = 60 ps).
// Each mechanism of the design is counted and must occur at least once:
// AFC trial bits kept and cleared, UP and DN decisions, high-gain mode,
// integrator overflow and underflow, fine-code steps, fractional carries,
// prescaler modulus switches, PRNG select flips, TDC ones and zeros.
module tb_timing_soc_top;
  timeunit 1ps; timeprecision 1fs;

  localparam real TREF = 1.0e6 / 26.0;
  localparam real TDT  = 60.0;

  logic fin = 1'b0, rst_n = 1'b1, tdc_in_a = 1'b0, tdc_in_b = 1'b0, tdc_rst_n = 1'b1;
  logic fout, dco_clk, fref, ffeed, afc_done, up, high_gain, ovf, unf, frac_bit, dither, mc, prng_sel;
  logic tdc_dout;
  logic [3:0] coarse;
  logic [7:0] fine_code;
  logic [5:0] frac;
  int checks = 0, failures = 0;

  timing_soc_top dut (
    .fin, .rst_n, .pre_ratio(8'd1), .p_val(8'd6), .s_val(8'd1), .out_ratio(8'd2),
    .fout, .dco_clk, .fref, .ffeed, .coarse, .fine_code, .frac, .afc_done, .up,
    .high_gain, .ovf, .unf, .frac_bit, .dither, .mc, .prng_sel,
    .tdc_in_a, .tdc_in_b, .tdc_rst_n, .tdc_dout
  );

  always #(TREF / 2.0) fin = ~fin;

  initial begin
    #(1000.0 * 1000 * 1000 * 5);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_afc_kept = 0, n_afc_clr = 0, n_up = 0, n_dn = 0, n_hg = 0, n_ovf = 0, n_unf = 0;
  int n_fine = 0, n_frac = 0, n_mc = 0, n_sel = 0, n_t1 = 0, n_t0 = 0;
  logic [3:0] prev_coarse;
  always @(negedge fref) if (afc_done) begin
    if (up) n_up++; else n_dn++;
    if (high_gain) n_hg++;
  end
  always @(posedge fref) begin if (ovf) n_ovf++; if (unf) n_unf++; end
  always @(fine_code) n_fine++;
  always @(posedge frac_bit) n_frac++;
  always @(posedge mc) n_mc++;
  always @(prng_sel) n_sel++;
  always @(coarse) begin
    // a trial bit cleared shows as the code falling while the AFC runs
    if (!afc_done && coarse < prev_coarse) n_afc_clr++;
    if (!afc_done && coarse > prev_coarse) n_afc_kept++;
    prev_coarse = coarse;
  end

  // ---------------- TDC stimulus and reference ----------------
  bit tdc_run = 1'b1;
  initial begin
    real s, x;
    logic dref;
    int n;
    #100 tdc_rst_n = 1'b0;
    #100 tdc_rst_n = 1'b1;
    #10000;
    s = 0.0; dref = 1'b0; n = 0;
    while (tdc_run) begin
      x = 50.0 * $sin(2.0 * 3.14159265358979 * 100.0e3 * n * 100.0e-9) + 0.123;
      s = s + x + (dref ? -TDT : TDT);
      fork
        begin #1000 tdc_in_a = 1'b1; #2000 tdc_in_a = 1'b0; end
        begin #(1000.0 + x) tdc_in_b = 1'b1; #2000 tdc_in_b = 1'b0; end
      join
      #(100000.0 - 3000.0 - x);
      if (s > 0.01 || s < -0.01) begin
        checks++;
        if (tdc_dout !== (s > 0.0)) begin
          failures++;
          if (failures < 5) $display("TDC sample %0d: dout=%b, expected %b", n, tdc_dout, s > 0.0);
        end
      end
      if (tdc_dout) n_t1++; else n_t0++;
      dref = tdc_dout;
      n++;
    end
  end

  // ---------------- DPLL sequence ----------------
  realtime t_fref, t_ffeed;
  always @(posedge fref)  t_fref  = $realtime;
  always @(posedge ffeed) t_ffeed = $realtime;

  initial begin
    realtime t0, t1, tafc;
    real err, maxerr, f;
    int quiet, ncyc;
    prev_coarse = 4'd8;
    #100 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    wait (afc_done);
    tafc = $realtime;
    checks++;
    if (coarse !== 4'd7) failures++;
    quiet = 0; ncyc = 0;
    while (quiet < 64 && ncyc < 5000) begin
      @(negedge fref);
      ncyc++;
      if (high_gain) quiet = 0; else quiet++;
    end
    $display("AFC done at %0.2f us (coarse %0d), lock %0.2f us later", tafc / 1.0e6, coarse,
             ($realtime - tafc) / 1.0e6);
    checks++;
    if (quiet < 64) failures++;
    repeat (200) @(posedge fref);
    maxerr = 0.0;
    @(posedge ffeed);
    t0 = $realtime;
    for (int i = 0; i < 200; i++) begin
      @(negedge fref);
      err = t_ffeed - t_fref;
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
    end
    @(posedge ffeed);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) / 200.0 > TREF * 1.0005 || (t1 - t0) / 200.0 < TREF * 0.9995 || maxerr > 1000.0) failures++;
    t0 = $realtime;
    repeat (1000) @(posedge fout);
    t1 = $realtime;
    f = 1.0e6 * 1000.0 / (t1 - t0);
    $display("Fout %f MHz (expected 637), max |phase error| %0.1f ps", f, maxerr);
    checks++;
    if (f < 637.0 * 0.998 || f > 637.0 * 1.002) failures++;
    tdc_run = 1'b0;
    #200000;
    $display("mechanisms: afc kept=%0d cleared=%0d up=%0d dn=%0d high-gain=%0d ovf=%0d unf=%0d",
             n_afc_kept, n_afc_clr, n_up, n_dn, n_hg, n_ovf, n_unf);
    $display("            fine steps=%0d frac carries=%0d /9 cycles=%0d prng flips=%0d tdc ones=%0d zeros=%0d",
             n_fine, n_frac, n_mc, n_sel, n_t1, n_t0);
    checks++; if (n_afc_kept == 0) failures++;
    checks++; if (n_afc_clr == 0) failures++;
    checks++; if (n_up == 0) failures++;
    checks++; if (n_dn == 0) failures++;
    checks++; if (n_hg == 0) failures++;
    checks++; if (n_ovf == 0) failures++;
    checks++; if (n_unf == 0) failures++;
    checks++; if (n_fine == 0) failures++;
    checks++; if (n_frac == 0) failures++;
    checks++; if (n_mc == 0) failures++;
    checks++; if (n_sel == 0) failures++;
    checks++; if (n_t1 == 0) failures++;
    checks++; if (n_t0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
