// Workload test of the fractional path: spur suppression by the PRNG.
// Two accumulators run from the same clock on the same mean fraction
// F/64: one randomised by prng_dither (F +/- 1 LSB), the other fed F - 1
// with the dither input held at +1, which is a plain accumulator of F.
// Over one full dither period (2 * 4095 clocks) the output bits, read as
// +/-1 with the mean removed, are transformed by a direct DFT and the
// largest line is taken for each. For each of several fractions the
// randomised accumulator's largest line must lie at least 5 dB below the
// plain one's, and both must carry the same number of ones within 2 %.
module tb_frac_spur;
  timeunit 1ps; timeprecision 1fs;

  localparam int  NPTS = 8190;
  localparam real PI   = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b1;
  always #500 clk = ~clk;

  logic [5:0] frac_d, frac_p;
  logic dither, sel, out_d, out_p;
  logic [11:0] state;
  logic [5:0] acc_d, acc_p;
  int checks = 0, failures = 0;

  prng_dither u_prng (.clk, .rst_n, .dither, .state, .sel);
  frac_accum  u_dith (.clk, .rst_n, .frac(frac_d), .dither,       .frac_out(out_d), .acc(acc_d));
  frac_accum  u_plain(.clk, .rst_n, .frac(frac_p), .dither(1'b1), .frac_out(out_p), .acc(acc_p));

  // watchdog
  initial begin
    #(1.0e9);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real yd [NPTS];
  real yp [NPTS];
  real cs [NPTS];
  real sn [NPTS];

  function automatic real max_line(ref real y [NPTS]);
    real m, re, im, p, mean;
    int idx;
    mean = 0.0;
    for (int n = 0; n < NPTS; n++) mean += y[n];
    mean /= NPTS;
    m = 0.0;
    for (int k = 1; k <= NPTS / 2; k++) begin
      re = 0.0; im = 0.0; idx = 0;
      for (int n = 0; n < NPTS; n++) begin
        re += (y[n] - mean) * cs[idx];
        im -= (y[n] - mean) * sn[idx];
        idx += k;
        if (idx >= NPTS) idx -= NPTS;
      end
      p = re * re + im * im;
      if (p > m) m = p;
    end
    return m;
  endfunction

  initial begin
    int fr [4] = '{5, 11, 21, 37};
    real md, mp, sd, sp;
    int nd, np;
    for (int n = 0; n < NPTS; n++) begin
      cs[n] = $cos(2.0 * PI * n / NPTS);
      sn[n] = $sin(2.0 * PI * n / NPTS);
    end
    foreach (fr[j]) begin
      frac_d = 6'(fr[j]);
      frac_p = 6'(fr[j] - 1);
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      repeat (4) @(negedge clk);
      nd = 0; np = 0;
      for (int n = 0; n < NPTS; n++) begin
        @(negedge clk);
        yd[n] = out_d ? 1.0 : -1.0;
        yp[n] = out_p ? 1.0 : -1.0;
        nd += int'(out_d);
        np += int'(out_p);
      end
      md = max_line(yd);
      mp = max_line(yp);
      $display("frac %0d/64: ones %0d (dithered) %0d (plain), largest line %0.1f dB lower with the PRNG",
               fr[j], nd, np, 10.0 * $log10(mp / md));
      checks++;
      if (!(mp >= 3.16 * md)) failures++;
      checks++;
      if (nd > np * 1.02 + 2 || nd < np * 0.98 - 2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
