// Workload test of the delta-sigma TDC: a 100 kHz single tone of 100 ps
// peak-to-peak, sampled at 10 MS/s (one edge pair every 100 ns) for 65,536
// samples. The output bits, read as +/-T_DT, are Hann-windowed and
// transformed by a direct DFT over the bins up to just past the tone
// (bin width 10 MHz / 65,536 = 152.6 Hz). From the spectrum:
//  - the tone's power (its bins k0-3..k0+4) gives its amplitude, which must
//    be 50 ps within 5 %;
//  - noise is integrated from 1 kHz up to the edge of the tone's lobe
//    (signal band 100 kHz, oversampling ratio 50) and the SNDR must reach at
//    least 28.95 dB, the value measured on silicon where analog noise adds
//    to the quantization noise this noiseless model produces;
//  - the in-band noise is also reported in ps rms.
module tb_tdc_sndr;
  timeunit 1ps; timeprecision 1fs;

  localparam real TDT   = 60.0;
  localparam int  NPTS  = 65536;
  localparam real FS    = 10.0e6;
  localparam real FIN   = 100.0e3;
  localparam real PI    = 3.14159265358979;

  logic in_a = 1'b0, in_b = 1'b0, rst_n = 1'b1, dout;
  int checks = 0, failures = 0;

  dsm_tdc dut (.in_a, .in_b, .rst_n, .dout);

  // watchdog: 10 ms of simulated time (the run needs 6.6 ms)
  initial begin
    #(1.0e10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input real x);
    fork
      begin #1000 in_a = 1'b1; #2000 in_a = 1'b0; end
      begin #(1000.0 + x) in_b = 1'b1; #2000 in_b = 1'b0; end
    join
    #(100000.0 - 3000.0 - x);
  endtask

  real y   [NPTS];
  real cs  [NPTS];
  real sn  [NPTS];

  initial begin
    real x, re, im, p, psig, pnoise, wsum2, amp, sndr, nrms;
    int k0, klo, khi, idx;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #10000;
    for (int i = 0; i < 200; i++) sample(0.0);   // settle
    for (int i = 0; i < NPTS; i++) begin
      x = 50.0 * $sin(2.0 * PI * FIN * i / FS);
      sample(x);
      y[i] = dout ? TDT : -TDT;
    end
    wsum2 = 0.0;
    for (int i = 0; i < NPTS; i++) begin
      cs[i] = $cos(2.0 * PI * i / NPTS);
      sn[i] = $sin(2.0 * PI * i / NPTS);
      p = 0.5 - 0.5 * cs[i];                    // Hann window
      y[i] = y[i] * p;
      wsum2 += p * p;
    end
    k0  = int'($floor(FIN * NPTS / FS));        // 655
    klo = int'($ceil(1.0e3 * NPTS / FS));       // 1 kHz -> bin 7
    khi = k0 + 4;
    psig = 0.0; pnoise = 0.0;
    for (int k = klo; k <= khi; k++) begin
      re = 0.0; im = 0.0; idx = 0;
      for (int n = 0; n < NPTS; n++) begin
        re += y[n] * cs[idx];
        im -= y[n] * sn[idx];
        idx = (idx + k) % NPTS;
      end
      // one-sided power of this bin, normalised so that a sine of
      // amplitude A summed over its lobe gives A^2 / 2
      p = 2.0 * (re * re + im * im) / (real'(NPTS) * wsum2);
      if (k >= k0 - 3) psig += p; else pnoise += p;
    end
    amp  = $sqrt(2.0 * psig);
    sndr = 10.0 * $log10(psig / pnoise);
    nrms = $sqrt(pnoise);
    $display("tone amplitude %0.2f ps (50 ps applied), in-band noise %0.3f ps rms, SNDR %0.2f dB",
             amp, nrms, sndr);
    checks++;
    if (amp < 47.5 || amp > 52.5) failures++;
    checks++;
    if (!(sndr >= 28.95)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
