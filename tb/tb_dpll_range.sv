// Workload test of the bang-bang DPLL across its output range. One loop at
// default parameters is reset and locked three times:
//   FIN 26 MHz, ratio 8*3+3 = 27 ->  702 MHz (near the bottom of 0.7-1.8 GHz)
//   FIN 25 MHz, ratio 8*7+4 = 60 -> 1500 MHz, output divider 32 -> 46.875 MHz
//   FIN 26 MHz, ratio 8*8+5 = 69 -> 1794 MHz (near the top)
// For each: the AFC must finish, the loop must reach 64 reference periods
// without high-gain mode within 5000 periods, the mean DCO frequency over
// 100 feedback periods must be within 0.2 % of FIN*ratio, and the mean
// output frequency over about 4000 DCO periods must be FIN*ratio/out_ratio
// (0.2 %).
// The pulse-swallow divider needs S <= P, which all three settings keep.
module tb_dpll_range;
  timeunit 1ps; timeprecision 1fs;

  logic fin = 1'b0, rst_n = 1'b1;
  real  tfin = 1.0e6 / 26.0;
  always #(tfin / 2.0) fin = ~fin;

  logic [7:0] p_val, s_val, out_ratio;
  logic fout, dco_clk, fref, ffeed, afc_done, up, high_gain, ovf, unf, frac_bit, dither, mc, prng_sel;
  logic [3:0] coarse;
  logic [7:0] fine_code;
  logic [5:0] frac;
  int checks = 0, failures = 0;

  bbpfd_dpll dut (
    .fin, .rst_n, .pre_ratio(8'd1), .p_val, .s_val, .out_ratio,
    .fout, .dco_clk, .fref, .ffeed, .coarse, .fine_code, .frac, .afc_done, .up,
    .high_gain, .ovf, .unf, .frac_bit, .dither, .mc, .prng_sel
  );

  // watchdog: 2 ms of simulated time
  initial begin
    #(2.0e9);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real f_mhz, input int p, input int s, input int od);
    realtime t0, t1;
    real fdco, ftarget, fo;
    int quiet, ncyc;
    tfin = 1.0e6 / f_mhz;
    p_val = 8'(p); s_val = 8'(s); out_ratio = 8'(od);
    ftarget = f_mhz * (8 * p + s);
    #(100000);
    rst_n = 1'b0;
    #(1000);
    rst_n = 1'b1;
    wait (afc_done);
    quiet = 0; ncyc = 0;
    while (quiet < 64 && ncyc < 5000) begin
      @(negedge fref);
      ncyc++;
      if (high_gain) quiet = 0; else quiet++;
    end
    checks++;
    if (quiet < 64) failures++;
    repeat (100) @(posedge fref);
    @(posedge ffeed);
    t0 = $realtime;
    repeat ((8 * p + s) * 100) @(posedge dco_clk);
    t1 = $realtime;
    fdco = 1.0e6 * (8 * p + s) * 100 / (t1 - t0);
    @(posedge fout);
    t0 = $realtime;
    repeat (4000 / od) @(posedge fout);
    t1 = $realtime;
    fo = 1.0e6 * real'(4000 / od) / (t1 - t0);
    $display("FIN %0.1f MHz ratio %0d: coarse %0d fine %0d, lock after %0d periods, DCO %0.3f MHz (target %0.1f), FOUT %0.3f MHz",
             f_mhz, 8 * p + s, coarse, fine_code, ncyc, fdco, ftarget, fo);
    checks++;
    if (fdco < ftarget * 0.998 || fdco > ftarget * 1.002) failures++;
    checks++;
    if (fo < ftarget / od * 0.998 || fo > ftarget / od * 1.002) failures++;
  endtask

  initial begin
    p_val = 8'd3; s_val = 8'd3; out_ratio = 8'd1;
    run(26.0, 3, 3, 1);
    run(25.0, 7, 4, 32);
    run(26.0, 8, 5, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
