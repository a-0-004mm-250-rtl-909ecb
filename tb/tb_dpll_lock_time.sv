// Lock-time comparison of the bang-bang DPLL with and without the high-gain
// mode. Two copies of the loop run from the same 26 MHz reference towards
// 1.274 GHz (feedback 8*6 + 1 = 49); one integrates with the boosted step of
// 16 when the feedback edge falls outside the E_FREF..L_FREF window, the
// other always with step 1. Lock is counted from the end of the AFC search
// to the first run of 64 reference periods without a high-gain flag.
// Checks: both lock, the boosted loop is faster, and the speed-up lies
// between 4 and 20 (the measured chip gives 220 us / 25 us, about 9).
module tb_dpll_lock_time;
  timeunit 1ps; timeprecision 1fs;

  localparam real TREF = 1.0e6 / 26.0;   // ps

  logic fin = 1'b0, rst_n = 1'b1;
  always #(TREF / 2.0) fin = ~fin;

  logic [1:0] fref, afc_done, high_gain;
  int checks = 0, failures = 0;

  bbpfd_dpll #(.INT_GAIN(16)) u_boost (
    .fin, .rst_n, .pre_ratio(8'd1), .p_val(8'd6), .s_val(8'd1), .out_ratio(8'd1),
    .fout(), .dco_clk(), .fref(fref[0]), .ffeed(), .coarse(), .fine_code(), .frac(),
    .afc_done(afc_done[0]), .up(), .high_gain(high_gain[0]), .ovf(), .unf(),
    .frac_bit(), .dither(), .mc(), .prng_sel()
  );
  bbpfd_dpll #(.INT_GAIN(1)) u_plain (
    .fin, .rst_n, .pre_ratio(8'd1), .p_val(8'd6), .s_val(8'd1), .out_ratio(8'd1),
    .fout(), .dco_clk(), .fref(fref[1]), .ffeed(), .coarse(), .fine_code(), .frac(),
    .afc_done(afc_done[1]), .up(), .high_gain(high_gain[1]), .ovf(), .unf(),
    .frac_bit(), .dither(), .mc(), .prng_sel()
  );

  realtime t_lock [2];
  bit      locked [2];

  for (genvar k = 0; k < 2; k++) begin : g_watch
    initial begin
      realtime t_afc;
      int quiet;
      locked[k] = 1'b0;
      @(negedge rst_n);
      @(posedge rst_n);
      wait (afc_done[k]);
      t_afc = $realtime;
      quiet = 0;
      while (quiet < 64) begin
        @(negedge fref[k]);
        if (high_gain[k]) quiet = 0; else quiet++;
      end
      t_lock[k] = $realtime - t_afc;
      locked[k] = 1'b1;
    end
  end

  task automatic report;
    $display("lock after AFC: high gain 16 %0.2f us (locked=%0d), gain 1 %0.2f us (locked=%0d)",
             t_lock[0] / 1.0e6, locked[0], t_lock[1] / 1.0e6, locked[1]);
    checks++;
    if (!locked[0]) failures++;
    checks++;
    if (!locked[1]) failures++;
    checks++;
    if (!(locked[0] && locked[1] && t_lock[0] * 4.0 <= t_lock[1] && t_lock[0] * 20.0 >= t_lock[1]))
      failures++;
    else
      $display("speed-up %0.2f", t_lock[1] / t_lock[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    wait (locked[0] && locked[1]);
    report();
  end

  // watchdog: 1 ms of simulated time
  initial begin
    #(1.0e9);
    failures++;
    report();
  end
endmodule
