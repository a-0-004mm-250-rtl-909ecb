// Testbench for bbpfd_gain_boost: E_FREF, FREF and L_FREF are produced 1 ns
// apart and FFEED at a random offset of -4..+4 ns from FREF. After the
// period's edges UP must say whether FREF came first and High Gain whether
// FFEED lay outside the E_FREF..L_FREF window.
module tb_bbpfd_gain_boost;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic e_fref = 1'b0, fref = 1'b0, l_fref = 1'b0, ffeed = 1'b0, rst_n = 1'b1;
  pfd_decision_t dec;
  logic very_early, very_late;
  int checks = 0, failures = 0;

  bbpfd_gain_boost dut (.e_fref, .fref, .l_fref, .ffeed, .rst_n, .dec, .very_early, .very_late);

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off, n_hg;
    n_hg = 0;
    #100 rst_n = 1'b0;  // an edge, so the asynchronous clears act
    #900 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      off = int'($urandom % 8000) - 4000;
      if (off == 0 || off == 1000 || off == -1000) off += 7;
      #(10000);
      fork
        begin #4000 e_fref = 1'b1; #15000 e_fref = 1'b0; end
        begin #5000 fref   = 1'b1; #15000 fref   = 1'b0; end
        begin #6000 l_fref = 1'b1; #15000 l_fref = 1'b0; end
        begin #(5000 + off) ffeed = 1'b1; #15000 ffeed = 1'b0; end
      join
      checks++;
      if (dec.up !== (off > 0) || dec.dn !== (off < 0) ||
          dec.high_gain !== (off < -1000 || off > 1000) ||
          very_early !== (off < -1000) || very_late !== (off > 1000)) begin
        failures++;
        if (failures < 5) $display("off=%0d up=%b hg=%b", off, dec.up, dec.high_gain);
      end
      if (dec.high_gain) n_hg++;
    end
    checks++;
    if (n_hg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
