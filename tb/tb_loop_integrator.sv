// Testbench for loop_integrator: random UP/DN, high-gain and enable inputs
// are applied and the fraction, OverF and UnderF are compared every clock
// with a reference integer model (step 1, or 16 in high-gain mode, wrapped
// modulo 64 with a carry/borrow flag).
module tb_loop_integrator;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  pfd_decision_t dec;
  logic [5:0] frac;
  logic ovf, unf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_hg = 0;

  loop_integrator dut (.clk, .rst_n, .en, .dec, .frac, .ovf, .unf);

  always #500 clk = ~clk;

  initial begin
    #(1000 * 1000 * 20);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rf, rv, ro, ru, step;
    dec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rf = 0;
    for (int i = 0; i < 3000; i++) begin
      en            = ($urandom % 8) != 0;
      dec.up        = (i < 1500) ? (($urandom % 4) != 0) : (($urandom % 4) == 0);
      dec.dn        = ~dec.up;
      dec.high_gain = ($urandom % 5) == 0;
      step = dec.high_gain ? 16 : 1;
      ro = 0; ru = 0;
      if (en) begin
        rv = dec.up ? rf + step : rf - step;
        if (rv > 63) begin ro = 1; rv -= 64; end
        if (rv < 0)  begin ru = 1; rv += 64; end
        rf = rv;
      end
      if (en && dec.high_gain) n_hg++;
      @(negedge clk);
      checks++;
      if (frac !== 6'(rf) || ovf !== 1'(ro) || unf !== 1'(ru)) begin
        failures++;
        if (failures < 5) $display("i=%0d frac=%0d/%0d ovf=%b/%0d unf=%b/%0d", i, frac, rf, ovf, ro, unf, ru);
      end
      if (ro != 0) n_ovf++;
      if (ru != 0) n_unf++;
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_hg == 0) failures++;
    $display("overflows=%0d underflows=%0d high-gain steps=%0d", n_ovf, n_unf, n_hg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
