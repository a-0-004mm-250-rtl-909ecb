// Testbench for the ring_dco model: measures the output period for several
// coarse, fine, proportional and fractional settings and compares the
// frequency with F0 + KC*coarse + KF*(fine units + frac) +/- KP.
module tb_ring_dco;
  timeunit 1ps; timeprecision 1fs;

  logic [3:0] coarse;
  logic [255:0] fine_therm;
  logic prop, prop_en, frac, clk_out;
  int checks = 0, failures = 0;

  ring_dco dut (.coarse, .fine_therm, .prop, .prop_en, .frac, .clk_out);

  initial begin
    #(1000 * 1000 * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t1, t2;
    real f_exp, f_meas;
    for (int i = 0; i < 40; i++) begin
      int c, n;
      c = int'($urandom % 16);
      n = int'($urandom % 257);
      coarse = 4'(c);
      fine_therm = '0;
      for (int k = 0; k < n; k++) fine_therm[k] = 1'b1;
      prop = 1'($urandom); prop_en = 1'($urandom); frac = 1'($urandom);
      f_exp = 700.0 + 75.0 * c + 0.5 * (n + (frac ? 1 : 0)) + (prop_en ? (prop ? 2.0 : -2.0) : 0.0);
      repeat (2) @(posedge clk_out);
      t1 = $realtime;
      repeat (10) @(posedge clk_out);
      t2 = $realtime;
      f_meas = 10.0 * 1.0e6 / (t2 - t1);
      checks++;
      if (f_meas < f_exp - 0.01 || f_meas > f_exp + 0.01) begin
        failures++;
        $display("c=%0d n=%0d exp=%f meas=%f", c, n, f_exp, f_meas);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
