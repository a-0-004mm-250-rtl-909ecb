// Testbench for afc: a stand-in oscillator in the testbench produces FFEED
// at (716 + 75*coarse) MHz / N, i.e. a DCO whose fine bank sits at 32 units,
// divided by N. For several N and pre-divider ratios the search must end
// with the largest coarse code whose FFEED is not faster than FREF, and
// `done` must rise within the expected number of FIN cycles
// (4 bits x (SETTLE + WIN + GUARD + 3) x ratio).
module tb_afc;
  timeunit 1ps; timeprecision 1fs;

  logic fin = 1'b0, rst_n = 1'b1, ffeed = 1'b0;
  logic [7:0] ratio;
  logic [3:0] coarse;
  logic done;
  int checks = 0, failures = 0;
  real fin_mhz = 26.0;
  int  ndiv = 49;

  afc dut (.fin, .rst_n, .ratio, .ffeed, .coarse, .done);

  always #(1.0e6 / (2.0 * fin_mhz)) fin = ~fin;
  always #(1.0e6 * ndiv / (2.0 * (716.0 + 75.0 * coarse))) ffeed = ~ffeed;

  int fin_cyc = 0;
  always @(posedge fin) fin_cyc++;

  initial begin
    #(1000.0 * 1000 * 1000 * 2);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nv[4]  = '{49, 57, 40, 49};
    int rv[4]  = '{1, 1, 1, 2};
    int exp_c[4];
    int start;
    for (int k = 0; k < 4; k++) begin
      // expected: largest code with (716 + 75c)/N <= FREF (26 MHz)
      exp_c[k] = 0;
      for (int c = 0; c < 16; c++) if ((716.0 + 75.0 * c) / nv[k] <= 26.0) exp_c[k] = c;
      ndiv = nv[k];
      ratio = 8'(rv[k]);
      fin_mhz = 26.0 * rv[k];
      #1000 rst_n = 1'b0;
      #1000 rst_n = 1'b1;
      start = fin_cyc;
      wait (done);
      checks++;
      if (coarse !== 4'(exp_c[k])) begin
        failures++;
        $display("N=%0d ratio=%0d coarse=%0d expected %0d", nv[k], rv[k], coarse, exp_c[k]);
      end
      checks++;
      if (fin_cyc - start > 4 * (16 + 64 + 16 + 3) * rv[k] + 4) begin
        failures++;
        $display("AFC took %0d FIN cycles", fin_cyc - start);
      end
      $display("N=%0d ratio=%0d coarse=%0d after %0d FIN cycles", nv[k], rv[k], coarse, fin_cyc - start);
      #100000;
      checks++;
      if (coarse !== 4'(exp_c[k]) || !done) failures++;  // code holds after done
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
