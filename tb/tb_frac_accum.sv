// Testbench for frac_accum: a reference accumulator in the testbench sees
// the same fraction and dither; the carry output and the accumulator must
// match it every clock. It also checks that, with a balanced dither, the
// density of carries over 1024 clocks equals frac/64 within one count.
module tb_frac_accum;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] frac;
  logic dither, frac_out;
  logic [5:0] acc;
  int checks = 0, failures = 0;

  frac_accum dut (.clk, .rst_n, .frac, .dither, .frac_out, .acc);

  always #500 clk = ~clk;

  initial begin
    #(1000 * 1000 * 50);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int racc, rnd, rout, ones;
    frac = '0; dither = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    racc = 0; rout = 0;
    // random fractions and dither, bit-exact comparison
    for (int i = 0; i < 2000; i++) begin
      frac   = (i % 100 == 0) ? 6'd0 : ((i % 100 == 1) ? 6'd63 : 6'($urandom));
      dither = 1'($urandom);
      rnd = int'(frac) + (dither ? 1 : -1);
      if (rnd < 0) rnd = 0;
      @(posedge clk);
      rout = (racc + rnd) / 64;
      racc = (racc + rnd) % 64;
      @(negedge clk);
      checks++;
      if (frac_out !== 1'(rout) || acc !== 6'(racc)) begin
        failures++;
        if (failures < 5) $display("i=%0d frac=%0d d=%b out=%b/%0d acc=%0d/%0d", i, frac, dither, frac_out, rout, acc, racc);
      end
    end
    // density with alternating dither
    for (int f = 5; f < 64; f += 19) begin
      frac = 6'(f);
      ones = 0;
      for (int i = 0; i < 1024; i++) begin
        dither = i[0];
        @(negedge clk);
        if (frac_out) ones++;
      end
      checks++;
      if (ones < f * 16 - 1 || ones > f * 16 + 1) begin
        failures++;
        $display("density frac=%0d ones=%0d", f, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
