// Testbench for pre_div: for ratios 1..12 counts input clocks per output
// period (must equal the ratio) and input clocks with the output high
// (must be ceil(ratio/2)); ratio 1 must pass the input through.
module tb_pre_div;
  timeunit 1ps; timeprecision 1fs;

  logic fin = 1'b0, rst_n = 1'b0, fref;
  logic [7:0] ratio;
  int checks = 0, failures = 0;

  pre_div dut (.fin, .rst_n, .ratio, .fref);

  always #500 fin = ~fin;

  initial begin
    #(1000 * 1000 * 20);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, hi = 0;
  always @(posedge fin) begin
    cyc++;
    #1 if (fref) hi++;
  end

  initial begin
    int last, lasthi;
    for (int r = 1; r <= 12; r++) begin
      rst_n = 1'b0;
      ratio = 8'(r);
      repeat (2) @(negedge fin);
      rst_n = 1'b1;
      @(posedge fref);
      @(posedge fref);
      last = cyc; lasthi = hi;
      for (int i = 0; i < 5; i++) begin
        @(posedge fref);
        checks++;
        if (cyc - last != r || hi - lasthi != (r + 1) / 2) begin
          failures++;
          $display("ratio=%0d period=%0d high=%0d", r, cyc - last, hi - lasthi);
        end
        last = cyc; lasthi = hi;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
