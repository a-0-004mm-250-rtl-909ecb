// Testbench for output_div: for ratios 1..12 counts input clocks per output
// period (must equal the ratio) and input clocks with the output high
// (must be ceil(ratio/2)); ratio 1 must pass the input through.
module tb_output_div;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, fout;
  logic [7:0] ratio;
  int checks = 0, failures = 0;

  output_div dut (.clk, .rst_n, .ratio, .fout);

  always #500 clk = ~clk;

  initial begin
    #(1000 * 1000 * 20);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, hi = 0;
  always @(posedge clk) begin
    cyc++;
    #1 if (fout) hi++;
  end

  initial begin
    int last, lasthi;
    for (int r = 1; r <= 12; r++) begin
      rst_n = 1'b0;
      ratio = 8'(r);
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      @(posedge fout);
      @(posedge fout);
      last = cyc; lasthi = hi;
      for (int i = 0; i < 5; i++) begin
        @(posedge fout);
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
