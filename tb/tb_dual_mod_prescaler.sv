// Testbench for dual_mod_prescaler: counts input clocks between rising
// output edges; the count must be 8 with mc = 0 and 9 with mc = 1, with mc
// changed randomly right after each output edge.
module tb_dual_mod_prescaler;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, mc = 1'b0, pclk;
  int checks = 0, failures = 0;

  dual_mod_prescaler dut (.clk, .rst_n, .mc, .pclk);

  always #500 clk = ~clk;

  initial begin
    #(1000 * 1000 * 20);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    int last, n8, n9;
    logic m;
    n8 = 0; n9 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(posedge pclk);  // first edge after reset is early
    @(posedge pclk);
    last = cyc;
    for (int i = 0; i < 400; i++) begin
      #1;
      m  = 1'($urandom);
      mc = m;
      @(posedge pclk);
      checks++;
      if (cyc - last != (m ? 9 : 8)) begin
        failures++;
        if (failures < 5) $display("i=%0d mc=%b period=%0d", i, m, cyc - last);
      end
      if (m) n9++; else n8++;
      last = cyc;
    end
    $display("div8=%0d div9=%0d", n8, n9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
