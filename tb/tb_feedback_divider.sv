// Testbench for feedback_divider: for several (P, S) settings, counts DCO
// clocks between rising FFEED edges; each period must be 8*P + S. Also
// checks that the prescaler spends exactly S of the P periods in /9 mode.
module tb_feedback_divider;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] p_val, s_val;
  logic pclk, ffeed, mc;
  int checks = 0, failures = 0;

  feedback_divider dut (.dco_clk(clk), .rst_n, .p_val, .s_val, .pclk, .ffeed, .mc);

  always #500 clk = ~clk;

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;
  int mc_cnt = 0;
  always @(posedge pclk) if (mc) mc_cnt++;

  initial begin
    int last;
    int pv[6] = '{6, 6, 7, 2, 20, 9};
    int sv[6] = '{1, 0, 7, 1, 13, 4};
    for (int k = 0; k < 6; k++) begin
      rst_n = 1'b0;
      p_val = 8'(pv[k]); s_val = 8'(sv[k]);
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      @(posedge ffeed);
      @(posedge ffeed);
      last = cyc;
      mc_cnt = 0;
      for (int i = 0; i < 10; i++) begin
        @(posedge ffeed);
        checks++;
        if (cyc - last != 8 * pv[k] + sv[k]) begin
          failures++;
          $display("P=%0d S=%0d period=%0d", pv[k], sv[k], cyc - last);
        end
        last = cyc;
      end
      checks++;
      if (mc_cnt != 10 * sv[k]) begin failures++; $display("mc count %0d", mc_cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
