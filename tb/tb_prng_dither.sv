// Testbench for prng_dither: checks that the LFSR has the maximal period
// 2^N-1 from its 1000...0 seed, that the select flip-flop toggles exactly once
// per period, that the dither stream equals the LSB stream of a reference
// Galois LFSR followed by its inverse, and that over 2*(2^N-1) clocks it holds
// as many ones as zeros.
module tb_prng_dither;
  timeunit 1ps; timeprecision 1fs;

  localparam int N = 12;
  localparam int PER = (1 << N) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dither, sel;
  logic [N-1:0] state;
  int checks = 0, failures = 0;

  prng_dither dut (.clk, .rst_n, .dither, .state, .sel);

  always #500 clk = ~clk;

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ref_s;
    logic         ref_sel;
    int ones, period, toggles;
    logic prev_sel;
    ref_s = {1'b1, {(N-1){1'b0}}};
    ref_sel = 1'b0;
    ones = 0; period = 0; toggles = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_sel = sel;
    ref_s = {1'b1, {(N-1){1'b0}}};
    ref_sel = 1'b0;
    for (int i = 0; i < 2 * PER; i++) begin
      // compare output before the edge
      checks++;
      if (dither !== (ref_sel ? ~ref_s[0] : ref_s[0])) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: dut=%b", i, dither);
      end
      if (dither) ones++;
      if (i > 0 && state == {1'b1, {(N-1){1'b0}}} && period == 0) period = i;
      if (ref_s == {1'b1, {(N-1){1'b0}}}) ref_sel = ~ref_sel;
      ref_s = ref_s[0] ? ((ref_s >> 1) ^ 12'h829) : (ref_s >> 1);
      @(negedge clk);
      if (sel != prev_sel) toggles++;
      prev_sel = sel;
    end
    checks++;
    if (period != PER) begin failures++; $display("period %0d", period); end
    checks++;
    if (ones != PER) begin failures++; $display("ones %0d of %0d", ones, 2 * PER); end
    checks++;
    if (toggles != 2) begin failures++; $display("toggles %0d", toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
