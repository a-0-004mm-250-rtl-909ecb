// Testbench for row_col_ctrl: random OverF/UnderF pulses move a reference
// code (saturating at 0 and 255); each clock the code must match and the
// 256-bit fine word must be the thermometer code of that value (exactly the
// lowest `code` units on).
module tb_row_col_ctrl;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, ovf = 1'b0, unf = 1'b0;
  logic [7:0] code;
  logic [255:0] therm;
  logic [15:0] row_full, col_on;
  int checks = 0, failures = 0;

  row_col_ctrl dut (.clk, .rst_n, .ovf, .unf, .code, .therm, .row_full, .col_on);

  always #500 clk = ~clk;

  initial begin
    #(1000 * 1000 * 20);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rc, sat_hi, sat_lo;
    logic [255:0] exp_t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rc = 32; sat_hi = 0; sat_lo = 0;
    checks++;
    if (code !== 8'd32) failures++;
    for (int i = 0; i < 4000; i++) begin
      // drift up for the first part, then down, so both ends are hit
      ovf = (i < 1500) ? (($urandom % 3) != 0) : (($urandom % 3) == 0);
      unf = ~ovf & (($urandom % 4) != 0);
      if (ovf && !unf && rc < 255) rc++;
      else if (unf && !ovf && rc > 0) rc--;
      if (rc == 255) sat_hi++;
      if (rc == 0) sat_lo++;
      @(negedge clk);
      exp_t = '0;
      for (int k = 0; k < rc; k++) exp_t[k] = 1'b1;
      checks++;
      if (code !== 8'(rc) || therm !== exp_t) begin
        failures++;
        if (failures < 5) $display("i=%0d code=%0d/%0d ones=%0d", i, code, rc, $countones(therm));
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("ends not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
