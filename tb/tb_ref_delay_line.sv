// Testbench for ref_delay_line: each output must follow the input's
// rising and falling edges by 1, 2 and 3 buffer delays.
module tb_ref_delay_line;
  timeunit 1ps; timeprecision 1fs;

  logic ref_in = 1'b0, e_fref, fref, l_fref;
  int checks = 0, failures = 0;
  realtime t0, te, tf, tl;

  ref_delay_line dut (.ref_in, .e_fref, .fref, .l_fref);

  always @(posedge e_fref) te = $realtime;
  always @(posedge fref)   tf = $realtime;
  always @(posedge l_fref) tl = $realtime;

  initial begin
    #(1000 * 1000 * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin
      #(10000 + 1000 * i);
      ref_in = 1'b1; t0 = $realtime;
      #(20000);
      ref_in = 1'b0;
      checks++;
      if (te - t0 != 1000.0 || tf - t0 != 2000.0 || tl - t0 != 3000.0) begin
        failures++;
        $display("delays %0t %0t %0t", te - t0, tf - t0, tl - t0);
      end
      #(5000);
      checks++;
      if (e_fref || fref || l_fref) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
