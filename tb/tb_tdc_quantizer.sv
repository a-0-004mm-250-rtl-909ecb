// Testbench for tdc_quantizer: two pulses with a random offset of
// -300..+300 ps; the output must be 1 exactly when edge_a rose first.
module tb_tdc_quantizer;
  timeunit 1ps; timeprecision 1fs;

  logic edge_a = 1'b0, edge_b = 1'b0, rst_n = 1'b1, dout;
  int checks = 0, failures = 0;

  tdc_quantizer dut (.edge_a, .edge_b, .rst_n, .dout);

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, n1;
    n1 = 0;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    checks++;
    if (dout !== 1'b0) failures++;
    for (int i = 0; i < 200; i++) begin
      x = int'($urandom % 601) - 300;
      if (x == 0) x = 1;
      #10000;
      fork
        begin #1000 edge_a = 1'b1; #2000 edge_a = 1'b0; end
        begin #(1000 + x) edge_b = 1'b1; #2000 edge_b = 1'b0; end
      join
      checks++;
      if (dout !== (x > 0)) begin failures++; $display("x=%0d dout=%b", x, dout); end
      if (dout) n1++;
    end
    $display("ones=%0d", n1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
