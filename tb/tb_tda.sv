// Testbench for the tda model: two signed time differences dT1, dT2
// (-150..+150 ps each) are applied as edge pairs, then AWK; the output pair
// must satisfy T(out2) - T(out1) = dT1 + dT2.
module tb_tda;
  timeunit 1ps; timeprecision 1fs;

  logic in1_a = 1'b0, in1_b = 1'b0, in2_a = 1'b0, in2_b = 1'b0, awk = 1'b0;
  logic out1, out2;
  int checks = 0, failures = 0;
  realtime t1, t2;

  tda dut (.in1_a, .in1_b, .in2_a, .in2_b, .awk, .out1, .out2);

  always @(posedge out1) t1 = $realtime;
  always @(posedge out2) t2 = $realtime;

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d1, d2;
    for (int i = 0; i < 100; i++) begin
      d1 = int'($urandom % 301) - 150;
      d2 = int'($urandom % 301) - 150;
      #10000;
      fork
        begin #(500) in1_a = 1'b1; #2000 in1_a = 1'b0; end
        begin #(500 + d1) in1_b = 1'b1; #2000 in1_b = 1'b0; end
        begin #(800) in2_a = 1'b1; #2000 in2_a = 1'b0; end
        begin #(800 + d2) in2_b = 1'b1; #2000 in2_b = 1'b0; end
        begin #(3000) awk = 1'b1; #2000 awk = 1'b0; end
      join
      #3000;
      checks++;
      if (t2 - t1 != real'(d1 + d2)) begin
        failures++;
        $display("d1=%0d d2=%0d out diff=%0t", d1, d2, t2 - t1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
