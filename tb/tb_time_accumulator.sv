// Testbench for the time_accumulator model: a sequence of input edge pairs
// with random differences (-40..+40 ps) is applied, one per 50 ns sample,
// with the wake edge 5 ns after IN_A; after each sample the output pair must
// carry the running sum of all input differences.
module tb_time_accumulator;
  timeunit 1ps; timeprecision 1fs;

  logic in_a = 1'b0, in_b = 1'b0, awk1 = 1'b0, out1, out2;
  int checks = 0, failures = 0;
  realtime t1, t2;

  time_accumulator dut (.in_a, .in_b, .awk1, .out1, .out2);

  always @(posedge out1) t1 = $realtime;
  always @(posedge out2) t2 = $realtime;

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, sum;
    sum = 0;
    for (int i = 0; i < 60; i++) begin
      d = int'($urandom % 81) - 40;
      // keep the running sum inside +/-200 ps
      if (sum + d > 200 || sum + d < -200) d = -d;
      sum += d;
      #10000;
      fork
        begin #1000 in_a = 1'b1; #2000 in_a = 1'b0; end
        begin #(1000 + d) in_b = 1'b1; #2000 in_b = 1'b0; end
        begin #6000 awk1 = 1'b1; #2000 awk1 = 1'b0; end
      join
      #30000;
      checks++;
      if (t2 - t1 != real'(sum)) begin
        failures++;
        $display("i=%0d sum=%0d out diff=%0t", i, sum, t2 - t1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
