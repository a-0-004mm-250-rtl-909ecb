// Testbench for the dtc model: for d = 1 the output difference must be the
// input difference minus 60 ps, for d = 0 plus 60 ps.
module tb_dtc;
  timeunit 1ps; timeprecision 1fs;

  logic a_in = 1'b0, b_in = 1'b0, d = 1'b0, a_out, b_out;
  int checks = 0, failures = 0;
  realtime ta, tb_;

  dtc dut (.a_in, .b_in, .d, .a_out, .b_out);

  always @(posedge a_out) ta = $realtime;
  always @(posedge b_out) tb_ = $realtime;

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x;
    for (int i = 0; i < 100; i++) begin
      x = int'($urandom % 201) - 100;
      d = 1'($urandom);
      #10000;
      fork
        begin #1000 a_in = 1'b1; #2000 a_in = 1'b0; end
        begin #(1000 + x) b_in = 1'b1; #2000 b_in = 1'b0; end
      join
      #3000;
      checks++;
      if (tb_ - ta != real'(x + (d ? -60 : 60))) begin
        failures++;
        $display("x=%0d d=%b out=%0t", x, d, tb_ - ta);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
