// Testbench for the gdb_cell model: IN, HLD and AWK edges are applied with a
// random hold interval dT (0..800 ps) and a random wake time; OUT must rise
// TD - dT after AWK (TD = 1 ns).
module tb_gdb_cell;
  timeunit 1ps; timeprecision 1fs;

  logic in_e = 1'b0, hld = 1'b0, awk = 1'b0, out;
  int checks = 0, failures = 0;
  realtime t_awk, t_out;

  gdb_cell dut (.in_e, .hld, .awk, .out);

  always @(posedge out) t_out = $realtime;

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dt, tw;
    for (int i = 0; i < 100; i++) begin
      dt = int'($urandom % 800);
      tw = 2000 + int'($urandom % 5000);
      #10000;
      fork
        begin in_e = 1'b1; #2000 in_e = 1'b0; end
        begin #(dt) hld = 1'b1; #2000 hld = 1'b0; end
        begin #(tw) awk = 1'b1; t_awk = $realtime; #2000 awk = 1'b0; end
      join
      #3000;
      checks++;
      if (t_out - t_awk != 1000.0 - dt) begin
        failures++;
        $display("dt=%0d out-awk=%0t", dt, t_out - t_awk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
