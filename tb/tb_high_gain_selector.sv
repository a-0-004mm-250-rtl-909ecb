// Testbench for high_gain_selector: each period the testbench produces
// E_FREF at 1 ns, FREF at 2 ns and L_FREF at 3 ns, and a feedback edge at a
// random time 0..4 ns; B and C are the edge flags of a PFD (set by their
// edge, both cleared once both are set). Very_Early must be 1 exactly when
// the feedback edge came before E_FREF, Very_Late exactly when it came after
// L_FREF, and High Gain when either.
module tb_high_gain_selector;
  timeunit 1ps; timeprecision 1fs;

  logic e_fref = 1'b0, l_fref = 1'b0, b = 1'b0, c = 1'b0, rst_n = 1'b1;
  logic very_early, very_late, high_gain;
  int checks = 0, failures = 0;

  high_gain_selector dut (.e_fref, .l_fref, .b, .c, .rst_n, .very_early, .very_late, .high_gain);

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tf, n_e, n_l, n_in;
    n_e = 0; n_l = 0; n_in = 0;
    #100 rst_n = 1'b0;  // an edge, so the asynchronous clears act
    #900 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      tf = 10 + int'($urandom % 3980);
      if (tf == 1000 || tf == 2000 || tf == 3000) tf++;
      #(10000);
      fork
        begin #1000 e_fref = 1'b1; #10000 e_fref = 1'b0; end
        begin #3000 l_fref = 1'b1; #10000 l_fref = 1'b0; end
        begin #2000 b = 1'b1; end
        begin #(tf) c = 1'b1; end
        begin
          #(tf > 2000 ? tf + 1 : 2001);
          b = 1'b0; c = 1'b0;   // A_RESET once both have arrived
        end
      join
      #1000;
      checks++;
      if (very_early !== (tf < 1000) || very_late !== (tf > 3000) ||
          high_gain !== (tf < 1000 || tf > 3000)) begin
        failures++;
        if (failures < 5) $display("tf=%0d ve=%b vl=%b hg=%b", tf, very_early, very_late, high_gain);
      end
      if (tf < 1000) n_e++; else if (tf > 3000) n_l++; else n_in++;
    end
    checks++;
    if (n_e == 0 || n_l == 0 || n_in == 0) failures++;
    $display("early=%0d late=%0d window=%0d", n_e, n_l, n_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
