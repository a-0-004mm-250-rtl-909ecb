// Testbench for bbpfd_core: reference and feedback clocks of the same
// period are applied with a random offset each period; after both edges UP
// must be 1 (and DN 0) exactly when the reference edge came first, the edge
// flags must have been cleared by A_RESET, and a long run of the same sign
// must leave the decision unchanged.
module tb_bbpfd_core;
  timeunit 1ps; timeprecision 1fs;

  logic fref = 1'b0, ffeed = 1'b0, rst_n = 1'b1;
  logic b, c, a_reset, up, dn;
  int checks = 0, failures = 0;
  int n_rst = 0;

  bbpfd_core dut (.fref, .ffeed, .rst_n, .b, .c, .a_reset, .up, .dn);

  always @(posedge a_reset) if (rst_n) n_rst++;

  initial begin
    #(1000 * 1000 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off, n_up, n_dn;
    n_up = 0; n_dn = 0;
    #100 rst_n = 1'b0;  // an edge, so the asynchronous clears act
    #900 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      // offset of FFEED relative to FREF, -5 ns .. +5 ns, never zero
      off = int'($urandom % 10000) - 5000;
      if (off == 0) off = 1;
      if (i >= 300) off = 300 + i;  // a run of late feedback edges
      #(10000);
      fork
        begin #5000 fref = 1'b1; #(15000) fref = 1'b0; end
        begin #(5000 + off) ffeed = 1'b1; #(15000) ffeed = 1'b0; end
      join
      checks++;
      if (up !== (off > 0) || dn !== (off < 0) || b || c) begin
        failures++;
        if (failures < 5) $display("i=%0d off=%0d up=%b dn=%b b=%b c=%b", i, off, up, dn, b, c);
      end
      if (off > 0) n_up++; else n_dn++;
    end
    checks++;
    if (n_rst != 400) begin failures++; $display("A_RESET pulses %0d", n_rst); end
    $display("up=%0d dn=%0d", n_up, n_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
