// Testbench for the dsm_tdc model at 10 MS/s (one edge pair every 100 ns).
// Phase 1: random input differences (-50..+50 ps); every output bit is
// compared with a discrete-time first-order delta-sigma reference
//   S[n] = S[n-1] + x[n] + T_DT*(D[n-1] ? -1 : +1),  D[n] = (S[n] > 0),
// with T_DT = 60 ps (ties, |S| < 0.01 ps, are not counted).
// Phase 2: a constant input must give a ones density of (1 + x/T_DT)/2.
// Phase 3: a 100 kHz sine of 100 ps peak-to-peak (oversampling ratio 50 at
// 100 kHz bandwidth); a 50-tap moving average of T_DT*(2D-1) must track the
// same moving average of the input within 3 ps rms, which only holds if the
// quantization error is noise-shaped.
module tb_dsm_tdc;
  timeunit 1ps; timeprecision 1fs;

  localparam real TDT = 60.0;
  localparam int  NSINE = 4000;

  logic in_a = 1'b0, in_b = 1'b0, rst_n = 1'b1, dout;
  int checks = 0, failures = 0;

  dsm_tdc dut (.in_a, .in_b, .rst_n, .dout);

  initial begin
    #(1000.0 * 1000 * 1000 * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input real x);
    fork
      begin #1000 in_a = 1'b1; #2000 in_a = 1'b0; end
      begin #(1000.0 + x) in_b = 1'b1; #2000 in_b = 1'b0; end
    join
    #(100000.0 - 3000.0 - x);
  endtask

  initial begin
    real s, x, err2, ma_x, ma_y;
    logic dref;
    int ones;
    real xs[$];
    real ys[$];
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #10000;
    // phase 1: bit-exact against the discrete model
    s = 0.0; dref = 1'b0;
    for (int i = 0; i < 400; i++) begin
      x = real'(int'($urandom % 100001) - 50000) / 1000.0;
      s = s + x + (dref ? -TDT : TDT);
      sample(x);
      if (s > 0.01 || s < -0.01) begin
        checks++;
        if (dout !== (s > 0.0)) begin
          failures++;
          if (failures < 5) $display("i=%0d x=%f s=%f dout=%b", i, x, s, dout);
        end
      end
      dref = dout;
    end
    // phase 2: constant inputs
    for (int k = 0; k < 3; k++) begin
      x = (k == 0) ? 17.3 : ((k == 1) ? -33.1 : 2.9);
      for (int i = 0; i < 50; i++) sample(x);  // settle
      ones = 0;
      for (int i = 0; i < 600; i++) begin
        sample(x);
        if (dout) ones++;
      end
      checks++;
      if (real'(ones) - 600.0 * (1.0 + x / TDT) / 2.0 > 2.0 ||
          real'(ones) - 600.0 * (1.0 + x / TDT) / 2.0 < -2.0) begin
        failures++;
        $display("constant %f ps: %0d ones of 600", x, ones);
      end
    end
    // phase 3: 100 kHz, 100 ps peak-to-peak sine, in-band error
    for (int i = 0; i < NSINE; i++) begin
      x = 50.0 * $sin(2.0 * 3.14159265358979 * 100.0e3 * i * 100.0e-9);
      sample(x);
      xs.push_back(x);
      ys.push_back(dout ? TDT : -TDT);
    end
    err2 = 0.0;
    for (int i = 100; i < NSINE; i++) begin
      ma_x = 0.0; ma_y = 0.0;
      for (int k = 0; k < 50; k++) begin
        ma_x += xs[i - k];
        ma_y += ys[i - k];
      end
      err2 += (ma_x - ma_y) * (ma_x - ma_y) / 2500.0;
    end
    err2 = $sqrt(err2 / (NSINE - 100));
    $display("sine 100 ps pp: in-band rms error %f ps", err2);
    checks++;
    if (err2 > 3.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
