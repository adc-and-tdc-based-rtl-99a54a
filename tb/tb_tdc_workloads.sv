// tb_tdc_workloads: the TDC's two bench experiments, at default sizes.
//
// Linearity: start and stop come from an arbitrary waveform generator running
// at 15 Gsample/s, so the programmed delay is a whole number of 66.7 ps
// samples. 100 delays from 45 samples (3 ns) to 15000 samples (1 us) are
// measured, each at a random phase to the TDC clock. Every result must be
// within 100 ps of the programmed delay, and a least-squares line through
// all of them must have a slope within 1e-4 of 1 and an offset within 50 ps.
//
// Repeatability: a pulse generator clocked by the TDC's own 500 MHz clock
// feeds start directly and stop through a cable, so the phase to the clock
// is the same every time. Two cable delays, 11.90 ns and 12.05 ns, are
// measured 16 times each; the 16 results of a cable must be identical and
// within 100 ps of the delay, and the two results must differ by 150 ps
// within 100 ps. (The 26 ns processing time is checked in tb_tdc.)
//
// The experiment shapes (sample rate, delay range, 16 samples, the two
// cable delays as estimated on the bench) follow the design's validation;
// the tolerances are this testbench's own.
`timescale 1ns / 1ps
module tb_tdc_workloads;
  logic clk = 0, rst, en, start, stop;
  logic [20:0] meas;
  logic eom, max_cnt;
  int checks = 0, failures = 0;

  tdc dut (.clk_i(clk), .rst_i(rst), .en_i(en), .start_i(start), .stop_i(stop),
           .measure_o(meas), .eom_o(eom), .max_cnt_o(max_cnt));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  // One measurement: start at phase ph after a rising edge, stop d ns later.
  task automatic measure(input real d, input real ph, output int got);
    @(posedge clk);
    #(ph) start = 1;
    #0.3  start = 0;
    #(d - 0.3) stop = 1;
    fork #0.3 stop = 0; join_none
    while (!eom) @(negedge clk);
    got = meas;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int got, err, worst, k;
    real x, y, sx, sy, sxx, sxy, n, slope, offs;
    int rep [2][16];
    real cable [2];
    rst = 0; en = 1; start = 0; stop = 0;
    #0.5 rst = 1;
    repeat (4) @(posedge clk);
    #0.5 rst = 0;
    repeat (4) @(posedge clk);

    // ---- linearity sweep ----
    sx = 0; sy = 0; sxx = 0; sxy = 0; n = 0; worst = 0;
    for (int i = 0; i < 100; i++) begin
      k = 45 + (i * (15000 - 45)) / 99;
      x = k / 15.0;                                   // ns
      measure(x, $urandom_range(0, 1999) / 1000.0, got);
      y = got / 1000.0;
      err = got - int'(x * 1000.0);
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      check(err < 100, $sformatf("linearity: %0d samples (%0.3f ns) measured %0d ps", k, x, got));
      sx += x; sy += y; sxx += x * x; sxy += x * y; n += 1;
    end
    slope = (n * sxy - sx * sy) / (n * sxx - sx * sx);
    offs  = (sy - slope * sx) / n;
    check(slope > 0.9999 && slope < 1.0001, $sformatf("linearity slope %f", slope));
    check(offs > -0.05 && offs < 0.05, $sformatf("linearity offset %f ns", offs));
    $display("linearity: slope %f, offset %0.1f ps, worst error %0d ps", slope, offs * 1000.0, worst);

    // ---- repeatability ----
    cable[0] = 11.90; cable[1] = 12.05;
    for (int c = 0; c < 2; c++) begin
      for (int s = 0; s < 16; s++) begin
        measure(cable[c], 0.35, got);
        rep[c][s] = got;
        check(got == rep[c][0], $sformatf("cable %0d sample %0d: %0d ps, first was %0d ps", c, s, got, rep[c][0]));
        check(got > int'(cable[c] * 1000.0) - 100 && got < int'(cable[c] * 1000.0) + 100,
              $sformatf("cable %0d measured %0d ps", c, got));
      end
    end
    check(rep[1][0] - rep[0][0] > 50 && rep[1][0] - rep[0][0] < 250,
          $sformatf("cable difference %0d ps", rep[1][0] - rep[0][0]));
    $display("repeatability: %0d ps and %0d ps over 16 samples each", rep[0][0], rep[1][0]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
