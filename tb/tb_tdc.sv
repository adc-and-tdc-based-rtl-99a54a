// tb_tdc: end-to-end test of the TDC with the modelled delay line.
//
// Start and stop edges are placed at random sub-clock phases with intervals
// from 2.5 ns to a few hundred ns; each measurement must be within 100 ps of
// the programmed interval (the fine quantisation is one 50 ps cell at each
// end). It also checks the 13-cycle processing time from the first clock
// edge after the stop to eom (26 ns at 500 MHz), the range limit when no stop
// comes (the result saturates near 704 periods), and the pause input. Each
// mechanism is counted and must occur at least once: the line seen filling
// twice, a short hit that skips the full state, the range limit and a pause.
`timescale 1ns / 1ps
module tb_tdc;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en, start, stop;
  logic [20:0] meas;
  logic eom, max_cnt;

  tdc dut (.clk_i(clk), .rst_i(rst), .en_i(en), .start_i(start), .stop_i(stop),
           .measure_o(meas), .eom_o(eom), .max_cnt_o(max_cnt));

  always #1 clk = ~clk;   // 500 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  int n_twice = 0, n_short = 0, n_limit = 0, n_pause = 0, n_meas = 0;
  always @(posedge clk) begin
    if (dut.u_sync.state_q == tdc_pkg::S_FILLING && dut.u_sync.en_i) begin
      if (dut.first && !dut.last) n_twice++;
      if (!dut.first && dut.last) n_short++;
    end
  end

  // Fire an interval of d ns, starting at phase ph (ns) after a rising edge.
  // lat counts the rising edges from the first one after the stop (edge 0)
  // to the one that raises eom; near is set when the stop came within 0.1 ns
  // of that first edge, too late for the line's first cell to have emptied.
  task automatic measure(input real d, input real ph, output int got, output int lat, output bit near);
    realtime t_stop;
    @(posedge clk);
    #(ph) start = 1;
    #0.3  start = 0;
    #(d - 0.3) stop = 1;
    t_stop = $realtime;
    fork #0.3 stop = 0; join_none
    @(posedge clk);
    near = ($realtime - t_stop) < 0.1;
    lat = 0;
    @(negedge clk);
    while (!eom && lat < 40) begin @(negedge clk); lat++; end
    got = meas;
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int got, lat;
    bit near;
    real d, ph;
    rst = 0; en = 1; start = 0; stop = 0;
    #0.5 rst = 1;   // an edge for the asynchronous clears
    repeat (4) @(posedge clk);
    #0.5 rst = 0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      ph = $urandom_range(0, 1999) / 1000.0;
      case (i % 4)
        0: d = 2.5 + $urandom_range(0, 1500) / 1000.0;          // short
        1: d = 4.0 + $urandom_range(0, 20000) / 1000.0;
        2: d = 20.0 + $urandom_range(0, 400000) / 1000.0;
        default: d = 5.0 + (i / 4) * 0.0137 + ph * 0.0;         // sweep
      endcase
      if (i == 1) begin d = 6.0; ph = 1.98; end                 // start just before an edge
      measure(d, ph, got, lat, near);
      n_meas++;
      check(lat == 13 || (near && lat == 14), $sformatf("processing time %0d cycles", lat));
      check(got > int'(d * 1000.0) - 100 && got < int'(d * 1000.0) + 100,
            $sformatf("interval %0d ps measured %0d ps", int'(d * 1000.0), got));
      repeat (3) @(posedge clk);
    end
    // Exact processing time: the stop comes 0.2 ns after an edge; the next
    // edge, 1.8 ns later, sees the line emptying, and eom must follow 13
    // edges after it (26 ns).
    begin
      int edges;
      @(posedge clk); #0.1 start = 1; #0.3 start = 0;
      repeat (5) @(posedge clk);
      #0.2 stop = 1; #0.3 stop = 0;
      @(posedge clk);
      edges = 0;
      @(negedge clk);
      while (!eom && edges < 40) begin @(negedge clk); edges++; end
      check(edges == 13, $sformatf("eom %0d edges after the first edge past the stop", edges));
      check(meas > 10100 - 100 && meas < 10100 + 100, $sformatf("measure %0d for 10.1 ns", meas));
    end
    repeat (3) @(posedge clk);
    // Range limit: no stop.
    @(posedge clk); #0.7 start = 1; #0.3 start = 0;
    fork
      begin wait (max_cnt); n_limit++; end
      begin repeat (800) @(posedge clk); end
    join_any
    disable fork;
    while (!eom) @(posedge clk);
    check(meas >= 704 * 2000 - 2500 && meas <= 706 * 2000, $sformatf("range limit result %0d", meas));
    repeat (3) @(posedge clk);
    check(!max_cnt, "range flag released in idle");
    // A stop arriving later must not disturb the idle TDC.
    stop = 1; #0.3 stop = 0;
    // Pause: with en low a hit is ignored.
    en = 0; n_pause++;
    @(posedge clk); #0.4 start = 1; #0.3 start = 0; #10 stop = 1; #0.3 stop = 0;
    repeat (30) @(posedge clk);
    check(!eom && dut.u_sync.state_q == tdc_pkg::S_IDLE, "paused TDC ignores the hit");
    en = 1;
    repeat (5) @(posedge clk);
    measure(7.77, 0.9, got, lat, near);
    check(got > 7770 - 100 && got < 7770 + 100, $sformatf("after pause: %0d", got));
    check(n_twice > 0, "line seen filling twice");
    check(n_short > 0, "short hit skipping the full state");
    check(n_limit > 0, "range limit reached");
    check(n_pause > 0, "pause exercised");
    $display("mechanisms: filling twice %0d, short %0d, range limit %0d, pause %0d, measurements %0d",
             n_twice, n_short, n_limit, n_pause, n_meas);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
