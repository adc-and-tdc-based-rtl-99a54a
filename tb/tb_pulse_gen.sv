// tb_pulse_gen: checks that hit rises on the start edge, falls on the stop
// edge with no clock involved, and is cleared by reset and by the range-limit
// flag. Edge times are chosen off any grid; widths are compared with the
// programmed interval.
`timescale 1ns / 1ps
module tb_pulse_gen;
  int checks = 0, failures = 0;
  logic start, stop, rst, max_cnt, hit;
  realtime t_rise, t_fall;

  pulse_gen dut (.start_i(start), .stop_i(stop), .rst_i(rst), .max_cnt_i(max_cnt), .hit_o(hit));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  always @(posedge hit) t_rise = $realtime;
  always @(negedge hit) t_fall = $realtime;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; stop = 0; rst = 0; max_cnt = 0;
    #1 rst = 1;
    #4 rst = 0;
    #1 check(hit == 0, "hit low after reset");
    // A stop without a start does nothing.
    #3.3 stop = 1; #1 stop = 0; #1 check(hit == 0, "lone stop keeps hit low");
    // Intervals of several lengths.
    for (int k = 0; k < 6; k++) begin
      realtime d;
      d = 2.137 + 3.71 * k;
      #7.013 start = 1;
      #0.5   start = 0;
      #(d - 0.5) stop = 1;
      #0.4   stop = 0;
      #1;
      check(hit == 0, "hit low after stop");
      check((t_fall - t_rise) > d - 0.0015 && (t_fall - t_rise) < d + 0.0015, $sformatf("width %0t vs %0t", t_fall - t_rise, d));
    end
    // A second start edge while hit is high keeps it high.
    #3 start = 1; #0.2 start = 0; #2 start = 1; #0.2 start = 0;
    #0.1 check(hit == 1, "hit stays high on a second start");
    // Range limit clears hit and holds it while raised.
    #1 max_cnt = 1; #0.05 check(hit == 0, "max_cnt clears hit");
    #1 start = 1; #0.2 start = 0; #0.1 check(hit == 0, "start ignored while max_cnt high");
    max_cnt = 0;
    #2 start = 1; #0.2 start = 0; #0.1 check(hit == 1, "start works again");
    // Reset clears it.
    rst = 1; #0.05 check(hit == 0, "reset clears hit"); rst = 0;
    #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
