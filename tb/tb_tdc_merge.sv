// tb_tdc_merge: presents coarse and fine counts with their ready pulses in
// different orders and checks T = N*2000 + (Fs - Fe)*50 ps, the end of
// measurement pulse, and the 6-cycle arithmetic window (eom 7 cycles after
// the cycle in which the second ready arrives).
`timescale 1ns / 1ps
module tb_tdc_merge;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [9:0] cnt;
  logic rf, rl, eom;
  logic [7:0] ff, fl;
  logic [20:0] meas;

  tdc_merge dut (.clk_i(clk), .rst_i(rst), .coarse_cnt_i(cnt), .ready_first_i(rf), .fine_bin_FirstPiece_i(ff),
                 .ready_last_i(rl), .fine_bin_LastPiece_i(fl), .measure_o(meas), .eom_o(eom));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; rf = 0; rl = 0; ff = 0; fl = 0; cnt = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      int n, a, b, expv, order, lat;
      n = (i == 0) ? 1 : (i == 1) ? 704 : $urandom_range(1, 767);
      a = $urandom_range(0, 45);
      b = $urandom_range(0, 45);
      expv = n * 2000 + (a - b) * 50;
      if (expv < 0) expv = 0;
      order = i % 3;  // 0: together, 1: first then last, 2: last then first
      cnt = 10'(n);
      @(negedge clk);
      if (order == 0) begin rf = 1; ff = 8'(a); rl = 1; fl = 8'(b); end
      else if (order == 1) begin rf = 1; ff = 8'(a); end
      else begin rl = 1; fl = 8'(b); end
      @(negedge clk);
      rf = 0; rl = 0; ff = 8'($urandom); fl = 8'($urandom);
      if (order != 0) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        if (order == 1) begin rl = 1; fl = 8'(b); end else begin rf = 1; ff = 8'(a); end
        @(negedge clk);
        rf = 0; rl = 0; ff = 8'($urandom); fl = 8'($urandom);
      end
      lat = 1;
      while (!eom && lat < 20) begin @(negedge clk); lat++; end
      check(eom, "eom raised");
      check(lat == 7, $sformatf("eom %0d cycles after the second ready", lat));
      check(meas == 21'(expv), $sformatf("measure %0d want %0d", meas, expv));
      @(negedge clk);
      check(!eom && meas == 21'(expv), "eom is one cycle, measure holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
