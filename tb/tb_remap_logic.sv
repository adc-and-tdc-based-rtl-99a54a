// tb_remap_logic: drives tap patterns straight into the sampling row and
// checks the first/last outputs one clock later and the two enabled banks,
// which must take tap 4k+3 of each cell only when enabled.
`timescale 1ns / 1ps
module tb_remap_logic;
  localparam int N = 45;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [4*N-1:0] taps;
  logic sf, sl, first, last;
  logic [N-1:0] tf, tl, exp_f, exp_l;

  remap_logic dut (.clk_i(clk), .rst_i(rst), .taps_i(taps), .store_first_i(sf), .store_last_i(sl),
                   .first_o(first), .last_o(last), .therm_first_o(tf), .therm_last_o(tl));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  function automatic logic [N-1:0] pick(input logic [4*N-1:0] t);
    for (int k = 0; k < N; k++) pick[k] = t[4*k+3];
  endfunction

  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [4*N-1:0] prev;
    rst = 1; taps = '0; sf = 0; sl = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    check(tf == '0 && tl == '0, "banks clear after reset");
    exp_f = '0; exp_l = '0;
    for (int it = 0; it < 200; it++) begin
      logic [4*N-1:0] t;
      for (int w = 0; w < 4*N; w += 32) t[w +: 32] = $urandom;
      taps = t;
      @(posedge clk);  // sampled here
      #0.1;
      check(first == t[0] && last == t[4*N-1], "first/last of the sampled row");
      sf = $urandom_range(0, 1);
      sl = $urandom_range(0, 1);
      if (sf) exp_f = pick(t);
      if (sl) exp_l = pick(t);
      taps = ~t;          // change the line; the banks must store the sample
      @(posedge clk);
      #0.1;
      check(tf == exp_f, "first-piece bank");
      check(tl == exp_l, "last-piece bank");
      sf = 0; sl = 0;
    end
    rst = 1; #0.1 check(tf == '0 && tl == '0 && first == 0, "asynchronous clear");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
