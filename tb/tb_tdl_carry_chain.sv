// tb_tdl_carry_chain: checks that a step on hit travels one cell per cell
// delay and that the four taps of each cell move together.
`timescale 1ns / 1ps
module tb_tdl_carry_chain;
  localparam int N = 45;
  int checks = 0, failures = 0;
  logic hit;
  logic [4*N-1:0] taps;

  tdl_carry_chain dut (.hit_i(hit), .taps_o(taps));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  function automatic int ones(input logic [4*N-1:0] t);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(t[4*i+3]);
    return c;
  endfunction

  function automatic bit cells_consistent(input logic [4*N-1:0] t);
    for (int i = 0; i < N; i++) if (t[4*i +: 4] != {4{t[4*i]}}) return 0;
    return 1;
  endfunction

  initial begin
    #20000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hit = 0;
    #5;
    check(taps == '0, "line empty at rest");
    hit = 1;
    // After k*50 ps + 10 ps exactly k cells hold a 1, filled from tap 0.
    #0.010;
    for (int k = 1; k <= N; k++) begin
      #0.050 check(ones(taps) == k && cells_consistent(taps) && ((taps & ((180'(1) << (4*k)) - 1)) == ((180'(1) << (4*k)) - 1)), $sformatf("fill %0d", k));
    end
    #3;
    check(taps == '1, "line full");
    hit = 0;
    #1.0005;   // 20 cells emptied
    check(ones(taps) == N - 20 && taps[79:0] == '0, "emptying from the input end");
    #3;
    check(taps == '0, "line empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
