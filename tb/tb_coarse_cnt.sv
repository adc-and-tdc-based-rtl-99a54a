// tb_coarse_cnt: the counter loads 1 on reset and counts enabled cycles.
`timescale 1ns / 1ps
module tb_coarse_cnt;
  int checks = 0, failures = 0;
  logic clk = 0, nrst, en;
  logic [9:0] cnt;
  int unsigned model;

  coarse_cnt dut (.clk_i(clk), .nrst_i(nrst), .cnt_en_i(en), .coarse_cnt_o(cnt));
  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  initial begin
    #20000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    nrst = 0; en = 0;
    @(negedge clk);
    check(cnt == 1, "reset value is 1");
    nrst = 1; model = 1;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      nrst = ($urandom_range(0, 299) != 0);
      @(negedge clk);
      if (!nrst) model = 1; else if (en) model = (model + 1) % 1024;
      check(cnt == 10'(model), $sformatf("count %0d vs %0d", cnt, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
