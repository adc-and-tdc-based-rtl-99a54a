// tb_capture_ctrl: with a 16-word memory, a trigger must write exactly 16
// consecutive ADC words to addresses 0..15 (skipping cycles without valid
// data), pass through FINISH for one cycle and return to IDLE; nothing is
// written while idle. Checked against a model memory.
`timescale 1ns / 1ps
module tb_capture_ctrl;
  localparam int AW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst, cap, vld, we, busy, done;
  logic [127:0] din, wd;
  logic [AW-1:0] addr;

  capture_ctrl #(.ADDR_W(AW)) dut (.clk_i(clk), .rst_i(rst), .capture_i(cap), .adc_valid_i(vld), .adc_data_i(din),
                                   .mem_we_o(we), .mem_addr_o(addr), .mem_wdata_o(wd), .busy_o(busy), .done_o(done));

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  logic [127:0] mem [2**AW];
  int writes;
  always @(posedge clk) if (we) begin mem[addr] <= wd; writes++; end

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] sent[$];
    rst = 1; cap = 0; vld = 0; din = '0; writes = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int shot = 0; shot < 3; shot++) begin
      int cycles;
      // Idle traffic is not recorded.
      repeat (5) begin vld = 1; din = {4{$urandom}}; @(negedge clk); end
      check(writes == 16 * shot && !busy, "no writes while idle");
      cap = 1; @(negedge clk); cap = 0;
      sent.delete();
      cycles = 0;
      while (busy && cycles < 200) begin
        vld = (shot == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        din = {4{$urandom}};
        if (vld && busy && !done) sent.push_back(din);
        @(negedge clk);
        cycles++;
        if (done) check(!we, "memory disabled in FINISH");
      end
      check(writes == 16 * (shot + 1), $sformatf("16 words per capture, %0d", writes));
      check(sent.size() == 16, "16 valid words consumed");
      for (int i = 0; i < 16 && i < sent.size(); i++) check(mem[i] == sent[i], $sformatf("word %0d", i));
      if (shot == 0) check(cycles == 17, $sformatf("16 capture cycles + FINISH, got %0d", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
