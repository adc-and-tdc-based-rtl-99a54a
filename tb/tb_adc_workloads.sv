// tb_adc_workloads: the ADC front end's bench experiment, 50 single shots
// overlapped, at default sizes.
//
// As on the bench, each DAC output is looped back to an ADC input (here a
// fixed delay of LOOP words, channels interleaved sample by sample in the
// 128-bit ADC word). 50 shots are fired through the AXI register with a
// random idle gap of 1 to 300 cycles before each, so the trigger falls at a
// different time relative to everything else each time. Every capture is
// read back in full and must equal the expected trigger-aligned pulse, and
// all 50 must be identical: the pulse edges land on the same capture sample
// every time, which is what overlapped waveforms show on the bench.
//
// The 50 shots and the closed-loop setup follow the design's validation;
// the loopback delay and the gaps are this testbench's own choices.
`timescale 1ns / 1ps
module tb_adc_workloads;
  localparam int LOOP = 37, SHOTS = 50, WORDS = 256, CAPW = 512;
  localparam int PS = 64, PL = 8, AMP = -16000;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [3:0] awaddr, araddr, wstrb;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic dac_valid, adc_valid, rd_en, shot, busy;
  logic [63:0] dac0, dac1;
  logic [127:0] adc_data, rdat;
  logic [8:0] raddr;

  adc_frontend dut (.clk_i(clk), .rst_i(rst),
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready),
    .dac_valid_i(dac_valid), .dac_data_0_o(dac0), .dac_data_1_o(dac1),
    .adc_valid_i(adc_valid), .adc_data_i(adc_data),
    .mem_rd_en_i(rd_en), .mem_raddr_i(raddr), .mem_rdata_o(rdat),
    .single_shot_o(shot), .cap_busy_o(busy));

  always #2 clk = ~clk;   // 250 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  // Loopback: LOOP-cycle delay line of DAC words, channels interleaved.
  function automatic logic [127:0] pack(input logic [63:0] c0, input logic [63:0] c1);
    for (int j = 0; j < 4; j++) begin
      pack[32*j +: 16]      = c0[16*j +: 16];
      pack[32*j + 16 +: 16] = c1[16*j +: 16];
    end
  endfunction
  logic [127:0] pipe [LOOP];
  always @(posedge clk) begin
    pipe[0] <= pack(dac0, dac1);
    for (int i = 1; i < LOOP; i++) pipe[i] <= pipe[i-1];
  end
  assign adc_data = pipe[LOOP-1];

  function automatic logic [63:0] dac_word(input int w);
    for (int j = 0; j < 4; j++) begin
      int idx = w * 4 + j;
      dac_word[16*j +: 16] = (idx >= PS && idx < PS + PL) ? 16'(AMP) : 16'd0;
    end
  endfunction

  task automatic axi_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1; wstrb = 4'hf; bready = 1;
    @(negedge clk);
    while (!bvalid) @(negedge clk);
    awvalid = 0; wvalid = 0;
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axi_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  logic [127:0] cap [SHOTS][CAPW];

  task automatic read_capture(input int slot);
    for (int a = 0; a < CAPW; a++) begin
      @(negedge clk); rd_en = 1; raddr = 9'(a);
      @(negedge clk); rd_en = 0;
      cap[slot][a] = rdat;
    end
  endtask

  task automatic shot_and_check(input int slot);
    logic [31:0] st;
    int polls;
    axi_write(4'h0, 32'h1);
    polls = 0;
    do begin axi_read(4'h4, st); polls++; end while (!st[1] && polls < 1000);
    check(st[1] && !st[0], "capture done and not busy");
    read_capture(slot);
    for (int a = 0; a < CAPW; a++) begin
      int k;
      logic [127:0] e;
      k = a - LOOP - 1;
      e = (k >= 0 && k < WORDS) ? pack(dac_word(k), dac_word(k)) : '0;
      check(cap[slot][a] == e, $sformatf("capture word %0d", a));
    end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_shots = 0, same = 0, first_edge;
    rst = 1; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; rd_en = 0; raddr = 0;
    dac_valid = 1; adc_valid = 1;
    for (int i = 0; i < LOOP; i++) pipe[i] = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (2 * LOOP) @(negedge clk);   // flush the loopback
    for (int s = 0; s < SHOTS; s++) begin
      repeat ($urandom_range(1, 300)) @(negedge clk);
      shot_and_check(s); n_shots++;
      if (cap[s] == cap[0]) same++;
    end
    first_edge = -1;
    for (int a = CAPW - 1; a >= 0; a--) if (cap[0][a] != '0) first_edge = a;
    check(first_edge == LOOP + 1 + PS / 4, $sformatf("pulse starts at capture word %0d", first_edge));
    check(same == SHOTS, $sformatf("%0d of %0d captures identical", same, SHOTS));
    $display("%0d shots, %0d identical, pulse at capture word %0d", n_shots, same, first_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
