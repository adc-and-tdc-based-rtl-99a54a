// tb_adc_frontend: closed-loop test of the ADC front end, as on the bench
// where each DAC output is cabled to an ADC input.
//
// A loopback model feeds the DAC words back as ADC words after LOOP cycles,
// interleaving the two channels sample by sample in the 128-bit word
// (CH1, CH2, CH1, CH2, ...). The test fires shots through the AXI register,
// polls the status register until the capture is done, reads the whole
// capture memory back and checks that
//  * DAC word k lands at capture address k + LOOP + 1 (trigger-aligned),
//  * every captured word equals the loopback of the computed pulse table,
//  * repeated shots give identical captures (synchronous single shot),
//  * in cyclic mode the DAC repeats the pulse every 256 words.
`timescale 1ns / 1ps
module tb_adc_frontend;
  localparam int LOOP = 20, WORDS = 256, CAPW = 512;
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

  logic [127:0] cap [2][CAPW];

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
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_shots = 0, n_cyclic = 0, period, last_hit;
    rst = 1; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; rd_en = 0; raddr = 0;
    dac_valid = 1; adc_valid = 1;
    for (int i = 0; i < LOOP; i++) pipe[i] = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (2 * LOOP) @(negedge clk);   // flush the loopback
    shot_and_check(0); n_shots++;
    repeat (37) @(negedge clk);
    shot_and_check(1); n_shots++;
    check(cap[0] == cap[1], "two shots capture the same waveform");
    // Cyclic mode: the pulse must come back every 256 words.
    axi_write(4'h0, 32'h2);
    last_hit = -1; period = 0;
    for (int c = 0; c < 3 * WORDS; c++) begin
      logic [63:0] prev;
      prev = dac0;
      @(negedge clk);
      if (dac0 == dac_word(PS / 4) && prev != dac0) begin
        if (last_hit >= 0) begin period = c - last_hit; n_cyclic++; end
        last_hit = c;
      end
    end
    check(n_cyclic >= 2 && period == WORDS, $sformatf("cyclic period %0d words", period));
    axi_write(4'h0, 32'h0);
    check(n_shots == 2 && n_cyclic > 0, "single-shot and cyclic modes both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
