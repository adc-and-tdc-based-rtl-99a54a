// tb_lidar_frontends: end-to-end test of both front ends at their default
// sizes, running at the same time on their own clocks (ADC side 250 MHz,
// TDC side 500 MHz).
//
// ADC side: a loopback model returns the DAC words as ADC words 20 cycles
// later. Two single shots are fired through the AXI register; each capture
// is read back in full and compared with the expected trigger-aligned pulse,
// and the two captures must match. Then cyclic mode is switched on and the
// pulse period checked (256 words, 1.024 us).
// TDC side: random intervals from 2.5 ns to 1 us, each measured within
// 100 ps; then a start with no stop (range limit) and a pause.
// Every mechanism is counted and must occur: single shot, capture
// wrap-around, cyclic mode, line filling twice, short hit, full periods,
// range limit, pause.
// The mechanisms, the 26 ns processing time and the sizes follow the design
// description; the loopback delay, interval mix and tolerances are this
// testbench's own choices.
`timescale 1ns / 1ps
module tb_lidar_frontends;
  localparam int LOOP = 20, WORDS = 256, CAPW = 512;
  localparam int PS = 64, PL = 8, AMP = -16000;
  int checks = 0, failures = 0;

  // ADC side signals
  logic aclk = 0, arst;
  logic [3:0] awaddr, araddr, wstrb;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic dac_valid, adc_valid, rd_en, shot, busy;
  logic [63:0] dac0, dac1;
  logic [127:0] adc_data, rdat;
  logic [8:0] raddr;
  // TDC side signals
  logic tclk = 0, trst, ten, start, stop;
  logic [20:0] meas;
  logic eom, max_cnt;

  lidar_frontends dut (
    .adc_clk_i(aclk), .adc_rst_i(arst),
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready),
    .dac_valid_i(dac_valid), .dac_data_0_o(dac0), .dac_data_1_o(dac1),
    .adc_valid_i(adc_valid), .adc_data_i(adc_data),
    .mem_rd_en_i(rd_en), .mem_raddr_i(raddr), .mem_rdata_o(rdat),
    .single_shot_o(shot), .cap_busy_o(busy),
    .tdc_clk_i(tclk), .tdc_rst_i(trst), .tdc_en_i(ten), .start_i(start), .stop_i(stop),
    .measure_o(meas), .eom_o(eom), .max_cnt_o(max_cnt));

  always #2 aclk = ~aclk;
  always #1 tclk = ~tclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  int n_shot = 0, n_wrap = 0, n_cyclic = 0, n_twice = 0, n_short = 0, n_full = 0, n_limit = 0, n_pause = 0;

  // ---------------- ADC side ----------------
  function automatic logic [127:0] pack(input logic [63:0] c0, input logic [63:0] c1);
    for (int j = 0; j < 4; j++) begin
      pack[32*j +: 16]      = c0[16*j +: 16];
      pack[32*j + 16 +: 16] = c1[16*j +: 16];
    end
  endfunction
  logic [127:0] pipe [LOOP];
  always @(posedge aclk) begin
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

  always @(negedge aclk) if (busy && rd_en == 0 && dut.u_adc.u_cap.wrap) n_wrap++;

  task automatic axi_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge aclk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1; wstrb = 4'hf; bready = 1;
    @(negedge aclk);
    while (!bvalid) @(negedge aclk);
    awvalid = 0; wvalid = 0;
    @(negedge aclk);
    bready = 0;
  endtask

  task automatic axi_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge aclk);
    araddr = a; arvalid = 1; rready = 1;
    @(negedge aclk);
    arvalid = 0;
    while (!rvalid) @(negedge aclk);
    d = rdata;
    @(negedge aclk);
    rready = 0;
  endtask

  logic [127:0] cap [2][CAPW];

  task automatic adc_shot(input int slot);
    logic [31:0] st;
    int polls = 0;
    axi_write(4'h0, 32'h1);
    n_shot++;
    do begin axi_read(4'h4, st); polls++; end while (!st[1] && polls < 1000);
    check(st[1], "capture done");
    for (int a = 0; a < CAPW; a++) begin
      int k;
      logic [127:0] e;
      @(negedge aclk); rd_en = 1; raddr = 9'(a);
      @(negedge aclk); rd_en = 0;
      cap[slot][a] = rdat;
      k = a - LOOP - 1;
      e = (k >= 0 && k < WORDS) ? pack(dac_word(k), dac_word(k)) : '0;
      check(rdat == e, $sformatf("capture %0d word %0d", slot, a));
    end
  endtask

  task automatic adc_side();
    int period = 0, last_hit = -1;
    arst = 1; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; rd_en = 0; raddr = 0;
    dac_valid = 1; adc_valid = 1;
    repeat (4) @(negedge aclk);
    arst = 0;
    repeat (2 * LOOP) @(negedge aclk);
    adc_shot(0);
    repeat (13) @(negedge aclk);
    adc_shot(1);
    check(cap[0] == cap[1], "repeated shots are aligned");
    axi_write(4'h0, 32'h2);
    for (int c = 0; c < 3 * WORDS; c++) begin
      logic [63:0] prev;
      prev = dac0;
      @(negedge aclk);
      if (dac0 == dac_word(PS / 4) && prev != dac0) begin
        if (last_hit >= 0) begin period = c - last_hit; n_cyclic++; end
        last_hit = c;
      end
    end
    check(period == WORDS, $sformatf("cyclic period %0d words", period));
    axi_write(4'h0, 32'h0);
  endtask

  // ---------------- TDC side ----------------
  always @(posedge tclk) begin
    if (dut.u_tdc.u_sync.state_q == tdc_pkg::S_FILLING && ten) begin
      if (dut.u_tdc.first && !dut.u_tdc.last) n_twice++;
      if (!dut.u_tdc.first && dut.u_tdc.last) n_short++;
    end
  end
  always @(negedge tclk) if (dut.u_tdc.cnt_en) n_full++;

  task automatic tdc_measure(input real d, input real ph, output int got);
    @(posedge tclk);
    #(ph) start = 1;
    #0.3  start = 0;
    #(d - 0.3) stop = 1;
    fork #0.3 stop = 0; join_none
    while (!eom) @(negedge tclk);
    got = meas;
  endtask

  task automatic tdc_side();
    int got;
    real d;
    trst = 0; ten = 1; start = 0; stop = 0;
    #0.5 trst = 1;
    repeat (4) @(posedge tclk);
    #0.5 trst = 0;
    repeat (4) @(posedge tclk);
    for (int i = 0; i < 40; i++) begin
      case (i % 3)
        0: d = 2.5 + $urandom_range(0, 1500) / 1000.0;
        1: d = 4.0 + $urandom_range(0, 50000) / 1000.0;
        default: d = 50.0 + $urandom_range(0, 950000) / 1000.0;
      endcase
      tdc_measure(d, $urandom_range(0, 1999) / 1000.0, got);
      check(got > int'(d * 1000.0) - 100 && got < int'(d * 1000.0) + 100,
            $sformatf("TDC interval %0d ps measured %0d ps", int'(d * 1000.0), got));
      repeat (3) @(posedge tclk);
    end
    // Range limit: a start with no stop.
    @(posedge tclk); #0.37 start = 1; #0.3 start = 0;
    while (!max_cnt) @(negedge tclk);
    n_limit++;
    while (!eom) @(negedge tclk);
    check(meas >= 704 * 2000 - 2500 && meas <= 706 * 2000, $sformatf("range limit result %0d", meas));
    repeat (4) @(posedge tclk);
    // Pause.
    ten = 0; n_pause++;
    @(posedge tclk); #0.4 start = 1; #0.3 start = 0; #12 stop = 1; #0.3 stop = 0;
    repeat (30) @(negedge tclk) check(!eom, "no result while paused");
    ten = 1;
    repeat (4) @(posedge tclk);
    tdc_measure(12.34, 1.1, got);
    check(got > 12340 - 100 && got < 12340 + 100, $sformatf("after pause %0d", got));
  endtask

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < LOOP; i++) pipe[i] = '0;
    fork
      adc_side();
      tdc_side();
    join
    check(n_shot > 0, "single shot");
    check(n_wrap > 0, "capture wrap-around");
    check(n_cyclic > 0, "cyclic mode");
    check(n_twice > 0, "line seen filling twice");
    check(n_short > 0, "short hit");
    check(n_full > 0, "full periods counted");
    check(n_limit > 0, "range limit");
    check(n_pause > 0, "pause");
    $display("mechanisms: shot %0d wrap %0d cyclic %0d filling-twice %0d short %0d full %0d limit %0d pause %0d",
             n_shot, n_wrap, n_cyclic, n_twice, n_short, n_full, n_limit, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
