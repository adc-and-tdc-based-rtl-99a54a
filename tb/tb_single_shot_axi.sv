// tb_single_shot_axi: AXI4-Lite writes and reads to the single-shot slave.
// A write of 1 to CTRL must give exactly one trigger pulse; bit1 sets the
// cyclic mode; STATUS reflects busy, the sticky done bit and DAC playback.
// Handshake rules are asserted: once raised, a response stays valid until
// accepted.
`timescale 1ns / 1ps
module tb_single_shot_axi;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [3:0] awaddr, araddr, wstrb;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic busy, done, playing, shot, cyclic;

  single_shot_axi dut (.clk_i(clk), .rst_i(rst),
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready),
    .cap_busy_i(busy), .dac_playing_i(playing), .cap_done_i(done), .single_shot_o(shot), .cyclic_o(cyclic));

  always #2 clk = ~clk;

  a_b_stable: assert property (@(posedge clk) disable iff (rst) bvalid && !bready |=> bvalid);
  a_r_stable: assert property (@(posedge clk) disable iff (rst) rvalid && !rready |=> rvalid && $stable(rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  int shots = 0;
  always @(negedge clk) if (shot) shots++;

  task automatic axi_write(input logic [3:0] a, input logic [31:0] d, input int bdelay);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1; wstrb = 4'hf;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat (bdelay) @(negedge clk);
    bready = 1;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "write OKAY");
    @(posedge clk); @(negedge clk);
    bready = 0;
  endtask

  task automatic axi_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    repeat (2) @(negedge clk);
    rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    check(rresp == 2'b00, "read OKAY");
    @(posedge clk); @(negedge clk);
    rready = 0;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    rst = 1; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; busy = 0; done = 0; playing = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(!shot && !cyclic, "idle after reset");
    axi_write(4'h0, 32'h1, 3);
    check(shots == 1, $sformatf("one trigger per write, %0d", shots));
    axi_write(4'h0, 32'h0, 0);
    check(shots == 1, "writing 0 does not trigger");
    axi_write(4'h0, 32'h2, 1);
    check(cyclic && shots == 1, "cyclic mode bit set");
    axi_read(4'h0, d);
    check(d == 32'h2, "CTRL reads back the mode");
    axi_write(4'h0, 32'h0, 0);
    check(!cyclic, "cyclic mode cleared");
    busy = 1; playing = 1;
    axi_read(4'h4, d);
    check(d == 32'h5, $sformatf("STATUS busy+playing %h", d));
    @(negedge clk) done = 1; @(negedge clk) done = 0; busy = 0; playing = 0;
    axi_read(4'h4, d);
    check(d == 32'h2, "done is sticky");
    axi_write(4'h0, 32'h1, 0);
    check(shots == 2, "second trigger");
    axi_read(4'h4, d);
    check(d == 32'h0, "done cleared by the next shot");
    axi_read(4'h8, d);
    check(d == 32'h0, "unmapped address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
