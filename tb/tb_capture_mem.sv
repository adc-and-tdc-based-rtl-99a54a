// tb_capture_mem: random writes and reads against a model array; the read
// data must appear one cycle after rd_en and hold while rd_en is low.
`timescale 1ns / 1ps
module tb_capture_mem;
  localparam int AW = 9;
  int checks = 0, failures = 0;
  logic clk = 0, we, re;
  logic [AW-1:0] wa, ra;
  logic [127:0] wd, rd;
  logic [127:0] model [2**AW];
  bit written [2**AW];

  capture_mem dut (.clk_i(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd), .rd_en_i(re), .raddr_i(ra), .rdata_o(rd));

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; re = 0; wa = 0; ra = 0; wd = 0;
    // Fill every word.
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; wa = AW'(a); wd = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wd; written[a] = 1;
    end
    @(negedge clk) we = 0;
    // Random reads with concurrent writes to other addresses.
    for (int i = 0; i < 1500; i++) begin
      logic [127:0] expv;
      @(negedge clk);
      re = 1; ra = AW'($urandom);
      expv = model[ra];
      we = $urandom_range(0, 1); wa = AW'($urandom); wd = {$urandom, $urandom, $urandom, $urandom};
      if (wa == ra) we = 0;
      if (we) model[wa] = wd;
      @(negedge clk);
      re = 0; we = 0;
      check(rd == expv, $sformatf("read %0d", ra));
      @(negedge clk);
      check(rd == expv, "read data holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
