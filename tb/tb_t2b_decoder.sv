// tb_t2b_decoder: random filling and emptying codes of the 45-cell line;
// checks ones of the first piece, zeros of the last piece, and that each
// result arrives 5 cycles after its valid.
`timescale 1ns / 1ps
module tb_t2b_decoder;
  localparam int N = 45;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic fv, lv, fr, lr;
  logic [N-1:0] tf, tl;
  logic [7:0] ff, fl;

  t2b_decoder dut (.clk_i(clk), .rst_i(rst), .first_valid_i(fv), .therm_first_i(tf), .last_valid_i(lv),
                   .therm_last_i(tl), .first_ready_o(fr), .fine_first_o(ff), .last_ready_o(lr), .fine_last_o(fl));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; fv = 0; lv = 0; tf = '0; tl = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 150; i++) begin
      int a, b, lat_f, lat_l;
      a = (i <= N) ? i : $urandom_range(0, N);
      b = (i <= N) ? N - i : $urandom_range(0, N);
      @(negedge clk);
      tf = '0; for (int j = 0; j < a; j++) tf[j] = 1'b1;          // ones from the input end
      tl = '1; for (int j = 0; j < b; j++) tl[j] = 1'b0;          // zeros from the input end
      fv = 1; lv = 1;
      @(negedge clk);
      fv = 0; lv = 0;
      lat_f = 0; lat_l = 0;
      for (int c = 1; c <= 8; c++) begin
        if (fr && lat_f == 0) begin lat_f = c; check(ff == 8'(a), $sformatf("ones %0d want %0d", ff, a)); end
        if (lr && lat_l == 0) begin lat_l = c; check(fl == 8'(b), $sformatf("zeros %0d want %0d", fl, b)); end
        @(negedge clk);
      end
      check(lat_f == 5 && lat_l == 5, $sformatf("latency %0d/%0d", lat_f, lat_l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
