// tb_counter_error: exhaustive check of the range flag, which must be high
// exactly for counts 704 to 767 (upper four bits 1011).
`timescale 1ns / 1ps
module tb_counter_error;
  int checks = 0, failures = 0;
  logic [9:0] cnt;
  logic mx;

  counter_error dut (.coarse_cnt_i(cnt), .max_cnt_o(mx));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      cnt = 10'(i);
      #1;
      checks++;
      if (mx != (i >= 704 && i < 768)) begin failures++; $display("FAIL at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
