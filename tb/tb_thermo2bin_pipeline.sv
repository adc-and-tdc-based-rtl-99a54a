// tb_thermo2bin_pipeline: streams thermometer codes through the encoder, one
// per cycle, and checks each result and its latency. Two instances: the
// 45-bit width of the TDC (latency 5) and the 256-bit default (counts above
// 255 saturate). Codes with a bubble inside the counted segment must still
// give the number of ones.
`timescale 1ns / 1ps
module tb_thermo2bin_pipeline;
  localparam int W1 = 45, W2 = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rstn;
  logic v1, v2, r1, r2;
  logic [W1-1:0] t1;
  logic [W2-1:0] t2;
  logic [7:0] b1, b2;

  thermo2bin_pipeline #(.THERMO_W(W1)) dut1 (.clock(clk), .reset(rstn), .valid(v1), .thermo(t1), .ready(r1), .bin(b1));
  thermo2bin_pipeline dut2 (.clock(clk), .reset(rstn), .valid(v2), .thermo(t2), .ready(r2), .bin(b2));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  int exp1[$], exp2[$];
  int cyc = 0, sent1[$];

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rstn) begin
    if (r1) begin
      int e, s;
      e = exp1.pop_front(); s = sent1.pop_front();
      check(b1 == 8'(e), $sformatf("45-bit: got %0d want %0d", b1, e));
      check(cyc - s == 5, $sformatf("45-bit latency %0d", cyc - s));
    end
    if (r2) begin
      int e;
      e = exp2.pop_front();
      check(b2 == 8'((e > 255) ? 255 : e), $sformatf("256-bit: got %0d want %0d", b2, e));
    end
  end

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rstn = 0; v1 = 0; v2 = 0; t1 = '0; t2 = '0;
    repeat (3) @(negedge clk);
    rstn = 1;
    for (int i = 0; i < 600; i++) begin
      int k1, k2;
      @(negedge clk);
      k1 = (i < 46) ? i : $urandom_range(0, W1);
      k2 = (i < 257) ? i : $urandom_range(0, W2);
      t1 = (k1 == 0) ? '0 : W1'((64'(1) << k1) - 1);
      t2 = '0;
      for (int j = 0; j < k2; j++) t2[j] = 1'b1;
      // A bubble: a 0 just below the top one, within the last eight bits
      // counted. The ones counter then returns k-1.
      if (i >= 46 && (i % 5 == 0) && (k1 % 8) >= 2) begin
        t1[k1 - 2] = 1'b0;
        k1 = k1 - 1;
      end
      v1 = ($urandom_range(0, 3) != 0);
      v2 = 1;
      if (v1) begin exp1.push_back(k1); sent1.push_back(cyc); end
      exp2.push_back(k2);
    end
    @(negedge clk); v1 = 0; v2 = 0;
    repeat (10) @(negedge clk);
    check(exp1.size() == 0 && exp2.size() == 0, "every code produced a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
