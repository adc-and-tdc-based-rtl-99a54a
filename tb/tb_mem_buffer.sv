// tb_mem_buffer: plays the pulse table in single-shot and cyclic mode and
// checks every output word against the pulse computed here from its
// parameters: one playback of 256 words per trigger, zeros after it, words
// held while val_info is low, and back-to-back repetition in cyclic mode
// (a pulse every 256 words = 1.024 us at 1 Gsample/s).
`timescale 1ns / 1ps
module tb_mem_buffer;
  localparam int WL = 1024, SPB = 4, WORDS = WL / SPB;
  localparam int PS = 64, PL = 8, AMP = -16000;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en, vi, cyc;
  logic [63:0] o0, o1;
  logic playing;

  mem_buffer dut (.clk_in(clk), .rst_in(rst), .enable(en), .val_info(vi), .cyclic_i(cyc),
                  .mem_out_0(o0), .mem_out_1(o1), .playing_o(playing));

  always #2 clk = ~clk;   // 250 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  function automatic logic [63:0] word(input int w);
    for (int j = 0; j < SPB; j++) begin
      int idx = w * SPB + j;
      word[16*j +: 16] = (idx >= PS && idx < PS + PL) ? 16'(AMP) : 16'd0;
    end
  endfunction

  // Collect words actually taken by the DAC (output registered one cycle).
  logic [63:0] got[$];
  logic took_q;
  always @(posedge clk) begin
    if (took_q) got.push_back(o0);
    took_q <= playing && vi && !rst;
    if (!rst) check(o0 == o1, "both channels carry the same word");
  end

  int n_pulses;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; en = 0; vi = 1; cyc = 0; took_q = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // Single shot, DAC taking a word every cycle.
    @(negedge clk) en = 1;
    @(negedge clk) en = 0;
    repeat (WORDS + 10) @(negedge clk);
    check(got.size() == WORDS, $sformatf("single shot plays %0d words", got.size()));
    n_pulses = 0;
    foreach (got[i]) begin
      check(got[i] == word(i), $sformatf("word %0d", i));
      if (got[i] != 0) n_pulses++;
    end
    check(n_pulses == PL / SPB, "one narrow pulse");
    check(o0 == '0 && !playing, "idle after the shot");
    got.delete();
    // Single shot with the DAC stalling now and then.
    @(negedge clk) en = 1;
    @(negedge clk) en = 0;
    for (int i = 0; i < 3 * WORDS; i++) begin vi = ($urandom_range(0, 2) != 0); @(negedge clk); end
    vi = 1; repeat (5) @(negedge clk);
    check(got.size() == WORDS, "stalled shot still plays every word once");
    foreach (got[i]) check(got[i] == word(i), $sformatf("stalled word %0d", i));
    got.delete();
    // Cyclic mode: three periods.
    cyc = 1; en = 1;
    repeat (3 * WORDS + 1) @(negedge clk);
    en = 0;
    repeat (3) @(negedge clk);
    check(got.size() >= 3 * WORDS, $sformatf("cyclic words %0d", got.size()));
    foreach (got[i]) check(got[i] == word(i % WORDS), $sformatf("cyclic word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
