// mem_buffer: on-chip pulse table that feeds the DAC.
//
// Instead of streaming a waveform from DDR through DMA, the DAC data path is
// fed from a small ROM holding WAVE_LEN samples of a narrow pulse (a short
// duty cycle keeps the pulse clear of the ADC's DC blocker). Each clock the
// block outputs the next SPB samples, the same four-sample word on both DAC
// channels (mem_out_0, mem_out_1), so 1024 samples last 256 cycles, 1.024 us
// at 1 Gsample/s.
//
// Two modes, as in the design's two versions:
//  * cyclic (cyclic_i = 1): while enable is high the table plays over and
//    over, giving one pulse per microsecond;
//  * single shot (cyclic_i = 0): a rising edge of enable (the single-shot
//    trigger) plays the table once, after which the outputs return to 0.
// The read address advances only in cycles where val_info (the DAC core's
// request for data) is high. Sample j of a word sits at bits
// [16j+15:16j], j = 0 being the earliest. Outputs are registered: a word
// appears the cycle after it is read. playing_o is high while a playback is
// in progress.
//
// Ports enable, val_info, clk_in, mem_out_0[63:0], mem_out_1[63:0], the table
// size and the two modes follow the design description. Its waveform values
// are not given: the table here is computed at elaboration as a rectangular
// pulse of PULSE_LEN samples of value PULSE_AMP starting at PULSE_START, and
// can be changed by those parameters. rst_in, cyclic_i and playing_o, the
// sample order and the meaning given to val_info are this implementation's
// own.
`timescale 1ns / 1ps
module mem_buffer #(
  parameter int unsigned WAVE_LEN    = 1024,
  parameter int unsigned SAMPLE_W    = 16,
  parameter int unsigned SPB         = 4,
  parameter int unsigned PULSE_START = 64,
  parameter int unsigned PULSE_LEN   = 8,
  parameter int          PULSE_AMP   = -16000
) (
  input  logic                    clk_in,
  input  logic                    rst_in,     // synchronous, active high
  input  logic                    enable,     // run (cyclic) / trigger (single shot)
  input  logic                    val_info,   // DAC takes a word this cycle
  input  logic                    cyclic_i,   // 1: cyclic mode, 0: single shot
  output logic [SAMPLE_W*SPB-1:0] mem_out_0,  // DAC channel 0, four samples
  output logic [SAMPLE_W*SPB-1:0] mem_out_1,  // DAC channel 1, four samples
  output logic                    playing_o
);

  localparam int unsigned WORDS  = WAVE_LEN / SPB;
  localparam int unsigned ADDR_W = $clog2(WORDS);
  localparam int unsigned WORD_W = SAMPLE_W * SPB;

  logic [WORD_W-1:0] rom [WORDS];

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      for (int j = 0; j < SPB; j++) begin
        int unsigned idx;
        idx = w * SPB + j;
        rom[w][SAMPLE_W*j +: SAMPLE_W] =
          (idx >= PULSE_START && idx < PULSE_START + PULSE_LEN) ? SAMPLE_W'(PULSE_AMP) : '0;
      end
    end
  end

  logic [ADDR_W-1:0] addr;
  logic              playing;
  logic              enable_q;
  logic              trig;
  logic              last_word;

  assign trig      = enable && !enable_q;
  assign last_word = (addr == ADDR_W'(WORDS - 1));

  always_ff @(posedge clk_in) begin
    if (rst_in) begin
      addr     <= '0;
      playing  <= 1'b0;
      enable_q <= 1'b0;
    end else begin
      enable_q <= enable;
      if (cyclic_i) begin
        playing <= enable;
        if (!enable)                  addr <= '0;
        else if (playing && val_info) addr <= addr + 1'b1;  // wraps after the last word
      end else if (!playing) begin
        addr <= '0;
        if (trig) playing <= 1'b1;
      end else if (val_info) begin
        addr <= addr + 1'b1;
        if (last_word) playing <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk_in) begin
    if (rst_in) begin
      mem_out_0 <= '0;
      mem_out_1 <= '0;
    end else if (playing && val_info) begin
      mem_out_0 <= rom[addr];
      mem_out_1 <= rom[addr];
    end else if (!playing) begin
      mem_out_0 <= '0;
      mem_out_1 <= '0;
    end
  end

  assign playing_o = playing;

endmodule
