// adc_pkg: constants shared by the ADC-based front end.
//
// The converters run at 1 Gsample/s and the FPGA side at 250 MHz, so every
// clock cycle carries four 16-bit samples per channel: 64 bits per channel
// and 128 bits for the two ADC channels together. The DAC pulse table holds
// 1024 samples, about 1 us of waveform. These numbers come from the design
// description. The capture depth (512 words of 128 bits, 2048 samples per
// channel, about 2 us) is this implementation's reading of the captured
// waveforms shown, which span about 2 us.
`timescale 1ns / 1ps
package adc_pkg;

  localparam int unsigned SAMPLE_W   = 16;   // bits per sample (two's complement)
  localparam int unsigned SPB        = 4;    // samples per channel per clock
  localparam int unsigned NUM_CH     = 2;    // ADC channels
  localparam int unsigned CH_W       = SAMPLE_W * SPB;     // 64
  localparam int unsigned BUS_W      = CH_W * NUM_CH;      // 128
  localparam int unsigned WAVE_LEN   = 1024; // samples in the DAC pulse table
  localparam int unsigned CAP_ADDR_W = 9;    // 512 capture words

  // AXI4-Lite register map of the single-shot slave (byte addresses).
  localparam logic [3:0] REG_CTRL   = 4'h0;  // W: bit0 fire single shot, bit1 cyclic mode
  localparam logic [3:0] REG_STATUS = 4'h4;  // R: bit0 capture busy, bit1 capture done

endpackage
