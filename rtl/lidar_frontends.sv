// lidar_frontends: the two LiDAR receiver front ends side by side.
//
// Two independent ways of timing a laser echo:
//  * adc_frontend digitises the whole returning waveform (full-waveform
//    LiDAR): a single shot plays a pulse through the DAC and records 2 us of
//    ADC samples in memory, both started by the same trigger. Clock adc_clk_i,
//    250 MHz, one 128-bit word (4 samples x 2 channels) per cycle.
//  * tdc measures only the interval between a start edge and a stop edge,
//    with 50 ps fine steps from a tapped delay line. Clock tdc_clk_i, 500 MHz.
// They share nothing but this wrapper; each keeps its own clock, reset and
// ports. The converters, their serial links, the processor and the block-RAM
// controller connect through the ports of adc_frontend.
// tdc_rst_i drives both synchronous and asynchronous flip-flops inside the
// TDC on purpose (see tdc), which linters report as a mixed reset net.
`timescale 1ns / 1ps
module lidar_frontends
  import adc_pkg::*;
  import tdc_pkg::*;
(
  // ---- ADC front end ----
  input  logic                  adc_clk_i,
  input  logic                  adc_rst_i,
  input  logic [3:0]            s_awaddr,
  input  logic                  s_awvalid,
  output logic                  s_awready,
  input  logic [31:0]           s_wdata,
  input  logic [3:0]            s_wstrb,
  input  logic                  s_wvalid,
  output logic                  s_wready,
  output logic [1:0]            s_bresp,
  output logic                  s_bvalid,
  input  logic                  s_bready,
  input  logic [3:0]            s_araddr,
  input  logic                  s_arvalid,
  output logic                  s_arready,
  output logic [31:0]           s_rdata,
  output logic [1:0]            s_rresp,
  output logic                  s_rvalid,
  input  logic                  s_rready,
  input  logic                  dac_valid_i,
  output logic [CH_W-1:0]       dac_data_0_o,
  output logic [CH_W-1:0]       dac_data_1_o,
  input  logic                  adc_valid_i,
  input  logic [BUS_W-1:0]      adc_data_i,
  input  logic                  mem_rd_en_i,
  input  logic [CAP_ADDR_W-1:0] mem_raddr_i,
  output logic [BUS_W-1:0]      mem_rdata_o,
  output logic                  single_shot_o,
  output logic                  cap_busy_o,
  // ---- TDC front end ----
  input  logic                  tdc_clk_i,
  input  logic                  tdc_rst_i,
  input  logic                  tdc_en_i,
  input  logic                  start_i,
  input  logic                  stop_i,
  output logic [MEAS_W-1:0]     measure_o,
  output logic                  eom_o,
  output logic                  max_cnt_o
);

  adc_frontend u_adc (
    .clk_i(adc_clk_i), .rst_i(adc_rst_i),
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .dac_valid_i, .dac_data_0_o, .dac_data_1_o,
    .adc_valid_i, .adc_data_i,
    .mem_rd_en_i, .mem_raddr_i, .mem_rdata_o,
    .single_shot_o, .cap_busy_o
  );

  tdc u_tdc (
    .clk_i    (tdc_clk_i),
    .rst_i    (tdc_rst_i),
    .en_i     (tdc_en_i),
    .start_i  (start_i),
    .stop_i   (stop_i),
    .measure_o(measure_o),
    .eom_o    (eom_o),
    .max_cnt_o(max_cnt_o)
  );

endmodule
