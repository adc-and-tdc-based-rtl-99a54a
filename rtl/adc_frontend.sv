// adc_frontend: single-shot, synchronous DAC pulse generation and ADC capture.
//
// The front end emits one narrow pulse through the DAC and records the
// returning waveform with the ADC, both started by the same trigger so that
// repeated shots line up to within one sample. A shot is fired by a write to
// the single-shot AXI slave. In that same cycle:
//   * mem_buffer starts playing its 1024-sample pulse table to both DAC
//     channels (dac_data_0_o/1_o, four samples per channel per cycle);
//   * capture_ctrl starts writing ADC words (adc_data_i, 128 bits: four
//     samples of each channel) into capture_mem until it is full.
// The processor then reads the capture back through the memory read port
// (mem_rd_en_i/mem_raddr_i/mem_rdata_o), and polls the status register to
// know when the capture is complete. With cyclic mode set in the control
// register the DAC instead repeats the pulse every 1024 samples.
//
// One clock (250 MHz, one 128-bit ADC word per cycle at 1 Gsample/s) serves
// the whole block. The converters, their JESD204B links and the processor are
// outside it. The chain of blocks follows the design description; the
// register interface and the single clock are this implementation's choices.
`timescale 1ns / 1ps
module adc_frontend
  import adc_pkg::CH_W, adc_pkg::BUS_W, adc_pkg::SAMPLE_W, adc_pkg::SPB;
#(
  parameter int unsigned WAVE_LEN   = adc_pkg::WAVE_LEN,
  parameter int unsigned CAP_ADDR_W = adc_pkg::CAP_ADDR_W
) (
  input  logic                  clk_i,
  input  logic                  rst_i,
  // AXI4-Lite slave (control and status)
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
  // DAC data path
  input  logic                  dac_valid_i,
  output logic [CH_W-1:0]       dac_data_0_o,
  output logic [CH_W-1:0]       dac_data_1_o,
  // ADC data path
  input  logic                  adc_valid_i,
  input  logic [BUS_W-1:0]      adc_data_i,
  // capture memory read port
  input  logic                  mem_rd_en_i,
  input  logic [CAP_ADDR_W-1:0] mem_raddr_i,
  output logic [BUS_W-1:0]      mem_rdata_o,
  // status
  output logic                  single_shot_o,
  output logic                  cap_busy_o
);

  logic                  cyclic;
  logic                  cap_done;
  logic                  mem_we;
  logic [CAP_ADDR_W-1:0] mem_waddr;
  logic [BUS_W-1:0]      mem_wdata;
  logic                  dac_playing;

  single_shot_axi u_axi (
    .clk_i, .rst_i,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .cap_busy_i   (cap_busy_o),
    .dac_playing_i(dac_playing),
    .cap_done_i   (cap_done),
    .single_shot_o(single_shot_o),
    .cyclic_o     (cyclic)
  );

  // In cyclic mode enable is held high by the mode bit; in single-shot mode
  // the trigger pulse gives the rising edge.
  mem_buffer #(.WAVE_LEN(WAVE_LEN), .SAMPLE_W(SAMPLE_W), .SPB(SPB)) u_buf (
    .clk_in   (clk_i),
    .rst_in   (rst_i),
    .enable   (cyclic || single_shot_o),
    .val_info (dac_valid_i),
    .cyclic_i (cyclic),
    .mem_out_0(dac_data_0_o),
    .mem_out_1(dac_data_1_o),
    .playing_o(dac_playing)
  );

  capture_ctrl #(.ADDR_W(CAP_ADDR_W), .DATA_W(BUS_W)) u_cap (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .capture_i  (single_shot_o),
    .adc_valid_i(adc_valid_i),
    .adc_data_i (adc_data_i),
    .mem_we_o   (mem_we),
    .mem_addr_o (mem_waddr),
    .mem_wdata_o(mem_wdata),
    .busy_o     (cap_busy_o),
    .done_o     (cap_done)
  );

  capture_mem #(.ADDR_W(CAP_ADDR_W), .DATA_W(BUS_W)) u_mem (
    .clk_i  (clk_i),
    .we_i   (mem_we),
    .waddr_i(mem_waddr),
    .wdata_i(mem_wdata),
    .rd_en_i(mem_rd_en_i),
    .raddr_i(mem_raddr_i),
    .rdata_o(mem_rdata_o)
  );

endmodule
