// capture_mem: simple dual-port memory holding one ADC capture.
//
// One write port, used by the capture controller, and one read port through
// which the processor reads the samples back after a shot (on the FPGA this
// is a block RAM behind an AXI block-RAM controller). The read is
// synchronous: rdata_o holds the word at raddr_i one cycle after rd_en_i.
// Both ports share one clock. Default size 512 x 128 bits (2048 samples per
// channel). That a block memory with a standard interface stores the samples
// is the design description's; its size and port details are this
// implementation's.
`timescale 1ns / 1ps
module capture_mem #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 128
) (
  input  logic              clk_i,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] waddr_i,
  input  logic [DATA_W-1:0] wdata_i,
  input  logic              rd_en_i,
  input  logic [ADDR_W-1:0] raddr_i,
  output logic [DATA_W-1:0] rdata_o
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk_i) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk_i) begin
    if (rd_en_i) rdata_o <= mem[raddr_i];
  end

endmodule
