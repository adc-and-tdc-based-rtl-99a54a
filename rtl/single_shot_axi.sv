// single_shot_axi: AXI4-Lite slave through which the processor fires the
// single-shot measurement of the ADC front end.
//
// Software writes the control register when the user asks for a shot; the
// block turns the write into a one-cycle single_shot_o pulse, which starts
// the DAC pulse playback and the ADC capture in the same clock cycle, so both
// converters stay aligned from shot to shot.
//
// Register map (32-bit, byte addresses, see adc_pkg):
//   0x0 CTRL   write: bit0 = 1 fires one shot (self-clearing),
//                     bit1 = DAC cyclic mode (held, read back at bit1)
//   0x4 STATUS read:  bit0 = capture busy, bit1 = capture done (sticky,
//                     cleared by the next shot), bit2 = DAC playing
// The slave accepts a write when address and data are both valid, answers
// with OKAY responses, and keeps one transaction of each kind outstanding.
// The bus is in the same clock domain as the converter data path here.
//
// The existence of a custom AXI slave that triggers the single shot follows
// the design description; the register map, the status bits and the single
// clock domain are this implementation's choices.
// Only the low two data bits and byte strobe 0 carry meaning; the other
// write-data bits and strobes are ignored by design.
`timescale 1ns / 1ps
module single_shot_axi
  import adc_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_i,          // synchronous, active high
  // AXI4-Lite slave
  input  logic [3:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [3:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // to and from the front end
  input  logic        cap_busy_i,
  input  logic        dac_playing_i,  // DAC pulse playback in progress
  input  logic        cap_done_i,     // one-cycle pulse at the end of a capture
  output logic        single_shot_o,  // one-cycle trigger
  output logic        cyclic_o        // DAC cyclic mode
);

  logic do_write, do_read;
  logic done_q;

  assign do_write  = s_awvalid && s_wvalid && !s_bvalid;
  assign do_read   = s_arvalid && !s_rvalid;
  assign s_awready = do_write;
  assign s_wready  = do_write;
  assign s_arready = do_read;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      s_bvalid      <= 1'b0;
      s_rvalid      <= 1'b0;
      s_rdata       <= '0;
      single_shot_o <= 1'b0;
      cyclic_o      <= 1'b0;
      done_q        <= 1'b0;
    end else begin
      single_shot_o <= 1'b0;
      if (cap_done_i) done_q <= 1'b1;

      if (do_write) begin
        s_bvalid <= 1'b1;
        if (s_awaddr == REG_CTRL && s_wstrb[0]) begin
          cyclic_o <= s_wdata[1];
          if (s_wdata[0]) begin
            single_shot_o <= 1'b1;
            done_q        <= 1'b0;
          end
        end
      end else if (s_bvalid && s_bready) begin
        s_bvalid <= 1'b0;
      end

      if (do_read) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr)
          REG_CTRL:   s_rdata <= {30'd0, cyclic_o, 1'b0};
          REG_STATUS: s_rdata <= {29'd0, dac_playing_i, done_q, cap_busy_i};
          default:    s_rdata <= '0;
        endcase
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

endmodule
