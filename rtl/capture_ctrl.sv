// capture_ctrl: memory controller that records one ADC capture per shot.
//
// A three-state machine drives a write counter and the write port of the
// capture memory:
//   IDLE    counter held at 0, memory idle; the single-shot trigger
//           (capture_i) moves to CAPTURE;
//   CAPTURE memory write enabled, counter incremented for each ADC word
//           (adc_valid_i); when the counter wraps around from its maximum,
//           the memory is full and the machine moves to FINISH;
//   FINISH  memory disabled, counter reset; back to IDLE on the next cycle.
// Each ADC word is 128 bits: four 16-bit samples of each of the two channels,
// stored as received. A capture fills all 2^ADDR_W words; with ADC data every
// cycle it takes 2^ADDR_W cycles in CAPTURE plus one in FINISH. done_o pulses
// in FINISH; busy_o is high outside IDLE.
//
// The states, their actions and the wrap-around end condition are the design
// description's; the valid qualifier on writes and the done/busy outputs are
// this implementation's.
`timescale 1ns / 1ps
module capture_ctrl #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 128
) (
  input  logic              clk_i,
  input  logic              rst_i,        // synchronous, active high
  input  logic              capture_i,    // single-shot trigger
  input  logic              adc_valid_i,
  input  logic [DATA_W-1:0] adc_data_i,
  output logic              mem_we_o,
  output logic [ADDR_W-1:0] mem_addr_o,
  output logic [DATA_W-1:0] mem_wdata_o,
  output logic              busy_o,
  output logic              done_o
);

  typedef enum logic [1:0] {IDLE = 2'd0, CAPTURE = 2'd1, FINISH = 2'd2} cap_state_t;

  cap_state_t        state_q;
  logic [ADDR_W-1:0] cnt_q;
  logic              wrap;

  assign wrap = (cnt_q == '1) && adc_valid_i;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state_q <= IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        IDLE: begin
          cnt_q <= '0;
          if (capture_i) state_q <= CAPTURE;
        end
        CAPTURE: begin
          if (adc_valid_i) cnt_q <= cnt_q + 1'b1;
          if (wrap)        state_q <= FINISH;
        end
        FINISH: begin
          cnt_q   <= '0;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign mem_we_o    = (state_q == CAPTURE) && adc_valid_i;
  assign mem_addr_o  = cnt_q;
  assign mem_wdata_o = adc_data_i;
  assign busy_o      = (state_q != IDLE);
  assign done_o      = (state_q == FINISH);

endmodule
