// tdc_synchronizer: the control logic of the TDC, a Mealy state machine.
//
// It watches the first and last sampled taps of the delay line. Seen as the
// pair {first,last}, 10 means the line is filling (the hit has entered but not
// reached the end), 11 that it is full, 01 that it is emptying and 00 that it
// is empty.
//
//   S_IDLE     --10--> S_FILLING   store_first_o=1 (keep the first piece)
//   S_FILLING  --1x--> S_FULL      cnt_en_o=1  (10 again happens when the line
//                                  is longer than a period: that edge still
//                                  lies a whole period after the first one)
//   S_FILLING  --01--> S_EMPTYING  store_last_o=1 (hit shorter than 2 periods)
//   S_FULL     --1x--> S_FULL      cnt_en_o=1
//   S_FULL     --0x--> S_EMPTYING  store_last_o=1 (keep the last piece)
//   S_EMPTYING --eom-> S_IDLE
//
// The outputs are combinational in state and inputs (Mealy), so an enable
// acts on the same sample that caused it, at the next clock edge. cnt_clr_o
// is high in S_IDLE and holds the coarse counter at its start value between
// measurements. first_valid_o/last_valid_o pulse one cycle after the
// matching store enable, when the stored code is ready for the decoder.
// en_i is the TDC's pause input: while it is low the machine holds its state
// and asserts no enable.
//
// The states, the transitions on 10/11/01 and the store/count enables follow
// the design description. The handling of 00 in S_FILLING (keep waiting) and
// in S_FULL (treat as emptying), the return to idle on the merge block's end
// of measurement, the valid pulses and the pause behaviour are this
// implementation's choices.
`timescale 1ns / 1ps
module tdc_synchronizer
  import tdc_pkg::*;
(
  input  logic clk_i,
  input  logic rst_i,          // synchronous reset, active high
  input  logic en_i,           // pause when low
  input  logic first_i,        // sampled first tap
  input  logic last_i,         // sampled last tap
  input  logic eom_i,          // end of measurement from the merge block
  output logic store_first_o,  // capture the filling code
  output logic store_last_o,   // capture the emptying code
  output logic cnt_en_o,       // count one full period
  output logic cnt_clr_o,      // hold the coarse counter at its start value
  output logic first_valid_o,  // first-piece code stored
  output logic last_valid_o,   // last-piece code stored
  output sync_state_t state_o
);

  sync_state_t state_q, state_d;

  always_comb begin
    state_d       = state_q;
    store_first_o = 1'b0;
    store_last_o  = 1'b0;
    cnt_en_o      = 1'b0;
    if (en_i) begin
      unique case (state_q)
        S_IDLE: begin
          if (first_i && !last_i) begin
            store_first_o = 1'b1;
            state_d       = S_FILLING;
          end
        end
        S_FILLING: begin
          if (first_i) begin
            cnt_en_o = 1'b1;
            state_d  = S_FULL;
          end else if (last_i) begin
            store_last_o = 1'b1;
            state_d      = S_EMPTYING;
          end
        end
        S_FULL: begin
          if (first_i) begin
            cnt_en_o = 1'b1;
          end else begin
            store_last_o = 1'b1;
            state_d      = S_EMPTYING;
          end
        end
        S_EMPTYING: begin
          if (eom_i) state_d = S_IDLE;
        end
        default: state_d = S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state_q       <= S_IDLE;
      first_valid_o <= 1'b0;
      last_valid_o  <= 1'b0;
    end else begin
      state_q       <= state_d;
      first_valid_o <= store_first_o;
      last_valid_o  <= store_last_o;
    end
  end

  assign cnt_clr_o = (state_q == S_IDLE);
  assign state_o   = state_q;

endmodule
