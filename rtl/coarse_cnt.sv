// coarse_cnt: the coarse counter of the TDC.
//
// A synchronous up counter that counts the clock periods during which the
// delay line is full. A synchronous reset (nrst_i low) loads 1, not 0: the
// measurement needs N = N_full + 1 periods, and starting at 1 supplies the
// "+1". cnt_en_i comes from the synchronizer. Width, start value and reset
// style follow the design description; 10 bits cover the 704 periods of a
// 200 m range at 500 MHz. The counter wraps at 2^CNT_W; the counter error
// block stops the measurement long before that.
`timescale 1ns / 1ps
module coarse_cnt #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             clk_i,
  input  logic             nrst_i,       // synchronous, active low: load 1
  input  logic             cnt_en_i,     // count this period
  output logic [CNT_W-1:0] coarse_cnt_o
);

  always_ff @(posedge clk_i) begin
    if (!nrst_i)       coarse_cnt_o <= CNT_W'(1);
    else if (cnt_en_i) coarse_cnt_o <= coarse_cnt_o + 1'b1;
  end

endmodule
