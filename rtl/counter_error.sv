// counter_error: range limit of the TDC.
//
// A stop that never comes (no echo, or an echo from beyond the maximum
// distance) must not leave the TDC counting forever. The limit follows from
// N = T_trip / T_clock: a 200 m range is a 400 m round trip, about 1.4 us,
// or about 700 periods of 2 ns. Rather than a full comparator the block looks
// only at the four most significant counter bits: when they read 1011 the
// count has reached 704 (10 1100 0000) and max_cnt_o is raised. That flag
// clears the hit pulse, so the measurement ends at the largest value the
// system reports. Pattern and width are the design description's.
// Combinational, no clock.
// The six low counter bits are deliberately not looked at, so linters
// report them as unused.
`timescale 1ns / 1ps
module counter_error #(
  parameter int unsigned CNT_W    = 10,
  parameter logic [3:0]  MAX_MSBS = 4'b1011
) (
  input  logic [CNT_W-1:0] coarse_cnt_i,
  output logic             max_cnt_o
);

  assign max_cnt_o = (coarse_cnt_i[CNT_W-1 -: 4] == MAX_MSBS);

endmodule
