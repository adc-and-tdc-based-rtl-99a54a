// tdc_merge: combines coarse and fine counts into a time in picoseconds.
//
//   T = N * TCLK_PS + (Fine_start - Fine_stop) * TDELAY_PS
//
// where N is the coarse counter (full periods plus one), Fine_start the ones
// of the first piece and Fine_stop the zeros of the last piece. Fine_start
// adds the part of the first period covered by the hit; Fine_stop removes the
// part of the last period after the hit fell.
//
// Each fine count is latched when its ready pulse arrives. Once both are in,
// the operands (and the coarse count, which is frozen by then) are loaded into
// registers and a small counter gives the arithmetic MERGE_CYCLES clock
// cycles, because the multiply-add does not fit in one 2 ns period: the sum is
// a multicycle path from the operand registers to measure_o. At the end of the
// window measure_o is updated and eom_o pulses for one cycle. measure_o holds
// its value until the next measurement. A negative result (possible only
// with inconsistent fine codes) is reported as 0.
//
// The formula, the 21-bit output and the 6-cycle timing counter are the
// design description's; the latching of the two ready pulses and the clamp at
// zero are this implementation's choices.
`timescale 1ns / 1ps
module tdc_merge #(
  parameter int unsigned CNT_W        = 10,
  parameter int unsigned BIN_W        = 8,
  parameter int unsigned MEAS_W       = 21,
  parameter int unsigned TCLK_PS      = 2000,
  parameter int unsigned TDELAY_PS    = 50,
  parameter int unsigned MERGE_CYCLES = 6
) (
  input  logic              clk_i,
  input  logic              rst_i,                // synchronous, active high
  input  logic [CNT_W-1:0]  coarse_cnt_i,
  input  logic              ready_first_i,
  input  logic [BIN_W-1:0]  fine_bin_FirstPiece_i,
  input  logic              ready_last_i,
  input  logic [BIN_W-1:0]  fine_bin_LastPiece_i,
  output logic [MEAS_W-1:0] measure_o,
  output logic              eom_o                 // end of measurement, one cycle
);

  localparam int unsigned WC = $clog2(MERGE_CYCLES + 1);
  localparam int unsigned SW = MEAS_W + 2;         // signed working width

  logic             have_first, have_last;
  logic [BIN_W-1:0] first_q, last_q;
  logic             busy;
  logic [WC-1:0]    cyc;
  logic [CNT_W-1:0] op_cnt;
  logic [BIN_W-1:0] op_first, op_last;

  logic             got_first, got_last;
  logic [BIN_W-1:0] first_v, last_v;

  assign got_first = have_first | ready_first_i;
  assign got_last  = have_last  | ready_last_i;
  assign first_v   = ready_first_i ? fine_bin_FirstPiece_i : first_q;
  assign last_v    = ready_last_i  ? fine_bin_LastPiece_i  : last_q;

  // Multicycle arithmetic from the operand registers.
  logic signed [SW-1:0] gross, fine, sum;
  always_comb begin
    gross = SW'(op_cnt) * SW'(TCLK_PS);
    fine  = (SW'(op_first) - SW'(op_last)) * SW'(TDELAY_PS);
    sum   = gross + fine;
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      have_first <= 1'b0;
      have_last  <= 1'b0;
      first_q    <= '0;
      last_q     <= '0;
      busy       <= 1'b0;
      cyc        <= '0;
      op_cnt     <= '0;
      op_first   <= '0;
      op_last    <= '0;
      measure_o  <= '0;
      eom_o      <= 1'b0;
    end else begin
      eom_o <= 1'b0;
      if (ready_first_i) first_q <= fine_bin_FirstPiece_i;
      if (ready_last_i)  last_q  <= fine_bin_LastPiece_i;
      if (!busy) begin
        have_first <= got_first;
        have_last  <= got_last;
        if (got_first && got_last) begin
          busy       <= 1'b1;
          cyc        <= '0;
          op_cnt     <= coarse_cnt_i;
          op_first   <= first_v;
          op_last    <= last_v;
          have_first <= 1'b0;
          have_last  <= 1'b0;
        end
      end else begin
        if (cyc == WC'(MERGE_CYCLES - 1)) begin
          busy      <= 1'b0;
          eom_o     <= 1'b1;
          measure_o <= (sum < 0) ? '0 : MEAS_W'(sum);
        end else begin
          cyc <= cyc + 1'b1;
        end
      end
    end
  end

endmodule
