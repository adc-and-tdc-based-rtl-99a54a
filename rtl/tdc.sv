// tdc: all-digital time-to-digital converter for direct time-of-flight LiDAR.
//
// It measures the time from a rising edge on start_i (laser fired) to a
// rising edge on stop_i (echo received) and reports it in picoseconds. Coarse
// time is counted in 2 ns clock periods; the fractions of a period at the two
// ends are read from a tapped delay line of 45 cells of about 50 ps.
//
//   start/stop -> pulse_gen -> hit -> tdl_carry_chain -> taps
//   taps -> remap_logic (sampling row + first/last-piece banks)
//   first/last sampled taps -> tdc_synchronizer -> store enables, count enable
//   coarse_cnt (N = full periods + 1) -> counter_error -> max_cnt clears hit
//   stored codes -> t2b_decoder -> Fine_start (ones), Fine_stop (zeros)
//   tdc_merge: T = N*2000 + (Fine_start - Fine_stop)*50 ps, eom_o
//
// Timing: the hit must span at least two clock edges (about 2 ns or more).
// measure_o is valid when eom_o pulses, 13 clock cycles (26 ns at 500 MHz)
// after the first clock edge that samples the line emptying. A stop that has
// not come when the counter reaches 704 periods ends the measurement there
// (max_cnt_o is then high until the TDC returns to idle). en_i pauses the
// control logic. rst_i is active high; it is applied synchronously to the
// control logic and asynchronously to the pulse generator and the sampling
// registers.
//
// The delay line is a behavioural model (on the FPGA it is a chain of CARRY4
// primitives), so this module simulates with real delays but only the rest of
// it is synthesizable logic. The block structure and all sizes follow the
// design description; the joins between blocks (valid/ready pulses, return to
// idle on eom_o, counter cleared in idle) are this implementation's choices.
//
// Lint notes: rst_i reaches both synchronous and asynchronous flip-flops on
// purpose (see above), which linters report as a net flopped both ways. The
// synchronizer's state output is a debug view and is left open here.
`timescale 1ns / 1ps
module tdc #(
  parameter int unsigned NUM_CELLS     = tdc_pkg::NUM_CELLS,
  parameter int unsigned CELL_DELAY_PS = tdc_pkg::TDELAY_PS,  // delay of the modelled line
  parameter int unsigned TDELAY_PS     = tdc_pkg::TDELAY_PS,  // delay assumed by the merge
  parameter int unsigned TCLK_PS       = tdc_pkg::TCLK_PS,
  parameter int unsigned CNT_W         = tdc_pkg::CNT_W,
  parameter int unsigned BIN_W         = tdc_pkg::BIN_W,
  parameter int unsigned MEAS_W        = tdc_pkg::MEAS_W
) (
  input  logic              clk_i,       // 500 MHz
  input  logic              rst_i,
  input  logic              en_i,
  input  logic              start_i,
  input  logic              stop_i,
  output logic [MEAS_W-1:0] measure_o,   // interval in ps
  output logic              eom_o,       // end of measurement, one cycle
  output logic              max_cnt_o    // range limit reached
);

  logic                   hit;
  logic [4*NUM_CELLS-1:0] taps;
  logic                   first, last;
  logic                   store_first, store_last, cnt_en, cnt_clr;
  logic                   first_valid, last_valid;
  logic [NUM_CELLS-1:0]   therm_first, therm_last;
  logic [CNT_W-1:0]       coarse_cnt;
  logic                   first_ready, last_ready;
  logic [BIN_W-1:0]       fine_first, fine_last;

  pulse_gen u_pulse_gen (
    .start_i  (start_i),
    .stop_i   (stop_i),
    .rst_i    (rst_i),
    .max_cnt_i(max_cnt_o),
    .hit_o    (hit)
  );

  tdl_carry_chain #(.NUM_CELLS(NUM_CELLS), .CELL_DELAY_PS(CELL_DELAY_PS)) u_tdl (
    .hit_i (hit),
    .taps_o(taps)
  );

  remap_logic #(.NUM_CELLS(NUM_CELLS)) u_remap (
    .clk_i        (clk_i),
    .rst_i        (rst_i),
    .taps_i       (taps),
    .store_first_i(store_first),
    .store_last_i (store_last),
    .first_o      (first),
    .last_o       (last),
    .therm_first_o(therm_first),
    .therm_last_o (therm_last)
  );

  tdc_synchronizer u_sync (
    .clk_i        (clk_i),
    .rst_i        (rst_i),
    .en_i         (en_i),
    .first_i      (first),
    .last_i       (last),
    .eom_i        (eom_o),
    .store_first_o(store_first),
    .store_last_o (store_last),
    .cnt_en_o     (cnt_en),
    .cnt_clr_o    (cnt_clr),
    .first_valid_o(first_valid),
    .last_valid_o (last_valid),
    .state_o      ()
  );

  coarse_cnt #(.CNT_W(CNT_W)) u_cnt (
    .clk_i       (clk_i),
    .nrst_i      (!(rst_i || cnt_clr)),
    .cnt_en_i    (cnt_en),
    .coarse_cnt_o(coarse_cnt)
  );

  counter_error #(.CNT_W(CNT_W), .MAX_MSBS(tdc_pkg::MAX_CNT_MSBS)) u_err (
    .coarse_cnt_i(coarse_cnt),
    .max_cnt_o   (max_cnt_o)
  );

  t2b_decoder #(.NUM_CELLS(NUM_CELLS), .BIN_W(BIN_W)) u_t2b (
    .clk_i        (clk_i),
    .rst_i        (rst_i),
    .first_valid_i(first_valid),
    .therm_first_i(therm_first),
    .last_valid_i (last_valid),
    .therm_last_i (therm_last),
    .first_ready_o(first_ready),
    .fine_first_o (fine_first),
    .last_ready_o (last_ready),
    .fine_last_o  (fine_last)
  );

  tdc_merge #(
    .CNT_W(CNT_W), .BIN_W(BIN_W), .MEAS_W(MEAS_W),
    .TCLK_PS(TCLK_PS), .TDELAY_PS(TDELAY_PS), .MERGE_CYCLES(tdc_pkg::MERGE_CYCLES)
  ) u_merge (
    .clk_i                (clk_i),
    .rst_i                (rst_i),
    .coarse_cnt_i         (coarse_cnt),
    .ready_first_i        (first_ready),
    .fine_bin_FirstPiece_i(fine_first),
    .ready_last_i         (last_ready),
    .fine_bin_LastPiece_i (fine_last),
    .measure_o            (measure_o),
    .eom_o                (eom_o)
  );

endmodule
