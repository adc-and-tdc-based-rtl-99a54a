// tdc_pkg: constants and types shared by the blocks of the time-to-digital
// converter (TDC).
//
// The TDC runs from a 500 MHz clock (2 ns period). Its fine interpolator is a
// tapped delay line of 45 digital cells of about 50 ps each, so the line is a
// little longer than one clock period. The coarse counter is 10 bits wide,
// enough for a 200 m range (about 1.4 us of round trip, 704 clock periods).
// The measurement leaves the TDC as a 21-bit value in picoseconds. Those
// numbers all come from the design description; the state encoding of the
// synchronizer is this implementation's own.
`timescale 1ns / 1ps
package tdc_pkg;

  localparam int unsigned TCLK_PS      = 2000;  // clock period, ps
  localparam int unsigned TDELAY_PS    = 50;    // delay of one digital cell, ps
  localparam int unsigned NUM_CELLS    = 45;    // digital cells (CARRY4) in the line
  localparam int unsigned CNT_W        = 10;    // coarse counter width
  localparam int unsigned BIN_W        = 8;     // fine code width
  localparam int unsigned MEAS_W       = 21;    // measurement width, ps
  localparam int unsigned MERGE_CYCLES = 6;     // cycles given to the merge arithmetic
  localparam logic [3:0]  MAX_CNT_MSBS = 4'b1011; // counter MSBs that flag the range limit

  // Synchronizer states, named after the state of the delay line.
  typedef enum logic [1:0] {
    S_IDLE     = 2'd0,  // line empty, waiting for a hit to enter it
    S_FILLING  = 2'd1,  // first piece stored, waiting for full or emptying
    S_FULL     = 2'd2,  // counting periods in which the line is full
    S_EMPTYING = 2'd3   // last piece stored, waiting for the end of measurement
  } sync_state_t;

endpackage
