// tdl_carry_chain: behavioural model of the tapped delay line.
//
// BEHAVIOURAL MODEL, not synthesizable logic. On the FPGA the line is a chain
// of NUM_CELLS CARRY4 carry-chain primitives placed one above the other, each
// configured as four cascaded multiplexers that simply pass the carry on
// (select inputs at 1, data inputs at 0), with hit_i entering the carry
// initialisation input of the first one. Each CARRY4 is one digital cell. The
// 4*NUM_CELLS carry outputs are the taps.
//
// The model follows the simulation model of the design description: all four
// taps of a cell follow the previous cell (or hit_i) after CELL_DELAY_PS, so a
// step on hit_i travels along the line at one cell per CELL_DELAY_PS. With the
// default 45 cells of 50 ps the line spans 2.25 ns, a little more than the
// 2 ns clock period, as the design requires.
//
// Interface: hit_i in, taps_o out, bit 0 nearest to hit_i. No clock.
`timescale 1ns / 1ps
module tdl_carry_chain #(
  parameter int unsigned NUM_CELLS     = 45,  // digital cells (CARRY4) in the line
  parameter int unsigned CELL_DELAY_PS = 50   // propagation delay of one cell
) (
  input  logic                     hit_i,
  output logic [4*NUM_CELLS-1:0]   taps_o
);

  localparam realtime CellDelay = CELL_DELAY_PS * 1ps;

  logic [NUM_CELLS-1:0] stage;

  assign #(CellDelay) stage[0] = hit_i;

  for (genvar i = 1; i < NUM_CELLS; i++) begin : g_cell
    assign #(CellDelay) stage[i] = stage[i-1];
  end

  for (genvar i = 0; i < NUM_CELLS; i++) begin : g_tap
    assign taps_o[4*i +: 4] = {4{stage[i]}};
  end

endmodule
