// remap_logic: sampling registers of the delay line and the re-mapping logic.
//
// Two rows of registers sit after the tapped delay line.
//  * The first row samples every tap at each rising clock edge. It takes the
//    "photo" of the line and is also the first stage against metastability.
//    Its first and last bits (the tap nearest the hit input and the farthest
//    one) go to the synchronizer as first_o and last_o.
//  * The second row is the re-mapping logic proper: two banks of NUM_CELLS
//    registers with clock enables. They take the last tap of each digital cell
//    (tap 4k+3) from the first row. The bank enabled by store_first_i keeps the
//    thermometer code of the line while it fills (first piece of the hit), the
//    bank enabled by store_last_i the code while it empties (last piece).
//
// Timing: a tap is seen on first_o/last_o one clock after it was sampled; a
// store enable asserted in that cycle captures that same sample at the next
// edge. The register structure, the choice of taps and the enable names follow
// the design description. rst_i clears all registers asynchronously (the
// design used clear-enabled flip-flops).
`timescale 1ns / 1ps
module remap_logic #(
  parameter int unsigned NUM_CELLS = 45
) (
  input  logic                   clk_i,
  input  logic                   rst_i,          // asynchronous clear, active high
  input  logic [4*NUM_CELLS-1:0] taps_i,         // raw taps of the delay line
  input  logic                   store_first_i,  // enable of the first-piece bank
  input  logic                   store_last_i,   // enable of the last-piece bank
  output logic                   first_o,        // sampled first tap
  output logic                   last_o,         // sampled last tap
  output logic [NUM_CELLS-1:0]   therm_first_o,  // stored filling code
  output logic [NUM_CELLS-1:0]   therm_last_o    // stored emptying code
);

  logic [4*NUM_CELLS-1:0] tdl_val_r;
  logic [NUM_CELLS-1:0]   cell_val;

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) tdl_val_r <= '0;
    else       tdl_val_r <= taps_i;
  end

  for (genvar k = 0; k < NUM_CELLS; k++) begin : g_cell
    assign cell_val[k] = tdl_val_r[4*k+3];
  end

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      therm_first_o <= '0;
      therm_last_o  <= '0;
    end else begin
      if (store_first_i) therm_first_o <= cell_val;
      if (store_last_i)  therm_last_o  <= cell_val;
    end
  end

  assign first_o = tdl_val_r[0];
  assign last_o  = tdl_val_r[4*NUM_CELLS-1];

endmodule
