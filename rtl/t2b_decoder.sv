// t2b_decoder: turns the two stored thermometer codes into fine counts.
//
// Two thermo2bin_pipeline encoders run side by side.
//  * First piece (line filling, ones from the input end): its number of ones
//    is Fine_start, the part of the first clock period covered by the hit.
//  * Last piece (line emptying, zeros from the input end, ones beyond): its
//    number of zeros is Fine_stop, the part of the last period after the hit
//    fell. The encoder counts ones, so the code is fed bit-reversed (putting
//    the ones at bit 0, as the encoder expects) and the count is subtracted
//    from NUM_CELLS.
// Each side has its own valid in and ready out, so a code is converted as soon
// as it is stored; both results appear 5 cycles after their valid for 45
// cells. Outputs hold until the next conversion.
//
// Counting ones on one side and zeros (cells minus ones) on the other follows
// the design description. The bit reversal is this implementation's way of
// serving both codes with the same ones-counting encoder.
`timescale 1ns / 1ps
module t2b_decoder #(
  parameter int unsigned NUM_CELLS = 45,
  parameter int unsigned BIN_W     = 8
) (
  input  logic                 clk_i,
  input  logic                 rst_i,            // synchronous, active high
  input  logic                 first_valid_i,
  input  logic [NUM_CELLS-1:0] therm_first_i,
  input  logic                 last_valid_i,
  input  logic [NUM_CELLS-1:0] therm_last_i,
  output logic                 first_ready_o,
  output logic [BIN_W-1:0]     fine_first_o,     // ones in the first piece
  output logic                 last_ready_o,
  output logic [BIN_W-1:0]     fine_last_o       // zeros in the last piece
);

  logic [NUM_CELLS-1:0] last_rev;
  logic [BIN_W-1:0]     last_ones;

  always_comb begin
    for (int i = 0; i < NUM_CELLS; i++) last_rev[i] = therm_last_i[NUM_CELLS-1-i];
  end

  thermo2bin_pipeline #(.THERMO_W(NUM_CELLS), .BIN_W(BIN_W)) u_first (
    .clock (clk_i),
    .reset (!rst_i),
    .valid (first_valid_i),
    .thermo(therm_first_i),
    .ready (first_ready_o),
    .bin   (fine_first_o)
  );

  thermo2bin_pipeline #(.THERMO_W(NUM_CELLS), .BIN_W(BIN_W)) u_last (
    .clock (clk_i),
    .reset (!rst_i),
    .valid (last_valid_i),
    .thermo(last_rev),
    .ready (last_ready_o),
    .bin   (last_ones)
  );

  assign fine_last_o = BIN_W'(NUM_CELLS) - last_ones;

endmodule
