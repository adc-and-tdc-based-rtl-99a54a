// pulse_gen: builds the "hit" pulse whose width the TDC measures.
//
// A rising edge on start_i sets hit_o; a rising edge on stop_i clears it.
// Two D flip-flops with their D inputs tied to 1 do this: the first is clocked
// by start_i and drives hit_o, the second is clocked by stop_i, and its output
// clears both flip-flops asynchronously, so it only lives for an instant. The
// block does not use the TDC clock at all: hit_o follows the input edges
// directly, which is what lets the delay line measure them with sub-clock
// precision.
//
// Besides the stop edge, hit_o is also cleared by rst_i and by max_cnt_i, the
// range-limit flag of the counter error block, so a stop that never arrives
// still ends the measurement at the largest value. The flip-flop pair and the
// stop-driven clear follow the design description; the exact set of clear
// sources (reset, stop, range limit, ORed together) is this implementation's
// reading of it.
//
// This is asynchronous logic by intent: the clear of the stop flip-flop is fed
// back from its own output, which yields a reset pulse of one gate delay.
`timescale 1ns / 1ps
module pulse_gen (
  input  logic start_i,    // rising edge starts the interval
  input  logic stop_i,     // rising edge ends the interval
  input  logic rst_i,      // asynchronous reset, active high
  input  logic max_cnt_i,  // range limit reached: force hit low
  output logic hit_o       // high from the start edge to the stop edge
);

  logic start_q;
  logic stop_q;
  logic clr;

  assign clr = rst_i | stop_q | max_cnt_i;

  always_ff @(posedge start_i or posedge clr) begin
    if (clr) start_q <= 1'b0;
    else     start_q <= 1'b1;
  end

  always_ff @(posedge stop_i or posedge clr) begin
    if (clr) stop_q <= 1'b0;
    else     stop_q <= 1'b1;
  end

  assign hit_o = start_q;

endmodule
