// thermo2bin_pipeline: pipelined mux-based thermometer-to-binary encoder with
// a ones counter in its last stage.
//
// It returns the number of ones in a thermometer code whose ones fill from
// bit 0 upwards. The code is padded with zeros to P = 2^k bits. Each mux stage
// then halves the part still in question, binary-search style: if the top bit
// of the lower half is 1 the lower half is taken as full, its size is added
// to the running count and the upper half is kept; otherwise the upper half is
// taken as empty and the lower half is kept. When FINAL_W bits remain, a ones
// counter adds them up. Because that last segment is counted rather than
// searched, bubbles (isolated wrong bits) near the transition cost at most a
// small error instead of a wrong power of two.
//
// Interface: valid/thermo in, ready/bin out. Every stage is registered, so a
// new code is accepted each cycle and the result appears LATENCY cycles later
// with a one-cycle ready pulse: LATENCY = 1 (input register) + log2(P/FINAL_W)
// (mux stages) + 1 (ones counter). For the 45-cell line (P = 64, FINAL_W = 8)
// that is 5 cycles. Counts above 2^BIN_W-1 saturate.
//
// The port list (clock, active-low reset, valid, thermo[255:0], ready,
// bin[7:0]) and "pipelined mux encoder with a ones counter at the end" are the
// design description's; the stage arrangement and FINAL_W are this
// implementation's own choices.
`timescale 1ns / 1ps
module thermo2bin_pipeline #(
  parameter int unsigned THERMO_W = 256,  // thermometer code width
  parameter int unsigned BIN_W    = 8,    // output width
  parameter int unsigned FINAL_W  = 8     // bits left for the ones counter
) (
  input  logic                clock,
  input  logic                reset,   // synchronous, active low
  input  logic                valid,   // thermo holds a code to convert
  input  logic [THERMO_W-1:0] thermo,
  output logic                ready,   // bin holds a result (one cycle)
  output logic [BIN_W-1:0]    bin
);

  localparam int unsigned P      = 2 ** $clog2(THERMO_W);
  localparam int unsigned FW     = (FINAL_W < P) ? FINAL_W : P;
  localparam int unsigned STAGES = $clog2(P / FW);
  localparam int unsigned CW     = $clog2(P + 1);

  logic [STAGES:0][P-1:0]  seg_q;   // part of the code still in question
  logic [STAGES:0][CW-1:0] acc_q;   // ones already accounted for
  logic [STAGES:0]         vld_q;

  // Input register.
  always_ff @(posedge clock) begin
    if (!reset) begin
      vld_q[0] <= 1'b0;
      seg_q[0] <= '0;
      acc_q[0] <= '0;
    end else begin
      vld_q[0] <= valid;
      seg_q[0] <= P'(thermo);
      acc_q[0] <= '0;
    end
  end

  // Mux stages: stage s+1 works on a segment of P >> (s+1) bits.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned HALF = P >> (s + 1);
    always_ff @(posedge clock) begin
      if (!reset) begin
        vld_q[s+1] <= 1'b0;
        seg_q[s+1] <= '0;
        acc_q[s+1] <= '0;
      end else begin
        vld_q[s+1] <= vld_q[s];
        if (seg_q[s][HALF-1]) begin
          seg_q[s+1] <= P'(seg_q[s][2*HALF-1:HALF]);
          acc_q[s+1] <= acc_q[s] + CW'(HALF);
        end else begin
          seg_q[s+1] <= P'(seg_q[s][HALF-1:0]);
          acc_q[s+1] <= acc_q[s];
        end
      end
    end
  end

  // Ones counter over the last segment.
  logic [CW-1:0] total;
  always_comb begin
    total = acc_q[STAGES];
    for (int i = 0; i < FW; i++) total = total + CW'(seg_q[STAGES][i]);
  end

  always_ff @(posedge clock) begin
    if (!reset) begin
      ready <= 1'b0;
      bin   <= '0;
    end else begin
      ready <= vld_q[STAGES];
      if (vld_q[STAGES]) begin
        if (CW > BIN_W && total > CW'((2 ** BIN_W) - 1)) bin <= '1;
        else                                              bin <= BIN_W'(total);
      end
    end
  end

endmodule
