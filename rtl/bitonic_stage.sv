`timescale 1ns/1ps
// bitonic_stage: stage STAGE (0-based) of an N-input bitonic sorting network
// of unsigned W-bit values, as combinational compare-exchange logic. Element
// i is paired with i ^ j and the pair is ordered ascending when (i & k) == 0,
// descending otherwise; k and j come from the stage number (bitonic_pkg).
// Element i of din/dout occupies bits i*W +: W.
module bitonic_stage
  import bitonic_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned W     = 16,
  parameter int unsigned STAGE = 0
) (
  input  logic [N*W-1:0] din,
  output logic [N*W-1:0] dout
);

  localparam int unsigned K = stage_k(STAGE);
  localparam int unsigned J = stage_j(STAGE);

  for (genvar i = 0; i < N; i++) begin : g_el
    localparam int unsigned P  = i ^ J;      // partner
    localparam bit          UP = (i & K) == 0;
    logic [W-1:0] a, b, lo, hi;
    assign a  = din[i*W +: W];
    assign b  = din[P*W +: W];
    assign lo = (a < b) ? a : b;
    assign hi = (a < b) ? b : a;
    // the lower index of an ascending pair takes the smaller value
    assign dout[i*W +: W] = ((i < P) == UP) ? lo : hi;
  end

endmodule
