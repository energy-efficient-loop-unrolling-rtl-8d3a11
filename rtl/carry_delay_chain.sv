`timescale 1ns/1ps
// carry_delay_chain (behavioural model): one Xilinx delay segment for the
// glitch-filter enable. On Artix-7 the carry multiplexers (MUXCY) of SLICES
// vertically adjacent slices are cascaded with their selects tied to logic 1,
// so the enable pulse entering the first slice ripples through every carry
// stage; the end of the segment drives one filter's latch enables and the
// next segment. A slice adds a nearly constant SLICE_PS = 780 ps (CYCINIT to
// CO[2]); the routing between slices varies with placement and is not given,
// so ROUTE_PS defaults to 0. The delay is physical, so each slice is one
// # delay in this model; a synthesis tool sees a wire.
// Timing: dout repeats din SLICES * (SLICE_PS + ROUTE_PS) later; pulses must
// be wider than one slice delay (continuous-assignment delays are inertial).
module carry_delay_chain
  import gf_pkg::*;
#(
  parameter int unsigned SLICES   = 6,
  parameter int unsigned SLICE_PS = gf_pkg::XIL_SLICE_PS,
  parameter int unsigned ROUTE_PS = 0
) (
  input  logic din,
  output logic dout
);

  localparam realtime STAGE = (SLICE_PS + ROUTE_PS) * 1ps;

  logic tap [SLICES+1];

  assign tap[0] = din;
  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    assign #(STAGE) tap[s+1] = tap[s];
  end
  assign dout = tap[SLICES];

endmodule
