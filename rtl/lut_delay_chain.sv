`timescale 1ns/1ps
// lut_delay_chain (behavioural model): one Altera delay segment for the
// glitch-filter enable. On Cyclone IV, LUT4s of adjacent logic elements in a
// LAB are connected output to input, each passing the enable pulse on. One
// element costs LUT_PS = 155 ps plus about ROUTE_PS = 200 ps of routing
// within the LAB. The flip-flops of those logic elements stay free for user
// logic. The delay is physical, so each LUT is one # delay in this model; a
// synthesis tool sees a wire.
// Timing: dout repeats din LUTS * (LUT_PS + ROUTE_PS) later.
module lut_delay_chain
  import gf_pkg::*;
#(
  parameter int unsigned LUTS     = 36,
  parameter int unsigned LUT_PS   = gf_pkg::ALT_LUT_PS,
  parameter int unsigned ROUTE_PS = gf_pkg::ALT_ROUTE_PS
) (
  input  logic din,
  output logic dout
);

  localparam realtime STAGE = (LUT_PS + ROUTE_PS) * 1ps;

  logic tap [LUTS+1];

  assign tap[0] = din;
  for (genvar l = 0; l < LUTS; l++) begin : g_lut
    assign #(STAGE) tap[l+1] = tap[l];
  end
  assign dout = tap[LUTS];

endmodule
