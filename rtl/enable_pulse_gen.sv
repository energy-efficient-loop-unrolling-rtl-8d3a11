`timescale 1ns/1ps
// enable_pulse_gen (behavioural model): makes one enable pulse per clock for
// the glitch-filter latches. A delayed copy of the clock is inverted and
// ANDed with the clock in one LUT, so the output goes high at each rising
// clock edge and falls PULSE_PS later, when the delayed clock catches up.
// The delay is a physical delay element, so it is modelled with a # delay and
// this file is a simulation model of the circuit; synthesis sees only the AND
// of the clock with its own inverse. The pulse width is this design's choice
// (the source only requires a pulse); it must exceed one delay-chain element
// so that the inertial delays of the chain pass it on.
module enable_pulse_gen
  import gf_pkg::*;
#(
  parameter int unsigned PULSE_PS = gf_pkg::DEF_PULSE_PS
) (
  input  logic clk,
  output logic pulse
);

  localparam realtime DELAY = PULSE_PS * 1ps;

  logic clk_dly;

  assign #(DELAY) clk_dly = clk;
  assign pulse = clk & ~clk_dly;

endmodule
