`timescale 1ns/1ps
// gf_pkg: types and constants shared by the glitch-filtered unrolled designs.
//
// The designs unroll an iterative function (a block-cipher round or a sorting
// stage) and put a transparent latch after every few iterations. The latch
// enables come from one pulse per clock, launched at the rising edge and
// delayed through a chain of FPGA carry-chain slices (Xilinx) or LUTs (Altera).
// FAMILY selects which of the two delay elements and latch styles is used.
// The per-element delays are the figures measured for Artix-7 and Cyclone IV;
// the pulse width is this design's own choice.
package gf_pkg;

  typedef enum logic [0:0] {
    FAM_XILINX = 1'b0,  // LDCE-style latch, carry-chain delay segments
    FAM_ALTERA = 1'b1   // LUT feedback latch, LUT delay segments
  } family_e;

  // Carry chain delay of one Artix-7 slice, CYCINIT to CO[2], in ps.
  localparam int unsigned XIL_SLICE_PS = 780;
  // Cyclone IV LUT delay and average LUT-to-LUT routing delay in a LAB, in ps.
  localparam int unsigned ALT_LUT_PS   = 155;
  localparam int unsigned ALT_ROUTE_PS = 200;
  // Width of the enable pulse (own choice: wider than one chain element).
  localparam int unsigned DEF_PULSE_PS = 1500;

endpackage
