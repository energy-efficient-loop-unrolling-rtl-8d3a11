`timescale 1ns/1ps
// glitch_filter: a WIDTH-bit transparent latch placed on the output of an
// unrolled round. While the enable en is high the latch passes d to q; when
// en falls it holds the last value. The enable is a short pulse that arrives
// only after the round output has settled, so the glitches the round produces
// on d never reach the next round: the next round sees one clean transition.
//
// FAMILY selects how the latch is built, following the two FPGA families the
// technique was demonstrated on:
//   FAM_XILINX  a level-sensitive storage element (on Artix-7 the LDCE latch,
//               a slice flip-flop with SR tied low and CE tied high, enable on
//               its clock pin). Written as always_latch.
//   FAM_ALTERA  Cyclone IV flip-flops cannot be latches, so each bit is one LUT
//               whose output feeds back to one of its inputs. The LUT function
//               q = en&d | ~en&q | d&q is this design's choice: the last
//               (consensus) term keeps q steady while en switches with d = q.
//               The feedback is an intended combinational loop; it is the
//               latch, and tools will report it as a loop.
// Either style is reported as a latch by synthesis; that is the purpose of
// the block. (Verilator's lint may say NOLATCH for the always_latch once the
// module is inlined into a larger design; the block is a latch regardless.) There is no reset, as in the LDCE with SR tied to logic 0.
// Timing: q follows d with no clock; it must be stable before en falls.
module glitch_filter
  import gf_pkg::*;
#(
  parameter int unsigned WIDTH  = 128,
  parameter family_e     FAMILY = FAM_XILINX
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (FAMILY == FAM_XILINX) begin : g_ldce
    always_latch begin
      if (en) q = d;
    end
  end else begin : g_lut_loop
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      assign q[b] = (en & d[b]) | (~en & q[b]) | (d[b] & q[b]);
    end
  end

endmodule
