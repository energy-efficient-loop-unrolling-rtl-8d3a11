`timescale 1ns/1ps
// enable_delay_segment: the delay segment between two consecutive
// glitch-filter enables, built from the delay element of the selected FPGA
// family: SLICES carry-chain slices on Xilinx, LUTS chained LUTs on Altera.
// The caller sizes the segment so that its delay exceeds the logic delay of
// the rounds between the two filters.
module enable_delay_segment
  import gf_pkg::*;
#(
  parameter family_e     FAMILY = FAM_XILINX,
  parameter int unsigned SLICES = 6,
  parameter int unsigned LUTS   = 36
) (
  input  logic din,
  output logic dout
);

  if (FAMILY == FAM_XILINX) begin : g_carry
    carry_delay_chain #(.SLICES(SLICES)) u_chain (.din(din), .dout(dout));
  end else begin : g_lut
    lut_delay_chain #(.LUTS(LUTS)) u_chain (.din(din), .dout(dout));
  end

endmodule
