`timescale 1ns/1ps
// bitonic_unrolled_gf: a bitonic sorter for N unsigned W-bit values (32 x 16
// bit by default, 15 compare-exchange stages) fully unrolled into one clock
// cycle, with an N*W-bit latch glitch filter after every FILTER_SPACING
// stages (two by default, the best energy point found for the sorter).
//
// Same scheme as the unrolled ciphers: launch register, bitonic_stage 0..14
// with glitch_filter latches between stage groups, an enable pulse started at
// the clock edge and delayed per filter by FILTER_SPACING * SLICES_PER_STAGE
// carry-chain slices (7 per stage on Artix-7) or FILTER_SPACING *
// LUTS_PER_STAGE LUTs (36 per stage on Cyclone IV), and an output register
// loaded at the next edge. Element i of data_in/data_out is bits i*W +: W;
// data_out is ascending, element 0 the smallest. One sort per clock, one clock
// of latency; the period must exceed the enable chain (about 78 ns at the
// defaults; the source ran the sorter at 120 ns). Only valid flags are reset.
module bitonic_unrolled_gf
  import gf_pkg::*;
  import bitonic_pkg::*;
#(
  parameter int unsigned N                = 32,
  parameter int unsigned W                = 16,
  parameter int unsigned FILTER_SPACING   = 2,
  parameter int unsigned SLICES_PER_STAGE = 7,
  parameter int unsigned LUTS_PER_STAGE   = 36,
  parameter family_e     FAMILY           = FAM_XILINX
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N*W-1:0] data_in,
  output logic           out_valid,
  output logic [N*W-1:0] data_out
);

  localparam int unsigned S  = num_stages(N);
  localparam int unsigned NF = (S - 1) / FILTER_SPACING;

  logic [N*W-1:0] data_q;
  logic           valid_q;
  logic [N*W-1:0] sin  [S];
  logic [N*W-1:0] sout [S];
  logic           en   [NF+1];

  always_ff @(posedge clk) begin
    if (in_valid) data_q <= data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      valid_q   <= in_valid;
      out_valid <= valid_q;
    end
  end

  always_ff @(posedge clk) begin
    if (valid_q) data_out <= sout[S-1];
  end

  enable_pulse_gen u_pulse (.clk(clk), .pulse(en[0]));

  for (genvar f = 1; f <= NF; f++) begin : g_seg
    enable_delay_segment #(
      .FAMILY(FAMILY),
      .SLICES(FILTER_SPACING * SLICES_PER_STAGE),
      .LUTS  (FILTER_SPACING * LUTS_PER_STAGE)
    ) u_seg (.din(en[f-1]), .dout(en[f]));
  end

  assign sin[0] = data_q;
  for (genvar s = 0; s < S; s++) begin : g_stage
    bitonic_stage #(.N(N), .W(W), .STAGE(s)) u_stage (.din(sin[s]), .dout(sout[s]));
    if (s + 1 < S) begin : g_link
      if ((s + 1) % FILTER_SPACING == 0) begin : g_filter
        glitch_filter #(.WIDTH(N*W), .FAMILY(FAMILY)) u_gf (
          .en(en[(s+1)/FILTER_SPACING]), .d(sout[s]), .q(sin[s+1]));
      end else begin : g_wire
        assign sin[s+1] = sout[s];
      end
    end
  end

endmodule
