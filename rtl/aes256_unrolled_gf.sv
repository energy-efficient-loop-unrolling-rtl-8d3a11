`timescale 1ns/1ps
// aes256_unrolled_gf: AES-256 encryption with all 14 rounds unrolled into one
// clock cycle and a latch glitch filter after every FILTER_SPACING rounds
// (every round by default, the best energy point found for AES).
//
// Structure and timing are those of simon128_unrolled_gf: launch register,
// round 1 (whose input already has round key 0 added), round 2 ... round 14
// (no MixColumns), 128-bit glitch_filter latches between round groups, an
// enable pulse started at the clock edge and delayed by FILTER_SPACING *
// SLICES_PER_ROUND slices (7 per round on Artix-7) or FILTER_SPACING *
// LUTS_PER_ROUND LUTs (36 per round on Cyclone IV) per filter, and an output
// register loaded at the next edge. The key register feeds a combinational
// key expansion. One encryption per clock, one clock of latency; the clock
// period must exceed the enable chain (about 72 ns at the defaults; the
// source ran AES at 175 ns). Only the valid flags are reset.
module aes256_unrolled_gf
  import gf_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned FILTER_SPACING   = 1,
  parameter int unsigned SLICES_PER_ROUND = 7,
  parameter int unsigned LUTS_PER_ROUND   = 36,
  parameter family_e     FAMILY           = FAM_XILINX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_load,
  input  logic [255:0] key_in,
  input  logic         in_valid,
  input  state_t       data_in,
  output logic         out_valid,
  output state_t       data_out
);

  localparam int unsigned R  = AES_ROUNDS;
  localparam int unsigned NF = (R - 1) / FILTER_SPACING;

  logic [255:0] key_q;
  state_t       data_q;
  logic         valid_q;
  state_t       rk   [15];
  state_t       rin  [R];
  state_t       rout [R];
  logic         en   [NF+1];

  always_ff @(posedge clk) begin
    if (key_load) key_q <= key_in;
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
    if (valid_q) data_out <= rout[R-1];
  end

  aes256_key_expand u_keys (.key(key_q), .rk(rk));

  enable_pulse_gen u_pulse (.clk(clk), .pulse(en[0]));

  for (genvar f = 1; f <= NF; f++) begin : g_seg
    enable_delay_segment #(
      .FAMILY(FAMILY),
      .SLICES(FILTER_SPACING * SLICES_PER_ROUND),
      .LUTS  (FILTER_SPACING * LUTS_PER_ROUND)
    ) u_seg (.din(en[f-1]), .dout(en[f]));
  end

  assign rin[0] = data_q ^ rk[0];
  for (genvar r = 0; r < R; r++) begin : g_round
    aes_round u_round (.din(rin[r]), .rk(rk[r+1]), .final_rnd(1'(r == R - 1)), .dout(rout[r]));
    if (r + 1 < R) begin : g_link
      if ((r + 1) % FILTER_SPACING == 0) begin : g_filter
        glitch_filter #(.WIDTH(128), .FAMILY(FAMILY)) u_gf (
          .en(en[(r+1)/FILTER_SPACING]), .d(rout[r]), .q(rin[r+1]));
      end else begin : g_wire
        assign rin[r+1] = rout[r];
      end
    end
  end

endmodule
