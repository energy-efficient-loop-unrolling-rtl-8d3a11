`timescale 1ns/1ps
// simon128_unrolled_gf: SIMON 128/128 with all ROUNDS rounds unrolled into
// one clock cycle and latch glitch filters between groups of rounds.
//
// Structure: the launch register takes data_in at a rising edge. The block
// then ripples through ROUNDS copies of simon_round; after every
// FILTER_SPACING-th round (except the last) a 128-bit glitch_filter latch
// separates the groups. The same edge starts an enable pulse
// (enable_pulse_gen) that travels down a chain of delay segments, one per
// filter, each FILTER_SPACING * SLICES_PER_ROUND carry-chain slices long on
// Xilinx or FILTER_SPACING * LUTS_PER_ROUND LUTs on Altera. The pulse opens
// each latch only after the rounds before it have settled, so each group of
// rounds sees one clean transition on its input instead of the glitches of
// every round before it. The output register takes the last round's result
// at the next rising edge.
//
// Defaults follow the source's best energy point for SIMON: a filter every
// two rounds, three slice delays (or 18 LUT delays) per round. The key
// register, loaded by key_load, feeds a combinational key schedule.
//
// Timing: in_valid/data_in sampled at edge n; out_valid/data_out valid after
// edge n+1, i.e. one encryption per clock with one clock of latency. The clock
// period must exceed the whole enable-chain delay plus the pulse width
// (about 160 ns at the defaults; the source ran SIMON at a 340 ns period).
// Only the valid flags are reset.
module simon128_unrolled_gf
  import gf_pkg::*;
  import simon_pkg::*;
#(
  parameter int unsigned ROUNDS           = SIMON_ROUNDS,
  parameter int unsigned FILTER_SPACING   = 2,
  parameter int unsigned SLICES_PER_ROUND = 3,
  parameter int unsigned LUTS_PER_ROUND   = 18,
  parameter family_e     FAMILY           = FAM_XILINX
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key_in,
  input  logic   in_valid,
  input  block_t data_in,
  output logic   out_valid,
  output block_t data_out
);

  localparam int unsigned NF = (ROUNDS - 1) / FILTER_SPACING;  // number of filters

  block_t key_q, data_q;
  logic   valid_q;
  word_t  rk [ROUNDS];
  block_t rin  [ROUNDS];
  block_t rout [ROUNDS];
  logic   en [NF+1];

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
    if (valid_q) data_out <= rout[ROUNDS-1];
  end

  simon_key_expand #(.ROUNDS(ROUNDS)) u_keys (.key(key_q), .rk(rk));

  enable_pulse_gen u_pulse (.clk(clk), .pulse(en[0]));

  for (genvar f = 1; f <= NF; f++) begin : g_seg
    enable_delay_segment #(
      .FAMILY(FAMILY),
      .SLICES(FILTER_SPACING * SLICES_PER_ROUND),
      .LUTS  (FILTER_SPACING * LUTS_PER_ROUND)
    ) u_seg (.din(en[f-1]), .dout(en[f]));
  end

  assign rin[0] = data_q;
  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    simon_round u_round (.din(rin[r]), .rk(rk[r]), .dout(rout[r]));
    if (r + 1 < ROUNDS) begin : g_link
      if ((r + 1) % FILTER_SPACING == 0) begin : g_filter
        glitch_filter #(.WIDTH(128), .FAMILY(FAMILY)) u_gf (
          .en(en[(r+1)/FILTER_SPACING]), .d(rout[r]), .q(rin[r+1]));
      end else begin : g_wire
        assign rin[r+1] = rout[r];
      end
    end
  end

endmodule
