`timescale 1ns/1ps
// simon128_partial_gf: SIMON 128/128 partially unrolled: UNROLL rounds are
// computed per clock cycle and the state is registered between cycles, so an
// encryption takes ceil(68 / UNROLL) cycles at a clock UNROLL times shorter
// than a fully rolled one would need per round (4 rounds per cycle allows
// about 50 MHz on Artix-7). Inside the unrolled block, a glitch_filter latch
// follows every FILTER_SPACING-th round, opened by the per-cycle enable pulse
// delayed through carry-chain (Xilinx) or LUT (Altera) segments, exactly as in
// the fully unrolled design.
//
// Unlike the fully unrolled version the round keys are not all present at
// once: the two most recent round keys are registered and the key schedule
// is unrolled alongside the rounds (UNROLL key steps per cycle). When UNROLL
// does not divide 68, the last cycle takes the state after the rounds that
// remain and ignores the rest of the block.
//
// Interface (this design's own): start with data_in/key_in is accepted when
// busy is low, at rising edge n. out_valid pulses for one cycle, with data_out
// valid, after edge n + ceil(68/UNROLL). The filter placement inside the
// block and the handshake are this design's choices.
module simon128_partial_gf
  import gf_pkg::*;
  import simon_pkg::*;
#(
  parameter int unsigned UNROLL           = 4,
  parameter int unsigned FILTER_SPACING   = 2,
  parameter int unsigned SLICES_PER_ROUND = 3,
  parameter int unsigned LUTS_PER_ROUND   = 18,
  parameter family_e     FAMILY           = FAM_XILINX
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key_in,
  input  block_t data_in,
  output logic   busy,
  output logic   out_valid,
  output block_t data_out
);

  localparam int unsigned NF = (UNROLL - 1) / FILTER_SPACING;

  block_t     st_q;
  word_t      ka_q, kb_q;          // round keys rnd_q and rnd_q + 1
  logic [6:0] rnd_q;               // rounds completed so far

  block_t rin  [UNROLL];
  block_t rout [UNROLL];
  word_t  ka   [UNROLL+1];
  word_t  kb   [UNROLL+1];
  logic   en   [NF+1];

  logic [6:0] remaining;
  logic       last;
  block_t     result;

  enable_pulse_gen u_pulse (.clk(clk), .pulse(en[0]));

  for (genvar f = 1; f <= NF; f++) begin : g_seg
    enable_delay_segment #(
      .FAMILY(FAMILY),
      .SLICES(FILTER_SPACING * SLICES_PER_ROUND),
      .LUTS  (FILTER_SPACING * LUTS_PER_ROUND)
    ) u_seg (.din(en[f-1]), .dout(en[f]));
  end

  // key schedule, unrolled alongside the rounds
  always_comb begin
    ka[0] = ka_q;
    kb[0] = kb_q;
    for (int unsigned u = 0; u < UNROLL; u++) begin
      ka[u+1] = kb[u];
      kb[u+1] = key_next(ka[u], kb[u], 32'(rnd_q) + u);
    end
  end

  assign rin[0] = st_q;
  for (genvar u = 0; u < UNROLL; u++) begin : g_round
    simon_round u_round (.din(rin[u]), .rk(ka[u]), .dout(rout[u]));
    if (u + 1 < UNROLL) begin : g_link
      if ((u + 1) % FILTER_SPACING == 0) begin : g_filter
        glitch_filter #(.WIDTH(128), .FAMILY(FAMILY)) u_gf (
          .en(en[(u+1)/FILTER_SPACING]), .d(rout[u]), .q(rin[u+1]));
      end else begin : g_wire
        assign rin[u+1] = rout[u];
      end
    end
  end

  assign remaining = 7'(SIMON_ROUNDS) - rnd_q;
  assign last      = remaining <= 7'(UNROLL);

  always_comb begin
    result = rout[UNROLL-1];
    for (int unsigned u = 0; u < UNROLL; u++)
      if (32'(remaining) == u + 1) result = rout[u];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      rnd_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          rnd_q <= '0;
        end
      end else if (last) begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
      end else begin
        rnd_q <= rnd_q + 7'(UNROLL);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!busy) begin
      if (start) begin
        st_q <= data_in;
        ka_q <= key_in[63:0];
        kb_q <= key_in[127:64];
      end
    end else if (last) begin
      data_out <= result;
    end else begin
      st_q <= rout[UNROLL-1];
      ka_q <= ka[UNROLL];
      kb_q <= kb[UNROLL];
    end
  end

endmodule
