`timescale 1ns/1ps
// aes256_partial_gf: AES-256 partially unrolled: UNROLL rounds per clock
// cycle with the state registered between cycles, ceil(14 / UNROLL) cycles
// per block. A glitch_filter latch follows every FILTER_SPACING-th round
// inside the unrolled block (every round by default), opened by the
// per-cycle enable pulse delayed through carry-chain or LUT segments.
//
// The round keys are generated iteratively next to the rounds: the last two
// round keys are registered and each round slot derives the next one. Each
// slot knows its global round number, so the slot that executes round 14
// skips MixColumns; if UNROLL does not divide 14 the last cycle takes the
// state after the remaining rounds. Round key 0 is added when the block is
// loaded.
//
// Interface (this design's own): start with data_in/key_in is accepted when
// busy is low, at rising edge n; out_valid pulses for one cycle, with
// data_out valid, after edge n + ceil(14/UNROLL).
module aes256_partial_gf
  import gf_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned UNROLL           = 2,
  parameter int unsigned FILTER_SPACING   = 1,
  parameter int unsigned SLICES_PER_ROUND = 7,
  parameter int unsigned LUTS_PER_ROUND   = 36,
  parameter family_e     FAMILY           = FAM_XILINX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] key_in,
  input  state_t       data_in,
  output logic         busy,
  output logic         out_valid,
  output state_t       data_out
);

  localparam int unsigned NF = (UNROLL - 1) / FILTER_SPACING;

  state_t     st_q;
  state_t     kp_q, ka_q;          // round keys rnd_q and rnd_q + 1
  logic [4:0] rnd_q;               // rounds completed so far

  state_t rin  [UNROLL];
  state_t rout [UNROLL];
  state_t kp   [UNROLL+1];
  state_t ka   [UNROLL+1];
  logic   fin  [UNROLL];
  logic   en   [NF+1];

  logic [4:0] remaining;
  logic       last;
  state_t     result;

  enable_pulse_gen u_pulse (.clk(clk), .pulse(en[0]));

  for (genvar f = 1; f <= NF; f++) begin : g_seg
    enable_delay_segment #(
      .FAMILY(FAMILY),
      .SLICES(FILTER_SPACING * SLICES_PER_ROUND),
      .LUTS  (FILTER_SPACING * LUTS_PER_ROUND)
    ) u_seg (.din(en[f-1]), .dout(en[f]));
  end

  // slot u executes round g = rnd_q + u + 1 with key ka[u]
  always_comb begin
    kp[0] = kp_q;
    ka[0] = ka_q;
    for (int unsigned u = 0; u < UNROLL; u++) begin
      fin[u]  = 32'(rnd_q) + u + 1 == AES_ROUNDS;
      kp[u+1] = ka[u];
      ka[u+1] = next_round_key(kp[u], ka[u][31:0], 32'(rnd_q) + u + 2);
    end
  end

  assign rin[0] = st_q;
  for (genvar u = 0; u < UNROLL; u++) begin : g_round
    aes_round u_round (.din(rin[u]), .rk(ka[u]), .final_rnd(fin[u]), .dout(rout[u]));
    if (u + 1 < UNROLL) begin : g_link
      if ((u + 1) % FILTER_SPACING == 0) begin : g_filter
        glitch_filter #(.WIDTH(128), .FAMILY(FAMILY)) u_gf (
          .en(en[(u+1)/FILTER_SPACING]), .d(rout[u]), .q(rin[u+1]));
      end else begin : g_wire
        assign rin[u+1] = rout[u];
      end
    end
  end

  assign remaining = 5'(AES_ROUNDS) - rnd_q;
  assign last      = remaining <= 5'(UNROLL);

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
        rnd_q <= rnd_q + 5'(UNROLL);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!busy) begin
      if (start) begin
        st_q <= data_in ^ key_in[255:128];
        kp_q <= key_in[255:128];
        ka_q <= key_in[127:0];
      end
    end else if (last) begin
      data_out <= result;
    end else begin
      st_q <= rout[UNROLL-1];
      kp_q <= kp[UNROLL];
      ka_q <= ka[UNROLL];
    end
  end

endmodule
