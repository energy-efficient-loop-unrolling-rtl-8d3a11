`timescale 1ns/1ps
// gf_top: the measurement setup around the glitch-filtered designs. Each
// design under test is fed by its own free-running cycle counter and
// initialised stimulus ROM, so it receives a new data word every clock, and
// its result leaves the chip on output ports (where a logic analyser would
// observe it). Five designs stand side by side, each on its own clock because
// each is run at its own latency:
//   SIMON-128 fully unrolled, filter every 2 rounds      (clk_simon, ~340 ns)
//   AES-256   fully unrolled, filter every round         (clk_aes,   ~175 ns)
//   bitonic sort 32 x 16 bit, filter every 2 stages      (clk_sort,  ~120 ns)
//   SIMON-128 partially unrolled, 4 rounds per cycle     (clk_simon_p, ~20 ns)
//   AES-256   partially unrolled, 2 rounds per cycle     (clk_aes_p,   ~25 ns)
// The fully unrolled designs take a ROM word whenever run is high and give
// one result per clock one clock later. The partially unrolled designs start
// a block whenever run is high and they are idle. The cipher keys enter
// through key ports and are held in each design's key register (key_load for
// the fully unrolled ones; the partial ones take the key at each start, so it
// should be held steady while run is high).
// FAMILY selects the Xilinx (carry-chain delays, LDCE latches) or Altera
// (LUT delays, LUT feedback latches) form of every filter.
// Analog and vendor parts of the setup (current sensing, XADC, JTAG bridge,
// logic analyser, the FFT core of the embedded-application test) are not
// included; their place is the ports.
module gf_top
  import gf_pkg::*;
#(
  parameter family_e     FAMILY    = FAM_XILINX,
  parameter int unsigned ROM_DEPTH = 16
) (
  input  logic           rst_n,
  input  logic           run,
  input  logic           clk_simon,
  input  logic           clk_aes,
  input  logic           clk_sort,
  input  logic           clk_simon_p,
  input  logic           clk_aes_p,
  input  logic           simon_key_load,
  input  logic [127:0]   simon_key,
  input  logic           aes_key_load,
  input  logic [255:0]   aes_key,
  output logic           simon_valid,
  output logic [127:0]   simon_ct,
  output logic           aes_valid,
  output logic [127:0]   aes_ct,
  output logic           sort_valid,
  output logic [511:0]   sort_out,
  output logic           simon_p_valid,
  output logic [127:0]   simon_p_ct,
  output logic           aes_p_valid,
  output logic [127:0]   aes_p_ct
);

  localparam int unsigned AW = $clog2(ROM_DEPTH);

  // ---------------- SIMON-128, fully unrolled ----------------
  logic [AW-1:0] simon_addr;
  logic [127:0]  simon_pt;
  logic          simon_run_q;

  cycle_counter #(.WIDTH(AW)) u_simon_cnt (.clk(clk_simon), .rst_n(rst_n), .count(simon_addr));
  stim_rom #(.WIDTH(128), .DEPTH(ROM_DEPTH), .SEED(64'd1)) u_simon_rom (
    .clk(clk_simon), .addr(simon_addr), .data(simon_pt));

  // delay run by the ROM's read latency so it marks valid ROM words
  always_ff @(posedge clk_simon or negedge rst_n)
    if (!rst_n) simon_run_q <= 1'b0; else simon_run_q <= run;

  simon128_unrolled_gf #(.FAMILY(FAMILY)) u_simon (
    .clk(clk_simon), .rst_n(rst_n), .key_load(simon_key_load), .key_in(simon_key),
    .in_valid(simon_run_q), .data_in(simon_pt), .out_valid(simon_valid), .data_out(simon_ct));

  // ---------------- AES-256, fully unrolled ----------------
  logic [AW-1:0] aes_addr;
  logic [127:0]  aes_pt;
  logic          aes_run_q;

  cycle_counter #(.WIDTH(AW)) u_aes_cnt (.clk(clk_aes), .rst_n(rst_n), .count(aes_addr));
  stim_rom #(.WIDTH(128), .DEPTH(ROM_DEPTH), .SEED(64'd2)) u_aes_rom (
    .clk(clk_aes), .addr(aes_addr), .data(aes_pt));

  always_ff @(posedge clk_aes or negedge rst_n)
    if (!rst_n) aes_run_q <= 1'b0; else aes_run_q <= run;

  aes256_unrolled_gf #(.FAMILY(FAMILY)) u_aes (
    .clk(clk_aes), .rst_n(rst_n), .key_load(aes_key_load), .key_in(aes_key),
    .in_valid(aes_run_q), .data_in(aes_pt), .out_valid(aes_valid), .data_out(aes_ct));

  // ---------------- bitonic sort, fully unrolled ----------------
  logic [AW-1:0] sort_addr;
  logic [511:0]  sort_in;
  logic          sort_run_q;

  cycle_counter #(.WIDTH(AW)) u_sort_cnt (.clk(clk_sort), .rst_n(rst_n), .count(sort_addr));
  stim_rom #(.WIDTH(512), .DEPTH(ROM_DEPTH), .SEED(64'd3)) u_sort_rom (
    .clk(clk_sort), .addr(sort_addr), .data(sort_in));

  always_ff @(posedge clk_sort or negedge rst_n)
    if (!rst_n) sort_run_q <= 1'b0; else sort_run_q <= run;

  bitonic_unrolled_gf #(.FAMILY(FAMILY)) u_sort (
    .clk(clk_sort), .rst_n(rst_n), .in_valid(sort_run_q), .data_in(sort_in),
    .out_valid(sort_valid), .data_out(sort_out));

  // ---------------- SIMON-128, partially unrolled ----------------
  logic [AW-1:0] simon_p_addr;
  logic [127:0]  simon_p_pt;
  logic          simon_p_busy, simon_p_run_q;

  cycle_counter #(.WIDTH(AW)) u_simon_p_cnt (.clk(clk_simon_p), .rst_n(rst_n), .count(simon_p_addr));
  stim_rom #(.WIDTH(128), .DEPTH(ROM_DEPTH), .SEED(64'd4)) u_simon_p_rom (
    .clk(clk_simon_p), .addr(simon_p_addr), .data(simon_p_pt));

  always_ff @(posedge clk_simon_p or negedge rst_n)
    if (!rst_n) simon_p_run_q <= 1'b0; else simon_p_run_q <= run;

  simon128_partial_gf #(.FAMILY(FAMILY)) u_simon_p (
    .clk(clk_simon_p), .rst_n(rst_n), .start(simon_p_run_q & ~simon_p_busy),
    .key_in(simon_key), .data_in(simon_p_pt), .busy(simon_p_busy),
    .out_valid(simon_p_valid), .data_out(simon_p_ct));

  // ---------------- AES-256, partially unrolled ----------------
  logic [AW-1:0] aes_p_addr;
  logic [127:0]  aes_p_pt;
  logic          aes_p_busy, aes_p_run_q;

  cycle_counter #(.WIDTH(AW)) u_aes_p_cnt (.clk(clk_aes_p), .rst_n(rst_n), .count(aes_p_addr));
  stim_rom #(.WIDTH(128), .DEPTH(ROM_DEPTH), .SEED(64'd5)) u_aes_p_rom (
    .clk(clk_aes_p), .addr(aes_p_addr), .data(aes_p_pt));

  always_ff @(posedge clk_aes_p or negedge rst_n)
    if (!rst_n) aes_p_run_q <= 1'b0; else aes_p_run_q <= run;

  aes256_partial_gf #(.FAMILY(FAMILY)) u_aes_p (
    .clk(clk_aes_p), .rst_n(rst_n), .start(aes_p_run_q & ~aes_p_busy),
    .key_in(aes_key), .data_in(aes_p_pt), .busy(aes_p_busy),
    .out_valid(aes_p_valid), .data_out(aes_p_ct));

endmodule
