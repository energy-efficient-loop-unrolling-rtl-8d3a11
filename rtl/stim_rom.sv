`timescale 1ns/1ps
// stim_rom: initialised ROM of DEPTH words of WIDTH bits that feeds test data
// to the design under test, one word per clock (registered read, one cycle
// of latency). The contents are only test stimulus; they are generated at
// elaboration by a 64-bit xorshift generator (x ^= x<<13; x ^= x>>7;
// x ^= x<<17) started from SEED, word w taking ceil(WIDTH/64) successive
// outputs, the first in the least significant bits.
module stim_rom #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 16,
  parameter logic [63:0] SEED  = 64'd1
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);

  localparam int unsigned CHUNKS = (WIDTH + 63) / 64;

  typedef logic [WIDTH-1:0] rom_t [DEPTH];

  function automatic rom_t gen_rom();
    rom_t r;
    logic [64*CHUNKS-1:0] w;
    logic [63:0] x;
    x = SEED;
    for (int d = 0; d < DEPTH; d++) begin
      for (int c = 0; c < CHUNKS; c++) begin
        x = x ^ (x << 13);
        x = x ^ (x >> 7);
        x = x ^ (x << 17);
        w[64*c +: 64] = x;
      end
      r[d] = w[WIDTH-1:0];
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  always_ff @(posedge clk) data <= ROM[addr];

endmodule
