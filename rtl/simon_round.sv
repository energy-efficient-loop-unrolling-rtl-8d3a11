`timescale 1ns/1ps
// simon_round: one round of SIMON 128/128 as pure combinational logic, the
// unit that is replicated when the cipher is unrolled. With din = {x, y}:
//   x' = y ^ ((x <<< 1) & (x <<< 8)) ^ (x <<< 2) ^ rk,   y' = x.
// The round is the standard SIMON round; only the cipher and its 68 rounds
// are taken from the source.
module simon_round
  import simon_pkg::*;
(
  input  block_t din,
  input  word_t  rk,
  output block_t dout
);

  assign dout = round_f(din, rk);

endmodule
