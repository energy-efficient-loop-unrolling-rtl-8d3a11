`timescale 1ns/1ps
// simon_key_expand: the complete SIMON 128/128 key schedule as combinational
// logic. rk[0] and rk[1] are the two key words; each further key is
//   rk[i+2] = ~rk[i] ^ T ^ (T >>> 1) ^ z2[i mod 62] ^ 3,  T = rk[i+1] >>> 3.
// In a fully unrolled cipher the schedule is evaluated once per key from the
// key register and stays static while data streams through, so it adds no
// switching per block (and folds to constants when the key is fixed).
module simon_key_expand
  import simon_pkg::*;
#(
  parameter int unsigned ROUNDS = SIMON_ROUNDS
) (
  input  block_t key,
  output word_t  rk [ROUNDS]
);

  always_comb begin
    rk[0] = key[63:0];
    rk[1] = key[127:64];
    for (int unsigned i = 2; i < ROUNDS; i++) rk[i] = key_next(rk[i-2], rk[i-1], i - 2);
  end

endmodule
