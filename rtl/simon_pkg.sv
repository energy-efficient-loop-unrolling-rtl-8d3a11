`timescale 1ns/1ps
// simon_pkg: the SIMON 128/128 block cipher (64-bit words, 128-bit key,
// 68 rounds). The round function and key schedule are the standard ones of
// the SIMON family; the glitch-filtered designs only name the cipher and its
// round count. A 128-bit block is {x, y} with x in bits 127:64; a key is
// {k1, k0} with k0, the first round key, in bits 63:0.
package simon_pkg;

  localparam int unsigned SIMON_ROUNDS = 68;
  typedef logic [63:0]  word_t;
  typedef logic [127:0] block_t;

  // Constant sequence z2, bit 61 first.
  localparam logic [61:0] Z2 = 62'b10101111011100000011010010011000101000010001111110010110110011;

  function automatic word_t rol(word_t v, int unsigned r);
    return (v << r) | (v >> (64 - r));
  endfunction

  function automatic word_t ror(word_t v, int unsigned r);
    return (v >> r) | (v << (64 - r));
  endfunction

  // One Feistel round.
  function automatic block_t round_f(block_t b, word_t k);
    word_t x, y;
    x = b[127:64];
    y = b[63:0];
    return {y ^ (rol(x, 1) & rol(x, 8)) ^ rol(x, 2) ^ k, x};
  endfunction

  // Round key i+2 from round keys i and i+1 (two-word key schedule).
  function automatic word_t key_next(word_t ki, word_t ki1, int unsigned i);
    word_t t;
    t = ror(ki1, 3);
    t = t ^ ror(t, 1);
    return ~ki ^ t ^ word_t'(Z2[61 - (i % 62)]) ^ word_t'(3);
  endfunction

endpackage
