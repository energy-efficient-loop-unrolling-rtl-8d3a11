`timescale 1ns/1ps
// aes_pkg: AES-256 (FIPS-197) building blocks. The state is 128 bits with
// byte 0 (row 0, column 0) in bits 127:120, columns in order, so a FIPS-197
// test vector reads left to right. The S-box is not listed: the constant
// function gen_sbox() builds it at elaboration by walking the multiplicative
// group with generator 3 (p <- p*3, q <- q/3 keeps q = p^-1) and applying the
// affine map b ^ rol1 ^ rol2 ^ rol3 ^ rol4 ^ 0x63 to each inverse.
package aes_pkg;

  localparam int unsigned AES_ROUNDS = 14;
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] state_t;
  typedef byte_t sbox_t [256];

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t rol8(byte_t a, int unsigned r);
    return (a << r) | (a >> (8 - r));
  endfunction

  function automatic sbox_t gen_sbox();
    sbox_t s;
    byte_t p, q;
    p = 8'h01;
    q = 8'h01;
    s[0] = 8'h63;
    for (int n = 0; n < 255; n++) begin
      s[p] = q ^ rol8(q, 1) ^ rol8(q, 2) ^ rol8(q, 3) ^ rol8(q, 4) ^ 8'h63;
      p = p ^ xtime(p);                 // p * 3
      q = q ^ (q << 1);                 // q / 3, i.e. q * 0xf6
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
    end
    return s;
  endfunction

  localparam sbox_t SBOX = gen_sbox();

  function automatic word_t sub_word(word_t w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic state_t sub_bytes(state_t s);
    state_t r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = SBOX[s[127-8*i -: 8]];
    return r;
  endfunction

  // Byte i = row i%4, column i/4; row r is rotated left by r columns.
  function automatic state_t shift_rows(state_t s);
    state_t r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = s[127-8*((i + 4*(i%4)) % 16) -: 8];
    return r;
  endfunction

  function automatic state_t mix_columns(state_t s);
    state_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127-32*c -: 8];
      a1 = s[119-32*c -: 8];
      a2 = s[111-32*c -: 8];
      a3 = s[103-32*c -: 8];
      r[127-32*c -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      r[119-32*c -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      r[111-32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      r[103-32*c -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // Round key g (g >= 2) from round key g-2 and the last word of round key
  // g-1. Even g applies RotWord, SubWord and Rcon to that word, odd g SubWord only.
  function automatic state_t next_round_key(state_t rk2, word_t last, int unsigned g);
    word_t t, w0, w1, w2, w3;
    byte_t rc;
    rc = 8'h01;                          // Rcon = 2^(g/2 - 1) for even g
    for (int unsigned n = 4; n <= 14; n += 2) if (g >= n) rc = xtime(rc);
    t = last;
    if (g % 2 == 0) t = sub_word({t[23:0], t[31:24]}) ^ {rc, 24'h0};
    else            t = sub_word(t);
    w0 = rk2[127:96] ^ t;
    w1 = rk2[95:64]  ^ w0;
    w2 = rk2[63:32]  ^ w1;
    w3 = rk2[31:0]   ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
