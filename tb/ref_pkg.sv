`timescale 1ns/1ps
// ref_pkg: reference models for the testbenches, written independently of
// the RTL packages: SIMON 128/128 from its definition, AES-256 with an S-box
// found by exhaustive search for the GF(2^8) inverse, plain sorting, and the
// xorshift generator that fills the stimulus ROMs. Also the published
// known-answer vectors.
package ref_pkg;

  // SIMON 128/128 known answer (key, plaintext, ciphertext).
  localparam logic [127:0] SIMON_KAT_KEY = 128'h0f0e0d0c0b0a09080706050403020100;
  localparam logic [127:0] SIMON_KAT_PT  = 128'h63736564207372656c6c657661727420;
  localparam logic [127:0] SIMON_KAT_CT  = 128'h49681b1e1e54fe3f65aa832af84e0bbc;
  // AES-256 known answer (FIPS-197 appendix C.3).
  localparam logic [255:0] AES_KAT_KEY = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  localparam logic [127:0] AES_KAT_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] AES_KAT_CT  = 128'h8ea2b7ca516745bfeafc49904b496089;

  // ---------------- SIMON ----------------
  function automatic logic [63:0] s_rol(logic [63:0] v, int r);
    return {v, v} >> (64 - r);
  endfunction

  function automatic void simon_keys(logic [127:0] key, output logic [63:0] k [68]);
    logic [61:0] z = 62'h2bdc0d262847e5b3;  // z2, first bit at the top
    logic [63:0] t;
    k[0] = key[63:0];
    k[1] = key[127:64];
    for (int i = 0; i < 66; i++) begin
      t = {k[i+1][2:0], k[i+1][63:3]};
      t = t ^ {t[0], t[63:1]};
      k[i+2] = 64'hffff_ffff_ffff_fffc ^ k[i] ^ t ^ {63'd0, z[61 - (i % 62)]};
    end
  endfunction

  function automatic logic [63:0] simon_round_ref(logic [63:0] x, logic [63:0] y, logic [63:0] k);
    return y ^ (s_rol(x, 1) & s_rol(x, 8)) ^ s_rol(x, 2) ^ k;
  endfunction

  function automatic logic [127:0] simon_enc(logic [127:0] pt, logic [127:0] key);
    logic [63:0] k [68];
    logic [63:0] x, y, t;
    simon_keys(key, k);
    x = pt[127:64];
    y = pt[63:0];
    for (int r = 0; r < 68; r++) begin
      t = x;
      x = simon_round_ref(x, y, k[r]);
      y = t;
    end
    return {x, y};
  endfunction

  // ---------------- AES ----------------
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox_ref(logic [7:0] a);
    logic [7:0] inv = 0, s;
    for (int j = 1; j < 256; j++) if (a != 0 && gmul(a, 8'(j)) == 8'h01) inv = 8'(j);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] ^= inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  typedef logic [7:0] st_t [16];

  function automatic st_t to_st(logic [127:0] v);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = s[i];
    return v;
  endfunction

  // one round on a 128-bit state (sbox table passed in for speed)
  function automatic logic [127:0] aes_round_ref(logic [127:0] v, logic [127:0] rk, bit last,
                                                 logic [7:0] sb [256]);
    st_t s = to_st(v), t;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) t[4*c+r] = sb[s[4*((c+r)%4)+r]];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        s[4*c+0] = gmul(t[4*c],2) ^ gmul(t[4*c+1],3) ^ t[4*c+2] ^ t[4*c+3];
        s[4*c+1] = t[4*c] ^ gmul(t[4*c+1],2) ^ gmul(t[4*c+2],3) ^ t[4*c+3];
        s[4*c+2] = t[4*c] ^ t[4*c+1] ^ gmul(t[4*c+2],2) ^ gmul(t[4*c+3],3);
        s[4*c+3] = gmul(t[4*c],3) ^ t[4*c+1] ^ t[4*c+2] ^ gmul(t[4*c+3],2);
      end
    else s = t;
    return from_st(s) ^ rk;
  endfunction

  function automatic void aes_keys(logic [255:0] key, logic [7:0] sb [256], output logic [127:0] rk [15]);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 8; i++) w[i] = key[255-32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]} ^ {rc, 24'd0};
        rc = gmul(rc, 8'h02);
      end else if (i % 8 == 4)
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
      w[i] = w[i-8] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic void make_sbox(output logic [7:0] sb [256]);
    for (int i = 0; i < 256; i++) sb[i] = sbox_ref(8'(i));
  endfunction

  function automatic logic [127:0] aes_enc(logic [127:0] pt, logic [255:0] key, logic [7:0] sb [256]);
    logic [127:0] rk [15];
    logic [127:0] s;
    aes_keys(key, sb, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 14; r++) s = aes_round_ref(s, rk[r], r == 14, sb);
    return s;
  endfunction

  // ---------------- sorting ----------------
  function automatic logic [511:0] sort32(logic [511:0] v);
    logic [15:0] a [32];
    logic [15:0] t;
    logic [511:0] r;
    for (int i = 0; i < 32; i++) a[i] = v[16*i +: 16];
    for (int i = 1; i < 32; i++)
      for (int j = i; j > 0 && a[j-1] > a[j]; j--) begin
        t = a[j]; a[j] = a[j-1]; a[j-1] = t;
      end
    for (int i = 0; i < 32; i++) r[16*i +: 16] = a[i];
    return r;
  endfunction

  // ---------------- stimulus ROM contents ----------------
  function automatic logic [63:0] xorshift(logic [63:0] x);
    x ^= x << 13;
    x ^= x >> 7;
    x ^= x << 17;
    return x;
  endfunction

  // word `idx` of a ROM of `width` bits started from `seed`
  function automatic logic [511:0] rom_word(logic [63:0] seed, int width, int idx);
    logic [63:0] x = seed;
    logic [511:0] w = 0;
    int chunks = (width + 63) / 64;
    for (int d = 0; d <= idx; d++)
      for (int c = 0; c < chunks; c++) begin
        x = xorshift(x);
        w[64*c +: 64] = x;
      end
    if (width < 512) w &= (512'd1 << width) - 1;
    return w;
  endfunction

endpackage
