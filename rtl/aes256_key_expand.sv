`timescale 1ns/1ps
// aes256_key_expand: the AES-256 key expansion as combinational logic,
// giving the 15 round keys rk[0..14]. rk[0] and rk[1] are the two halves of
// the key (bits 255:128 first); each further round key comes from the two
// before it (aes_pkg::next_round_key). As in the SIMON design, the expansion
// is evaluated once per key from the key register.
module aes256_key_expand
  import aes_pkg::*;
(
  input  logic [255:0] key,
  output state_t       rk [15]
);

  always_comb begin
    rk[0] = key[255:128];
    rk[1] = key[127:0];
    for (int unsigned g = 2; g < 15; g++) rk[g] = next_round_key(rk[g-2], rk[g-1][31:0], g);
  end

endmodule
