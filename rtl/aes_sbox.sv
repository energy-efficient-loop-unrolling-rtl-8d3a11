`timescale 1ns/1ps
// aes_sbox: the AES S-box as a 256-entry lookup table (a ROM of LUTs on an
// FPGA). The table is not typed in: aes_pkg builds it at elaboration from
// the definition (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1,
// then the affine map with constant 0x63). Combinational.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  assign y = SBOX[a];

endmodule
