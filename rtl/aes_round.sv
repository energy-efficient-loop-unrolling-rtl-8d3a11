`timescale 1ns/1ps
// aes_round: one AES encryption round as combinational logic, the unit that
// is replicated when the cipher is unrolled: SubBytes (16 S-boxes),
// ShiftRows, MixColumns (bypassed when final_rnd is high, as in round 14)
// and AddRoundKey with rk. Byte 0 of the state is bits 127:120.
module aes_round
  import aes_pkg::*;
(
  input  state_t din,
  input  state_t rk,
  input  logic   final_rnd,
  output state_t dout
);

  state_t sb, sr;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.a(din[127-8*i -: 8]), .y(sb[127-8*i -: 8]));
  end

  assign sr   = shift_rows(sb);
  assign dout = (final_rnd ? sr : mix_columns(sr)) ^ rk;

endmodule
