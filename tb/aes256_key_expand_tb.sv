`timescale 1ns/1ps
// aes256_key_expand_tb: all 15 round keys against the reference expansion
// (word-by-word, as in FIPS-197) for the FIPS-197 key and random keys; the
// FIPS key's last round key is also compared with its published value.
module aes256_key_expand_tb;
  import ref_pkg::*;
  int checks = 0, failures = 0;
  logic [255:0] key;
  logic [127:0] rk [15];
  logic [127:0] ek [15];
  logic [7:0]   sb [256];

  aes256_key_expand u_dut (.key(key), .rk(rk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_sbox(sb);
    for (int n = 0; n < 30; n++) begin
      key = (n == 0) ? AES_KAT_KEY : {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      aes_keys(key, sb, ek);
      for (int r = 0; r < 15; r++) begin
        checks++;
        if (rk[r] !== ek[r]) begin failures++; $display("FAIL key %0d rk %0d: %h exp %h", n, r, rk[r], ek[r]); end
      end
      if (n == 0) begin
        checks++;
        if (rk[14] !== 128'h24fc79ccbf0979e9371ac23c6d68de36) begin failures++; $display("FAIL FIPS round key 14"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
