`timescale 1ns/1ps
// simon_key_expand_tb: all 68 round keys against the reference schedule, for
// the published test key and random keys; the test key's round keys, applied
// round by round in the testbench, must give the published ciphertext.
module simon_key_expand_tb;
  import ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] key;
  logic [63:0]  rk [68];
  logic [63:0]  ek [68];
  logic [63:0]  x, y, t;

  simon_key_expand u_dut (.key(key), .rk(rk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      key = (n == 0) ? SIMON_KAT_KEY : {$urandom, $urandom, $urandom, $urandom};
      #1;
      simon_keys(key, ek);
      for (int i = 0; i < 68; i++) begin
        checks++;
        if (rk[i] !== ek[i]) begin failures++; $display("FAIL key %0d", i); end
      end
      if (n == 0) begin
        x = SIMON_KAT_PT[127:64];
        y = SIMON_KAT_PT[63:0];
        for (int r = 0; r < 68; r++) begin t = x; x = simon_round_ref(x, y, rk[r]); y = t; end
        checks++;
        if ({x, y} !== SIMON_KAT_CT) begin failures++; $display("FAIL known answer %h", {x, y}); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
