`timescale 1ns/1ps
// aes_sbox_tb: all 256 entries against an S-box found by searching for each
// multiplicative inverse, plus entries printed in FIPS-197.
module aes_sbox_tb;
  import ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, y;

  aes_sbox u_dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (y !== sbox_ref(a)) begin failures++; $display("FAIL sbox[%h]=%h exp %h", a, y, sbox_ref(a)); end
    end
    a = 8'h00; #1 checks++; if (y !== 8'h63) failures++;
    a = 8'h53; #1 checks++; if (y !== 8'hed) failures++;
    a = 8'hff; #1 checks++; if (y !== 8'h16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
