`timescale 1ns/1ps
// aes_round_tb: random states and round keys, normal and final rounds,
// against the reference round.
module aes_round_tb;
  import ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] din, rk, dout, exp;
  logic         fin;
  logic [7:0]   sb [256];

  aes_round u_dut (.din(din), .rk(rk), .final_rnd(fin), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_sbox(sb);
    for (int i = 0; i < 400; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      rk  = {$urandom, $urandom, $urandom, $urandom};
      fin = 1'(i % 4 == 3);
      #1;
      exp = aes_round_ref(din, rk, fin, sb);
      checks++;
      if (dout !== exp) begin failures++; $display("FAIL fin=%0d %h -> %h exp %h", fin, din, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
