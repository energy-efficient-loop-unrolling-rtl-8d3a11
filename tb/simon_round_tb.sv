`timescale 1ns/1ps
// simon_round_tb: random blocks and keys against the reference round.
module simon_round_tb;
  import ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] din, dout, exp;
  logic [63:0]  rk;

  simon_round u_dut (.din(din), .rk(rk), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      rk  = {$urandom, $urandom};
      #1;
      exp = {simon_round_ref(din[127:64], din[63:0], rk), din[127:64]};
      checks++;
      if (dout !== exp) begin failures++; $display("FAIL %h -> %h exp %h", din, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
