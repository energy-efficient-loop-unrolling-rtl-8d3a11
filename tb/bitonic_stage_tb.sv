`timescale 1ns/1ps
// bitonic_stage_tb: the 15 stages chained in order must sort random arrays of
// 32 unsigned 16-bit values ascending (checked against an insertion sort);
// every stage must output a permutation of its input.
module bitonic_stage_tb;
  import ref_pkg::*;
  int checks = 0, failures = 0;
  logic [511:0] v [16];

  for (genvar s = 0; s < 15; s++) begin : g_st
    bitonic_stage #(.N(32), .W(16), .STAGE(s)) u_st (.din(v[s]), .dout(v[s+1]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned wsum(logic [511:0] x);
    longint unsigned a = 0;
    for (int i = 0; i < 32; i++) a += longint'(x[16*i +: 16]) * longint'(x[16*i +: 16]) + x[16*i +: 16];
    return a;
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 32; i++) v[0][16*i +: 16] = (n % 3 == 0) ? 16'($urandom % 8) : 16'($urandom);
      #1;
      for (int s = 1; s <= 15; s++) begin
        checks++;
        if (wsum(v[s]) != wsum(v[0])) begin failures++; $display("FAIL stage %0d lost values", s - 1); end
      end
      checks++;
      if (v[15] !== sort32(v[0])) begin failures++; $display("FAIL not sorted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
