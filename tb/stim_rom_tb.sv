`timescale 1ns/1ps
// stim_rom_tb: every word of a 128-bit and a 512-bit ROM against the
// testbench's own xorshift sequence, with one cycle of read latency.
module stim_rom_tb;
  import ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [3:0]   addr;
  logic [127:0] d1;
  logic [511:0] d2;

  stim_rom #(.WIDTH(128), .DEPTH(16), .SEED(64'd7)) u_a (.clk(clk), .addr(addr), .data(d1));
  stim_rom #(.WIDTH(512), .DEPTH(16), .SEED(64'd3)) u_b (.clk(clk), .addr(addr), .data(d2));

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      addr = 4'(i * 7);
      @(posedge clk) #1;
      checks += 2;
      if (d1 !== rom_word(64'd7, 128, int'(addr))[127:0]) begin failures++; $display("FAIL 128-bit word %0d", addr); end
      if (d2 !== rom_word(64'd3, 512, int'(addr))) begin failures++; $display("FAIL 512-bit word %0d", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
