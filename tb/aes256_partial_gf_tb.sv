`timescale 1ns/1ps
// aes256_partial_gf_tb: two partially unrolled AES-256 instances, 2 rounds
// per cycle in Xilinx form at 40 MHz (7 cycles per block) and 4 rounds per
// cycle in Altera form at a 75 ns clock (4 cycles, the last one using only 2
// of the 4 rounds, so the final round sits in a middle slot). Checks the
// FIPS-197 known answer and random blocks against the reference cipher, and
// that out_valid comes exactly ceil(14/UNROLL) clocks after the start edge.
module aes256_partial_gf_tb;
  import gf_pkg::*;
  import ref_pkg::*;

  localparam int NBLK = 12;

  int checks = 0, failures = 0;
  logic clk_x = 0, clk_a = 0, rst_n = 0;
  bit done_x = 0, done_a = 0;

  always #12.5 clk_x = ~clk_x;
  always #37.5 clk_a = ~clk_a;

  initial begin
    #(75 * 10 * (NBLK + 4));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define AES_P_BENCH(SUF, CLK, FAM, U) \
  logic start_``SUF, busy_``SUF, ov_``SUF; \
  logic [255:0] key_``SUF; logic [127:0] din_``SUF, dout_``SUF, exp_``SUF; \
  aes256_partial_gf #(.UNROLL(U), .FAMILY(FAM)) u_``SUF ( \
    .clk(CLK), .rst_n(rst_n), .start(start_``SUF), .key_in(key_``SUF), .data_in(din_``SUF), \
    .busy(busy_``SUF), .out_valid(ov_``SUF), .data_out(dout_``SUF)); \
  initial begin \
    int cyc; logic [7:0] sb [256]; \
    make_sbox(sb); \
    start_``SUF = 0; key_``SUF = 0; din_``SUF = 0; \
    wait (rst_n); \
    for (int n = 0; n < NBLK; n++) begin \
      @(negedge CLK); \
      key_``SUF = (n == 0) ? AES_KAT_KEY : {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}; \
      din_``SUF = (n == 0) ? AES_KAT_PT  : {$urandom, $urandom, $urandom, $urandom}; \
      exp_``SUF = (n == 0) ? AES_KAT_CT  : aes_enc(din_``SUF, key_``SUF, sb); \
      start_``SUF = 1; \
      @(posedge CLK); #1 start_``SUF = 0; \
      cyc = 0; \
      do begin @(posedge CLK); #1 cyc++; end while (!ov_``SUF && cyc < 200); \
      checks += 2; \
      if (cyc != (14 + U - 1) / U) begin failures++; $display("FAIL %s: %0d cycles, expected %0d", `"SUF`", cyc, (14 + U - 1) / U); end \
      if (dout_``SUF !== exp_``SUF) begin failures++; $display("FAIL %s block %0d: %h exp %h", `"SUF`", n, dout_``SUF, exp_``SUF); end \
      @(posedge CLK); #1; \
      checks++; \
      if (ov_``SUF || busy_``SUF) begin failures++; $display("FAIL %s: out_valid longer than one cycle", `"SUF`"); end \
    end \
    done_``SUF = 1; \
  end

  `AES_P_BENCH(x, clk_x, FAM_XILINX, 2)
  `AES_P_BENCH(a, clk_a, FAM_ALTERA, 4)

  initial begin
    #100 rst_n = 1;
    wait (done_x && done_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
