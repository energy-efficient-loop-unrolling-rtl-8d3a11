`timescale 1ns/1ps
// simon128_unrolled_gf_tb: runs the fully unrolled SIMON in both FPGA forms,
// Xilinx at a 340 ns clock and Altera at a 600 ns clock (the encryption
// latencies reported for the two boards). Checks:
//  - the published known answer, then a back-to-back stream of random blocks
//    (one per clock) against the reference cipher, with a key reload midway;
//  - each result appears exactly one clock after its block is launched;
//  - the last filter's enable pulses once per clock and has closed again
//    before the next clock edge (the enable chain fits in the cycle);
//  - the first filter holds the previous block right after the launch edge
//    and passes the new one only after its enable.
module simon128_unrolled_gf_tb;
  import gf_pkg::*;
  import ref_pkg::*;

  localparam int NBLK = 40;

  int checks = 0, failures = 0;
  int x_enables = 0, a_enables = 0, x_holds = 0, a_holds = 0;

  logic clk_x = 0, clk_a = 0, rst_n = 0;

  always #170 clk_x = ~clk_x;
  always #300 clk_a = ~clk_a;

  initial begin
    #(700 * (NBLK + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one driver/checker per family
  `define SIMON_BENCH(SUF, CLK, FAM, ENCNT, HOLDCNT) \
  logic key_load_``SUF, in_valid_``SUF, out_valid_``SUF; \
  logic [127:0] key_``SUF, din_``SUF, dout_``SUF; \
  logic [127:0] exp_``SUF [$]; \
  logic [127:0] held_``SUF; \
  bit done_``SUF = 0; \
  simon128_unrolled_gf #(.FAMILY(FAM)) u_``SUF ( \
    .clk(CLK), .rst_n(rst_n), .key_load(key_load_``SUF), .key_in(key_``SUF), \
    .in_valid(in_valid_``SUF), .data_in(din_``SUF), .out_valid(out_valid_``SUF), .data_out(dout_``SUF)); \
  always @(posedge u_``SUF.en[33]) ENCNT++; \
  initial begin \
    logic [127:0] k; \
    key_load_``SUF = 1; key_``SUF = SIMON_KAT_KEY; in_valid_``SUF = 0; din_``SUF = 0; k = SIMON_KAT_KEY; \
    wait (rst_n); \
    for (int n = 0; n < NBLK; n++) begin \
      @(negedge CLK); \
      key_load_``SUF = 0; \
      if (n == NBLK / 2) begin k = {$urandom, $urandom, $urandom, $urandom}; key_``SUF = k; key_load_``SUF = 1; end \
      in_valid_``SUF = 1; \
      din_``SUF = (n == 0) ? SIMON_KAT_PT : {$urandom, $urandom, $urandom, $urandom}; \
      exp_``SUF.push_back((n == 0) ? SIMON_KAT_CT : simon_enc(din_``SUF, k)); \
    end \
    @(negedge CLK) in_valid_``SUF = 0; key_load_``SUF = 0; \
    repeat (3) @(negedge CLK); \
    checks++; \
    if (exp_``SUF.size() != 0) begin failures++; $display("FAIL %s: %0d results missing", `"SUF`", exp_``SUF.size()); end \
    done_``SUF = 1; \
  end \
  /* latency: a block launched at edge n is out after edge n+1 */ \
  logic vq_``SUF = 0; \
  always @(posedge CLK) begin \
    held_``SUF = u_``SUF.rin[2]; \
    if (rst_n) begin \
      checks++; \
      if (u_``SUF.en[33] !== 1'b0) begin failures++; $display("FAIL %s enable chain longer than the cycle", `"SUF`"); end \
    end \
    #1; \
    if (rst_n) begin \
      checks++; \
      if (out_valid_``SUF !== vq_``SUF) begin failures++; $display("FAIL %s latency", `"SUF`"); end \
      if (u_``SUF.rin[2] === held_``SUF) HOLDCNT++; \
      else begin failures++; $display("FAIL %s first filter did not hold", `"SUF`"); end \
      if (out_valid_``SUF) begin \
        checks++; \
        if (exp_``SUF.size() == 0) begin failures++; $display("FAIL %s unexpected result", `"SUF`"); end \
        else if (dout_``SUF !== exp_``SUF[0]) begin \
          failures++; $display("FAIL %s got %h exp %h", `"SUF`", dout_``SUF, exp_``SUF[0]); void'(exp_``SUF.pop_front()); \
        end else void'(exp_``SUF.pop_front()); \
      end \
    end \
    vq_``SUF = u_``SUF.valid_q; \
  end

  `SIMON_BENCH(x, clk_x, FAM_XILINX, x_enables, x_holds)
  `SIMON_BENCH(a, clk_a, FAM_ALTERA, a_enables, a_holds)

  initial begin
    #1000 rst_n = 1;
    wait (done_x && done_a);
    checks += 2;
    if (x_enables < NBLK || a_enables < NBLK) begin failures++; $display("FAIL enables %0d %0d", x_enables, a_enables); end
    if (x_holds < NBLK || a_holds < NBLK) begin failures++; $display("FAIL holds %0d %0d", x_holds, a_holds); end
    $display("last-filter enables: xilinx %0d altera %0d; first-filter holds: %0d %0d", x_enables, a_enables, x_holds, a_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
