`timescale 1ns/1ps
// unroll_degree_sweep_tb: the partial-unrolling workload. SIMON-128 is built
// with 2, 4, 5, 7, 10, 17 and 68 rounds per cycle and AES-256 with 2, 4, 6, 8
// and 14, all in Xilinx form, each clocked at the frequency reported for that
// degree on Artix-7 (SIMON 100, 50, 41, 29.5, 20.5, 11.7, 2.9 MHz; AES 40, 23,
// 17, 11, 5.7 MHz). Every instance encrypts the known answer and random
// blocks; results are checked against the reference, the cycle count must be
// ceil(rounds / degree), and the last filter enable of the block (where there
// is one) must have closed before the next clock edge.
module unroll_degree_sweep_tb;
  import gf_pkg::*;
  import ref_pkg::*;

  localparam int NBLK = 4;
  localparam int NS = 7, NA = 5;
  localparam int          SU [NS] = '{2, 4, 5, 7, 10, 17, 68};
  localparam int          SH [NS] = '{5000, 10000, 12200, 16950, 24400, 42750, 172500};  // half periods, ps
  localparam int          AU [NA] = '{2, 4, 6, 8, 14};
  localparam int          AH [NA] = '{12500, 21750, 29400, 45450, 87700};

  int checks = 0, failures = 0, finished = 0;
  logic rst_n = 0;
  logic [7:0] sb [256];

  initial begin
    #(350 * 20 * (NBLK + 2));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define SWEEP_BENCH(MOD, U, HALF, RND, KW, KAT_K, KAT_P, KAT_C, ENC, NFV) \
    logic clk = 0, start = 0, busy, ov; \
    logic [KW-1:0] key; \
    logic [127:0] din, dout, exp; \
    always #(HALF * 1ps) clk = ~clk; \
    MOD #(.UNROLL(U)) u_dut (.clk(clk), .rst_n(rst_n), .start(start), .key_in(key), .data_in(din), \
      .busy(busy), .out_valid(ov), .data_out(dout)); \
    if (NFV > 0) begin : g_en \
      always @(posedge clk) if (busy) begin \
        checks++; \
        if (u_dut.en[NFV] !== 1'b0) begin failures++; $display("FAIL degree %0d: enable chain exceeds the period", U); end \
      end \
    end \
    initial begin \
      int cyc; \
      wait (rst_n); \
      for (int n = 0; n < NBLK; n++) begin \
        @(negedge clk); \
        key = (n == 0) ? KAT_K : KW'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}); \
        din = (n == 0) ? KAT_P : {$urandom, $urandom, $urandom, $urandom}; \
        exp = (n == 0) ? KAT_C : ENC; \
        start = 1; \
        @(posedge clk); #(1ps) start = 0; \
        cyc = 0; \
        do begin @(posedge clk); #(1ps) cyc++; end while (!ov && cyc < 100); \
        checks += 2; \
        if (cyc != (RND + U - 1) / U) begin failures++; $display("FAIL degree %0d: %0d cycles", U, cyc); end \
        if (dout !== exp) begin failures++; $display("FAIL degree %0d block %0d", U, n); end \
      end \
      finished++; \
    end

  for (genvar i = 0; i < NS; i++) begin : g_simon
    `SWEEP_BENCH(simon128_partial_gf, SU[i], SH[i], 68, 128, SIMON_KAT_KEY, SIMON_KAT_PT, SIMON_KAT_CT,
                 simon_enc(din, key), (SU[i] - 1) / 2)
  end

  for (genvar i = 0; i < NA; i++) begin : g_aes
    `SWEEP_BENCH(aes256_partial_gf, AU[i], AH[i], 14, 256, AES_KAT_KEY, AES_KAT_PT, AES_KAT_CT,
                 aes_enc(din, key, sb), AU[i] - 1)
  end

  initial begin
    make_sbox(sb);
    #100 rst_n = 1;
    wait (finished == NS + NA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
