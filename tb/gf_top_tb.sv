`timescale 1ns/1ps
// gf_top_tb: end-to-end test of the whole setup at its default parameters
// (Xilinx form). Each design runs on its own clock at the latency reported for
// it: SIMON 340 ns, AES 175 ns, sort 120 ns, partial SIMON 20 ns (50 MHz),
// partial AES 25 ns (40 MHz). With run held high every design streams words
// from its ROM. The testbench
//  - checks that each design is fed its ROM words in order (testbench's own
//    xorshift model) and that every result matches the reference models,
//    computed from the key on the top's ports;
//  - reloads both cipher keys midway, while data is streaming;
//  - counts the mechanisms: launches, last-filter enable pulses, first-filter
//    holds after a launch edge, ROM wrap-around, key reloads, multi-cycle
//    partial encryptions; a mechanism that never happened counts a failure.
module gf_top_tb;
  import ref_pkg::*;

  localparam int NSIMON = 20;  // blocks through the fully unrolled SIMON

  int checks = 0, failures = 0;

  logic rst_n = 0, run = 0;
  logic clk_simon = 0, clk_aes = 0, clk_sort = 0, clk_simon_p = 0, clk_aes_p = 0;
  logic simon_key_load = 0, aes_key_load = 0;
  logic [127:0] simon_key = SIMON_KAT_KEY;
  logic [255:0] aes_key = AES_KAT_KEY;
  logic simon_valid, aes_valid, sort_valid, simon_p_valid, aes_p_valid;
  logic [127:0] simon_ct, aes_ct, simon_p_ct, aes_p_ct;
  logic [511:0] sort_out;
  logic [7:0] sb [256];

  gf_top u_top (.*);

  always #170  clk_simon   = ~clk_simon;
  always #87.5 clk_aes     = ~clk_aes;
  always #60   clk_sort    = ~clk_sort;
  always #10   clk_simon_p = ~clk_simon_p;
  always #12.5 clk_aes_p   = ~clk_aes_p;

  initial begin
    #(340 * (NSIMON + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // ------------------------------------------------------------------
  // fully unrolled designs: input order, results, one clock latency
  // ------------------------------------------------------------------
  logic [127:0] simon_exp [$], aes_exp [$];
  logic [511:0] sort_exp [$];
  int simon_idx = -1, aes_idx = -1, sort_idx = -1;

  // position of a word in a 16-word ROM, -1 if absent (the counters run
  // freely, so the first word a design takes depends on clock phase)
  function automatic int rom_index(logic [63:0] seed, int width, logic [511:0] w);
    for (int i = 0; i < 16; i++) if (rom_word(seed, width, i) === w) return i;
    return -1;
  endfunction
  int simon_res = 0, aes_res = 0, sort_res = 0;
  int wraps = 0, key_reloads = 0, holds = 0;
  logic [127:0] simon_kq = SIMON_KAT_KEY;
  logic [255:0] aes_kq = AES_KAT_KEY;

  always @(posedge clk_simon) if (rst_n) begin
    logic [127:0] hold_v;
    hold_v = u_top.u_simon.rin[2];
    if (simon_key_load) begin simon_kq = simon_key; key_reloads++; end
    if (u_top.u_simon.in_valid) begin
      if (simon_idx < 0) simon_idx = rom_index(64'd1, 128, 512'(u_top.u_simon.data_in));
      check(simon_idx >= 0 && 512'(u_top.u_simon.data_in) === rom_word(64'd1, 128, simon_idx % 16), "SIMON ROM order");
      if (simon_idx % 16 == 15) wraps++;
      simon_idx++;
      simon_exp.push_back(simon_enc(u_top.u_simon.data_in, simon_kq));
    end
    #1;
    if (u_top.u_simon.valid_q && u_top.u_simon.rin[2] === hold_v) holds++;
    if (simon_valid) begin
      check(simon_exp.size() > 0 && simon_ct === simon_exp[0], "SIMON result");
      if (simon_exp.size() > 0) void'(simon_exp.pop_front());
      simon_res++;
    end
  end

  always @(posedge clk_aes) if (rst_n) begin
    if (aes_key_load) begin aes_kq = aes_key; key_reloads++; end
    if (u_top.u_aes.in_valid) begin
      if (aes_idx < 0) aes_idx = rom_index(64'd2, 128, 512'(u_top.u_aes.data_in));
      check(aes_idx >= 0 && 512'(u_top.u_aes.data_in) === rom_word(64'd2, 128, aes_idx % 16), "AES ROM order");
      aes_idx++;
      aes_exp.push_back(aes_enc(u_top.u_aes.data_in, aes_kq, sb));
    end
    #1;
    if (aes_valid) begin
      check(aes_exp.size() > 0 && aes_ct === aes_exp[0], "AES result");
      if (aes_exp.size() > 0) void'(aes_exp.pop_front());
      aes_res++;
    end
  end

  always @(posedge clk_sort) if (rst_n) begin
    if (u_top.u_sort.in_valid) begin
      if (sort_idx < 0) sort_idx = rom_index(64'd3, 512, 512'(u_top.u_sort.data_in));
      check(sort_idx >= 0 && 512'(u_top.u_sort.data_in) === rom_word(64'd3, 512, sort_idx % 16), "sort ROM order");
      sort_idx++;
      sort_exp.push_back(sort32(u_top.u_sort.data_in));
    end
    #1;
    if (sort_valid) begin
      check(sort_exp.size() > 0 && sort_out === sort_exp[0], "sort result");
      if (sort_exp.size() > 0) void'(sort_exp.pop_front());
      sort_res++;
    end
  end

  // ------------------------------------------------------------------
  // partially unrolled designs
  // ------------------------------------------------------------------
  logic [127:0] simon_p_exp, aes_p_exp;
  int simon_p_res = 0, aes_p_res = 0, simon_p_busy_cyc = 0, aes_p_busy_cyc = 0;
  int simon_p_starts = 0, aes_p_starts = 0;

  always @(posedge clk_simon_p) if (rst_n) begin
    if (u_top.u_simon_p.busy) simon_p_busy_cyc++;
    if (u_top.u_simon_p.start && !u_top.u_simon_p.busy) begin
      simon_p_exp = simon_enc(u_top.u_simon_p.data_in, simon_key);
      simon_p_starts++;
    end
    #1;
    if (simon_p_valid) begin
      check(simon_p_ct === simon_p_exp, "partial SIMON result");
      simon_p_res++;
    end
  end

  always @(posedge clk_aes_p) if (rst_n) begin
    if (u_top.u_aes_p.busy) aes_p_busy_cyc++;
    if (u_top.u_aes_p.start && !u_top.u_aes_p.busy) begin
      aes_p_exp = aes_enc(u_top.u_aes_p.data_in, aes_key, sb);
      aes_p_starts++;
    end
    #1;
    if (aes_p_valid) begin
      check(aes_p_ct === aes_p_exp, "partial AES result");
      aes_p_res++;
    end
  end

  // last-filter enable pulses of each design
  int en_simon = 0, en_aes = 0, en_sort = 0, en_simon_p = 0, en_aes_p = 0;
  always @(posedge u_top.u_simon.en[33])  en_simon++;
  always @(posedge u_top.u_aes.en[13])    en_aes++;
  always @(posedge u_top.u_sort.en[7])    en_sort++;
  always @(posedge u_top.u_simon_p.en[1]) en_simon_p++;
  always @(posedge u_top.u_aes_p.en[1])   en_aes_p++;

  // ------------------------------------------------------------------
  initial begin
    make_sbox(sb);
    simon_key_load = 1;
    aes_key_load = 1;
    #1000 rst_n = 1;
    @(negedge clk_simon);
    simon_key_load = 0;
    run = 1;
    @(negedge clk_aes) aes_key_load = 0;
    repeat (NSIMON / 2) @(negedge clk_simon);
    // reload both keys while data streams
    simon_key = {$urandom, $urandom, $urandom, $urandom};
    aes_key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    simon_key_load = 1;
    @(negedge clk_simon) simon_key_load = 0;
    @(negedge clk_aes) aes_key_load = 1;
    @(negedge clk_aes) aes_key_load = 0;
    repeat (NSIMON / 2) @(negedge clk_simon);
    run = 0;
    repeat (4) @(negedge clk_simon);

    $display("results: simon %0d aes %0d sort %0d simon_p %0d aes_p %0d", simon_res, aes_res, sort_res, simon_p_res, aes_p_res);
    $display("last-filter enables: simon %0d aes %0d sort %0d simon_p %0d aes_p %0d", en_simon, en_aes, en_sort, en_simon_p, en_aes_p);
    $display("first-filter holds %0d, ROM wraps %0d, key reloads %0d, partial busy cycles %0d/%0d",
             holds, wraps, key_reloads, simon_p_busy_cyc, aes_p_busy_cyc);
    check(simon_exp.size() == 0 && aes_exp.size() == 0 && sort_exp.size() == 0, "all results delivered");
    check(simon_res >= NSIMON && aes_res > 0 && sort_res > 0, "fully unrolled results");
    check(simon_p_res > 0 && aes_p_res > 0, "partial results");
    check(simon_p_busy_cyc >= 17 * simon_p_res && aes_p_busy_cyc >= 7 * aes_p_res, "partial multi-cycle operation");
    check(en_simon >= NSIMON && en_aes > 0 && en_sort > 0 && en_simon_p > 0 && en_aes_p > 0, "filter enables");
    check(holds > 0, "filter hold after launch");
    check(wraps > 0, "ROM wrap");
    check(key_reloads >= 2, "key reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
