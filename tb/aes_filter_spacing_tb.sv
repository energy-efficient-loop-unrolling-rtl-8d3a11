`timescale 1ns/1ps
// aes_filter_spacing_tb: filter-placement sweep for AES-256 (14 rounds, 175 ns clock).
// The fully unrolled design is built six times, in Xilinx form, with a glitch
// filter every 1, 2, 3, 5 and 7 rounds and with none at all (spacing equal
// to the round count, the unfiltered case). All six take the same
// stream of NBLK random blocks back to back, one per clock. Each copy must
// return every block, equal to the reference model, on the clock after it
// was launched, and its last filter enable must be low again at every clock
// edge, so the enable chain fits the period. Spacings that do not divide the
// round count leave a shorter last group, as the module allows.
// The spacings and the clock period are the ones the evaluation uses; the
// stream length and the random data are this bench's own.
module aes_filter_spacing_tb;
  import ref_pkg::*;

  localparam int NBLK = 8;
  localparam int NSP = 6;
  localparam int ROUNDS = 14;
  localparam int SP [NSP] = '{1, 2, 3, 5, 7, 14};

  int checks = 0, failures = 0;
  logic rst_n = 0;
  logic clk = 0;
  logic vin = 0;
  logic [127:0] din = '0;
  logic [127:0] expq [$];
  logic [7:0] sb [256];

  always #87.5 clk = ~clk;

  initial begin
    #(175 * (NBLK + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected result of each launched block, in launch order
  always @(posedge clk) if (vin) expq.push_back(aes_enc(din, AES_KAT_KEY, sb));

  for (genvar i = 0; i < NSP; i++) begin : g_sp
    localparam int NF = (ROUNDS - 1) / SP[i];
    logic ov;
    logic [127:0] dout;
    int got = 0;
    aes256_unrolled_gf #(.FILTER_SPACING(SP[i])) u_dut (
      .clk(clk), .rst_n(rst_n), .key_load(1'b1), .key_in(AES_KAT_KEY), .in_valid(vin), .data_in(din),
      .out_valid(ov), .data_out(dout));
    // with no filter there is no chain to time
    always @(posedge clk) if (rst_n) begin
      if (NF > 0) begin
        checks++;
        if (u_dut.en[NF] !== 1'b0) begin
          failures++;
          $display("FAIL spacing %0d: enable chain still high at the edge", SP[i]);
        end
      end
      #1;
      if (ov) begin
        checks++;
        if (got >= expq.size() || dout !== expq[got]) begin
          failures++;
          $display("FAIL spacing %0d: result %0d wrong", SP[i], got);
        end
        got++;
      end
    end
  end

  initial begin
    make_sbox(sb);
    #1000 rst_n = 1;
    for (int n = 0; n < NBLK; n++) begin
      @(negedge clk);
      vin = 1;
      din = {$urandom, $urandom, $urandom, $urandom};
    end
    @(negedge clk) vin = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < NSP; i++) begin
      checks++;
      if (got_of(i) != NBLK) begin
        failures++;
        $display("FAIL spacing %0d: %0d of %0d results", SP[i], got_of(i), NBLK);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int got_of(int i);
    case (i)
      0: return g_sp[0].got;
      1: return g_sp[1].got;
      2: return g_sp[2].got;
      3: return g_sp[3].got;
      4: return g_sp[4].got;
      default: return g_sp[5].got;
    endcase
  endfunction
endmodule
