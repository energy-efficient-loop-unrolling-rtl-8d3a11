`timescale 1ns/1ps
// cycle_counter_tb: after reset the count must step by one per clock and wrap.
module cycle_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] count;

  cycle_counter #(.WIDTH(4)) u_dut (.clk(clk), .rst_n(rst_n), .count(count));

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (count !== 4'd0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 1; i <= 40; i++) begin
      @(posedge clk) #1;
      checks++;
      if (count !== 4'(i)) begin failures++; $display("FAIL count %0d exp %0d", count, i % 16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
