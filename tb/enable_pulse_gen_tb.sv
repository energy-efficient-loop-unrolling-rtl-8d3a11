`timescale 1ns/1ps
// enable_pulse_gen_tb: the pulse must rise with each rising clock edge and
// last PULSE_PS (1.5 ns at the default), and stay low for the rest of the cycle.
module enable_pulse_gen_tb;
  int checks = 0, failures = 0;
  logic clk = 0, pulse;
  realtime t_clk, t_rise;

  enable_pulse_gen u_dut (.clk(clk), .pulse(pulse));

  always #10 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      @(posedge clk) t_clk = $realtime;
      #0.1;
      checks++;
      if (pulse !== 1'b1) begin failures++; $display("FAIL pulse not high after edge"); end
      t_rise = t_clk;
      @(negedge pulse);
      checks++;
      if ($realtime - t_rise < 1.499 || $realtime - t_rise > 1.501) begin
        failures++; $display("FAIL width %0t", $realtime - t_rise);
      end
      #5;
      checks++;
      if (pulse !== 1'b0) begin failures++; $display("FAIL pulse high mid-cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
