`timescale 1ns/1ps
// carry_delay_chain_tb: a 1.5 ns pulse must leave the chain unchanged in width
// after the chain's delay: 4.68 ns for the default length, 2.34 ns for half of it.
module carry_delay_chain_tb;
  int checks = 0, failures = 0;
  logic din = 0, d1, d2;
  realtime t0;

  carry_delay_chain #(.SLICES(6)) u_a (.din(din), .dout(d1));
  carry_delay_chain #(.SLICES(3)) u_b (.din(din), .dout(d2));

  task automatic expect_time(realtime got, realtime exp, string what);
    checks++;
    if (got < exp - 0.002 || got > exp + 0.002) begin
      failures++; $display("FAIL %s: %0.3f ns, expected %0.3f ns", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    for (int i = 0; i < 10; i++) begin
      fork
        begin din = 1; #1.5 din = 0; end
        begin t0 = $realtime; @(posedge d1); expect_time($realtime - t0, 4.68, "long rise"); @(negedge d1); expect_time($realtime - t0, 4.68 + 1.5, "long fall"); end
        begin @(posedge d2); expect_time($realtime - t0, 2.34, "short rise"); @(negedge d2); expect_time($realtime - t0, 2.34 + 1.5, "short fall"); end
      join
      #20;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
