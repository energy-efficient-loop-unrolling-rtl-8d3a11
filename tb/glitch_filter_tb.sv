`timescale 1ns/1ps
// glitch_filter_tb: checks both latch styles of glitch_filter. While en is low
// the output must hold through any activity (glitches) on d; while en is high
// it must follow d; when en falls it must keep the last value of d.
module glitch_filter_tb;
  import gf_pkg::*;

  int checks = 0, failures = 0;
  logic       en;
  logic [7:0] d, qx, qa, held;

  glitch_filter #(.WIDTH(8), .FAMILY(FAM_XILINX)) u_x (.en(en), .d(d), .q(qx));
  glitch_filter #(.WIDTH(8), .FAMILY(FAM_ALTERA)) u_a (.en(en), .d(d), .q(qa));

  task automatic check(logic [7:0] exp, string what);
    checks += 2;
    if (qx !== exp) begin failures++; $display("FAIL %s xilinx q=%h exp=%h", what, qx, exp); end
    if (qa !== exp) begin failures++; $display("FAIL %s altera q=%h exp=%h", what, qa, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; d = 0;
    #1;
    for (int it = 0; it < 50; it++) begin
      // transparent phase: output follows several values of d
      en = 1;
      repeat (3) begin
        d = 8'($urandom);
        #1 check(d, "transparent");
      end
      held = d;
      #1 en = 0;
      #1 check(held, "closed");
      // glitches on d while closed must not pass
      repeat (10) begin
        d = 8'($urandom);
        #0.2 check(held, "glitch blocked");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
