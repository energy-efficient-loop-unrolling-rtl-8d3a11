`timescale 1ns/1ps
// cycle_counter: free-running WIDTH-bit counter that addresses the stimulus
// ROM, so that a new data word reaches the design under test every clock.
// Synchronous, cleared by the active-low reset, wraps at 2^WIDTH.
module cycle_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

endmodule
