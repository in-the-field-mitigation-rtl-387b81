// reset_sync: active-low reset synchronizer. The reset is asserted at once
// (asynchronously) and released two clocks of `clk` after `arst_n` rises, so
// every flip-flop of the domain leaves reset on the same edge. Used for the
// benchmark clock domain, whose clock only runs while the PLL is locked;
// assertion needs no clock, so it works while that clock is stopped.
`timescale 1ns / 1ps
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic q1;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      q1    <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      q1    <= 1'b1;
      rst_n <= q1;
    end
  end

endmodule
