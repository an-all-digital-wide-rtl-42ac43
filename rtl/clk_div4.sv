// clk_div4 -- divide-by-4 clock for the lock-in unit (CLK_sar).
//
// A two-bit counter clocked by the reference clock; its MSB is CLK_sar, a
// 50% duty clock whose rising edge follows every fourth reference rising
// edge.  The lock-in unit therefore gives the delay line and phase detector
// four reference periods to settle per search step.  The division by 4 is
// the source design's; the counter form and asynchronous reset are this
// design's choices.
module clk_div4 (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps; timeprecision 100fs;

  logic [1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n)
    if (!rst_n) cnt <= 2'd0;
    else        cnt <= cnt + 2'd1;

  assign clk_out = cnt[1];
endmodule
