// clk_gate -- glitch-free clock gate for the delay-line input.
//
// The enable is re-timed on the falling edge of the clock and ANDed with
// the clock, so the gated clock only ever passes whole high pulses.  The
// lock-in unit keeps the gate closed while the delay line drains after a
// reset and opens it when period measurement starts; the first edge that
// enters the line is then the one the frequency-estimation selector
// measures.  This gate is this design's own addition.
module clk_gate (
  input  logic clk,
  input  logic en,
  input  logic rst_n,
  output logic gclk
);
  timeunit 1ps; timeprecision 100fs;

  logic en_q;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;

  assign gclk = clk & en_q;
endmodule
