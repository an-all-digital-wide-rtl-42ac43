// fes -- frequency-estimation selector.
//
// With the delay line parked at its middle word C = 1000000, the selector
// divides CLK_ref by two and lets phases P2 and P3 of the line sample the
// divided clock: S0 is sampled by P2 and S1 by P3.  A sample is 1 when the
// phase edge arrives while the first high half-period of CLK_ref/2 (one
// reference period long) is still running, i.e. when 2 or 3 stage delays
// are shorter than the reference period:
//   S = 11  slow clock   (Range 1, search starts at 1000000)
//   S = 01  middle clock (Range 2, search starts at 0100000)
//   S = 00  fast clock   (Range 3, search starts at 0010000)
// Because the whole reference period is measured, the result does not
// depend on the input duty cycle.  Timing: `en` must rise one reference
// period before the first clock edge enters the delay line (the lock-in
// unit and the input clock gate ensure this); S is valid 3 stage delays
// after that edge and holds until reset.  The divider, the two sampling
// flops and the S table follow the source design; running the divider for
// one half-period only and keeping a captured 1 are this design's choices.
module fes (
  input  logic       ref_clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       p2,
  input  logic       p3,
  output logic [1:0] s        // {S1, S0}
);
  timeunit 1ps; timeprecision 100fs;

  logic half;      // first high half-period of CLK_ref/2
  logic started;
  logic s0, s1;

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) begin
      half    <= 1'b0;
      started <= 1'b0;
    end else if (en && !started) begin
      half    <= 1'b1;
      started <= 1'b1;
    end else begin
      half    <= 1'b0;
    end

  always_ff @(posedge p2 or negedge rst_n)
    if (!rst_n) s0 <= 1'b0;
    else        s0 <= s0 | half;

  always_ff @(posedge p3 or negedge rst_n)
    if (!rst_n) s1 <= 1'b0;
    else        s1 <= s1 | half;

  assign s = {s1, s0};
endmodule
