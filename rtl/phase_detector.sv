// phase_detector -- window phase detector of the DLL.
//
// Two flip-flops sample the feedback clock Fb (phase P4 of the delay line):
// Q2 at the rising edge of Ref and Q1 at the rising edge of Reft, which is
// Ref delayed by the window 2Td (30 ps, made outside by a buffer chain).
//   Q1 Q2 = 1 1  Fb rose before Ref        -> feedback leads, Comp = 1
//   Q1 Q2 = 1 0  Fb rose inside the window -> Lock = 1
//   Q1 Q2 = 0 x  Fb not yet risen at Reft  -> feedback lags, Comp = 0
// Outputs are registered values combined by one gate each, so they change
// right after a Ref or Reft edge and hold for a reference period.  The two
// sampling flops, the 2Td window and the meaning of Lock and Comp follow the
// source design; the asynchronous reset is this design's addition.
module phase_detector (
  input  logic ref_clk,   // Ref
  input  logic reft,      // Ref delayed by 2Td
  input  logic fb,        // Fb
  input  logic rst_n,
  output logic lock,
  output logic comp
);
  timeunit 1ps; timeprecision 100fs;

  logic q1, q2;

  always_ff @(posedge reft or negedge rst_n)
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= fb;

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) q2 <= 1'b0;
    else        q2 <= fb;

  assign lock = q1 & ~q2;
  assign comp = q1 &  q2;
endmodule
