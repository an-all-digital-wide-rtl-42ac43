// sr_edge -- edge-triggered set/reset latch used by the frequency multiplier.
//
// Q goes to 1 on a rising edge of S and to 0 on a rising edge of R, no
// matter how long S and R stay high, so overlapping multiphase inputs of any
// duty cycle give clean outputs.  Built from two flip-flops, one clocked by
// S and one by R, whose XOR is Q: a set makes the two differ, a reset makes
// them equal.  S and R edges must not coincide.  The edge-triggered reading
// of the SR latch is this design's choice.
module sr_edge (
  input  logic s,
  input  logic r,
  input  logic rst_n,
  output logic q
);
  timeunit 1ps; timeprecision 100fs;

  logic ts, tr;

  always_ff @(posedge s or negedge rst_n)
    if (!rst_n) ts <= 1'b0;
    else        ts <= ~tr;

  always_ff @(posedge r or negedge rst_n)
    if (!rst_n) tr <= 1'b0;
    else        tr <= ts;

  assign q = ts ^ tr;
endmodule
