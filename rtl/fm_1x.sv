// fm_1x -- 1X clock generator with 50% duty.
//
// Latch A is set by Phi1 and reset by Phi2, latch B set by Phi3 and reset
// by Phi4; their outputs set and reset a third latch.  With the four phases
// a quarter period apart the output rises at Phi1 and falls at Phi3: the
// reference frequency at 50% duty, independent of the input duty cycle.
// Structure from the source design; the latches are edge-triggered
// (sr_edge), which is this design's choice.  phi[0] is Phi1.
module fm_1x (
  input  logic [3:0] phi,
  input  logic       rst_n,
  output logic       out_1x
);
  timeunit 1ps; timeprecision 100fs;

  logic qa, qb;

  sr_edge u_a (.s(phi[0]), .r(phi[1]), .rst_n(rst_n), .q(qa));
  sr_edge u_b (.s(phi[2]), .r(phi[3]), .rst_n(rst_n), .q(qb));
  sr_edge u_o (.s(qa),     .r(qb),     .rst_n(rst_n), .q(out_1x));
endmodule
