// fm_2x -- 2X clock generator with 50% duty.
//
// Latch A (set Phi1, reset Phi2) is high for the first quarter of each
// reference period, latch B (set Phi3, reset Phi4) for the third quarter;
// their OR is a clock at twice the reference frequency with 50% duty,
// independent of the input duty cycle.  Structure from the source design;
// the edge-triggered latches are this design's choice.  phi[0] is Phi1.
module fm_2x (
  input  logic [3:0] phi,
  input  logic       rst_n,
  output logic       out_2x
);
  timeunit 1ps; timeprecision 100fs;

  logic qa, qb;

  sr_edge u_a (.s(phi[0]), .r(phi[1]), .rst_n(rst_n), .q(qa));
  sr_edge u_b (.s(phi[2]), .r(phi[3]), .rst_n(rst_n), .q(qb));

  assign out_2x = qa | qb;
endmodule
