// fm_half -- 0.5X clock generator.
//
// A flip-flop with its inverted output fed back to D toggles on every rising
// edge of its clock, giving half the frequency at exactly 50% duty whatever
// the input duty cycle.  It is clocked by P4, the DLL output.  The circuit
// follows the source design; driving it from P4 is this design's choice.
module fm_half (
  input  logic clk,
  input  logic rst_n,
  output logic out_half
);
  timeunit 1ps; timeprecision 100fs;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_half <= 1'b0;
    else        out_half <= ~out_half;
endmodule
