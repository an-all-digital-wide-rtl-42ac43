// lrdl_stage -- behavioural model of one leakage-reduced delay-line stage.
//
// Not synthesizable: the real stage is a fine-tune cell (an inverter whose
// output load is switched by a control gate) followed by a lattice of NAND
// delay units.  The clock walks forward through every unit whose thermometer
// bit is set and turns back at the first clear one, so the intrinsic delay
// and each coarse step are both one unit (two NAND delays).  The model
// reduces this to
//     delay = TU_PS * (1 + number of set bits of therm) + fine * TU_PS / 8
// applied as a transport delay to both edges of `a`, resolved to 0.5 ps.  An edge is never
// allowed to overtake an earlier one when the code shrinks while edges are
// in flight.  TU_PS and the 1/8 fine step are this design's choices; the
// structure (fine cell in front, T0..T15 lattice) follows the source design.
// The same model serves as the replica delay cell of the 4X multiplier.
module lrdl_stage #(
  parameter int unsigned TU_PS = 60,
  parameter int unsigned NUNIT = 16
) (
  input  logic             a,
  input  logic [NUNIT-1:0] therm,
  input  logic [2:0]       fine,
  output logic             y
);
  timeunit 1ps; timeprecision 100fs;

  // all times below are counted in half picoseconds
  longint unsigned due_q[$];       // landing times of edges in flight
  logic            val_q[$];       // their values
  event            launched;
  longint unsigned last_due;

  function automatic longint unsigned stage_delay2(input logic [NUNIT-1:0] t, input logic [2:0] f);
    return longint'(2 * TU_PS * (1 + $countones(t))) + longint'((32'(f) * TU_PS) / 4);
  endfunction

  function automatic longint unsigned now2();
    return longint'($realtime * 2.0);
  endfunction

  initial begin
    y        = 1'b0;
    last_due = 0;
  end

  // launch: the delay is taken from the code when the edge enters
  always @(a) begin
    automatic longint unsigned due = now2() + stage_delay2(therm, fine);
    if (due < last_due) due = last_due;
    last_due = due;
    due_q.push_back(due);
    val_q.push_back(a);
    -> launched;
  end

  // land: edges leave in order, waited out with constant delay steps
  initial forever begin
    if (due_q.size() == 0) @(launched);
    while (now2() < due_q[0]) begin
      automatic longint unsigned n = due_q[0] - now2();
      if (n >= 1024)    #512;
      else if (n >= 64) #32;
      else              #0.5;
    end
    y = val_q.pop_front();
    void'(due_q.pop_front());
  end
endmodule
