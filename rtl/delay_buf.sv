// delay_buf -- behavioural model of a fixed delay buffer chain.
//
// Not synthesizable: it stands for the buffer chain that delays the
// reference clock by the phase detector's lock window 2Td (30 ps in the
// source design) to make Reft.  Every change of `a` appears on `y` after
// DELAY_PS picoseconds (transport delay, pulses shorter than the delay are
// kept).  Edges wait in a queue and are released with constant delay steps
// so that the model also runs in simulators that reject run-time delays.
module delay_buf #(
  parameter int unsigned DELAY_PS = 30
) (
  input  logic a,
  output logic y
);
  timeunit 1ps; timeprecision 100fs;

  // times in half picoseconds
  longint unsigned due_q[$];
  logic            val_q[$];
  event            launched;

  function automatic longint unsigned now2();
    return longint'($realtime * 2.0);
  endfunction

  initial y = 1'b0;

  always @(a) begin
    due_q.push_back(now2() + longint'(2 * DELAY_PS));
    val_q.push_back(a);
    -> launched;
  end

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
