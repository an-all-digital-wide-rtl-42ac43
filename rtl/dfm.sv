// dfm -- dynamic frequency monitor.
//
// Watches the phase detector's Lock output after the lock-in unit has
// finished (en = 1).  When Lock falls from 1 to 0 while enabled, the loop
// has drifted out of its window (supply, temperature or input-frequency
// change) and the monitor emits an internal reset pulse int_rst lasting
// PULSE_CYC reference periods.  That pulse resets the lock-in unit, which
// drops `en` and relocks from period measurement on.  The monitor is only
// reset by the external reset, so it cannot cut its own pulse short.
// Timing: Lock is registered on CLK_ref; int_rst rises one reference edge
// after the fall is seen.  Triggering on a Lock fall while enabled, and the
// resulting internal reset, follow the source design; the synchronous form
// and the pulse length in reference periods (instead of a buffer delay Td)
// are this design's choices.
module dfm #(
  parameter int unsigned PULSE_CYC = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic lock,
  output logic int_rst
);
  timeunit 1ps; timeprecision 100fs;

  logic       lock_q;
  logic [3:0] pulse_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lock_q  <= 1'b0;
      pulse_q <= '0;
    end else begin
      lock_q <= lock;
      if (en && lock_q && !lock) pulse_q <= 4'(PULSE_CYC);
      else if (pulse_q != 0)     pulse_q <= pulse_q - 4'd1;
    end

  assign int_rst = (pulse_q != 0);
endmodule
