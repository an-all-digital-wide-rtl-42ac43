// tb_sr_edge -- self-checking test of the edge-triggered SR latch.
// Applies rising edges on S and R in several orders (S then R, repeated
// S, repeated R, overlapping high levels) and checks that the output
// rises on the first S edge after a reset, falls on the first R edge after
// a set, ignores repeated edges of the same kind, and is cleared by rst_n.
module tb_sr_edge;
  timeunit 1ps; timeprecision 100fs;

  int checks = 0, failures = 0;
  logic s = 0, r = 0, rst_n = 1;
  logic q;

  sr_edge dut (.s(s), .r(r), .rst_n(rst_n), .q(q));

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t (q=%b)", m, $time, q); end
  endtask

  task automatic pulse_s(); s = 1'b1; #50; s = 1'b0; #50; endtask
  task automatic pulse_r(); r = 1'b1; #50; r = 1'b0; #50; endtask

  initial begin
    #100;
    chk(q == 1'b0, "q not cleared by reset");
    rst_n = 1'b1;
    #100;
    pulse_s(); chk(q == 1'b1, "S edge does not set");
    pulse_s(); chk(q == 1'b1, "second S edge changes q");
    pulse_r(); chk(q == 1'b0, "R edge does not reset");
    pulse_r(); chk(q == 1'b0, "second R edge changes q");
    // overlapping levels as with 50% duty phases: S high, then R rises
    s = 1'b1; #100; chk(q == 1'b1, "overlap: set");
    r = 1'b1; #100; chk(q == 1'b0, "overlap: reset while S still high");
    s = 1'b0; #100; chk(q == 1'b0, "S fall changes q");
    s = 1'b1; #100; chk(q == 1'b1, "S rise while R high does not set");
    r = 1'b0; #100; s = 1'b0; #100;
    rst_n = 1'b0; #10; chk(q == 1'b0, "reset does not clear");
    rst_n = 1'b1; #100;
    for (int k = 0; k < 5; k++) begin
      pulse_s(); chk(q == 1'b1, "repeat set");
      pulse_r(); chk(q == 1'b0, "repeat reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
