// tb_clk_gate -- self-checking test of the glitch-free clock gate.
// Drives a 1000 ps clock, raises and drops the enable at several points
// inside the high and the low phase, and checks on a 1 ps grid that the
// gated clock is either a copy of the clock or held low, that it never
// produces a shortened high pulse outside reset, and that enable changes take effect
// from the next clock fall. Reset forces the gate closed.
module tb_clk_gate;
  timeunit 1ps; timeprecision 100fs;

  int checks = 0, failures = 0;
  logic clk = 0, en = 0, rst_n = 1;
  logic gclk;
  int   hi_len = 0, short_pulses = 0, pulses = 0;
  logic en_exp = 0;

  clk_gate dut (.clk(clk), .en(en), .rst_n(rst_n), .gclk(gclk));

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // clock and reference model on a 1 ps grid
  int t = 0;
  int bad = 0;
  logic rst_seen = 0;    // a reset inside a pulse may cut it short
  initial forever begin
    #1;
    t++;
    if (t % 1000 == 0)   clk = 1'b1;
    if (t % 1000 == 500) begin
      clk = 1'b0;
      en_exp = rst_n ? en : 1'b0;
    end
    if (!rst_n) en_exp = 1'b0;
    #0.1;
    if (gclk !== (clk & en_exp)) bad++;
    if (!rst_n) rst_seen = 1'b1;
    if (gclk) hi_len++;
    else if (hi_len > 0) begin
      pulses++;
      if (hi_len != 500 && !rst_seen) short_pulses++;
      hi_len = 0;
    end
    if (!gclk) rst_seen = 1'b0;
  end

  initial begin
    #2300 rst_n = 1;
    #3000 en = 1;      // enable in the high phase
    #5100 en = 0;      // disable in the high phase
    #4200 en = 1;      // enable in the low phase
    #6000 en = 0;      // disable in the low phase
    #3000 en = 1;
    #3000 rst_n = 0;   // reset closes the gate
    #2000 chk(gclk == 1'b0, "gate open during reset");
    rst_n = 1;
    #5000;
    chk(bad == 0, $sformatf("%0d ps where the gated clock differs from clk & retimed en", bad));
    chk(short_pulses == 0, $sformatf("%0d shortened pulses", short_pulses));
    chk(pulses >= 15, $sformatf("only %0d pulses passed", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
