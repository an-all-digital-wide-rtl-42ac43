// tb_dfm -- the monitor must pulse int_rst for exactly one reference
// period after Lock falls while enabled, and stay quiet when Lock falls
// with Enable low or when Lock rises.
module tb_dfm;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0, lock = 0, int_rst;
  int   pulses = 0, width = 0;

  dfm dut (.clk(clk), .rst_n(rst_n), .en(en), .lock(lock), .int_rst(int_rst));

  always #500 clk = ~clk;
  always @(posedge clk) begin
    #1;
    if (int_rst) width++;
  end
  always @(posedge int_rst) pulses++;

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (pulses=%0d width=%0d)", m, pulses, width); end
  endtask

  initial begin
    #2200 rst_n = 1;
    @(negedge clk) lock = 1;          // lock rises, not enabled
    repeat (3) @(negedge clk);
    lock = 0;                         // falls while disabled
    repeat (3) @(negedge clk);
    chk(pulses == 0, "pulse while disabled");
    lock = 1;
    @(negedge clk) en = 1;
    repeat (3) @(negedge clk);
    chk(pulses == 0, "pulse on rising lock");
    lock = 0;                         // out of lock
    repeat (4) @(negedge clk);
    chk(pulses == 1, "no pulse after lock fall");
    chk(width == 1, "pulse width not one period");
    lock = 1; repeat (3) @(negedge clk);
    lock = 0; repeat (4) @(negedge clk);
    chk(pulses == 2, "second fall not seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
