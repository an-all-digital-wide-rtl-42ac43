// tb_fm_half -- a 1000 ps clock with 25% and 75% duty drives the 0.5X
// circuit; the output must rise once every two input periods and be high
// exactly half the time.
module tb_fm_half;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  localparam int T = 1000;
  logic clk = 0, rst_n = 1, out;

  fm_half dut (.clk(clk), .rst_n(rst_n), .out_half(out));

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dl[2] = '{25, 75};
    foreach (dl[d]) begin
      int hi, rises;
      logic prev;
      hi = 0; rises = 0; prev = 0;
      rst_n = 0; clk = 0;
      #500 rst_n = 1;
      for (int t = 0; t < 24 * T; t++) begin
        clk = (t % T) < dl[d] * T / 100;
        #1;
        if (t >= 4 * T) begin
          if (out) hi++;
          if (out && !prev) rises++;
        end
        prev = out;
      end
      checks++;
      if (rises != 10) begin failures++; $display("FAIL duty=%0d rises=%0d", dl[d], rises); end
      checks++;
      if (hi != 10 * T) begin failures++; $display("FAIL duty=%0d high=%0d", dl[d], hi); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
