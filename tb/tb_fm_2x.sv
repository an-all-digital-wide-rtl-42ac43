// tb_fm_2x -- four phases a quarter period apart are generated from a
// reference of period 1000 ps with 25%, 50% and 75% duty.  Over 20
// periods the output must rise 2 time(s) per period and be high for
// exactly half the time, whatever the input duty.
module tb_fm_2x;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  localparam int T = 1000;
  logic [3:0] phi = '0;
  logic       rst_n = 1, out;
  int         duty = 50;

  fm_2x dut (.phi(phi), .rst_n(rst_n), .out_2x(out));

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dl[3] = '{25, 50, 75};
    foreach (dl[d]) begin
      int hi, rises;
      logic prev;
      hi = 0; rises = 0; prev = 0;
      duty = dl[d];
      rst_n = 0;
      phi = '0;
      #500 rst_n = 1;
      for (int t = 0; t < 25 * T; t++) begin
        for (int i = 0; i < 4; i++)
          phi[i] = (((t - (i + 1) * T / 4) % T + T) % T) < duty * T / 100 && t >= (i + 1) * T / 4;
        #1;
        if (t >= 5 * T) begin
          if (out) hi++;
          if (out && !prev) rises++;
        end
        prev = out;
      end
      checks++;
      if (rises != 20 * 2) begin failures++; $display("FAIL duty=%0d rises=%0d", duty, rises); end
      checks++;
      if (hi != 20 * T / 2) begin failures++; $display("FAIL duty=%0d high=%0d of %0d", duty, hi, 20 * T); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
