// tb_fm_4x -- a 2X clock (period 600 ps, 50% duty) and main words 32 and
// 50 drive the 4X circuit.  The replica must delay 2X by the stage delay
// of word C >> 1 (60 ps * (1 + units) + fine * 7.5 ps), and 4X must rise
// twice per 2X period with each pulse as long as that delay.
module tb_fm_4x;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  localparam int T2 = 600;
  logic       x2 = 0, out, x2_d;
  logic [6:0] code = 7'd32;

  fm_4x dut (.x2(x2), .code(code), .out_4x(out), .x2_d(x2_d));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words[2] = '{32, 50};
    foreach (words[w]) begin
      int hi, rises, rc, rd;
      logic prev;
      realtime tr;
      hi = 0; rises = 0; prev = 0;
      code = 7'(words[w]);
      rc = words[w] >> 1;
      rd = 60 * (1 + (rc >> 3)) + (rc & 7) * 15 / 2;
      for (int t = 0; t < 22 * T2; t++) begin
        x2 = (t % T2) < T2 / 2;
        if (t == 10 * T2) tr = $realtime;
        #1;
        if (t >= 2 * T2) begin
          if (out) hi++;
          if (out && !prev) rises++;
        end
        prev = out;
      end
      checks++;
      if (rises != 40) begin failures++; $display("FAIL word=%0d rises=%0d", words[w], rises); end
      checks++;
      if (hi > 40 * rd + 40 || hi < 40 * rd - 40) begin failures++; $display("FAIL word=%0d high=%0d exp~%0d", words[w], hi, 40 * rd); end
      x2 = 0;
      #2000;
    end
    // replica delay of one edge
    begin
      realtime t0;
      code = 7'd40;
      #2000;
      t0 = $realtime;
      x2 = 1;
      @(posedge x2_d);
      checks++;
      if ($realtime - t0 != 60.0 * (1 + 2) + 7.5 * 4) begin
        failures++; $display("FAIL replica delay %0.1f", $realtime - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
