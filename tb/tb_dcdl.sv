// tb_dcdl -- drives a clock into the four-stage line for several control
// words and checks that phase Pi rises i stage delays after the input,
// with stage delay = 60 ps * (1 + C[6:3]) + C[2:0] * 7.5 ps.
module tb_dcdl;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic [6:0] code = 7'd64;
  logic [3:0] p;
  realtime    tp[4];

  dcdl dut (.clk_in(clk), .code(code), .p(p));

  for (genvar i = 0; i < 4; i++) begin : g_mon
    always @(posedge p[i]) tp[i] = $realtime;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[6] = '{0, 1, 16, 64, 100, 127};
    realtime t0, ts;
    foreach (codes[n]) begin
      code = 7'(codes[n]);
      #5000;
      t0 = $realtime;
      clk = 1'b1;
      #5000;
      clk = 1'b0;
      ts = 60.0 * (1 + (codes[n] >> 3)) + 7.5 * (codes[n] & 7);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (tp[i] - t0 != ts * (i + 1)) begin
          failures++;
          $display("FAIL code=%0d P%0d at %0.1f exp %0.1f", codes[n], i + 1, tp[i] - t0, ts * (i + 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
