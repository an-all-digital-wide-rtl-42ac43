// tb_fes -- the selector sees a gated reference clock whose first edge
// enters a model line with stage delay 540 ps (middle word); P2 and P3 are
// that clock delayed by 2 and 3 stages.  Reference periods on both sides
// of the 1080 ps and 1620 ps thresholds must give S = 00, 01 and 11, for
// input duty cycles of 50%, 25% and 75%.
module tb_fes;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic ref_clk = 0, gclk, rst_n = 1, en = 0, p2, p3;
  logic [1:0] s;
  int   tref = 1000, thigh = 500;
  bit   run = 0;

  fes dut (.ref_clk(ref_clk), .rst_n(rst_n), .en(en), .p2(p2), .p3(p3), .s(s));

  task automatic wait_ps(input int n);
    repeat (n / 64) #64;
    repeat (n % 64) #1;
  endtask

  always begin
    wait_ps(tref - thigh);
    ref_clk = 1;
    wait_ps(thigh);
    ref_clk = 0;
  end
  // clock gate as in the top: opens one period after en
  bit gate_q = 0;
  always @(negedge ref_clk) gate_q <= en;
  always_comb gclk = ref_clk & gate_q;
  // model line at the middle word: 540 ps per stage
  delay_buf #(.DELAY_PS(1080)) u_p2 (.a(gclk), .y(p2));
  delay_buf #(.DELAY_PS(1620)) u_p3 (.a(gclk), .y(p3));

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  periods[6] = '{700, 1000, 1100, 1500, 1700, 3000};
    int  duty[3]    = '{50, 25, 75};
    logic [1:0] exp_s;
    foreach (duty[d]) foreach (periods[n]) begin
      rst_n = 0; en = 0;
      tref  = periods[n];
      thigh = periods[n] * duty[d] / 100;
      repeat (8) @(posedge ref_clk);
      rst_n = 1;
      @(posedge ref_clk); #1 en = 1;
      repeat (10) @(posedge ref_clk);
      exp_s = (tref > 1620) ? 2'b11 : (tref > 1080) ? 2'b01 : 2'b00;
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("FAIL T=%0d duty=%0d s=%b exp=%b", tref, duty[d], s, exp_s);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
