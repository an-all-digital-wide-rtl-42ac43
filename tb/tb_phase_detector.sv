// tb_phase_detector -- a reference clock, its copy delayed by the 30 ps
// window, and a feedback clock at chosen offsets.  Feedback before Ref must
// give Comp=1 Lock=0, inside the window Lock=1 Comp=0, after the window
// Lock=0 Comp=0.
module tb_phase_detector;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic ref_clk = 0, reft = 0, fb = 0, rst_n = 1;
  logic lock, comp;
  int   offs = 0;   // feedback offset from Ref, ps (negative = earlier)

  phase_detector dut (.ref_clk(ref_clk), .reft(reft), .fb(fb), .rst_n(rst_n), .lock(lock), .comp(comp));

  localparam int T = 1000;
  // one reference period per loop: Ref rises at 400, Reft at 430,
  // Fb at 400 + offs; each high for half a period
  always begin
    for (int t = 0; t < T; t++) begin
      ref_clk = (t >= 400) && (t < 900);
      reft    = (t >= 430) && (t < 930);
      fb      = (t >= 400 + offs) && (t < 900 + offs);
      #1;
    end
  end

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cases[7] = '{-200, -40, -5, 5, 15, 25, 60};
    offs = 0;
    #3000 rst_n = 1;
    foreach (cases[n]) begin
      offs = cases[n];
      repeat (4) @(posedge ref_clk);
      #100;
      checks++;
      if (offs < 0) begin
        if (!(comp && !lock)) begin failures++; $display("FAIL lead offs=%0d lock=%b comp=%b", offs, lock, comp); end
      end else if (offs < 30) begin
        if (!(lock && !comp)) begin failures++; $display("FAIL window offs=%0d lock=%b comp=%b", offs, lock, comp); end
      end else begin
        if (lock || comp) begin failures++; $display("FAIL lag offs=%0d lock=%b comp=%b", offs, lock, comp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
