// tb_lrdl_stage -- measures the delay of one stage for a spread of
// thermometer and fine codes and compares it with
// 60 ps * (1 + set units) + fine * 7.5 ps.  Also checks that an edge sent
// after the code shrank does not overtake the one before it.
module tb_lrdl_stage;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic        a = 1'b0, y;
  logic [15:0] therm = '0;
  logic [2:0]  fine = '0;

  lrdl_stage dut (.a(a), .therm(therm), .fine(fine), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1, expd;
    #100;
    for (int k = 0; k <= 15; k += 3) begin
      for (int f = 0; f < 8; f += 3) begin
        therm = 16'((32'h1 << k) - 1);
        fine  = 3'(f);
        #10;
        t0 = $realtime;
        a  = (k + f) % 2 == 0;     // alternate 1, 0, 1, ...
        @(y);
        t1 = $realtime;
        expd = 60.0 * (1 + k) + 7.5 * f;
        checks++;
        if (t1 - t0 != expd) begin
          failures++;
          $display("FAIL k=%0d f=%0d delay=%0.1f exp=%0.1f", k, f, t1 - t0, expd);
        end
        #2000;
      end
    end
    // ordering: a slow rising edge, then a fast falling edge right after;
    // the falling edge must not land first and leave the output high
    therm = 16'h00ff; fine = 0; a = 1'b0; #2000;
    a = 1'b1;                    // due in 540 ps
    #10; therm = '0; a = 1'b0;   // would be due in 60 ps
    #200;
    checks++;
    if (y !== 1'b0) begin failures++; $display("FAIL edge landed before its predecessor"); end
    #2000;
    checks++;
    if (y !== 1'b0) begin failures++; $display("FAIL overtaking edge left y=%b", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
