// tb_delay_buf -- the window buffer must reproduce each input edge 30 ps
// later: unchanged 1 ps before, changed 1 ps after.
module tb_delay_buf;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic a = 1'b0, y;

  delay_buf dut (.a(a), .y(y));

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    for (int k = 0; k < 6; k++) begin
      logic nv;
      nv = ~a;
      a = nv;
      #29; chk(y == ~nv, "y changed too early");
      #2;  chk(y == nv,  "y not changed after 30 ps");
      #50;
      repeat (k) #10;
    end
    // a pulse shorter than the delay survives (transport delay)
    a = 1'b1; #10; a = 1'b0;
    #25; chk(y == 1'b1, "short pulse lost");
    #10; chk(y == 1'b0, "short pulse end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
