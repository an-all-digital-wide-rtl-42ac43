// tb_lock_in_unit -- runs the lock-in unit against an ideal delay line and
// phase detector: total delay = 240 ps + 30 ps * C, Comp when the delay is
// shorter than the reference period, Lock when it is within 30 ps after it.
// For each S code and several periods it checks the flush and measurement
// phases, that the search takes 7, 6 or 5 CLK_sar steps (at most 28
// reference periods), that it starts from the word of the S table, and that
// the final word is the largest one (with the forced-zero top bits) whose
// delay is below period + 30 ps.
module tb_lock_in_unit;
  import dll_pkg::*;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, comp, lock, dl_run, fes_en, dfm_en;
  logic [1:0] s = 2'b11;
  logic [6:0] code;
  lu_state_e  state;
  int  tref = 2000;
  int  dly;

  lock_in_unit dut (
    .clk_sar(clk), .rst_n(rst_n), .s(s), .comp(comp), .lock(lock),
    .code(code), .dl_run(dl_run), .fes_en(fes_en), .dfm_en(dfm_en), .state(state)
  );

  always #2000 clk = ~clk;
  assign dly  = 240 + 30 * int'(code);
  assign comp = dly < tref;
  assign lock = (dly >= tref) && (dly < tref + 30);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (T=%0d s=%b code=%b)", m, tref, s, code); end
  endtask

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  pers[3][3] = '{'{1700, 2500, 4000}, '{1100, 1300, 1600}, '{500, 800, 1070}};
    logic [1:0] scodes[3] = '{2'b11, 2'b01, 2'b00};
    int  nbits[3] = '{7, 6, 5};
    int  steps, best;
    for (int r = 0; r < 3; r++) for (int k = 0; k < 3; k++) begin
      rst_n = 0; s = scodes[r]; tref = pers[r][k];
      @(negedge clk);
      rst_n = 1;
      #1;
      chk(!dl_run && code == 7'b1000000, "flush");
      for (int c = 0; c < 2; c++) begin
        @(negedge clk);
        chk(!dl_run && code == 7'b1000000, "flush");
      end
      for (int c = 0; c < 2; c++) begin
        @(negedge clk);
        chk(dl_run && fes_en && code == 7'b1000000, "measure");
      end
      @(negedge clk);
      chk(code == (7'b1 << (nbits[r] - 1)), "initial word");
      steps = 0;
      while (!dfm_en && steps < 20) begin
        steps++;
        @(negedge clk);
      end
      chk(steps == nbits[r], "search step count");
      chk(steps * 4 <= 28, "lock time over 28 reference periods");
      best = 0;
      for (int c = 0; c < (1 << nbits[r]); c++)
        if (240 + 30 * c < tref + 30) best = c;
      chk(int'(code) == best, "final word");
      chk(lock, "final word not in lock window");
      repeat (3) @(negedge clk);
      chk(int'(code) == best && dfm_en, "word not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
