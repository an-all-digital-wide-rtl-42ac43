// tb_freq_mult -- four phases of a 1200 ps reference (50% duty) and the
// matching word C = 32 (300 ps per stage) drive the multiplier.  For each
// F[1:0] the selected CLK_mul must rise 0.5, 1, 2 or 4 times per reference
// period over 20 periods, and every output must match its own port.
module tb_freq_mult;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  localparam int T = 1200;
  logic [3:0] phi = '0;
  logic [6:0] code = 7'd32;
  logic       rst_n = 1;
  logic [1:0] f_sel = 2'b00;
  logic       o_half, o_1x, o_2x, o_4x, clk_mul;

  freq_mult dut (
    .phi(phi), .code(code), .rst_n(rst_n), .f_sel(f_sel),
    .out_half(o_half), .out_1x(o_1x), .out_2x(o_2x), .out_4x(o_4x), .clk_mul(clk_mul)
  );

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_r[4] = '{10, 20, 40, 80};
    #500 rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      int rises, mism;
      logic prev, sel;
      rises = 0; mism = 0; prev = 0;
      f_sel = 2'(f);
      for (int t = 0; t < 25 * T; t++) begin
        for (int i = 0; i < 4; i++)
          phi[i] = (((t - (i + 1) * T / 4) % T + T) % T) < T / 2 && t >= (i + 1) * T / 4;
        #1;
        case (f)
          0: sel = o_half;
          1: sel = o_1x;
          2: sel = o_2x;
          default: sel = o_4x;
        endcase
        if (t >= 5 * T) begin
          if (clk_mul && !prev) rises++;
          if (clk_mul !== sel) mism++;
        end
        prev = clk_mul;
      end
      checks++;
      if (rises != exp_r[f]) begin failures++; $display("FAIL F=%0d rises=%0d exp=%0d", f, rises, exp_r[f]); end
      checks++;
      if (mism != 0) begin failures++; $display("FAIL F=%0d CLK_mul differs from its source", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
