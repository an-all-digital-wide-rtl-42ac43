// tb_clk_div4 -- CLK_sar must rise once every four reference rising edges
// and be high for two of them.
module tb_clk_div4;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, clk_out;
  int   n_ref = 0, last = 0, highs = 0;

  clk_div4 dut (.clk_in(clk), .rst_n(rst_n), .clk_out(clk_out));

  always #500 clk = ~clk;

  // power-on reset: a real falling edge so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_ref++;
    #1;
    if (clk_out) highs++;
  end

  always @(posedge clk_out) begin
    if (last != 0) begin
      checks++;
      if (n_ref - last != 4) begin failures++; $display("FAIL period %0d", n_ref - last); end
    end
    last = n_ref;
  end

  initial begin
    #2200 rst_n = 1;
    repeat (40) @(posedge clk);
    #10;
    checks++;
    if (highs != 20) begin failures++; $display("FAIL duty highs=%0d", highs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
