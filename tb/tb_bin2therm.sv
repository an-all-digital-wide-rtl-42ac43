// tb_bin2therm -- exhaustive check of the binary to thermometer decoder:
// for every 4-bit input the number of set bits must equal the input and
// the set bits must be the lowest ones.
module tb_bin2therm;
  timeunit 1ps; timeprecision 100fs;
  int checks = 0, failures = 0;
  logic [3:0]  bin;
  logic [15:0] therm;

  bin2therm dut (.bin(bin), .therm(therm));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [15:0] exp_t;
      bin = 4'(v);
      exp_t = 16'((32'h1 << v) - 1);
      #10;
      checks++;
      if (therm !== exp_t) begin
        failures++;
        $display("FAIL bin=%0d therm=%b exp=%b", v, therm, exp_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
