// bin2therm -- binary to thermometer decoder for the lattice delay line.
//
// The coarse part of the delay-line control word is binary; the lattice of
// delay units needs one enable per unit, T0..T(NT-1), filled from T0 upward:
// T[i] = 1 when i < bin.  With the default 4-bit input the top unit T15 is
// never enabled (15 active units at most).  Purely combinational.  The
// conversion itself follows the source design; the rule i < bin is this
// design's choice.
module bin2therm #(
  parameter int unsigned NB = 4,
  parameter int unsigned NT = 16
) (
  input  logic [NB-1:0] bin,
  output logic [NT-1:0] therm
);
  timeunit 1ps; timeprecision 100fs;

  always_comb begin
    for (int unsigned i = 0; i < NT; i++)
      therm[i] = (i < 32'(bin));
  end
endmodule
