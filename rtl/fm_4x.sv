// fm_4x -- 4X clock generator.
//
// The 2X clock passes through a replica of one delay-line stage whose
// control word is the main word shifted right by one (about half the
// stage delay Td, i.e. an eighth of the reference period); XOR of 2X and
// the delayed copy 2X_D gives a pulse after every 2X edge, four per
// reference period.  Only N+1 delay cells are needed for N-times
// multiplication instead of 2N.  Because the stage has an intrinsic delay
// the shifted word gives slightly more than Td/2, so the 4X duty is close
// to, not exactly, 50%.  The structure and the shifted word follow the
// source design; the replica is the behavioural stage model.
module fm_4x
  import dll_pkg::*;
#(
  parameter int unsigned TU_PS = 60
) (
  input  logic          x2,
  input  logic [CW-1:0] code,
  output logic          out_4x,
  output logic          x2_d
);
  timeunit 1ps; timeprecision 100fs;

  logic [CW-1:0] rcode;
  logic [15:0]   rtherm;

  assign rcode = code >> 1;

  bin2therm #(.NB(4), .NT(16)) u_dec (.bin(rcode[CW-1:CW-4]), .therm(rtherm));

  lrdl_stage #(.TU_PS(TU_PS), .NUNIT(16)) u_replica (
    .a(x2), .therm(rtherm), .fine(rcode[2:0]), .y(x2_d)
  );

  assign out_4x = x2 ^ x2_d;
endmodule
