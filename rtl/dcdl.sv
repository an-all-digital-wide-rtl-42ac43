// dcdl -- behavioural model of the four-phase digitally controlled delay line.
//
// Not synthesizable.  Four identical leakage-reduced stages in series share
// one control word C[6:0]; stage i drives phase P(i+1), so when the loop is
// locked the phases are a quarter of the reference period apart and P4
// (the DLL output) is one full period behind CLKIN.  C[6:3] is turned into
// the lattice thermometer code T0..T15 by a real decoder (bin2therm), C[2:0]
// sets the fine-tune cell.  With TU_PS = 60 one stage spans 60..1012.5 ps and
// the line 240..4050 ps in 30 ps steps (all four stages move together).
// The four-phase structure and the thermometer lattice follow the source
// design; the bit split and the unit delay are this design's choices.
module dcdl
  import dll_pkg::*;
#(
  parameter int unsigned TU_PS  = 60,
  parameter int unsigned NPHASE = 4
) (
  input  logic              clk_in,
  input  logic [CW-1:0]     code,
  output logic [NPHASE-1:0] p
);
  timeunit 1ps; timeprecision 100fs;

  logic [15:0] therm;

  bin2therm #(.NB(4), .NT(16)) u_dec (.bin(code[CW-1:CW-4]), .therm(therm));

  for (genvar i = 0; i < NPHASE; i++) begin : g_stage
    logic stage_in;
    if (i == 0) begin : g_first
      assign stage_in = clk_in;
    end else begin : g_next
      assign stage_in = p[i-1];
    end
    lrdl_stage #(.TU_PS(TU_PS), .NUNIT(16)) u_stage (
      .a(stage_in), .therm(therm), .fine(code[2:0]), .y(p[i])
    );
  end
endmodule
