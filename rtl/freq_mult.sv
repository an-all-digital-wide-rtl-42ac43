// freq_mult -- programmable 0.5X / 1X / 2X / 4X frequency multiplier.
//
// Takes the four evenly spaced phases of the locked delay line and builds
// all four clocks at once: 0.5X by toggling on Phi4, 1X and 2X from
// edge-triggered SR latches, 4X from 2X and a half-stage replica delay.
// F[1:0] selects one of them as CLK_mul (00 = 0.5X, 01 = 1X, 10 = 2X,
// 11 = 4X) through a plain multiplexer, so a change of F takes effect at
// once, with a possible short pulse at the switch.  The four circuits
// follow the source design; the F encoding and the plain multiplexer are
// this design's choices.  phi[0] is Phi1.
// The delayed 2X copy of the 4X circuit (x2_d) is an observation output
// only and is left open here.
module freq_mult
  import dll_pkg::*;
#(
  parameter int unsigned TU_PS = 60
) (
  input  logic [3:0]    phi,
  input  logic [CW-1:0] code,
  input  logic          rst_n,
  input  logic [1:0]    f_sel,
  output logic          out_half,
  output logic          out_1x,
  output logic          out_2x,
  output logic          out_4x,
  output logic          clk_mul
);
  timeunit 1ps; timeprecision 100fs;

  fm_half u_half (.clk(phi[3]), .rst_n(rst_n), .out_half(out_half));
  fm_1x   u_1x   (.phi(phi), .rst_n(rst_n), .out_1x(out_1x));
  fm_2x   u_2x   (.phi(phi), .rst_n(rst_n), .out_2x(out_2x));
  fm_4x #(.TU_PS(TU_PS)) u_4x (.x2(out_2x), .code(code), .out_4x(out_4x), .x2_d());

  always_comb begin
    unique case (fsel_e'(f_sel))
      F_HALF:  clk_mul = out_half;
      F_1X:    clk_mul = out_1x;
      F_2X:    clk_mul = out_2x;
      F_4X:    clk_mul = out_4x;
      default: clk_mul = out_1x;
    endcase
  end
endmodule
