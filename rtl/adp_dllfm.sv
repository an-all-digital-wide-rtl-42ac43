// adp_dllfm -- all-digital programmable DLL-based frequency multiplier.
//
// A four-phase digitally controlled delay line (DCDL) is locked so that its
// last phase P4 lags the reference clock by exactly one period; the four
// phases are then a quarter period apart and a multiplier combines them
// into 0.5X, 1X, 2X and 4X clocks.  Locking is done in three steps:
//   1. period measurement: the lock-in unit (LU) parks the line at its
//      middle word 1000000 and the frequency-estimation selector (FES)
//      checks whether 2 or 3 stage delays fit in a reference period,
//      giving S[1:0];
//   2. synchronisation: the LU's adaptive SAR search starts at half,
//      a quarter or an eighth of the line's range according to S, so the
//      first trial is never near a harmonic, and settles one bit per
//      CLK_sar = CLK_ref/4 period with the phase detector (PD); at most
//      28 reference periods;
//   3. frequency compensation: the dynamic frequency monitor (DFM) watches
//      the PD Lock output and, if it falls, pulses an internal reset that
//      restarts step 1.
// Delay elements (DCDL, PD window buffer, 4X replica cell) are behavioural
// models with picosecond delays, so this module simulates only with timing
// enabled; the rest is synthesizable logic.  With the default 60 ps unit
// the line spans 240..4050 ps in 30 ps steps and locks reference clocks of
// about 0.25 to 2.1 GHz.  The block set and the three steps follow the
// source design; the input clock gate that lets the FES see a clean first
// edge, the unit delay and the combined reset are this design's choices.
// The LU's state output is left open on purpose: it is for observation
// and testing only.
module adp_dllfm
  import dll_pkg::*;
#(
  parameter int unsigned TU_PS  = 60,
  parameter int unsigned WIN_PS = 30
) (
  input  logic          ref_clk,
  input  logic          ex_rst,
  input  logic [1:0]    f_sel,
  output logic [3:0]    phase,
  output logic          clk_out,
  output logic          clk_mul,
  output logic          clk_half,
  output logic          clk_1x,
  output logic          clk_2x,
  output logic          clk_4x,
  output logic [1:0]    s_code,
  output logic [CW-1:0] code,
  output logic          pd_lock,
  output logic          pd_comp,
  output logic          lu_locked,
  output logic          int_rst
);
  timeunit 1ps; timeprecision 100fs;

  logic      rst_n;       // Reset-bar: external or DFM reset
  logic      clk_sar;
  logic      dl_run, fes_en, dfm_en;
  logic      dl_in;
  logic      reft;

  assign rst_n = ~(ex_rst | int_rst);

  clk_div4 u_div (.clk_in(ref_clk), .rst_n(rst_n), .clk_out(clk_sar));

  lock_in_unit u_lu (
    .clk_sar(clk_sar), .rst_n(rst_n), .s(s_code), .comp(pd_comp), .lock(pd_lock),
    .code(code), .dl_run(dl_run), .fes_en(fes_en), .dfm_en(dfm_en), .state()
  );

  clk_gate u_gate (.clk(ref_clk), .en(dl_run), .rst_n(rst_n), .gclk(dl_in));

  dcdl #(.TU_PS(TU_PS), .NPHASE(4)) u_dcdl (.clk_in(dl_in), .code(code), .p(phase));

  fes u_fes (
    .ref_clk(ref_clk), .rst_n(rst_n), .en(fes_en), .p2(phase[1]), .p3(phase[2]), .s(s_code)
  );

  delay_buf #(.DELAY_PS(WIN_PS)) u_win (.a(ref_clk), .y(reft));

  phase_detector u_pd (
    .ref_clk(ref_clk), .reft(reft), .fb(phase[3]), .rst_n(rst_n), .lock(pd_lock), .comp(pd_comp)
  );

  dfm #(.PULSE_CYC(1)) u_dfm (
    .clk(ref_clk), .rst_n(~ex_rst), .en(dfm_en), .lock(pd_lock), .int_rst(int_rst)
  );

  freq_mult #(.TU_PS(TU_PS)) u_fm (
    .phi(phase), .code(code), .rst_n(rst_n), .f_sel(f_sel),
    .out_half(clk_half), .out_1x(clk_1x), .out_2x(clk_2x), .out_4x(clk_4x), .clk_mul(clk_mul)
  );

  assign clk_out   = phase[3];
  assign lu_locked = dfm_en;
endmodule
