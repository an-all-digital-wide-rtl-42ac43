// lock_in_unit -- adaptive successive-approximation (ASAR) lock-in unit.
//
// Clocked by CLK_sar (CLK_ref / 4), so each step has four reference periods
// to let the delay line and phase detector settle.  After reset it runs:
//   FLUSH    FLUSH_CYC steps: delay-line input gated off, C = 1000000, so
//            no edge of an older code is left in the line;
//   MEASURE  MEAS_CYC steps: gate open, FES enabled with C = 1000000;
//   SEARCH   the adaptive decision block turns S[1:0] into the first trial
//            word (1000000, 0100000 or 0010000, forcing D6 and D5 to 0
//            for faster clocks) and the SAR then settles one bit per step,
//            from the first trial bit down to D0: the bit is kept when the
//            phase detector reports lead (Comp) or lock, otherwise cleared,
//            and the next lower bit is set for trial;
//   LOCKED   the word is held and the dynamic frequency monitor is enabled.
// The search takes 7, 6 or 5 steps, at most 28 reference periods.  A reset
// (external or from the monitor) restarts the whole sequence.  Keeping a
// bit on Lock as well as on lead makes the search end on the largest word
// whose feedback edge comes before the end of the lock window; with a
// delay step no larger than the window that word lies inside it.  The
// algorithm, initial words and CLK_sar follow the source design; the FLUSH
// step, the step counts and keeping a bit on Lock are this design's choices.
module lock_in_unit
  import dll_pkg::*;
#(
  parameter int unsigned FLUSH_CYC = 3,
  parameter int unsigned MEAS_CYC  = 2
) (
  input  logic          clk_sar,
  input  logic          rst_n,
  input  logic [1:0]    s,
  input  logic          comp,
  input  logic          lock,
  output logic [CW-1:0] code,
  output logic          dl_run,
  output logic          fes_en,
  output logic          dfm_en,
  output lu_state_e     state
);
  timeunit 1ps; timeprecision 100fs;

  lu_state_e     state_q;
  logic [CW-1:0] code_q;
  logic [2:0]    bit_q;      // bit under trial
  logic [3:0]    cnt_q;

  always_ff @(posedge clk_sar or negedge rst_n)
    if (!rst_n) begin
      state_q <= LU_FLUSH;
      code_q  <= MID_WORD;
      bit_q   <= 3'(CW - 1);
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        LU_FLUSH: begin
          code_q <= MID_WORD;
          if (32'(cnt_q) == FLUSH_CYC - 1) begin
            cnt_q   <= '0;
            state_q <= LU_MEASURE;
          end else begin
            cnt_q <= cnt_q + 4'd1;
          end
        end
        LU_MEASURE: begin
          if (32'(cnt_q) == MEAS_CYC - 1) begin
            cnt_q   <= '0;
            code_q  <= adb_init_word(s);
            bit_q   <= 3'(adb_first_bit(s));
            state_q <= LU_SEARCH;
          end else begin
            cnt_q <= cnt_q + 4'd1;
          end
        end
        LU_SEARCH: begin
          automatic logic [CW-1:0] c = code_q;
          if (!(comp || lock)) c[bit_q] = 1'b0;
          if (bit_q == 3'd0) begin
            state_q <= LU_LOCKED;
          end else begin
            c[bit_q - 3'd1] = 1'b1;
            bit_q <= bit_q - 3'd1;
          end
          code_q <= c;
        end
        LU_LOCKED: ;
        default: state_q <= LU_FLUSH;
      endcase
    end

  assign code   = code_q;
  assign state  = state_q;
  assign dl_run = (state_q != LU_FLUSH);
  assign fes_en = (state_q == LU_MEASURE);
  assign dfm_en = (state_q == LU_LOCKED);
endmodule
