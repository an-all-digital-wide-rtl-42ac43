// dll_pkg -- shared types and constants of the all-digital DLL clock generator.
//
// Holds the width of the delay-line control word, the encodings of the
// frequency-estimation code S[1:0] and of the multiplier select F[1:0], the
// lock-in unit states, and the adaptive decision block (ADB) table that maps
// S[1:0] to the first SAR trial word and the first bit to be searched.
// The 7-bit word and the three S codes with their initial states follow the
// source design; the F[1:0] encoding and the state set are this design's
// own choices.  A lint run on a module that reads the package but not
// MID_WORD (the lock-in unit's flush word) reports it unused; that is
// expected.
package dll_pkg;
  timeunit 1ps; timeprecision 100fs;

  localparam int CW = 7;            // control word C[6:0]

  // S[1:0] = {S1, S0} from the frequency-estimation selector
  typedef enum logic [1:0] {
    S_FAST = 2'b00,                 // Range 3: start at 0010000
    S_MID  = 2'b01,                 // Range 2: start at 0100000
    S_SLOW = 2'b11                  // Range 1: start at 1000000
  } fes_code_e;

  // F[1:0] multiplier select
  typedef enum logic [1:0] {
    F_HALF = 2'b00,
    F_1X   = 2'b01,
    F_2X   = 2'b10,
    F_4X   = 2'b11
  } fsel_e;

  typedef enum logic [1:0] {
    LU_FLUSH   = 2'd0,              // delay line input gated, C = 1000000
    LU_MEASURE = 2'd1,              // FES measures with C = 1000000
    LU_SEARCH  = 2'd2,              // binary search, one bit per CLK_sar
    LU_LOCKED  = 2'd3               // code held, DFM enabled
  } lu_state_e;

  // Adaptive decision block: index of the first bit to search.
  // Code 10 cannot come from a monotonic line; it is treated as 11.
  function automatic int unsigned adb_first_bit(input logic [1:0] s);
    case (s)
      S_FAST:  return CW - 3;       // D6 = D5 = 0
      S_MID:   return CW - 2;       // D6 = 0
      default: return CW - 1;
    endcase
  endfunction

  function automatic logic [CW-1:0] adb_init_word(input logic [1:0] s);
    return (CW)'(1) << adb_first_bit(s);
  endfunction

  localparam logic [CW-1:0] MID_WORD = (CW)'(1) << (CW - 1);
endpackage
