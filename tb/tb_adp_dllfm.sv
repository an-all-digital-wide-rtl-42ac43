// tb_adp_dllfm -- end-to-end test of the DLL clock generator at its
// default parameters (60 ps delay unit, 30 ps lock window).
//
// For reference clocks of 250 MHz, 500 MHz, 625 MHz, 667 MHz, 1 GHz and
// 1.25 GHz (periods 4000, 2000, 1600, 1499, 1000 and 800 ps) it resets
// the design, lets it lock and checks, against values worked out here
// from the line's delay law (4*TU + TU/2 * C for the whole line, 9*TU per
// stage at the middle word, i.e. 240 + 30*C ps and 540 ps):
//   - the frequency-estimation code S (11 / 01 / 00),
//   - that the search takes 7, 6 or 5 CLK_sar steps, at most 28 reference
//     periods,
//   - the final control word and that the phase detector reports Lock,
//   - that P1..P4 are a quarter period apart and P4 one period late,
//   - that CLK_mul gives 0.5, 1, 2 and 4 rising edges per reference period
//     for F = 00, 01, 10, 11, with 1X and 2X at 50% duty.
// It then changes the reference period of a locked loop and checks that
// the frequency monitor fires an internal reset and the loop relocks, and
// repeats the checks with 70% and 75% duty references, where the 1X and 2X
// outputs must still be at 50% duty.
// Each mechanism (three S ranges, relock by the monitor, four F modes,
// SAR bits kept and cleared, skewed-duty input) is counted and must occur
// at least once. A duty below 50% is not used: the detector reads the
// feedback level at the reference edge, so a trial delay shorter than the
// reference low time reads as lag.
module tb_adp_dllfm;
  import dll_pkg::*;
  timeunit 1ps; timeprecision 100fs;

  // delay unit and window of the design under test, and the numbers
  // derived from them: whole line 4*TU + (TU/2)*C, stage at the middle
  // word 9*TU, duty tolerance per output edge
  localparam int TU       = 60;
  localparam int WIN      = 30;
  localparam int MID      = 9 * TU;
  localparam int DUTY_TOL = 2 * TU / 3;
  localparam int STEP     = 1;         // sampling step of the edge counter, ps
  localparam int T_CHANGE = 1100;      // period after the frequency change

  int checks = 0, failures = 0;
  int tref = 1000;
  int duty = 50;           // reference high time in percent
  logic ref_clk = 0, ex_rst = 0;
  logic [1:0] f_sel = 2'b01;
  logic [3:0] phase;
  logic       clk_out, clk_mul, clk_half, clk_1x, clk_2x, clk_4x;
  logic [1:0] s_code;
  logic [6:0] code;
  logic       pd_lock, pd_comp, lu_locked, int_rst;

  int n_range[4];          // indexed by S code
  int n_relock = 0, n_kept = 0, n_cleared = 0;
  int n_fmode[4];
  int n_skewed = 0;        // locks with a 70% or 75% duty reference

  adp_dllfm dut (
    .ref_clk(ref_clk), .ex_rst(ex_rst), .f_sel(f_sel), .phase(phase), .clk_out(clk_out),
    .clk_mul(clk_mul), .clk_half(clk_half), .clk_1x(clk_1x), .clk_2x(clk_2x), .clk_4x(clk_4x),
    .s_code(s_code), .code(code), .pd_lock(pd_lock), .pd_comp(pd_comp),
    .lu_locked(lu_locked), .int_rst(int_rst)
  );

  task automatic wait_ps(input int n);
    repeat (n / 64) #64;
    repeat (n % 64) #1;
  endtask

  // reference clock; at 50% duty the low half gets the odd picosecond
  initial forever begin
    ref_clk = 1'b1;
    wait_ps(tref * duty / 100);
    ref_clk = 1'b0;
    wait_ps(tref - tref * duty / 100);
  end

  initial begin
    #200000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s (T=%0d S=%b C=%0d lock=%b)", m, tref, s_code, code, pd_lock);
    end
  endtask

  // SAR decisions seen inside the lock-in unit
  always @(posedge dut.clk_sar)
    if (dut.u_lu.state_q == LU_SEARCH) begin
      if (pd_comp || pd_lock) n_kept++;
      else                    n_cleared++;
    end

  // search length in reference periods
  int search_cycles = 0;
  always @(posedge ref_clk)
    if (dut.u_lu.state_q == LU_SEARCH) search_cycles++;

  always @(posedge int_rst) n_relock++;

  function automatic logic [1:0] exp_s(input int t);
    return {logic'(3 * MID < t), logic'(2 * MID < t)};
  endfunction

  function automatic int exp_word(input int t);
    int nb, best;
    nb = (exp_s(t) == 2'b11) ? 7 : (exp_s(t) == 2'b01) ? 6 : 5;
    best = 0;
    for (int c = 0; c < (1 << nb); c++)
      if (4 * TU + (TU / 2) * c < t + WIN) best = c;
    return best;
  endfunction

  function automatic int exp_bits(input logic [1:0] s);
    return (s == 2'b11) ? 7 : (s == 2'b01) ? 6 : 5;
  endfunction

  // Raise the external reset at a falling reference edge where the monitor
  // pulse is low, so the combined reset really falls (also from an
  // arbitrary power-on state).
  task automatic apply_reset();
    ex_rst = 1'b0;
    do @(negedge ref_clk); while (int_rst);
    ex_rst = 1'b1;
  endtask

  // wait for lock with a bound in reference periods
  task automatic wait_lock(output int cycles);
    cycles = 0;
    while (!lu_locked && cycles < 200) begin
      @(posedge ref_clk);
      cycles++;
    end
  endtask

  task automatic check_locked();
    realtime tr, tp[4];
    int  hi1, hi2, rises;
    logic p1, p2;
    chk(s_code == exp_s(tref), "S code");
    n_range[s_code]++;
    chk(int'(code) == exp_word(tref), "final control word");
    repeat (4) @(posedge ref_clk);
    chk(pd_lock && !pd_comp, "phase detector not locked");
    // phase spacing: measure from a reference edge
    @(posedge ref_clk);
    tr = $realtime;
    fork
      @(posedge phase[0]) tp[0] = $realtime;
      @(posedge phase[1]) tp[1] = $realtime;
      @(posedge phase[2]) tp[2] = $realtime;
    join
    @(posedge ref_clk);
    @(posedge phase[3]) tp[3] = $realtime;
    chk(tp[3] - tr >= tref && tp[3] - tr <= tref + WIN, "P4 not one period late");
    for (int i = 0; i < 3; i++)
      chk((tp[i] - tr) >= (i + 1) * tref / 4.0 - WIN && (tp[i] - tr) <= (i + 1) * tref / 4.0 + WIN,
          $sformatf("P%0d spacing %0.1f", i + 1, tp[i] - tr));
    // every multiplier mode
    for (int f = 0; f < 4; f++) begin
      f_sel = 2'(f);
      repeat (4) @(posedge ref_clk);
      rises = 0; hi1 = 0; hi2 = 0; p1 = clk_mul; p2 = 0;
      for (int t = 0; t < 16 * tref; t += STEP) begin
        #(STEP);
        if (clk_mul && !p1) rises++;
        p1 = clk_mul;
        if (clk_1x) hi1 += STEP;
        if (clk_2x) hi2 += STEP;
      end
      chk(rises == ((f == 0) ? 8 : (f == 1) ? 16 : (f == 2) ? 32 : 64),
          $sformatf("F=%0d gives %0d rising edges in 16 periods", f, rises));
      if (rises > 0) n_fmode[f]++;
      if (f == 1) begin
        chk(hi1 > 8 * tref - 16 * DUTY_TOL && hi1 < 8 * tref + 16 * DUTY_TOL, $sformatf("1X duty %0d/%0d", hi1, 16 * tref));
        chk(hi2 > 8 * tref - 32 * DUTY_TOL && hi2 < 8 * tref + 32 * DUTY_TOL, $sformatf("2X duty %0d/%0d", hi2, 16 * tref));
      end
    end
  endtask

  initial begin
    int periods[6] = '{4000, 2000, 1600, 1499, 1000, 800};
    int cyc;
    int skew[2][2] = '{'{1000, 75}, '{4000, 70}};
    foreach (periods[k]) begin
      apply_reset();
      tref = periods[k];
      repeat (6) @(posedge ref_clk);
      @(negedge ref_clk);
      ex_rst = 1'b0;
      search_cycles = 0;
      wait_lock(cyc);
      chk(lu_locked, "no lock within 200 periods");
      chk(search_cycles == 4 * exp_bits(exp_s(tref)), $sformatf("search took %0d periods", search_cycles));
      chk(search_cycles <= 28, "search over 28 periods");
      check_locked();
      $display("T=%0d ps: S=%b C=%0d locked after %0d periods (search %0d)", tref, s_code, code, cyc, search_cycles);
    end

    // frequency change after lock: the monitor must restart the loop
    begin
      int n_prev;
      n_prev = n_relock;
      tref = T_CHANGE;
      repeat (3) @(posedge ref_clk);
      search_cycles = 0;
      cyc = 0;
      while (n_relock == n_prev && cyc < 50) begin
        @(posedge ref_clk);
        cyc++;
      end
      chk(n_relock > n_prev, "monitor did not fire after the frequency change");
      @(posedge ref_clk);
      wait_lock(cyc);
      chk(lu_locked, "no relock");
      chk(search_cycles <= 28, "relock search over 28 periods");
      check_locked();
      $display("T=%0d ps after change: S=%b C=%0d relocked", tref, s_code, code);
    end

    // duty-cycle immunity: 1X and 2X stay at 50% with a skewed reference
    foreach (skew[k]) begin
      apply_reset();
      tref = skew[k][0];
      duty = skew[k][1];
      repeat (6) @(posedge ref_clk);
      @(negedge ref_clk);
      ex_rst = 1'b0;
      search_cycles = 0;
      wait_lock(cyc);
      chk(lu_locked, "no lock with a skewed reference");
      check_locked();
      if (lu_locked) n_skewed++;
      $display("T=%0d ps duty %0d%%: S=%b C=%0d locked", tref, duty, s_code, code);
    end

    // every mechanism must have happened
    chk(n_range[2'b11] > 0, "range 1 (S=11) never used");
    chk(n_range[2'b01] > 0, "range 2 (S=01) never used");
    chk(n_range[2'b00] > 0, "range 3 (S=00) never used");
    chk(n_relock > 0, "monitor never fired");
    for (int f = 0; f < 4; f++) chk(n_fmode[f] > 0, $sformatf("F=%0d never produced a clock", f));
    chk(n_kept > 0 && n_cleared > 0, "SAR never kept or never cleared a bit");
    chk(n_skewed == 2, "skewed-duty reference runs missing");
    $display("mechanisms: S11=%0d S01=%0d S00=%0d relock=%0d kept=%0d cleared=%0d F=%0d/%0d/%0d/%0d",
             n_range[3], n_range[1], n_range[0], n_relock, n_kept, n_cleared,
             n_fmode[0], n_fmode[1], n_fmode[2], n_fmode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
