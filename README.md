# ADP-DLLFM: an all-digital DLL clock generator with a SAR lock and a 0.5X–4X multiplier

This is a delay-locked loop (DLL) built from four equal digitally controlled
delay stages. The loop is locked when the last stage's output P4 is exactly
one reference period behind the reference clock. The four stage outputs are
then spaced a quarter period apart. A small multiplier combines these four
phases into clocks at 0.5X, 1X, 2X and 4X the reference frequency, and a
2-bit selector picks one of them as `clk_mul`.

There is no charge pump and no analog loop filter. The delay word is found by
a successive-approximation register (SAR) search, one bit per four reference
periods. A SAR DLL has two classic problems:

- it can lock onto two or more periods instead of one (harmonic lock);
- once its search is over, it cannot follow a drifting frequency.

This design handles them in two ways:

- a **frequency-estimation selector** measures the reference period before
  the search and picks the search's starting word;
- a **dynamic frequency monitor** restarts the whole procedure when the
  phase detector reports loss of lock.

The delay elements are behavioural models with picosecond delays. Everything
else is synthesizable RTL. The design simulates with plain Verilator using
`--timing`.

## Lock sequence

The sequence is run by `lock_in_unit`, which is clocked by
CLK_sar = CLK_ref/4 from `clk_div4`. Each step below lasts a whole number of
CLK_sar periods.

| Step | CLK_sar periods | What happens |
|---|---|---|
| Flush | 3 | Delay word is 1000000 (middle of the range). The line's input gate is closed, so the line empties. |
| Measure | 2 | The gate opens. The FES enable is high and the FES watches the first edge through the line. |
| Search | 7, 6 or 5 | One SAR bit per period. S = 11, 01 or 00 picks the number of bits. |
| Locked | – | The word is frozen and `lu_locked` (the DFM enable) is high. |

After the external reset falls, lock takes about 48, 44 or 40 reference periods
in total. The search alone takes 28, 24 or 20 of them.

If the phase detector's Lock output falls while the loop is locked, the
monitor pulses `int_rst`. The combined reset `~(ex_rst | int_rst)` takes the
loop back to Flush.

## The delay line and its numbers

Each of the four `lrdl_stage` instances has a delay of

    t_stage = TU * (1 + units) + fine * TU/8

The terms are:

- `units` is the number of delay units enabled in a lattice of NAND delay
  units. It comes from `code[6:3]` through the binary-to-thermometer decoder
  `bin2therm`, as T0..T15.
- `fine` is `code[2:0]`, which drives a fine-tune cell.
- TU is two NAND delays. It sets both the intrinsic delay and the coarse
  step.

With `TU_PS = 60`, the four-stage line is linear in the 7-bit word C:

    t_line = 240 ps + 30 ps * C      (240 .. 4050 ps)

The step for the whole line is 30 ps. This equals the phase detector's lock
window of 30 ps (2Td). The largest word whose edge arrives before
Ref + 30 ps therefore always lands inside the window. This is why
TU = 60 ps was chosen.

`dcdl` chains the stages and outputs `phase[3:0]` = P1..P4. `clk_out` is P4.

## Frequency estimation and the adaptive start word

Harmonic lock is avoided by making sure the first trial delay is near the
right one. While the line sits at the middle word 1000000, each stage is
540 ps. `fes` divides the reference by two and opens a window one reference
period long. P2 (2 × 540 = 1080 ps) and P3 (1620 ps) sample that window. A
sample that sees the window still high means the reference period is longer
than that many stage delays. Both flip-flops hold a captured 1 until reset.

| Reference period T | S[1:0] | Start word | Bits searched | Search range (line delay) |
|---|---|---|---|---|
| T > 1620 ps | 11 | 1000000 | 7 (D6..D0) | 240–4050 ps |
| 1080 < T ≤ 1620 ps | 01 | 0100000 | 6 (D5..D0, D6 = 0) | 240–2130 ps |
| T ≤ 1080 ps | 00 | 0010000 | 5 (D4..D0, D6 = D5 = 0) | 240–1170 ps |

The table is coded in `dll_pkg` (`adb_init_word`, `adb_first_bit`). For
example:

- 250 MHz gives S = 11;
- 667 MHz gives S = 01;
- 1 GHz and 1.25 GHz give S = 00.

### SAR decision rule

Each search step does three things:

1. It keeps the bit under trial if the phase detector says the feedback edge
   is early (Comp = 1) or inside the window (Lock = 1).
2. Otherwise it clears that bit.
3. It sets the next lower bit as the next trial.

"Early, so add delay" is the rule this design follows. Written descriptions
of this kind of SAR sometimes state the opposite polarity; that polarity
does not converge with this phase detector. The search ends on the largest
word whose edge arrives before Ref + 30 ps. Because the step is 30 ps, that
word is in the lock window.

## Phase detector and its duty-cycle limit

`phase_detector` samples P4 twice:

- Q2 is P4 sampled on the reference edge;
- Q1 is P4 sampled 30 ps later, on Reft, which `delay_buf` produces from the
  reference.

The outputs are:

- `lock = Q1 & ~Q2`: P4 rose inside the window;
- `comp = Q1 & Q2`: P4 rose before the reference edge.

The detector reads the feedback **level**. A trial delay d shorter than
T − t_high therefore reads as "late", even though it is early. With a
reference duty cycle of 50% or more, every trial made from the adaptive start
words is long enough, so the search is correct. Below 50% duty the search can
end on a wrong word. The multiplier outputs do not inherit the input duty
cycle; see below.

### Lock range with the defaults

- Slow end: the line's maximum of 4050 ps limits the reference to about
  247 MHz.
- Fast end: the S = 00 first trial is 720 ps. It must stay below about 1.5
  reference periods, or the search settles on two periods.
- The usable range is therefore about 0.25–2.1 GHz.
- In simulation, periods from 4000 ps down to 470 ps lock correctly. A
  400 ps period locks to 2T.

To cover slower clocks, for example at a low supply voltage where gates are
far slower, raise `TU_PS` and `WIN_PS` together (`WIN_PS = TU_PS/2`). All
the thresholds above scale with them. With `TU_PS = 1200` and
`WIN_PS = 600`, a model of gates twenty times slower:

- the line spans 4.8 to 81 ns;
- the usable range is about 12.3 to 105 MHz;
- 18, 40 and 67 MHz references give S = 11, 01 and 00.


## Dynamic frequency monitor

`dfm` is enabled by the lock-in unit once the search is over. It keeps a
registered copy of Lock. A high-to-low transition of Lock while the monitor
is enabled starts an `int_rst` pulse `PULSE_CYC` reference periods long (1
by default). Only the external reset resets the monitor itself, so its pulse
survives the reset it causes. The relock repeats flush and measurement
(20 periods) before a search of at most 28 periods.

## Frequency multiplier

The multiplier is built from the four phases Φ1..Φ4 = P1..P4, which are a
quarter period apart:

| Output | Circuit | Module |
|---|---|---|
| 0.5X | Flip-flop toggled by P4 | `fm_half` |
| 1X | SR(Φ1,Φ2) and SR(Φ3,Φ4) set and reset a third SR latch | `fm_1x` |
| 2X | SR(Φ1,Φ2) OR SR(Φ3,Φ4) | `fm_2x` |
| 4X | 2X XOR 2X delayed by a replica stage | `fm_4x` |

The 1X output rises on Φ1 and falls on Φ3. Both edges are rising edges of
the phases, so the output has 50% duty whatever the input duty.

The SR latches are edge-triggered (`sr_edge`):

- a rising S sets the output;
- a rising R clears it.

They are built from two flip-flops whose XOR is the output. This is needed
because the phases' high levels overlap.

The 4X replica stage gets the main word shifted right by one bit, which is
about half a stage delay. The stage's intrinsic delay is not halved, so the
4X duty cycle is near 50% but not exact. For example, at a 625 MHz reference
the replica delay is 225 ps against an ideal 200 ps.

`f_sel` chooses the clock on `clk_mul`:

| `f_sel` | 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| `clk_mul` | 0.5X | 1X | 2X | 4X |

All four outputs are also available as separate ports.

## Module map

| File | Contents |
|---|---|
| `rtl/dll_pkg.sv` | Word width, enums, start-word table |
| `rtl/adp_dllfm.sv` | Top: wiring and combined reset |
| `rtl/lock_in_unit.sv` | Flush / measure / adaptive SAR / locked controller |
| `rtl/clk_div4.sv` | CLK_sar = CLK_ref / 4 |
| `rtl/clk_gate.sv` | Glitch-free gate in front of the delay line |
| `rtl/fes.sv` | Frequency-estimation selector |
| `rtl/dcdl.sv`, `rtl/lrdl_stage.sv`, `rtl/bin2therm.sv` | Delay line (behavioural stages) |
| `rtl/delay_buf.sv` | 30 ps window buffer (behavioural) |
| `rtl/phase_detector.sv` | Two-flip-flop window phase detector |
| `rtl/dfm.sv` | Dynamic frequency monitor |
| `rtl/freq_mult.sv`, `rtl/fm_*.sv`, `rtl/sr_edge.sv` | Multiplier |

### Top-level ports

| Port | Meaning |
|---|---|
| `ref_clk`, `ex_rst` | Reference clock and external reset (active high) |
| `f_sel` | Multiplier select |
| `phase[3:0]`, `clk_out` | Delay-line phases and P4 |
| `clk_mul`, `clk_half`, `clk_1x`, `clk_2x`, `clk_4x` | Multiplied clocks |
| `s_code`, `code` | Observed FES result and delay word |
| `pd_lock`, `pd_comp`, `lu_locked`, `int_rst` | Status outputs |

### Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `TU_PS` | Top, `dcdl`, `lrdl_stage`, `fm_4x`, `freq_mult` | 60 | Delay unit |
| `WIN_PS` | Top | 30 | Lock window |
| `FLUSH_CYC`, `MEAS_CYC` | `lock_in_unit` | 3, 2 | Length of flush and measure |
| `PULSE_CYC` | `dfm` | 1 | Reset pulse length |

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl rtl/dll_pkg.sv rtl/*.sv \
        tb/tb_adp_dllfm.sv --top-module tb_adp_dllfm -o sim
    ./obj_dir/sim

`tb_adp_dllfm` runs the top with its default parameters. It locks the loop
at the following reference clocks:

| Reference | Period | Duty |
|---|---|---|
| 250 MHz | 4000 ps | 50% |
| 500 MHz | 2000 ps | 50% |
| 625 MHz | 1600 ps | 50% |
| 667 MHz | 1499 ps | 50% |
| 1 GHz | 1000 ps | 50% |
| 1.25 GHz | 800 ps | 50% |
| 1 GHz | 1000 ps | 75% |
| 250 MHz | 4000 ps | 70% |

For each lock it checks:

- S against the thresholds above;
- the search length: 4 × bits, never more than 28 periods;
- the final word: the largest C with 240 + 30C < T + 30;
- that Lock is high;
- the quarter-period phase spacing;
- the number of `clk_mul` edges in every `f_sel` mode;
- that 1X and 2X are at 50% duty.

It also changes the period of a locked loop from 800 ps to 1100 ps and
checks that the monitor fires and the loop relocks.

Each mechanism must be seen at least once, or the test counts a failure:

- each S range;
- the monitor relock;
- each multiplier mode;
- SAR bits both kept and cleared;
- a skewed-duty input.

The whole run takes a few seconds.

`tb_adp_dllfm_lowv` runs the same checks with `TU_PS = 1200` and
`WIN_PS = 600`, the slow-corner model above. It uses references of 13, 18,
40, 67 and 75 MHz, then a change to 22 ns, then skewed-duty runs at 67 and
18 MHz.

The delay models use event queues and constant-step waits, so Verilator
needs `--timing`. For synthesis, replace `lrdl_stage` and `delay_buf` with
real delay cells. Every other module is ordinary clocked or combinational
logic.

## Where this design departs from, or adds to, the original

- **Delay numbers.** The 60 ps unit delay, the 3-bit fine cell in steps of
  TU/8, and the split of the 7-bit word into 4 coarse and 3 fine bits are
  this design's choices. The 30 ps lock window, the 7-bit word, the 16
  thermometer lines and the four phases are the original numbers.
- **Input gate.** The flush and measurement phases and the input clock gate
  are this design's way to give the FES one clean edge to measure.
- **FES window.** The FES window is one high half-period of CLK_ref/2, and
  its sampled bits are held until reset.
- **Monitor timing.** The monitor is synchronous to the reference clock. In
  the original, its reset pulse width is set by a delay element.
- **Compensation time.** After a monitor reset, recovery takes up to 48
  reference periods rather than 28, because flush and measurement are
  repeated.
- **`f_sel` encoding.** The `f_sel` encoding and the plain clock mux
  (without glitch-free switching) are this design's choices.
- **Circuit-level techniques.** The half-stack NAND gate, the PowerPC
  flip-flop and the output pad drivers are circuit-level and are not
  modelled. The lattice stage stands for the first, and ordinary flip-flops
  for the second.
- **Low-voltage operation.** The 0.3 V operating points, with references
  from about 13 to 75 MHz, need line delays of 13–77 ns. The default
  60 ps unit does not reach them. They are covered by the scaled
  parameters above, and the 20× slowdown is an estimate. Jitter, power and
  leakage are not modelled.
