# Adaptive and resilient domino register file

A register file built from domino read paths is normally clocked with a
guardband: its frequency is set low enough (or its supply high enough) that a
read still finishes in time in the slowest bitcell of the die, during the
worst supply droop, at the worst temperature and after years of aging. Most of
the time none of these worst cases is present and the guardband is wasted.

This design removes the guardband by watching every read in place:

* **Timing margin detectors (TMD)** tell, per bit, how close the read data
  arrived to the capturing clock edge. The clock is sped up (or the supply
  lowered) while the margin is comfortable and slowed down when it gets thin.
* **Timing error detectors (TED)** catch reads that arrived *after* the edge.
  Such a read is not used: it is replayed at half frequency or at a raised
  supply, so wrong data never leaves the register file.
* **Conditional delayed precharge** lets a slow bitline keep evaluating a bit
  longer, so a read that would otherwise be lost without trace (a sensing
  failure) reaches the latch late and becomes a timing error the TED can see.

The RTL holds a 7 KB array of 14 sub-arrays, each 128 entries x 32 bits
(4 Kb), with the detectors in every bitslice, per-sub-array error compaction,
and the three controllers that close the loop: error response (replay),
error rate tracking, and voltage/frequency adaptation.

## The read path and its clock phases

Phases are named by cycle number and half: read *n* is issued so that its
word line is high in phase 2H (clock high of cycle 2), the precharge happens in
2L, the data is captured at the rising edge that starts 3H, and the error
flags are captured at the edge that starts 4H.

Inside a bitslice (`domino_read_array`):

1. 16 cells share a local bitline (LBL), precharged high. A selected cell that
   stores 1 discharges its LBL; a 0 leaves it high.
2. A 2-input merge-NAND joins two LBLs (NAOUT), two merge-NANDs drive one
   global bitline (GBL, so 4 LBLs per GBL), and the two GBLs of the slice feed
   a set-dominant latch (SDL). A falling GBL sets SDLOUT to 1. The latch is
   cleared shortly after the falling clock edge (on the rising edge of a
   delayed inverted clock, DEL CLKB) if both GBLs are precharged.
3. SDLOUT is the read data. It is captured by the data flip-flop at the start
   of 3H.

The nominal read is set to arrive after mid-cycle. That matters for the error
detector (below): the next read cannot disturb SDLOUT before the detector's
window closes.

Two failure modes of a domino read are modelled:

* **Sensing failure**: the bitline precharge of the pair starts before a slow
  cell has finished discharging its LBL. The LBL is pulled back high, the 1 is
  lost, and nothing downstream can notice.
* **Precharge failure**: the precharge phase ends before a discharged LBL is
  restored, so the next read of that pair sees a false 1.

## Conditional delayed precharge

Each LBL pair has precharge devices P1/P2 and an equaliser EQ1 between its
two LBLs (`cond_precharge`). At the falling edge the state of the pair's
merge-NAND picks how the pair is precharged:

* **NAOUT = 1** (one LBL already discharged, a normal fast 1): EQ1 turns on
  with the plain inverted clock. The discharged LBL shares charge with its
  high neighbour at once, and P1/P2 finish the job later, which makes the
  restore fast.
* **NAOUT = 0** (read 0, or a slow 1 still on its way down): EQ1, P1 and P2
  all wait for a delayed copy of the inverted clock (DEL PCHB). The slow cell
  gets extra evaluation time.

The delay is two mux delays plus a 2-bit setting of extra steps
(`prog_delay_line`). The setting trades two failure modes:

* Too short: late 1s are cut off, which is a silent sensing failure.
* Too long: the precharge is squeezed out of the low phase, which is a
  precharge failure.

In between, a late 1 travels on to the SDL after the capturing edge and is
caught by the TED.

The useful setting depends on the clock period:
`eval_end < T/2 + delay` is needed for the read to survive. For a late read to
be detectable, its SDL transition must also come after `T`. The model's
default numbers make `pch_sel = 2` (280 ps) the right choice around the
adapted operating point (about 1.25 GHz, `T` = 710-920 ps), and `pch_sel = 3`
the right choice at a 1000 ps clock.

## Timing margin detection (TMD)

Per bitslice, SDLOUT and two delayed copies of it are flopped on the same
rising edge (`tmd`). The copies are delayed by MDW2, and by MDW1+MDW2, where
MDW is the margin detection window set by two delay lines. A difference
between SDLOUT and a delayed copy means SDLOUT changed within that window
before the edge:

| flag | window | meaning | response |
|------|--------|---------|----------|
| TMDa | MDW2 (closest to the edge) | margin too small | lower F or raise V |
| TMDb | MDW1 + MDW2 | margin adequate | hold |
| none | | margin large | raise F or lower V |

## Timing error detection (TED)

Per bitslice, SDLOUT is captured by the data flop at the rising edge and by a
latch that is transparent while the clock is high (3H) (`ted`). A read that
arrives inside 3H is missed by the flop but caught by the latch, so their XOR
flags a timing error during 3L. The latch then holds the correct value. The
window is half a clock cycle. That is why nominal data must arrive after
mid-cycle: otherwise the *next* read's transition would also fall into the
window.

## Error compaction

Each sub-array reduces its 32 flags to one bit (`error_compactor`):

* a MODE mux selects TED or TMD flags;
* each half of the slices drives a 16-input domino error bitline that
  evaluates in 3L;
* the two bitlines are combined by a NAND;
* a flop at the start of 4H holds ERR COMPACT for one cycle.

The flags of a read are therefore known two edges after it was issued. The
published circuit uses a single compactor with a mode input. Here each
sub-array has three compactors (TED, TMDa, TMDb) so that replay and
adaptation can run at the same time.

## The control loop

* **Error response controller** (`error_response_controller`). Reads enter
  through a valid/ready port and are tracked in a 3-stage pipeline (issue,
  data, flags). A read retires when its TED flag is clear. On an error:
  * the failing read and the up to two younger reads behind it are squashed;
  * they are replayed in order, one at a time, into an empty pipeline, with
    either `f_half` (replay at F/2) or `v_boost` (replay at raised supply)
    asserted, as `replay_mode` selects;
  * new requests wait until the replay has retired.

  Replays are serialised because at F/2 the early transition of a following
  read would land inside the doubled TED window and look like an error.
* **Error rate tracker** (`error_rate_tracker`). It counts errors over
  `ERT_PERIOD` cycles and pulses ERTe when the count exceeds `err_threshold`.
* **V/F adaptation controller** (`vf_adaptation_controller`). Once per
  `VF_PERIOD` cycles it applies the table above to the flags seen in that
  period, moving `f_code` one step (or `v_code` with `adapt_v` = 1):
  * TMDa or ERTe slows down;
  * TMDb alone holds;
  * clean reads speed up;
  * no reads holds.

  Codes saturate. Margin flags count only for reads retired outside a replay.
* **Clock generator** (`clock_generator`, behavioural, inside the top).
  Period =
  `T_BASE_PS - f_code * T_STEP_PS`, doubled while `f_half`. The default base
  is 1160 ps (about 860 MHz, a guardbanded clock).

The voltage regulator is not part of the RTL: the top outputs `v_code` and
`v_boost` for it. In simulation, an environment model converts them into a
shorter evaluation delay.

## What is RTL and what is a timing model

The digital parts are synthesizable RTL:

* storage and decoder;
* precharge select;
* TMD and TED flops and latch;
* compactor;
* the three controllers;
* the top.

The analog domino evaluation, the delay lines and the clock source can only
be described with delays. They are behavioural models that use forked timed
threads, so simulators need timing support, and yosys synthesis rejects them.

Every picosecond value in them is a model choice:

| quantity | value |
|---|---|
| LBL evaluation | 440 ps + 0..60 ps fixed within-die offset per LBL (hashed from sub-array, slice and LBL index) + `slow_ps` |
| NAND / GBL / SDL | 80 / 50 / 50 ps (nominal SDL arrival 620-680 ps) |
| LBL restore | 150 ps alone, 75 ps with EQ1 switched on together, 50 ps with EQ1 already sharing |
| precharge delay | 40 + 120 x `pch_sel` ps |
| DEL CLKB | 40 + 20 x `clkb_sel` ps |
| MDW lines | 20 + 40 x sel ps (defaults: MDW2 = 60 ps, MDW1+MDW2 = 140 ps) |

`slow_ps` is an input of the top. It stands for everything that slows the
bitlines: supply droop, low supply, temperature and aging.

## Interface of `resilient_rf_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `period_ps` | out | the clock made by the internal clock generator, and its present period |
| `rst_n` | in | asynchronous active-low reset |
| `req_valid`, `req_addr`, `req_ready` | in/in/out | read request. The address is `{sub-array, row}` (4 + 7 bits); sub-array indices of 14 and above are ignored |
| `rsp_valid`, `rsp_addr`, `rsp_data` | out | a retired, error-free read: two edges after issue, later if replayed |
| `wr_en`, `wr_addr`, `wr_data` | in | write, takes effect at the rising edge |
| `tune` | in | `rf_tune_t`: `mdw2_sel`, `mdw12_sel`, `pch_sel`, `clkb_sel` (2 bits each) |
| `replay_mode`, `adapt_v`, `err_threshold` | in | replay at F/2 (0) or raised V (1); adapt V instead of F; ERTe threshold |
| `slow_ps` | in | operating-point delay, read-path model only |
| `f_code`, `v_code`, `f_half`, `v_boost` | out | to clock generator and voltage regulator |
| `err_evt`, `erte`, `tmda_evt`, `tmdb_evt`, `replay_active`, `err_count`, `vf_step` | out | status and event pulses |

Parameters are:

* `N_SUBS` = 14, `N_ROWS` = 128, `N_BITS` = 32;
* `ERT_PERIOD` = 1024 and `VF_PERIOD` = 256 (cycles);
* `CODE_W` = 6, `T_BASE_PS` = 1160, `T_STEP_PS` = 10 (clock generator).

Module hierarchy:

```
resilient_rf_top
  rf_subarray x N_SUBS
    rwl_decoder, bitcell_array, domino_read_array,
    prog_delay_line x 4 (precharge, DEL CLKB, MDW2, MDW1+MDW2),
    cond_precharge x 4 per slice, tmd, ted per slice, error_compactor x 3
  error_response_controller, error_rate_tracker, vf_adaptation_controller
  clock_generator
rf_pkg (constants and rf_tune_t)
```

## Simulating

Verilator 5 with `--timing` is needed. Run from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/rf_pkg.sv \
  tb/tb_resilient_rf_top.sv --top-module tb_resilient_rf_top -Mdir obj -o sim
obj/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each block
has one (`tb/tb_<module>.sv`). The system-level ones are:

* `tb_resilient_rf_top`: two sub-arrays and short controller periods. It
  makes every mechanism happen and counts it:
  * frequency adaptation up and down;
  * TMDa and TMDb;
  * TED errors replayed at F/2 and at raised supply;
  * ERTe;
  * supply adaptation up and down;
  * the delayed-precharge comparison: under the same droop, `pch_sel = 2`
    gives only correct data, while `pch_sel = 1` loses reads silently.

  Supply droop is modelled as a periodic increase of `slow_ps`, like a noise
  injector. A reference memory checks every response.
* `tb_resilient_rf_top_full`: every top parameter at its default (all 14
  sub-arrays, 1792 entries). It covers writes, adaptation from the slowest
  clock (1160 ps), and droop with replay. It takes about two minutes.

In `tb_resilient_rf_top` the clock generator is set to a 1000 ps base in 5 ps
steps, which gives finer adaptation steps. Both runs use `pch_sel = 2`, which
covers the band the adaptation moves through (see above).

`tb_rf_subarray` shows the detector behaviour of one sub-array at a fixed
1000 ps clock, in phases:

* no flags;
* TMDb only;
* TMDa with correct data;
* TED with wrong flop data but a correct latch;
* silent loss with a short precharge delay.

## Departures from the published design and limits

* Three compactors per sub-array instead of one with a mode input (see above).
* The request/response interface, the replay pipeline (squash depth,
  serialised replay) and the controller periods, thresholds and step sizes
  are this design's choices. The published design gives the decision table
  and the two replay options but no cycle-level protocol.
* The latched TED data is correct, but it is not forwarded. Errors are always
  replayed, as in the published scheme.
* All delays are model numbers, not silicon numbers. Results in picoseconds
  show the mechanisms, not the measured behaviour.
* The error bitlines of the compactor are modelled as latches that are
  transparent in the low phase. The TED latch is a real latch. Both are
  intentional.
* The scan chain, voltage regulator, noise injector and clock source of the
  test chip are not RTL:
  * scan settings are top ports;
  * the regulator and noise are represented by `slow_ps` in the testbenches;
  * the clock source is a behavioural model.
* The precharge delay setting does not follow the clock by itself. It is a
  static input that has to suit the frequency range in use.
* The failure statistics for a 1 Mb array are extrapolated, not run. Holding
  that size would need `N_SUBS` = 256.
