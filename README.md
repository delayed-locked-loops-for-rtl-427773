# All-digital delay-locked loop for a forwarded-clock serial link

A serial receiver needs a local clock whose edges line up with a reference clock. It has to keep them lined up while process, voltage and temperature (PVT) drift, and while a clock tree of unknown delay sits between the clock source and the flip-flops that use the clock. This design is a delay-locked loop (DLL) that does this entirely with digital control. No charge pump, loop filter or analog control voltage is involved. The delay is set by two codes:

- a **coarse** code for a 32-element thermometer-coded delay line, with large steps for fast capture;
- a **fine** code for a line of four current-starved delay units (FDUs), with 64 settings of 1 to 3 ps each, for tracking.

A small state machine, clocked by the reference, updates one code by one step per cycle. It uses three flags from a phase detector:

- **UP**: add delay or remove it;
- **LOCK**: the phase error is inside a ±8 ps window, so freeze the codes;
- **half-cycle LOCK**: the clocks are 180° apart. The loop then fixes the error in one step by making the clock divider skip half a period, instead of sweeping the delay line across half a period.

Operating point: a 5.6 GHz "2UI" clock (two unit intervals per period of an 11.2 Gb/s link) is divided by four to the 1.4 GHz "8UI" loop clock, which has a 714 ps period.

```
 clk_2ui ──► freq_divider ──clk_8ui──► coarse delay line ──► fine delay line ──┬─► PHY clock network ───┬──► clk_phy
 5.6 GHz     (÷2, ÷2, slip)  1.4 GHz    32 × 7 ps              4 FDU × 16 legs   │   (150 ps)              │
                ▲                           ▲                      ▲             └─► node clock network ──► clk_node
                │ shift_req_tgl             │ C / C_bar            │ Fine_thermal[63:0]     (150 ps)
                │                  coarse_thermal_encoder   fine_thermal_encoder           │
                │                           ▲                      ▲                       │ fed back
                │                           │ coarse_code          │ fine_code             ▼
                └──────────────────── dll_controller ◄── up, lock, half_lock ── phase_detector ◄── clk_ref (1.4 GHz)
                                     (clocked by clk_ref)                          (two dt = 8 ps cells)
```

The loop aligns `clk_phy`, the leaf of the PHY clock network, with `clk_ref`. The node-controller network hangs off the same fine-line output, so it gets the same correction. It is not compared against the reference.

## The phase detector and its two windows

This is the part of the design that is easiest to misread. It is built from three identical two-state bang-bang detectors (`bb_phase_detector`). Each is a flip-flop that samples one clock on the rising edge of another. Two fixed delay cells of dt = 8 ps (`pd_delay_cell`) skew the inputs:

| comparator | samples | on the rising edge of | meaning when 1 |
|---|---|---|---|
| main | `clk_out` | `clk_ref` | fed-back clock leads: **UP**, add delay |
| window A | `clk_out` + dt | `clk_ref` | |
| window B | `clk_out` | `clk_ref` + dt | |

Write φ = t(ref edge) − t(out edge), where positive φ means the fed-back clock is early, and T for the period. For a 50 % duty clock:

- A = 1 for dt ≤ φ < T/2 + dt;
- B = 1 for −dt ≤ φ < T/2 − dt.

Their exclusive OR, `pre_lock`, is therefore high in two windows of width 2·dt = 16 ps:

- around φ = 0, where **B alone** is set: this is **LOCK**;
- around φ = T/2, where **A alone** is set: this is **half-cycle LOCK**. The clocks are in anti-phase.

Because the half-cycle window comes from the same two comparators, its width always equals the lock window's width. Telling the two windows apart by which comparator is set is this design's choice. A plain XOR would raise LOCK at 180° too.

A and B are clocked dt apart, so when both change, the raw flag glitches for dt after each reference edge. A synchronizer takes UP, LOCK and half-LOCK on the **falling** edge of `clk_ref`, half a period after the comparison, when all three comparators have settled. The controller then sees each comparison at the next rising edge, so the loop can update every cycle. A synchronizer on the rising edge would add a cycle of loop latency, and the codes would then overshoot the 16 ps window. The falling-edge synchronizer gives a comparison-to-LOCK delay of 357 ps. That is about what the original design reports for its analog detector (240 to 354 ps across corners).

The window must be wider than the largest delay step, or the loop could jump over it and never lock. Here the window is 16 ps, and the largest steps are 7 ps (coarse) and 3 ps (fine).

## The control flow

`dll_controller` runs on `clk_ref` and follows this sequence after reset:

```
ST_WAIT (4 cycles) ─► ST_CHECK_LOCK ──LOCK──► ST_TRACK  (coarse stage marked done, codes kept)
                          │ no
                          ▼
                      ST_CHECK_HALF ──half LOCK──► toggle shift_req_tgl ─► ST_SHIFT_WAIT (4 cycles) ─┐
                          │ no                                                                       │
                          ▼                                                                          │
                      ST_COARSE_INIT (coarse code = 16, mid range) ◄──────────────────────────────────┘
                          ▼
                      ST_TRACK, every cycle:
                          LOCK                  → hold both codes, mark the coarse stage done
                          coarse stage not done → coarse code +1 on UP, −1 otherwise
                          coarse stage done     → fine code   +1 on UP, −1 otherwise
```

Notes on the flow:

- **Two tracking stages.** Coarse steps capture a large initial error quickly. Once the loop has been inside the window once, the coarse code is frozen for good. Later drift is then corrected by the fine code alone. Changing a coarse element while a clock edge is in flight disturbs that edge (settling and duty-cycle distortion). Fine legs change the current, not the path, so they are safe to move every cycle.
- **Wait states.** The waits give the phase detector pipeline time to report the new phase after reset or a slip. Their length, 4 cycles, is this design's choice.
- **Start codes.** Coarse starts at 16 and fine at 32, mid range for both.
- **Saturation.** Both codes stop at their ends. A code that stays at an end is a sign that the target is out of range (see *Limitations*).
- **Outputs.** `locked` is LOCK while the FSM tracks. `coarse_done` shows the coarse stage is finished. `state` exposes the FSM state.
- **Assertions.** Two concurrent assertions check that a code never moves by more than one step per cycle.

## The half-period slip

The divider (`freq_divider`) is two toggle flip-flops in cascade:

- the first stage toggles on `clk_2ui`; its inverted output is the 2.8 GHz `clk_4ui`;
- the second stage toggles on rising `clk_4ui`; its output is `clk_8ui`.

To shift `clk_8ui` by 180°, the second stage skips exactly one toggle. Every later `clk_8ui` edge then arrives one `clk_4ui` period (357 ps, half of 714 ps) later. The skip is requested by toggling `shift_req_tgl`, a level signal from the reference-clock domain. Two flip-flops bring it into the `clk_4ui` domain. Each change of the level causes one skipped toggle, three `clk_4ui` edges after the change. One reference cycle of work therefore replaces a sweep of up to 357 ps of delay line.

## Delay lines and codes

The delay lines, window cells and clock networks are analog parts. They are written as behavioural models using transport delays (`out <= #(d) in`). The delay values are this design's estimates, chosen to agree with the few operating points the original design reports.

| part | model | range |
|---|---|---|
| coarse line (`coarse_delay_line`) | code k selects k + 1 elements of 7 ps | 7 … 224 ps |
| fine unit (`fine_delay_unit`) | 46 ps with all legs off, minus 1, 2 or 3 ps per enabled leg of group 1, 2 or 3 | 13 … 46 ps |
| fine line (`fine_delay_line`) | four FDUs in series | 52 … 181 ps |
| window cell (`pd_delay_cell`) | fixed | 8 ps |
| clock network (`clock_distribution`) | fixed insertion delay | 150 ps |

**Coarse code.** `coarse_thermal_encoder` turns code k into C[0..k] = 1, and C_bar is its complement. Only C = 1 with C_bar = 0 selects a stage. Code 0 is the shortest path: one element.

**Fine code.** Each FDU has 16 switch legs in three groups of 5, 5 and 6. In slice bits these are [4:0], [9:5] and [15:10]. FDU f is driven by `Fine_thermal[16f+15:16f]`. The clock enters the FDU driven by bits [63:48] and leaves through the one driven by bits [15:0].

`fine_thermal_encoder` walks the legs in this fixed order:

1. group 1 of FDU 0, FDU 1, FDU 2, FDU 3 (five legs each, codes 0–19);
2. group 2 of each FDU in the same way (codes 20–39);
3. group 3, six legs per FDU (codes 40–63).

Fine code f switches off the first f legs of that order and leaves the rest on. A higher code therefore means more delay, as for the coarse code. The step is 1 ps at low codes, 2 ps in the middle and 3 ps at the top. The fine delay at mid code 32 is 96 ps, with a 2 ps step there.

**Start point.** At the start codes, the loop delay from `clk_8ui` to `clk_phy` is 17·7 + 96 + 150 = 365 ps.

## Measured behaviour (simulation)

`dll_top_tb` runs the whole loop at the default parameters. Each scenario starts from reset:

| scenario | result |
|---|---|
| reference already inside the window | locks at the first check, cycle 7, with no code change |
| reference 80 ps late | coarse code steps up to 28; locked in 21 cycles |
| reference 90 ps early | coarse code steps down to 3; locked in 22 cycles |
| reference 180° off | one divider slip, codes untouched; locked in 14 cycles |
| drift of +20 ps, then −40 ps after lock | coarse code stays frozen; the fine code re-locks in 3 and 12 cycles |

Every lock must come within 96 cycles, the worst case the original design quotes, and leave |phase error| < 8 ps. The testbench counts each mechanism: first-check lock, slip, coarse up and down, fine up and down, and re-lock by fine code only. It fails if any of them never happens.

`dll_lock_sweep_tb` resets the loop 50 times, with the reference placed at 24 phases across the period, at 1.4 GHz and at 1.2 GHz. It gives:

- the worst lock time is 23 cycles;
- the phases the testbench predicts to be out of reach saturate the coarse code, as expected (see below).

## Limitations and departures

- **Capture range.** The flow uses only the coarse code before the first lock, with the fine code at 96 ps. It captures loop delays of 255 to 472 ps, plus the 180° point caught by the slip. A reference phase outside that range drives the coarse code to 0 or 31, and the loop stays unlocked. The flow checks for half-cycle lock only once, after reset. This follows the described flow and is not patched here. A wider half-cycle window, ideally a quarter period, would halve the range the line must cover.
- **Total line span.** With the delay estimates above, coarse plus fine spans 59 to 405 ps. That is 346 ps, 11 ps short of half a 714 ps period, and further short at 1.2 GHz. A coarse element of about 7.4 ps would close the gap at 1.4 GHz. Change `T_ELEM_PS` to explore this. The 7 ps figure assumes that the one reported coarse-line delay (159 ps at code 8, fine at mid code) includes the fine line. If it were the coarse line alone, an element would be near 18 ps. That is larger than the 16 ps window, so the coarse stage would need a different stopping rule.
- **Fine code direction.** The original design describes both "a higher fine code injects more current, so it is faster" and "the step size grows with the code". This design follows the second: a higher code means more delay and larger steps.
- **Transport-delay models.** `y <= #(d) x` keeps only edges that are further apart than d. Every delay in this design is below half a period (the largest single model is 224 ps, against 357 ps), so it is safe here. Keep that in mind before stretching a model.
- **No PVT, settling, jitter or duty-cycle effects.** Every delay is one fixed value. The analog asymmetry of the original half-cycle window (wider on one side than the other) is not modelled. The lock window is a fixed 16 ps; the original design measured 14 to 20 ps across corners.
- **Synthesis.** The divider, both encoders, the phase-detector logic and the controller are synthesizable. The delay lines, window cells and clock networks are simulation models, so `dll_top` as a whole is for simulation. A synthesis tool reads the coarse line model's "no stage selected: hold" behaviour as a latch.
- **Lint notes.** Verilator reports `ZERODLY` on the computed delays of the models. It also notes that clocks are sampled as data (`SYNCASYNCNET`), which is what a phase detector does.

## Files

| file | contents |
|---|---|
| `rtl/dll_pkg.sv` | sizes (32 coarse stages, 4 × 16 fine legs, 5/5/6 groups) and the FSM state enum |
| `rtl/dll_top.sv` | the loop; parameters `PHY_CDN_PS`, `NODE_CDN_PS`, `WINDOW_DT_PS` |
| `rtl/freq_divider.sv` | ÷2 ÷2 divider with the half-period slip |
| `rtl/coarse_thermal_encoder.sv`, `rtl/coarse_delay_line.sv` | coarse code and line (line: model) |
| `rtl/fine_thermal_encoder.sv`, `rtl/fine_delay_unit.sv`, `rtl/fine_delay_line.sv` | fine code, FDU and line (FDU and line: models) |
| `rtl/bb_phase_detector.sv`, `rtl/phase_detector.sv`, `rtl/pd_delay_cell.sv` | two-state detector, three-state detector with windows and synchronizer, window delay (model) |
| `rtl/clock_distribution.sv` | clock network as an insertion delay (model); used twice |
| `rtl/dll_controller.sv` | control FSM |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/dll_lock_sweep_tb.sv` | lock-time and capture-range sweep |

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog. `dll_top_tb` takes a `+trace` plusarg that prints the FSM state, flags, codes and phase error every cycle.

## Simulating

Verilator 5 with timing support, from the top directory:

```
verilator --binary --timing --assert -Wno-ZERODLY -Irtl rtl/dll_pkg.sv tb/dll_top_tb.sv --top-module dll_top_tb
./obj_dir/Vdll_top_tb
```

Replace `dll_top_tb` with any other testbench name. The package must be listed first. `-Irtl` lets Verilator find the other modules by file name. Each testbench runs in a few seconds.

All files use `timeunit 1ps; timeprecision 10fs`. The testbenches use a 2UI period of 178.6 ps (8UI and reference period 714.4 ps). To try another operating point:

- change the delay parameters of `dll_top`, or the model defaults;
- adjust the prediction functions at the top of `dll_top_tb` and `dll_lock_sweep_tb`, which recompute the expected loop delay independently of the RTL.
