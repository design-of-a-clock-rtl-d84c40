# Clock generator around an embedded silicon oscillator

A chip that has no quartz crystal can still make an accurate clock if it
knows how fast its own logic is. This design does that. An on-chip
oscillator, the "eCrystal", is a ring of hysteresis delay cells. A 19-bit
codeword sets its period. The right codeword depends on the process corner,
the supply voltage and the temperature, so it is found in two steps:

1. **Calibration, once, on the tester.** A crystal reference is applied. An
   all-digital PLL (ADPLL) searches for the codeword that makes the oscillator
   match the reference. The result is called the *Locked Code*. At the same
   time, a delay ratio estimator measures R, the delay of a NAND cell divided
   by the delay of a BUFFER cell. This ratio moves with process, voltage and
   temperature.
   - Pairs of (R, Locked Code) are collected at several conditions.
   - The tester fits three process dependent parameters (PDPs) a, b and c to
     them.
   - The PDPs are stored on the chip.
2. **Operation, in the field, without a reference.** The PLL is switched
   off. The estimator measures R again. The mapper computes the codeword as
   `a*R^2 + b*R + c`.

A second, independent loop sits after the oscillator: the all-digital pulse
width control loop (ADPWCL). It regenerates a clock with a duty cycle of 10 %
to 90 %, in 10 % steps. It needs no look-up table, because it measures the
clock period in units of its own delay cells. The clock it works on is the
eCrystal output or an external clock.

```
             xtal_clk (calibration only)
                 |
                 v
        +--------------+     +------+     +-----+
   +--->| PFD          |---->|  CU  |---->| DLF |--- locked_code
   |    +--------------+ up  +------+     +-----+
   |                     dn                  | pll_code
   |                                         v
   |    ring_osc x2 -> delay ratio -> mapper -> [mode mux] -> HDC-DCO --+--> ecrystal_clk
   |                  estimator       ^  map_code                       |
   |                                  |                                 |
   |                            PDP registers                           |
   +--------------------------------------------------------------------+
                                                                        |
                          clk_ext --> [input select] <------------------+
                                           |
                                           v
                                        ADPWCL --> out_clk (duty 10..90 %)
```

## The calibration PLL

The loop has three parts: a phase-frequency detector (PFD), a control unit
(CU) and a digital loop filter (DLF). They close the loop around the DCO.
Everything runs on the 5 MHz reference.

**Codeword.** The codeword `{coarse[7:0], fine1[4:0], fine2[5:0]}` has three
fields, one per DCO tuning stage. At the typical corner the stages weigh
987 ps, 62.9 ps and 2.04 ps per step. The DCO model therefore spans 4.18 ns
to 258 ns. A larger code means a slower clock.

**Detector.** The PFD is bang-bang. It looks at one reference edge and one
DCO edge.
- `up` means the DCO edge came late: speed up.
- `dn` means it came early: slow down.
- Both flags high means the two edges were closer than the 8 ps dead zone.

**Search.** The CU runs a binary search over one field at a time.
- At reset, every field is at mid-range (128, 16, 32). The first step is a
  quarter of the range (64, 8, 16).
- Every `N_RESP` = 16 reference cycles, the CU reads the PFD and moves the
  current field by the step.
- When the verdict flips polarity (slow then fast, or fast then slow), the
  step is halved.
- A flip while the step is already 1 ends the field, and the search moves to
  the next field. Two other events also end a field: a verdict inside the dead
  zone, or a field pushed against the end where it already sits. Without these
  two rules the search could stall.

**Averaging and lock.** After the second fine field, the CU enters the
*average* state and keeps toggling fine2 by one step. Meanwhile the DLF
records the largest and smallest codeword it sees. Lock comes after six
polarity inversions, or after a 256-cycle time-out. At lock the DLF drives
the DCO with `(max + min) / 2`, the Locked Code, and the CU stops.

**Restarting the DCO.** A codeword is never changed while the ring is
running.
- With every update, the CU stops the DCO (`dco_rst`) for one reference
  cycle. The DCO restarts with a rising edge at the next reference edge, in
  phase with the reference.
- The PFD is held clear (`pfd_clr`) half a cycle longer, so it never pairs
  the two restart edges.
- Each window therefore measures how far the DCO has drifted over 16 periods,
  which amplifies a small frequency error into a visible phase error.

**Timing.** The 5 MHz testbench locks after 482 reference cycles. The
worst-case bound of the original design is 608 cycles. The average period
then differs from the reference by about 1 ppm.

## Operation mode: ratio estimator and mapper

**Delay ratio estimator.** The estimator enables two 16-stage ring
oscillators, one of NAND cells and one of BUFFER cells, and counts both.
- The NAND ring counts 2^14 cycles. Then the BUFFER-ring counter is frozen.
- The frozen count is `R = D_NAND / D_BUF` in unsigned Q2.14, so no divider
  is needed.
- The stop flag crosses clock domains through two-flop synchronisers. This
  costs about 3 counts, 0.02 %. The target accuracy is 0.1 %.
- A `start` pulse clears both counters on the next system cycle and starts
  the rings on the cycle after.
- The rings run only during a measurement.

**Mapper.** The mapper evaluates `code = a*R^2 + b*R + c` in full precision.
- a, b and c are signed 32-bit numbers in Q.8, in units of the codeword's
  least significant bit.
- The result is rounded to the nearest code and clamped to 19 bits.
- The mapper has two pipeline stages.
- Here the PDPs are fitted to codewords directly. The original design fits
  them to the reference-cell delay and maps that to a code.

**PDP registers.** The PDPs live in a three-word register file, written
through `pdp_we/pdp_addr/pdp_wdata`. The original design can also use a
one-time-programmable memory, which is not modelled.

**Clocking.** The mapper and the estimator's control run on the eCrystal
clock itself. In operation mode no other clock exists.

## The pulse width control loop

This is the least obvious part. The output clock is made by an SR latch:
- **Set:** a one-shot pulse (SET) on every rising input edge.
- **Reset:** a pulse taken from the input clock after a programmable delay.

The duty cycle therefore equals delay / period. The loop must learn how many
delay steps make one period, on this die, now.

**Measuring by equivalent-time sampling.** After `start`, the counter holds
the delay code at 0 for 8 cycles. It then raises the code by one step every
`SWEEP_DIV` = 4 input cycles.
- On each input cycle, the delayed strobe (D.S, through the mapping delay
  line: `map_ds`) samples the inverted output clock (`map_out`).
- Each step moves the sampling point 125 ps later in the output period. The
  sampled bit ("recovery") is therefore a slowed-down copy of the inverted
  output, one sample per step.
- During the sweep the output has its minimum high phase, because the latch
  is reset by the fixed minimum delay (Min_D.S). Recovery starts low, rises
  when the strobe passes the output's falling edge, and falls when it reaches
  the next rising edge.
- The PVT compensator counts sweep steps inside two windows:
  - `maskall`, from the start to the falling edge of recovery, gives the
    period in steps.
  - `maskmin`, from the rising to the falling edge, gives `nowduty`, the low
    phase.
- Recovery passes through three flip-flops into the input clock domain, and
  the step count is delayed three cycles to match.

The mapping delay line gives the strobe and the output the same extra delays.
This makes a zero-delay code line up with the output's rising edge.

**Arithmetic.** The auto calibration circuit computes

    SETDUTY = round(k * period / 10) - (period - nowduty)      k = duty_code (1..9)

This is the wanted high time minus the high time the path already produces.
The result is clamped at 0.
- It is a four-step sequence (multiply, divide by ten, subtract, clamp), so
  SETDUTY appears four cycles after the measurement.
- When `duty_code` changes, the result is recomputed from the stored
  measurement within four cycles, without a new sweep.
- With SETDUTY valid, the counter loads it as the delay code, and the
  pulse generator's multiplexer resets the latch from D.S instead of Min_D.S.

**Delay line.** The delay line is 13 bits: an 8-bit coarse path selector
(256-to-1) and a 5-bit fine one (32-to-1). It is modelled as one linear scale
of 125 ps per code, so a coarse step equals 32 fine steps. Its range is
8191 × 125 ps ≈ 1 µs. That covers 5 MHz (1600 codes) to 60 MHz (134 codes).

**Timing.** The loop locks about `4*period/125 ps + 20` input cycles after
`start`:
- 659 cycles (13 µs) at 50 MHz
- 555 cycles at 60 MHz
- 6419 cycles at 5 MHz

Every setting from 10 % to 90 % lands within 1 % of the request at 5, 50 and
60 MHz, including with a 30 % input duty cycle.

## Behavioural models and synthesizable logic

**Synthesizable:**
- `adpll_cu`, `adpll_dlf`, `delay_ratio_estimator`, `mapper`, `pdp_regfile`
- `pwcl_counter`, `pvt_compensator`, `pwcl_acc`
- `pulse_generator`: an intentional SR latch.

**Timing models of analog or full-custom cells:**
- `hdc_dco`, `adpll_pfd`, `ring_osc`, `one_shot`, `std_cell_delay_line`,
  `mapping_delay_line`
- They use `#` delays on real-valued parameters, with each edge delayed on
  its own (transport delay). Each says so in its first comment.
- Their parameters hold typical-corner values. To model another corner,
  change the cell delays (e.g. `T_FINE_PS` = 85.4 or 222 ps,
  `D_NAND_PS`/`D_BUF_PS`).

**Structural:** `adpll`, `adpwcl` and the top `clock_generator`. The shared
types (codeword struct, search-state and status enums) are in `cg_pkg`.

## Where this design departs from the original

- **Step halving.** The search step is *halved* on each polarity inversion.
  The original describes both halving and quartering; halving is a true
  binary search.
- **Flag meaning.** `up` means "speed up" (the feedback lags). The original
  text is not consistent about which flag rises on a lag.
- **Ending a field early.** A search field also ends on a dead-zone verdict
  or at a range end, and a dead-zone verdict counts as an inversion while
  averaging. These rules are this design's own.
- **Sweep rate.** The ADPWCL sweep advances once every 4 input cycles, so
  the strobe path settles. This makes the worst-case lock (5 MHz) about
  6400 cycles, against about 2000 in the original. With `SWEEP_DIV` = 1 the
  loop locks at 5 MHz in 1619 cycles. However, the sample that closes the
  period window is taken more than one input cycle after its step, so the
  period reads one step long. At 60 MHz that puts 70 % and 90 % just outside
  1 %.
- **SETDUTY formula.** SETDUTY is computed from both `period` and `nowduty`,
  as given above. The original prints only `desired duty × nowduty`. The
  form used here reproduces the evenly spaced delay codes the original
  reports for settings 1 to 9.
- **Not built:**
  - The one-time-programmable PDP store. A register file is used instead.
  - The PFD's pulse amplifier. Its effect is the dead zone, which is part of
    the PFD model.
  - The remote-reference tracker and the radio baseband of the surrounding
    communication system.
- **Corners.** The PLL and the eCrystal path are simulated at the typical
  corner only. The ADPWCL is also simulated with the fast and slow fine steps
  (85.4 ps and 222 ps).

## Verification

Every block has a self-checking testbench in `tb/` named `tb_<module>`. It
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_clock_generator`** runs the whole chip with default parameters. It
  checks five stages in turn:
  1. Calibration: lock, Locked Code and ppm error.
  2. Ratio measurement.
  3. PDP write.
  4. Switch to operation mode: the mapper reproduces the Locked Code, and the
     free-running error is within 20 ppm.
  5. ADPWCL on the eCrystal clock at 30 % and 70 % (a duty change with no
     new sweep), then on a 50 MHz external clock at 90 %.

  It counts each mechanism: search states, dead-zone verdicts, mode
  switches, ratio and mapper results, ADPWCL locks, recomputations and input
  selection. It fails if any count is zero.
- **`tb_adpll`** closes the loop with the DCO model at 5 MHz. It checks that
  lock arrives within 608 cycles and that the period error is within 20 ppm.
- **`tb_adpll_cu`** runs the control unit against an ideal detector. It
  checks the reset codeword, the starting steps, the 16-cycle update rate and
  convergence to random targets.
- **`tb_adpwcl`** checks 5, 50 and 60 MHz, with 50 % and 30 % input duty,
  for all nine duty settings within 1 %. It also checks the lock time.
- **`tb_adpwcl_corners`** repeats the duty sweep at 50 MHz with fast-corner
  and slow-corner delay steps (85.4 ps and 222 ps). The loop measures 235 and
  91 steps per period, and every setting is within 0.5 % (fast) and
  0.9 % (slow) of the request.
- **The other unit testbenches** check their block against numbers worked
  out independently:
  - exact integer reference for the mapper
  - the formula and the four-cycle latency for the ACC
  - delays to 0.01 ps for the delay models
  - the ratio within 0.1 % at three corners

All pass with random initial state.

## Simulating

The code is SystemVerilog-2017. Each model uses `timeunit 1ps; timeprecision
1fs;`. With Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_clock_generator \
        -y rtl -y tb +libext+.sv rtl/cg_pkg.sv tb/tb_clock_generator.sv -o sim
    ./obj_dir/sim

Replace `tb_clock_generator` with any other testbench. The full-chip test
simulates about 1.5 ms of chip time in under a second.

Useful parameters on the top:
- `N_RESP`: PLL update window.
- `R_FRAC`: ratio precision.
- `RING_STAGES`, `D_BUF_PS`, `D_NAND_PS`: the ring cells, which stand for
  the operating condition.
- `SWEEP_DIV`: input cycles per ADPWCL sweep step.

## Files

| File | Contents |
|---|---|
| `rtl/cg_pkg.sv` | codeword struct, field widths, search-state and status enums |
| `rtl/clock_generator.sv` | top: PLL, eCrystal path, mode multiplexer, ADPWCL |
| `rtl/adpll.sv`, `adpll_pfd.sv`, `adpll_cu.sv`, `adpll_dlf.sv` | calibration PLL |
| `rtl/hdc_dco.sv` | DCO model |
| `rtl/ring_osc.sv`, `delay_ratio_estimator.sv`, `mapper.sv`, `pdp_regfile.sv` | operation-mode path |
| `rtl/adpwcl.sv`, `one_shot.sv`, `std_cell_delay_line.sv`, `pulse_generator.sv`, `mapping_delay_line.sv`, `pwcl_counter.sv`, `pvt_compensator.sv`, `pwcl_acc.sv` | pulse width control loop |
| `tb/tb_*.sv` | one self-checking testbench per module |
