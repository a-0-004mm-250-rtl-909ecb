# Low-power timing blocks: a ΔΣ time-to-digital converter and a bang-bang digital PLL

This repository holds two small timing circuits meant for a low-power SoC.
They share no signals and sit side by side in one top level, `timing_soc_top`.

- **A first-order delta-sigma TDC.** It works entirely in the time domain.
  The input is the time between two rising edges. Instead of a delay-line ruler, the converter uses a
  *time-difference accumulator*: a pair of gated delay cells that stores an interval and adds
  another to it. It puts out one bit per sample. The density of ones tracks the input interval, and
  the quantization error is pushed to high frequencies. A digital decimator behind it gives the
  resolution.
- **A bang-bang digital PLL (DPLL) with a ring DCO.** A one-bit phase detector closes the loop.
  Three additions make it both quick and clean:
  - an automatic frequency control (AFC) picks the coarse band;
  - a *gain-boosted* phase detector multiplies the integral step by 16 while the phase error is large;
  - a 1-bit fractional path, dithered by a balanced pseudo-random generator, refines the frequency without
    the spurs of a plain accumulator.

Most of the DPLL is synthesizable RTL. The DCO, the reference delay buffers and all the
time-domain cells of the TDC are analog circuits, so they are written here as behavioural models
with `#` delays. The time-domain models simulate accurately, but they are not a netlist.

---

## 1. The bang-bang DPLL

```
 FIN ─► pre_div ─► ref_delay_line ─┬ E_FREF ┐
                                   ├ FREF  ─┼► bbpfd_gain_boost ─ UP/DN, HighGain ─┐
                                   └ L_FREF ┘            ▲                         │
                                                         │ FFEED                   ▼
        ┌──── afc (coarse 4b) ───────────────────┐       │              loop_integrator (6b frac,
        │                                        ▼       │                  OverF / UnderF)
        │                          ring_dco ◄─ prop (UP/DN)                   │         │
        │                           ▲   ▲  ◄── fine 256b thermometer ◄─ row_col_ctrl     │ frac
        │                           │   └─ fractional bit ◄─ frac_accum ◄─ ± prng_dither ┘
        │                           │                           ▲ (clocked by prescaler output)
        └── FFEED ◄── feedback_divider (8/9 prescaler, ÷P, ÷S) ◄─┘ DCO
                                                    DCO ─► output_div ─► FOUT
```

### 1.1 DCO and its tuning word

`ring_dco` models a four-stage differential ring oscillator with capacitive tuning. Its inputs are:

| Input | Width | Effect in the model |
|---|---|---|
| `coarse` | 4 b binary | 75 MHz per step from 700 MHz |
| `fine_therm` | 256 b thermometer | 0.5 MHz per unit |
| `frac` | 1 b | one more fine unit while high |
| `prop` | 1 b | ±2 MHz, the proportional path, active once `prop_en` is high |

The model's frequency range is 700–1953 MHz. The slopes are this design's choice, set so that the
range covers 0.7–1.8 GHz. The model changes period at the next half cycle.

### 1.2 The phase detector and the gain booster (`bbpfd_core`, `high_gain_selector`)

The reference goes through three equal buffers (`ref_delay_line`, 1 ns each in the model). These
give an early copy `E_FREF`, the nominal `FREF` and a late copy `L_FREF`.

**Core detector (`bbpfd_core`).** Two edge flip-flops record that FREF (`b`) and FFEED (`c`) have
arrived. Once both are high, `a_reset = b & c` clears them both. Before that happens, each
arrival is sampled by the other one's edge:
- `b1` captures `b` on the rising edge of `c`;
- `c1` captures `c` on the rising edge of `b`.

The edge that came second therefore sees the first one's flag set. A set/reset latch holds the
decision: UP when FREF led, DN when FFEED led. The decision stays valid until the next comparison.
The latch is on purpose: the detector is asynchronous and has no clock of its own.

**High-gain selector (`high_gain_selector`).**
- When `E_FREF` rises, FFEED has already arrived, and FREF has not, the feedback is *very early*.
- When `L_FREF` rises, FREF has arrived, and FFEED has not, the feedback is *very late*.
- Either flag raises `high_gain`.

With 1 ns buffers, high gain means the phase error is larger than 1 ns. `bbpfd_gain_boost`
wraps both parts and delivers a `pfd_decision_t {up, dn, high_gain}` struct.

**Integrator (`loop_integrator`).** The integrator runs on the falling edge of FREF, when both
compared edges have certainly arrived. It adds ±1 to a 6-bit fraction register, or ±16 when
`high_gain` is set. A carry out of the fraction (OverF) or a borrow (UnderF) moves the 8-bit fine
code in `row_col_ctrl` up or down by one. That block decodes the code into a 16 × 16
row/column thermometer of 256 capacitor units. The fine code saturates at 0 and 255. It starts at
32 so that the AFC measures with the fine bank near the bottom.

The proportional path (UP/DN straight to the DCO) and the integrator are held off until the AFC
has finished.

Tuning is meant to be slow: a small bang-bang gain keeps the limit cycle small but makes locking
slow. The gain of 16 shortens the slew while the error is large. Once the edges fall inside the
±1 ns window, the loop returns to step 1.

### 1.3 Fractional dithering (`prng_dither`, `frac_accum`)

The 6-bit fraction of the integrator is too fine to apply directly, so `frac_accum` accumulates
it and sends the carry to the DCO as a one-bit fractional input. Each accumulation uses the
fraction plus or minus one LSB (clamped at zero). The sign comes from `prng_dither`.

A plain LFSR sequence has one more 1 than 0s per period, which would bias the average. The
generator fixes this:
- A 12-bit Galois LFSR (x¹² + x⁶ + x⁴ + x + 1, seed `1000…0`) runs through its 4095 states.
- A comparator detects the return to the seed and toggles a select flip-flop.
- A MUX outputs the LSB in one pass and the inverted LSB in the next.

The combined sequence is 2·4095 long and holds exactly as many +1s as −1s, so the mean of the
dithered fraction equals the fraction itself.

Both the accumulator and the generator are clocked by the output of the 8/9 prescaler, not by a
fixed clock. That clock's period changes with the swallow pattern, which randomises the sampling
further.

Over a full dither period, the largest spectral line of the fractional bit falls 6–8 dB below that
of an undithered accumulator with the same fraction, and the average is unchanged.

### 1.4 Feedback and output dividers

- `feedback_divider` is a pulse-swallow counter that divides by `8·P + S` (with S ≤ P).
  `dual_mod_prescaler` divides by 9 for the first S prescaler periods of each output period and by
  8 for the rest.
- `pre_div` and `output_div` are plain programmable dividers. A ratio of 1 passes the clock through.

### 1.5 AFC (`afc`)

Before fine locking, the AFC chooses the 4-bit coarse code by successive approximation, MSB
first. For each bit it does the following:
1. Applies the trial code.
2. Waits `SETTLE` reference periods.
3. Counts FFEED edges over `WIN` = 64 reference periods.
4. Clears the bit if the count exceeds `WIN`, because the DCO is then too fast.

The FFEED counter lives in the FFEED clock domain. Its enable and clear cross over through two-flop
synchronisers, and its value is read only after `GUARD` idle cycles, when it can no longer change.
This keeps the clock crossing safe without a Gray code. The search ends on the code just below the
target, so the fine loop always starts from a frequency that is too low.

### 1.6 Timing at a glance

With FIN = 26 MHz, P = 6 and S = 1 (ratio 49, DCO 1.274 GHz):
- The AFC takes about 15 µs, coarse code 7.
- Lock follows about 17 µs later with high gain, or about 170 µs with the boost disabled
  (`INT_GAIN = 1`).
- In lock the feedback edge stays within ±71 ps of FREF.
- The mean feedback period matches the reference to better than 0.05 %.

These times scale with the DCO model's gains. The published chip reports 25 µs against 220 µs.

---

## 2. The ΔΣ TDC

### 2.1 Gated delay buffer and time-difference adder (`gdb_cell`, `tda`)

A gated delay buffer has three edge inputs: IN, HLD and AWK.
1. IN starts an internal ramp.
2. HLD freezes it, which stores the interval ΔT_IN = T_HLD − T_IN.
3. AWK resumes the ramp. OUT fires when the ramp reaches the end of its full delay T_d.

So `T_OUT − T_AWK = T_d − ΔT_IN`: the stored interval comes back out, referenced to AWK.

`tda` uses two such cells with a shared AWK, one for each of the two output edges. Each cell is
fed by two operands, one normally and one cross-connected, with a fixed offset `T_off` on each path.
The cross-connection inverts the second operand, so the two output edges differ by the *sum* of
the two input intervals.

### 2.2 Accumulator, DTC and quantizer (`time_accumulator`, `dtc`, `tdc_quantizer`)

The time accumulator is made of two adders:
- **TDA2** is woken by the sample's `IN_A` edge. It releases the previous sum, which it adds to an
  all-zero operand, the identity.
- **TDA1** adds that sum to the new input pair and stores the result back into TDA2. It is woken
  by a second, later edge (`in_a` + 5 ns in `dsm_tdc`) after all its operands have arrived.

The **DTC** is two 2:1 MUXes with a `T_DT` delay on one leg each:
- when the previous output bit is 1, the A edge is delayed;
- when it is 0, the B edge is delayed.

This subtracts or adds `T_DT` to the input interval, which closes the ΔΣ feedback and the residue
operation without any separate arithmetic.

The **quantizer** is one flip-flop clocked by one output edge of the accumulator that samples the
other, so it outputs the sign of the accumulated interval.

### 2.3 Behaviour

For a constant input x between −T_DT and +T_DT, the fraction of ones is (1 + x/T_DT)/2. With
T_DT = 60 ps, a ±50 ps input, for example a 100 ps peak-to-peak sine, stays in range. Each sample
needs about 7 ns to settle, so the model runs at 10 MS/s with plenty of margin.

`tb_dsm_tdc` compares every output bit with an ideal discrete-time first-order ΔΣ loop and they
agree bit for bit. `tb_tdc_sndr` applies a 100 kHz, 100 ps peak-to-peak sine at 10 MS/s for
65,536 samples and takes a Hann-windowed DFT of the bit stream. The tone comes back at 49.9 ps
amplitude, and the noise from 1 kHz to 100 kHz (oversampling ratio 50) is 0.13 ps rms, giving
48.8 dB SNDR. The model is noiseless, so it shows quantization noise only; the chip's measured
28.95 dB SNDR also includes flicker and thermal noise.

---

## 3. What follows the published design and what is this design's own

**Taken from the published description:**
- the block structure of both circuits;
- the 4 b coarse and 256 b thermometer fine tuning;
- the 6-bit fraction and the 1-bit fractional DCO input;
- the 8/9 prescaler, and the prescaler output as the clock of the accumulator and PRNG;
- the PRNG made of a Galois LFSR, comparator, toggle flip-flop and MUX, its `1000…0` seed and 12-bit length;
- the high gain of 16 and the E_FREF/FREF/L_FREF window;
- the GDB/TDA time arithmetic with its offsets and cross-connection;
- the DTC as MUXed delays selected by the previous output bit.

**This design's choices:**

| Area | Choice |
|---|---|
| Delays and DCO gains | Every delay value and every DCO gain. |
| LFSR | The feedback polynomial. |
| Dither | ±1 LSB, clamped at zero. |
| Fine bank | The 16 × 16 split and the start code 32. |
| AFC | The whole search method. |
| Loop timing | The loop filter clocked on the falling FREF edge; the loop enabled only after the AFC; high gain applied to the integral path only. |
| PFD RTL | B1/C1 and the very-early/very-late flags hold their values until overwritten, instead of being cleared by a pulse, because a zero-delay description cannot give that pulse a width. |
| TDC wake | The wake edge of TDA1 is a delayed copy of `IN_A`. |
| Reset | All resets are active-low and asynchronous. |

**Not included:** the voltage-controlled delay lines used to generate the TDC's test input. The
testbenches produce the edge pairs directly.

---

## 4. Files

| Area | Files |
|---|---|
| Shared package | `rtl/dpll_pkg.sv` (widths, gain, `pfd_decision_t`) |
| DPLL | `bbpfd_dpll`, `pre_div`, `ref_delay_line`*, `bbpfd_core`, `high_gain_selector`, `bbpfd_gain_boost`, `loop_integrator`, `row_col_ctrl`, `prng_dither`, `frac_accum`, `dual_mod_prescaler`, `feedback_divider`, `afc`, `ring_dco`*, `output_div` |
| TDC | `dsm_tdc`*, `dtc`*, `time_accumulator`*, `tda`*, `gdb_cell`*, `tdc_quantizer` |
| Top | `timing_soc_top`* |

\* behavioural: contains `#` delays or instantiates models with delays.

Each file opens with a description of what the block does, how it does it, its ports and its timing.

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog.

- `tb_timing_soc_top` runs the whole design at default parameters. It locks the DPLL at
  1.274 GHz, runs the TDC for 492 samples, and counts every mechanism at least once: AFC bit kept
  and cleared, UP, DN, high gain, OverF, UnderF, fine steps, fractional carries, ÷9 cycles, PRNG
  select flips, and TDC ones and zeros.
- `tb_dpll_lock_time` compares the lock time with and without the gain boost.
- `tb_dpll_range` locks the loop at 702 MHz, 1.5 GHz (output divided by 32 to 46.875 MHz) and 1794 MHz.
- `tb_frac_spur` shows that the dither lowers the largest spectral line of the fractional bit by 6 to 8 dB against a plain accumulator of the same fraction.
- `tb_tdc_sndr` measures the TDC's in-band SNDR on a 65,536-sample sine.

## 5. Simulating

All modules use `timeunit 1ps; timeprecision 1fs;` and need Verilator 5 with `--timing`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/dpll_pkg.sv \
          tb/tb_timing_soc_top.sv --top-module tb_timing_soc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. All of them finish in a few seconds at most.

The simulation is two-state. Every register sits behind an asynchronous reset, and the testbenches
drive each reset high, low, then high again so that the reset edge is seen. Keep that pattern when
writing new tests.

To change the loop, adjust the `bbpfd_dpll` parameters (`INT_GAIN`, `AFC_WIN`, `BUF_DELAY_PS`),
the DCO model's gains, or the TDC delays (`TDT_PS` sets the full scale).
