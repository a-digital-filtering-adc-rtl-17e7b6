# Digital filtering ADC with programmable blocker cancellation — digital baseband RTL

A receiver baseband usually needs a steep analog low-pass filter ahead of its
ADC, because blockers (the receiver's own TX leakage, and other strong signals
next to the wanted channel) are far larger than the wanted signal. This design
drops that analog filter. A simple first-order continuous-time ΔΣ modulator
digitises the baseband. Its output goes through digital second-order bandpass
filters, one per blocker. A current DAC then subtracts the rebuilt blockers at
the modulator input. Seen from the input, the closed loop puts a notch on each
blocker. The digital coefficients and the clock set the notches, so they do not
drift with process, voltage or temperature.

The RTL here is the digital part of an I/Q receiver built this way:

* **two feedback channels (I and Q)**. Each one has one fixed notch for the TX
  leakage, whose frequency offset is known. It also has one notch that can be
  programmed from 17.5 to 107.5 MHz in 1 MHz steps, at 720 MS/s;
* **blocker detection**. A saturation monitor notices when a new blocker
  overloads the ADC. The programmable filters then sweep the band as energy
  detectors, and the strongest setting becomes the notch;
* a behavioural model of the **25 % duty-cycle LO divider** that drives the I/Q
  mixers.

The analog parts stay outside the RTL: LNA, mixers, modulator, quantizer, DACs
and the passive filters. The top module's ports are their digital interfaces.

## Signal path of one channel

```
 therm[15:0] ─► T2B ─► code (−8..+8) ──┬──► TX bandpass  ─┐
 (17-level            (ADC output)     │                  + ─► LPF ─► ΔΣ trunc ─► B2T ─► dac_cells[31:0]
  quantizer)                           └──► blocker BPF ──┘ (26 dB dc,  (18→6 bit)   (32 cells)
                                               │   gated by   pole 1 MHz,
                                               │   bl_in_loop zero 20 MHz)
                                               └──► energy detector (blocker detection)
```

| stage | module | word | notes |
|---|---|---|---|
| thermometer → code | `t2b_decoder` | 5-bit signed, −8..+8 | adder tree counts the ones and subtracts 8, so bubbles are tolerated |
| bandpass ×2 | `iir_bpf2` | 18-bit, 12 fraction bits | 9-bit coefficients; 1.0 of this word = one DAC cell |
| sum | `dfadc_channel` | 18-bit, saturating | the blocker filter is added only while `bl_in_loop` is high |
| HPF compensation | `lpf_comp` | 18-bit | first-order IIR |
| truncation | `dsm_trunc` | 6-bit signed, −16..+16 | first-order error feedback, no forward delay |
| binary → thermometer | `b2t_encoder` | 32 cell enables | `w+16` cells on, filled from bit 0 |

**Timing:** one sample per clock, with two clock inputs:

* `clk` is the quantizer clock. The code register and all filter states run
  on it.
* `clk_dig` is the same clock delayed by 0.7 period. Only the DAC register
  runs on it, as in the original design.

Everything between the code register and the DAC register is combinational.
A thermometer word captured on a `clk` edge therefore drives the DAC cells
0.7 period later. The catch is that this path (two multiplies in the
resonator, one in the LPF) must settle within 0.7 period.

Every loop delay adds phase shift, which limits how high the notch can go.
With the DAC one full period after the quantizer instead of 0.7, the model
in `tb_dfadc_loop` oscillates at 90 and 107.5 MHz even at `gshift = 3`. A
pipeline register would cost a full extra period, so the path has none.

**Why the passive HPF and the LPF:** the cancellation DAC carries only blocker
content, so a first-order passive high-pass follows it. That high-pass keeps the
DAC's noise and distortion out of the signal band. The high-pass also takes
away low-frequency loop gain, and `lpf_comp` puts that gain back. `lpf_comp` has
20× (26 dB) gain at dc, a pole at 1 MHz and a zero at 20 MHz. Above about
20 MHz its gain is back near 1.

## The bandpass filter (`iir_bpf2`)

This is the part that decides how deep the notches are and where they sit. It is
a two-integrator (state-variable) resonator:

```
low'  = low  + f·band
high  = x − low' − q·band
band' = band + f·high             y = round(band' / 2^(4+gshift)), saturated to 18 bits
```

`f = f_coef/512` and `q = q_coef/512`, both unsigned 9-bit. The centre frequency
is `f0 = fs/π · asin(f/2)`, so `f_coef = round(1024·sin(π·f0/fs))`. The quality
factor is `1/q`, whatever the frequency. The notches therefore keep the same Q
over the whole range: `q_coef = 21` gives Q ≈ 24.

Example coefficients at fs = 720 MHz:

| f0 | 17.5 MHz | 22.5 MHz | 41 MHz | 59.5 MHz | 107.5 MHz |
|---|---|---|---|---|---|
| `f_coef` | 78 | 100 | 182 | 263 | 463 |

One MHz is about 4.4 coefficient steps, so 9 bits are enough to place a notch on
the 1 MHz grid. With a direct-form biquad at this Q, 9-bit coefficients would
not be enough.

* **Peak gain:** at the centre, `band` is about Q times the input.
* **`gshift`:** lowers the output in 6 dB steps. This trades notch depth for
  loop phase margin.
* **Loop gain:** one DAC cell is 7 µA. The quantizer's feedback unit is 1.6 µA.
  With Q = 24 and `gshift = 1`, the filter gives about 12 DAC cells per ADC code
  at the centre. That is a loop gain of roughly 55 (35 dB), the depth the
  original design reports for its TX-leakage notch. The closed-loop
  testbench measures 34.7 dB; the original design reports 34.9 dB.

**Number formats:**

* The states are 30 bits wide, with 16 fraction bits, and saturate.
* Coefficient products are truncated.
* The output is rounded half-up.
* `en = 0` switches the filter off: its states and output are held at zero.
* `clr` restarts the filter from zero. The sweep uses it before each new
  setting.

## Blocker detection

`blocker_fsm` runs the state sequence below. The state leaves the top as
`det_state`.

| state | filters | what ends it |
|---|---|---|
| `IDLE` | all off, DAC at mid-scale | `det_enable` rises |
| `INIT` | TX filter on | next cycle |
| `POWER_SAVE` | TX filter only | a saturated 400-sample window on I or Q |
| `FS_MAX` | `fs_max` high: the analog side raises the full scale | 400 cycles |
| `SWEEP` | blocker filters out of the loop, used as detectors | all 91 settings measured |
| `PROGRAM` | strongest setting loaded in both channels, filters restarted, `fs_max` low | next cycle |
| `NORMAL` | both notches in the loop | saturation → `FS_MAX`; blocker-filter energy below `pwr_thresh` on both channels → `POWER_SAVE` |

* **Saturation:** `sat_monitor` counts codes at +8 or −8 in consecutive
  400-sample windows. It flags a window once the count reaches `sat_thresh`.
* **Sweep:** the settings are 17.5 + k MHz, k = 0..90. In step *j* the I channel
  measures setting 2*j* and the Q channel measures 2*j*+1. Both channels see the
  same blockers, so this halves the sweep time.
* **One sweep step:** one cycle to restart the filters, one cycle to open the
  window, then 400 samples squared and summed (`energy_detector`, 48 bits).
* **Sweep time:** 46 steps take 18 493 cycles, which is 25.7 µs at 720 MHz.
* **Choosing the setting:** the setting with the largest energy wins. A tie goes
  to the lower setting. `freq_coef_rom` turns the setting number into `f_coef`.
  It builds its table at elaboration from the sine formula above, so there is no
  data file.
* **Normal operation:** the energy detectors keep measuring the blocker-filter
  outputs. The filter output is the blocker being cancelled, so its energy shows
  whether the blocker is still there.

## Top level (`dfadc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | quantizer sample clock; asynchronous active-low reset |
| `clk_dig` | in | 1 | DAC clock: `clk` delayed by 0.7 period |
| `det_enable` | in | 1 | run detection; low = every digital filter off |
| `therm_i`, `therm_q` | in | 16 | quantizer thermometer words |
| `tx_f_coef`, `tx_q_coef`, `tx_gshift` | in | 9, 9, 3 | TX-leakage notch (host-set, known offset) |
| `bl_q_coef`, `bl_gshift` | in | 9, 3 | Q and depth of the blocker notch |
| `sat_thresh` | in | 9 | extreme codes per window that mean saturation |
| `pwr_thresh` | in | 48 | blocker-filter energy per window that means "gone" |
| `lo_clk2x` | in | 1 | 50 % clock at 2× LO for the divider |
| `code_i`, `code_q` | out | 5 | ADC output codes |
| `dac_cells_i`, `dac_cells_q` | out | 32 | cancellation-DAC cell enables |
| `dac_word_i`, `dac_word_q` | out | 6 | the same as signed words |
| `sat_count_i`, `sat_count_q` | out | 9 | extreme codes in the last window |
| `fs_max` | out | 1 | request for the raised analog full scale |
| `det_state`, `bl_idx`, `bl_active` | out | 3, 7, 1 | controller state; notch setting (17.5 + `bl_idx` MHz); notch in loop |
| `lo_phase` | out | 4 | 25 % LO phases, 0/90/180/270° |

Typical settings:

* TX notch at 41 MHz: `tx_f_coef = 182`, `tx_q_coef = 21`, `tx_gshift = 1`.
* Blocker notch: `bl_q_coef = 21`. Use a larger value for wideband, modulated
  blockers.

The two channels run in lock step, and an assertion in the top checks that their
windows stay aligned.

## What this RTL decides on its own

The original design gives the function of these parts but not their insides.
The choices here are:

* the resonator topology, the internal precision, and how 1.0 of the 18-bit word
  maps to one DAC cell;
* the order sum → LPF → truncator, and the LPF's 12-bit coefficients. The pole
  and zero map through z = e^{sT}: A = 4060, Z = 3439 and B0 = 4489, all over
  4096;
* reading "5-bit DAC" together with "truncated to 6 bits" as a signed 6-bit word
  in −16..+16 that drives 32 unit cells. The truncator clips beyond ±16 and
  carries only the dropped fraction;
* the saturation threshold and the blocker-gone threshold (run-time inputs);
* the 400-cycle wait after the full-scale step, the tie rule, and an `IDLE`
  state for "all filters off";
* putting the detection controller on chip. The original prototype ran it in
  software off chip, and describes the on-chip version as about 15 % more
  digital area.

## Limits

* **The closed loop is checked only with a simple model.** `tb_dfadc_loop`
  wraps one channel in a behavioural modulator with these parts:
  * an ideal integrator that clips at ±12 steps;
  * a 17-level quantizer;
  * an NRZ DAC_1;
  * DAC_DIG with the original unit currents, followed by a 19.8 MHz
    first-order high-pass.

  The modulator's amplifier, its excess-loop-delay DAC and the R0/C0 input
  filter are left out. In this model, the full-depth setting
  (`gshift = 1`) is stable up to about 55 MHz, `gshift = 2` up to about
  80 MHz, and `gshift = 3` over the whole range up to 107.5 MHz. The original
  design does not say which gain it uses near 107.5 MHz. With both notches
  in the loop (41 MHz TX filter and a 30.5 MHz blocker filter), both at
  `gshift = 1`, the loop oscillates. `tb_dfadc_detect` therefore runs the
  blocker filter at `gshift = 2`. The long `tb_dfadc_top` run is open-loop:
  its source model makes the blocker smaller while `fs_max` is high and while
  the right notch is in the loop.
* **Full scale comes back at once.** `fs_max` is released in the same cycle
  that the blocker notch is connected (`PROGRAM`). The original design
  restores the full scale once the blocker is cancelled. The full-scale step
  also scales the cancellation DAC's unit current, so the notch has to
  re-settle after the step whichever comes first. A Q ≈ 24 notch needs a few
  hundred samples for that, so the first `NORMAL` window can see some
  extreme codes. `sat_thresh` has to allow for that. In `tb_dfadc_detect`
  (+9.5 dBFS blocker, `sat_thresh = 40`), the first `NORMAL` window is not
  flagged.
* **No analog controls.** The full-scale control and the VGA are analog
  matters. Only `fs_max` leaves the RTL, and `clk_dig` must be generated
  outside it.
* **`lo_divider_25` is a behavioural latch model.** It is not meant for a
  standard-cell flow. Its two latches in a loop are the circuit, and lint
  reports them as a combinational loop.

## Simulation

Each `tb/tb_<module>.sv` is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/dfadc_pkg.sv tb/tb_dfadc_top.sv --top-module tb_dfadc_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_t2b_decoder` | all 65 536 thermometer words |
| `tb_b2t_encoder` | all 64 DAC words |
| `tb_iir_bpf2` | bit-exact against an integer model with random coefficients, `clr` and `en`; selectivity at 41 MHz against 30 and 52 MHz; 6 dB step |
| `tb_lpf_comp` | bit-exact model; dc gain 20 and unity gain at fs/2 |
| `tb_dsm_trunc` | bit-exact model, mean preserved, clipping |
| `tb_sat_monitor`, `tb_energy_detector` | window counts, timing and sums against counters in the testbench |
| `tb_freq_coef_rom` | all 91 entries against `$sin` |
| `tb_blocker_fsm` | every state and transition; all 91 settings visited once (I even, Q odd); sweep ≤ 26 µs; the right setting chosen when the blocker sits between two settings |
| `tb_dfadc_channel` | bit-exact cycle model of the whole channel, with the `clk`/`clk_dig` timing |
| `tb_dfadc_loop` | closed loop through a behavioural modulator:<br>• 41 MHz notch > 30 dB (34.7 dB measured)<br>• 1 MHz signal within 1 dB<br>• +14 dBFS TX leakage: no quantizer overload with the notch, overload without it<br>• 22.5 MHz blocker notch > 20 dB<br>• 107.5 MHz notch stable at `gshift = 3`<br>• at 90 MHz, `gshift = 1` oscillates and `gshift = 3` does not<br>• 5 MHz-wide modulated blockers (11 tones with random phases) at 41 and 22.5 MHz, both notches on: 28 dB and 23 dB mean attenuation |
| `tb_dfadc_detect` | closed loop through I and Q behavioural modulators around `dfadc_top`, with the TX notch on and a +9.5 dBFS blocker at 30.5 MHz:<br>• power save without the blocker<br>• saturation seen and `fs_max` raised<br>• `NORMAL` with the notch at 30.5 MHz within 26.5 µs (26.24 µs measured)<br>• blocker > 15 dB down (29 dB measured) with no saturated window<br>• back to power save when the blocker goes |
| `tb_dfadc_top` | end-to-end run at the default sizes (listed below) |
| `tb_lo_divider_25` | one-hot 25 % phases in order at half the input rate |

The end-to-end run in `tb_dfadc_top` goes through these steps:

1. signal only, in power save;
2. a blocker appears at 22.5 MHz and is found by the Q channel;
3. the blocker moves to 59.5 MHz and is found again, this time by the I channel;
4. the blocker disappears, and the design returns to power save;
5. detection is disabled, and the design goes idle.

It counts each mechanism and fails if any of them never occurs. It takes about
0.2 s.

**Parameters you can change:**

* The widths live in `dfadc_pkg`.
* `iir_bpf2` has `ACC_W` and `ACC_FRAC`.
* `lpf_comp` has `A`, `Z`, `B0` and `F`. Recompute them from the formulas in its
  header for another sample rate.
* `freq_coef_rom` has `F0_KHZ`, `STEP_KHZ` and `FS_KHZ`.
* `blocker_fsm` has `FS_SETTLE`.
