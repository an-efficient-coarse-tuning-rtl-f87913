# Coarse tuning and fractional-N control for a fast-switching PHS synthesizer

A PHS handset must hop between 300 kHz channels spread over about 35 MHz
(1884.65 to 1919.45 MHz) in under 30 us. The LC-VCO that gives acceptable
phase noise has a small tuning gain, so one varactor curve cannot span the
band, and there is no time to run a capacitor-bank search at every hop.

This design splits coarse tuning in two:

* **Main coarse tuning**, once after power-up: a 10-bit switched-capacitor
  bank `CAPS[9:0]` is set by successive approximation so that the VCO runs
  at the band centre, 1902 MHz. The bank's weights are deliberately
  redundant, which allows the early (large) bits to be decided from very
  short frequency measurements. The whole search takes 259/60 of one
  full-accuracy measurement instead of 10.
* **Auxiliary coarse tuning**, at every channel switch: four extra
  capacitors `CAUX_SEL[3:0]` shift the tuned curve in 6 MHz steps. The step
  is looked up from the target channel, with no measurement at all.

Around that sits a conventional fractional-N loop: a 19.2 MHz reference,
doubled to 38.4 MHz, compared against the VCO divided by N or N+1 under
control of a sigma-delta modulator.

The SystemVerilog here is the digital part: the coarse tuning controller,
the sigma-delta modulator and the N/N+1 divider. The analog part is not
modelled in RTL: reference doubler, phase-frequency detector, charge pump,
loop filter, bandwidth switch and VCO. A behavioural VCO in `tb/` stands in
for the oscillator in simulation.

## Block structure

```
                       channel[6:0]
                            |
        +-------------------+--------------------------------------+
        | freq_synth_digital                                       |
        |                                                          |
        |  coarse_tuning_controller (ref_clk)                      |
        |    en_counter_gen ---- EN_CNT, COMP_CLK, DES_CLK, RST_CNT|
        |    vco_accumulator (vco_clk) -- VCO_CNT                  |
        |    ch_ref_num_gen ------------- CH_REF_NUM               |
        |    digital_comparator --------- UP / DOWN                |
        |    caps_decision -------------- CAPS (trial word)        |--> caps[9:0]
        |    aux_cap_select ------------- CAUX_SEL                 |--> caux_sel[3:0]
        |    output register (frozen at COARSE_LOCK)               |--> coarse_lock
        |                                                          |
        |  channel -> N, FRAC                                      |
        |  sigma_delta_mod (vco_clk) -- sel_np1                    |
        |  nn1_divider     (vco_clk) -- div_out (to the PFD)       |--> div_out
        +----------------------------------------------------------+
```

`synth_pkg` holds the shared constants: the capacitor weights and
redundancies, the window function and the frequency-code conversions.

## The redundant capacitor bank and the weighted windows

This is the heart of the design and the part that needs most care.

Capacitor `i` has relative weight `W[i]`. Its redundancy `R[i]` is how far
the lower capacitors together can overshoot it:
`R[i] = max(0, sum(W[0..i-1]) - W[i])`.

| bit | W  | sum of lower | R  | counting window (REF cycles, T_MIN = 60) |
|-----|----|--------------|----|-------------------------------------------|
| 9   |128 | 138          | 10 | T_MIN/10 = 6  |
| 8   | 64 | 74           | 10 | 6  |
| 7   | 32 | 42           | 10 | 6  |
| 6   | 16 | 26           | 10 | 6  |
| 5   | 10 | 16           | 6  | T_MIN/6 = 10 |
| 4   | 6  | 10           | 4  | T_MIN/4 = 15 |
| 3   | 4  | 6            | 2  | T_MIN/2 = 30 |
| 2   | 3  | 3            | 0  | T_MIN = 60 |
| 1   | 2  | 1            | 0  | 60 |
| 0   | 1  | 0            | 0  | 60 |

The frequency is measured by counting VCO cycles during a window of
`T` reference cycles. One count is worth `19.2 MHz / T`, so the error of a
measurement scales as `1/T`. A bit with redundancy `R` tolerates an error
`R` times larger than a bit with none, so its window can be `T_MIN / R`.
The windows add up to 259 cycles (259/60 x T_MIN), against 600 if every
bit used T_MIN. That is 2.3 times shorter at the same final accuracy.

**The decision rule matters.** Successive approximation here only ever
adds capacitance below the current bit. A capacitor dropped by mistake can
be made up by the lower bits, as long as the mistake is within that bit's
redundancy. A capacitor kept by mistake cannot be undone. So
`caps_decision` keeps the trial capacitor only when the comparator reports
DOWN, meaning the count is strictly above the reference and the VCO is
still too fast. On UP, or on an exact tie, it drops the capacitor. With
the opposite tie rule, simulation showed up to 3 MHz residual error after a
wrong early "keep".

`CAPS[i] = 1` connects capacitor `i`, which lowers the frequency.

## One bit of the search (en_counter_gen)

All control runs on the 19.2 MHz reference. The strobes that the block
diagram calls clocks (COMP_CLK, DES_CLK) are one-cycle synchronous
enables. For each bit, from `CAPS[9]` down to `CAPS[0]`:

| REF cycles | signal   | action |
|------------|----------|--------|
| window     | EN_CNT   | `vco_accumulator` counts VCO edges |
| 1          | (idle)   | the VCO-domain count settles |
| 1          | COMP_CLK | `digital_comparator` registers UP = cnt < ref, DOWN = cnt > ref |
| 1          | DES_CLK  | `caps_decision` keeps or drops bit i and puts bit i-1 on trial |
| 1          | RST_CNT  | counter cleared; the new trial word reaches the VCO |

`ch_ref_num_gen` supplies the expected count for the current window:
`CH_REF_NUM = round(f_target x T / 19.2 MHz)`. During main tuning the
target is 1902 MHz.

From reset release to `coarse_lock` takes **302 REF cycles (15.7 us)**:
259 window cycles, 40 strobe cycles, and 3 cycles for the start pulse, the
start delay and the lock register. The sequencer starts one cycle after
the decision block loads the first trial word (`CAPS[9]` alone). That gap
lets the word pass through the output register before the first window
opens. Without it, the first window measures the wrong VCO setting.

The counter runs on the VCO clock. EN_CNT and RST_CNT reach it through
two-flop synchronisers, which replaces the gated clock of a textbook
implementation with a clock enable. The count is read in the reference
domain only after it has been stable for a full reference cycle.

After `CAPS[0]` is decided, `coarse_lock` rises and the output register
stops following the search. This register stands in for the switches that
isolate the VCO from the controller after tuning. `CAPS` then holds until
the next reset.

## Auxiliary coarse tuning (aux_cap_select)

`CAUX_SEL[0]` and `[2]` each lower the curve by 6 MHz; `[1]` and `[3]`
each lower it by 12 MHz. Main tuning runs with `0011`, so the codes give:

| CAUX_SEL | curve centre |
|----------|--------------|
| 0000 | 1902 + 18 MHz |
| 0001 | 1902 + 12 MHz |
| 0010 | 1902 + 6 MHz |
| 0011 | 1902 MHz (main tuning) |
| 0111 | 1902 - 6 MHz |
| 1011 | 1902 - 12 MHz |
| 1111 | 1902 - 18 MHz |

After lock, the controller registers the code whose curve centre is
nearest the channel frequency (decision boundaries at ±3, ±9 and ±15 MHz).
Before lock it outputs `0011`. A channel switch therefore changes the coarse
setting within two reference cycles. The varactor must then cover at most
about 3 MHz, plus the main tuning residue.

## Frequency plan, sigma-delta modulator and divider

All frequencies are integer codes in 50 kHz units (`synth_pkg`). 50 kHz
divides the channel raster, the 1884.65 MHz first channel, the 1902 MHz
centre and both reference frequencies, so every conversion is exact:

* channel `k` (input `channel[6:0]`, 0 to 116): f = 1884.65 MHz + k x 300 kHz;
* division ratio: f / 38.4 MHz = N + FRAC/768, so N = 49 across the whole
  band and FRAC is in 1/768 steps (50 kHz).

`sigma_delta_mod` is a first-order modulator. It adds FRAC to an
accumulator (mod 768) once per divider period, and its carry selects
divide-by-N+1 for the next period. Over 768 periods exactly FRAC of them
divide by N+1. It runs on the VCO clock and is stepped by the divider's
terminal count `tc`.

`nn1_divider` is a single down-counter. At terminal count it reloads with
N-1 or N. `div_out` is high for the first floor(ratio/2) cycles, which
gives one rising edge per period for the phase detector.

`channel` is treated as quasi-static in both clock domains.

## Top-level interface (freq_synth_digital)

| port | dir | width | meaning |
|------|-----|-------|---------|
| ref_clk | in | 1 | 19.2 MHz reference |
| vco_clk | in | 1 | VCO output |
| rst_n | in | 1 | power-up reset, asynchronous, active low; starts main tuning |
| channel | in | 7 | PHS channel number |
| caps | out | 10 | coarse capacitor word to the VCO |
| caux_sel | out | 4 | auxiliary capacitors to the VCO |
| coarse_lock | out | 1 | main tuning finished, `caps` frozen |
| ct_busy | out | 1 | main tuning in progress |
| div_out | out | 1 | divided VCO to the phase-frequency detector |
| n_int, frac | out | 7, 10 | current division ratio N and FRAC |
| ct_up, ct_down | out | 1, 1 | last coarse comparison (diagnostic) |

Parameters: `T_MIN` (60 reference cycles, the full-accuracy window) and
`N` (14, the counter width).

## Choices made in this implementation

These points are this implementation's own decisions:

* T_MIN = 60 reference cycles. This makes every weighted window a whole
  number of cycles.
* The channel numbering and the 50 kHz fractional resolution.
* Strobe widths and the idle cycle before COMP_CLK.
* Rounding in CH_REF_NUM.
* The tie rule: drop on a tie.
* Nearest-curve boundaries for CAUX_SEL.
* A first-order modulator and a single-counter divider.
* Main tuning always targets 1902 MHz. The channel setting drives only
  CAUX_SEL, N and FRAC.
* No settling time for the analog VCO after a capacitor switch: the
  single RST_CNT cycle is the only gap between one window and the next.

Not in RTL: reference doubler, PFD, charge pump, loop filter, bandwidth
control (`BW_EN[5:1]`), and the VCO itself. Lock time after a channel
switch is set by the analog loop and is not simulated. The digital side of
a switch is the CAUX_SEL update plus the new N/FRAC.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| tb_en_counter_gen | windows 6,6,6,6,10,15,30,60,60,60; strobe order; 259-cycle sum; 300 cycles start to done |
| tb_vco_accumulator | counts within ±1 of the window length, clear, hold, saturation |
| tb_digital_comparator | UP/DOWN against the operands, updates only on COMP_CLK |
| tb_ch_ref_num_gen | every channel and every bit against real-arithmetic rounding |
| tb_caps_decision | all targets 0 to 266 within one LSB; injected wrong early decisions absorbed by the redundancy |
| tb_aux_cap_select | all 117 channels and the seven curve centres |
| tb_sigma_delta_mod | exactly FRAC carries in 768 steps; bounded running error |
| tb_nn1_divider | period = N or N+1 and duty, with random ratios |
| tb_coarse_tuning_controller | 12 power-ups, VCO offsets ±30 MHz with up to ±3 % capacitor mismatch; lock in 302 cycles; error ≤ 1.05 MHz; CAUX_SEL per channel |
| tb_freq_synth_digital | end to end at default parameters (details below) |

`tb_freq_synth_digital` runs main tuning and then checks the window
lengths. It then switches channels across the band, starting with a jump
from 1884.65 to 1915.55 MHz. For each channel it does three things:

* it puts the behavioural VCO on frequency, standing in for the analog loop;
* it checks that the varactor offset this needs stays under 3.8 MHz;
* it checks that 768 divider periods contain exactly 768·N + FRAC VCO
  cycles.

It also requires that each of these happens at least once: UP and DOWN
decisions, all seven CAUX_SEL codes, and both divide ratios.

`tb/vco_model.sv` is the behavioural VCO. It models f as F_TOP minus 0.4 MHz
times the weighted, mismatched capacitor sum, minus the auxiliary steps,
plus a fine offset.

To run a testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_freq_synth_digital rtl/synth_pkg.sv tb/tb_freq_synth_digital.sv
./obj_dir/Vtb_freq_synth_digital
```

All files use `timescale 1ns/1fs`. The femtosecond precision keeps the
behavioural VCO's period accurate enough for cycle-exact frequency checks.
