# Wide-band fractional-N PLL: digital core

A PLL that must cover every cellular band from about 1.1 GHz to 2.7 GHz needs a VCO whose tuning range is far wider than one analog tuning curve can provide without a huge VCO gain. This design uses the usual remedy: a switched-capacitor LC VCO with 32 overlapping sub-bands, chosen by a 5-bit code. The PLL locks in two steps:

1. **Coarse tuning (band search).** The analog tuning voltage is parked at its minimum, V_min. A digital loop then measures the VCO frequency against the reference and steps the band code up until the sub-band holding the target frequency is found.
2. **Fine tuning.** The band code is frozen and the ordinary charge-pump loop closes. A fractional-N divider holds the output at N_desired × f_ref. Its dual-modulus ratio is dithered by a third-order MASH sigma-delta modulator.

This repository holds the digital half of that system:

- the high-speed divide-by-8;
- the phase-select prescaler;
- the programmable A/B divider;
- the MASH 1-1-1 modulator;
- the band-search loop;
- the switch control that moves the PLL from one loop to the other.

The VCO, phase-frequency detector, charge pump, loop filter, V_min switch and crystal oscillator are analog. They appear only as ports of `wbpll_top`.

## Frequency plan and the division ratio

The reference is 40 MHz, and `n_desired` is the wanted VCO frequency in units of f_ref. It is 26 bits wide, unsigned, with 7 integer and 19 fractional bits. Every division ratio below is counted in VCO periods.

The divider chain has three parts:

- **Divide-by-8 (`hf_div8`).** Three cascaded divide-by-2 stages. The first stage runs at the full VCO rate. The last stage supplies four phases of f_vco/8, spaced 90°, which is a quarter of its period or 2 VCO periods.
- **Prescaler (`prescaler_1_125`).** Its output period is 8 VCO periods in mode 0. In mode 1 it swallows a quarter period, giving 10 VCO periods, i.e. a ratio of 1.25 relative to f_vco/8.
- **A/B accumulator (`pd_accumulator`).** Each divider output period lasts B prescaler periods. In A of them the prescaler is in mode 1.

So one output period is

    N_div = 8(B - A) + 10 A = 2 (A + 4B)        VCO periods.

With A in 0..3 and B in 3..8, `A + 4B` covers every integer from 12 to 35 without a gap. N_div therefore covers 24..70 in steps of 2. The output range 1.3–2.7 GHz at 40 MHz needs roughly 32..68.

The fractional part uses N_desired/2. The same 26 bits are read as 6 integer bits N_I and 20 fractional bits F. The modulator turns F into a signed integer sequence N_offset whose average is F / 2^20. Then:

- N_d = N_I + N_offset (6 bits);
- A = N_d[1:0] and B = N_d[5:2].

Thus A + 4B = N_d, and the average division is 2 (N_I + F/2^20) = N_desired.

Twenty fractional bits give a step of 2 × 40 MHz / 2^20 ≈ 76 Hz. That is well inside a 25 kHz channel grid and a 0.1 ppm settling error.

**Usable input range:**

- N_offset spans −3..+4, and N_d must not drop below 12, where A could exceed B.
- A fractional N_desired therefore needs N_I of at least 15, i.e. N_desired of at least 30.
- At the top end, N_d may rise above 35 while the modulator dithers. The 4-bit B accepts up to 15, so N_desired up to 70 is fine.
- Integer values work from 24 to 70.
- An assertion in the accumulator flags a B of 0 or an A > B.

## Divide-by-8 and its quadrature phases

`dff_div2` is a master-slave flip-flop built from two `d_latch` instances, with the inverted output fed back. The master is transparent while the clock is high and the slave while it is low. The master output therefore leads the slave output by half an input period, which is 90° of the divided output. In the differential current-mode logic this circuit stands for, both polarities of every signal are free. The four phases of the last stage are thus {slave, master} and their complements:

- `ph[0] = m`
- `ph[1] = q`
- `ph[2] = ~m`
- `ph[3] = ~q`

`ph[k]` lags `ph[0]` by k × 90°. The first stage's output (`div2`, f_vco/2) is also brought out for the band search.

Each latch loop is a real combinational loop through level-sensitive storage. Verilator reports it as `UNOPTFLAT`, and that is expected.

## The spike-free 1 / 1.25 prescaler

Selecting a later phase of the same clock removes a quarter period from the output. With a single 4:1 multiplexer clocked by its own output, the switch can happen while both the old and new phases are high or low at awkward moments. That produces a glitch, which is a disaster for the counter behind it. This design uses two multiplexers side by side and ORs their outputs:

- The **early** select (`phase_select_ctrl.sel_early`) advances by one phase at the output's rising edge when `mode` is 1.
- The **late** select copies the early one at the output's falling edge.

At the moment the early multiplexer switches, the late one is still on the old phase and its output is high. The OR therefore stays high and hides the transition. By the time the late multiplexer switches, the early one has already moved to the new phase.

Both selects must start on the same phase, so both reset to phase 0. The testbench checks two things: the output period is exactly 8 or 10 VCO periods, and no high or low pulse is shorter than 2 VCO periods.

## The A/B accumulator

`pd_accumulator` is a down-counter clocked by the prescaler output. It works like this:

- On reload it loads B − 1 and samples A and B, so both stay fixed for the whole output period.
- It counts down to 0 and then reloads.
- The prescaler mode is `A > count`. It is computed from the *next* count, so it is ready before the prescaler edge that uses it. The last A cycles of every period are therefore the long ones.
- `fout` is high for the first prescaler cycle of each period. It is the PLL's feedback clock.

## MASH 1-1-1 modulator

Three first-order stages (`sd_stage1`) are cascaded. Each is a 20-bit accumulator whose carry is the one-bit quantizer output and whose remainder feeds the next stage. The outputs are combined with delays and differences so that the quantization errors of the first two stages cancel exactly:

    N_offset = q1 z^-2 + q2 z^-1 (1 - z^-1) + q3 (1 - z^-1)^2
             = z^-3 F + (1 - z^-1)^3 E3

The result lies in −3..+4. It is carried as a 4-bit signed word.

The modulator is written the way a plain-CMOS version is drawn:

- The adders are chains of `mirror_full_adder` cells. These produce inverted sum and carry outputs.
- The accumulator registers are `tspc_dff` cells with an inverted output.
- The two inversions cancel: each register samples the inverted sum and returns its true value.
- The TSPC flip-flop has no reset, so a synchronous clear gates the data inputs.

The delay registers that do the noise shaping are ordinary flip-flops.

The modulator is clocked by the divider output `fout`. In lock this runs at the reference rate, and a new A/B pair is produced exactly once per divider period. `frac_n_divider` generates the modulator clear with a two-flop synchroniser on that clock.

## Band search

`band_search` contains a D latch, a counter, a comparator and a small FSM, all timed by the reference:

- **Counter.** The f_vco/2 signal passes through the latch, which is transparent while the reference is high. `bs_counter` counts its rising edges during that half period and is cleared while the reference is low. The count is about f_vco / (4 f_ref), i.e. N/4.
- **Comparator.** `bs_comparator` shifts the count left by 2 and compares it with the integer part of `n_desired`. The result is `too_low`.
- **FSM.** `bs_fsm` acts on the reference's falling edge, when the count is complete:
  - **start** (`BS_FIRST`): band 0. If band 0 is already fast enough, the target lies below the VCO range, and the search ends there. Otherwise it moves to band 1.
  - **step** (`BS_STEP`): while still too low, step to the next band. Once the band is fast enough, go back one band, because the target lies inside the previous band's range, above its V_min frequency. If the top band is still too low, stay at the top.
  - **lock** (`BS_LOCK`): band frozen. S1 releases the tuning node, S3 opens and S2 closes the normal loop.
- **Restart.** A change of the integer part of `n_desired` drives `hold` low for one reference cycle and restarts the search. So does reset.

A search takes at most 33 reference periods (0.83 µs).

The count has a step of 4 in N. The window edges make it up to one count low, or about 1.4 counts high. The high case comes from the latch opening while f_vco/2 is already high, which counts as one more pulse. The decision can therefore be off by about −4..+6 in N. This is enough to pick a band because neighbouring bands overlap, and the fine loop takes over from there. The testbenches check that the chosen band b satisfies:

- the frequency at V_min in band b is below the target plus a margin;
- the frequency in band b+1 is above it minus a margin.

## Loop switches and the top level

`wbpll_top` wires the blocks together:

- The divide-by-8 phases reach the fractional-N divider through S2.
- `div2` reaches the band search through S3.
- S1, S2, S3, the band code and `fdiv` are outputs that drive the analog parts.
- The switches are AND gates on the digital paths.
- While S2 is open, the fractional-N divider is held in reset, so it and its modulator start from a known state when the normal loop closes.

Parameters shared by the modules live in `wbpll_pkg`. These are the widths of F, N_I, A, B, N_offset and the band code, and the FSM state type.

## Departures from the original description and choices made here

- **Accumulator.** It counts down from B − 1, and the A long cycles are the last ones in each period. An up-counting variant with the long cycles first is also described. Both give A + 4B.
- **Modulator output width.** It is 4 signed bits rather than 3, because +4 occurs.
- **Modulator clock.** The modulator runs on the divider output, not directly on the reference. The two are the same frequency in lock.
- **Band search counting.** The count uses f_vco/2 rather than the divide-by-8 output. The ×4 scaling in the comparator is a choice of this design.
- **Band-search decision rule.** The rule is as given above. The original wording could be read as stopping at the first comparison. The rule implemented here is the one that steps through the bands.
- **Hold detection.** Hold watches only the integer part of `n_desired`.
- **Resets, select encoding and switch polarity.** These are choices of this design:
  - reset is active low, and asynchronous in the dividers and the modulator path;
  - the band-search FSM and its modulus register take the reset synchronously, at the falling reference edge, as a locking procedure that starts from a synchronous reset;
  - the multiplexer select is binary;
  - a switch is closed when its signal is 1.
- **Phase derivation.** The quadrature phases come from the master and slave latches of the last stage.
- **Not included.** The current-mode-logic level-shifting buffer in front of the divider is left out because its logic function is the identity. No maximum clock frequency is claimed: the 3 GHz capability of the original divider is a circuit property, not an RTL one.

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb/vco_model.sv` is a behavioural VCO with 32 bands and a linear frequency step, used by the band-search and top-level tests.

Example:

    verilator --binary --timing --assert -Irtl -Itb rtl/wbpll_pkg.sv tb/tb_wbpll_top.sv --top-module tb_wbpll_top
    ./obj_dir/Vtb_wbpll_top

`tb_wbpll_top` runs the top at its default parameters through several operations. It reports how often each mechanism happened:

- band steps up, step-backs, below-range and top-band endings, restarts;
- prescaler cycles in each mode;
- negative and positive modulator offsets.

It also checks the chosen bands and the average division against `n_desired`.

`tb_wbpll_channels` runs the top at its default parameters on a 25 kHz channel grid. It uses six fixed frequencies and six random frequencies between 1.3 and 2.7 GHz. For each one it checks that the mean division over 32768 reference periods is within 5·10⁻⁴ of the requested ratio, and it prints the residual frequency error. That error is a few kHz, and it comes from the finite averaging window.

The latch-based divider needs a falling edge on `rst_n` to initialise, so the testbenches raise it at time 0 and drop it shortly after. They hold it low across a falling reference edge so that the synchronous band-search reset also takes effect.

## How far to trust it

- The divider chain and the modulator are checked cycle by cycle against independent reference models:
  - period by period for the divider;
  - closed-form output for the modulator;
  - the long-run average equals the input fraction.
- The band search is checked against a simple linear VCO model only. Real band overlap and VCO gain spread are not modelled.
- The latch-level divider is a functional model of a current-mode-logic circuit, and it synthesises to latches.
- Timing at GHz rates cannot be judged from this RTL.
