# Quadrature error corrector for HBM3 data strobes

An HBM3 interface carries its data strobe (DQS) as four phases, I, Q, IB and QB. Each phase
should sit a quarter clock period after the one before it. Wiring and buffer mismatch skew
these phases. This corrector pulls them back onto the quarter-period grid. It works in both
seamless mode, where the strobes toggle all the time, and burst mode, where they toggle only
during a data burst. Because burst-mode strobes are not periodic, the corrector cannot
measure the strobes against themselves. Instead it uses a clock of the same frequency as its
time reference.

The central idea is a capacitor ratio of 4:1:

- **CLK mode.** A current `I` from a current DAC (IDAC) charges four equal capacitors (4C)
  for one full clock period `T`. The IDAC code is adjusted until the capacitor voltage lands
  exactly on a comparator threshold. The IDAC code now stores the period.
- **DQS mode.** The same current charges a single capacitor (C) for as long as the gap
  between two neighbouring strobe edges, for example from I rising to Q rising. With a
  quarter of the capacitance, the voltage reaches the same threshold exactly when the gap is
  `T/4`. The comparator bit therefore says whether the gap is too long or too short.
  The corrector shifts the later strobe of the pair until that bit toggles evenly.

The strobes' duty cycle plays no part, and there is no need for periodic strobes. The clock
only sets the length of a quarter period.

## Block map

```
                       +------------------ main path -------------------+
 dqs_in[0] (I)  ------>| fixed_delay_line (116.8 ps) ---------------------> dqs_out[0]
 dqs_in[1] (Q)  ------>| dcdl  (code dcdl_q)   --------------------------> dqs_out[1]
 dqs_in[2] (IB) ------>| dcdl  (code dcdl_ib)  --------------------------> dqs_out[2]
 dqs_in[3] (QB) ------>| dcdl  (code dcdl_qb)  --------------------------> dqs_out[3]
                       +-------------------------------------------------+
                                      | corrected strobes
   clk ---> pulse_generator <---------+
              | pulse (clk_pulse or dqs_pulse), sel_sync
              v
          pulse_width_detector (IDAC + 4 x C + comparator + switch logic) --> d
              |                                                               |
          div8_counter (clk_lf = pulse/8, dout = count of d per window) <-----+
              |
          digital_loop_filter --> dac_ctrl (to IDAC), dcdl_q/ib/qb, sel, sel_dqs
```

`qec` is the corrector on its own. `qec_testchip` is the top. It adds the prototype's test
circuits: a `dqs_generator` that creates skewed quadrature strobes, and a `test_mux` that
routes one signal to a single measurement pin.

The feedback loop is clocked only by the measurement pulses it creates. When the strobes
stop between bursts, every loop register simply holds its value.

## Pulse-width detector (`pulse_width_detector`, `idac`, `idac_decoder`, `pwd_switch_logic`)

This is the analog core, so it is written as a behavioural model. Its ports are the real
block's: pulse, mode, IDAC code, enable, and the decision `d`.

- `idac_decoder` turns the 5-bit code `n` into the thermometer code that drives the IDAC's
  32 unit cells. It is synthesizable.
- `idac` models the current as `I = 36 µA + 2.2 µA·(n+1)`. That spans 38.2–106.4 µA.
- `pwd_switch_logic` makes the switch controls from the pulse:
  - `sw` is low while the pulse is high, which charges the capacitors.
  - `sw_clk` and `sw_dqs` are the per-mode switches.
  - `dclk` is `sw` delayed by a buffer (30 ps). On its rising edge the comparator's
    flip-flop stores the answer.
  - `rst0` is `dclk` delayed again. `rst = sw & rst0` discharges the capacitors after the
    answer is stored. This is the REST phase. In the real circuit the current is steered
    into a dummy path so node A keeps its voltage.
- `pulse_width_detector` integrates `V = I·t/C_total` over the time `sw` was low.
  - `C_total` is 4·24 fF in CLK mode and 24 fF in DQS mode.
  - It compares `V` against 0.55 V at the rising `dclk` edge: `d = 1` means the pulse was
    longer than the target.
  - 0.55 V is the voltage that the ideal 84.48 µA current gives on 96 fF in 625 ps (1.6 GHz).
  - The model has no charge sharing, channel-length modulation or capacitor mismatch. The
    real circuit is sized against exactly those effects: four switches are on in both modes,
    and the current is steered during REST. A parameter `VOS_V` can add a comparator offset.

The IDAC range sets the frequency range. Hitting 0.55 V on 96 fF needs 52.8 µA at 1.0 GHz
and 105.6 µA at 2.0 GHz. Both lie inside the modelled range.

## Pulse generator (`pulse_generator` = `clk_pulse_gen` + `dqs_pulse_gen` + `glitch_free_mux`)

- `clk_pulse_gen` divides the clock by two. The result, `clk_pulse`, is high for exactly one
  clock period `T`.
- `dqs_pulse_gen` selects a pair of neighbouring strobes with `sel_dqs`:
  - 0 selects I→Q, 1 selects Q→IB, and 2 selects IB→QB.
  - It outputs `early & ~late`. This pulse starts at the earlier strobe's rising edge and
    ends at the later one's, so its width is the phase gap.
- `glitch_free_mux` chooses between the two pulse sources when `sel` changes mode.
  - A plain mux could cut a pulse short, and the detector would take that as a real
    measurement. Each source therefore has its own enable flip-flop, clocked on that
    source's falling edge.
  - The new source is enabled only after the old one has been disabled. Every pulse that
    reaches the detector is therefore whole.
  - `sel_sync`, the enable of the DQS source, tells the detector which capacitor set to use
    for the current pulse.
  - The two enables are never on together. The testbench checks this.

## DIV8 and 3-bit counter (`div8_counter`)

The loop filter does not need to run at the strobe rate. `div8_counter` divides the
measurement pulse by eight to make `clk_lf`.

- During a window of eight pulses, a 3-bit counter clocked by `d & pulse` counts the
  detector's 1-decisions.
- `rst_d` comes from the divider and clears that counter once per window.
- `dout[2:0]` is the counter copied on every falling pulse edge. It is therefore stable at
  the rising `clk_lf` edge, where the loop filter reads it.

A 3-bit count can only hold 0–7. In this implementation the decision that coincides with
`rst_d` is dropped, so a window carries **seven** counted decisions.

## Digital loop filter (`digital_loop_filter`)

The filter is a small state machine clocked by `clk_lf`. Each step uses one window count,
`dout` (the number of 1-decisions out of 7):

| stage | mode | action per window | exit |
|---|---|---|---|
| `ST_SAR` | CLK | 5-bit SAR on the IDAC code, MSB first. A trial bit is kept if most decisions were 0 (voltage too low means more current is needed). | after 5 bits |
| `ST_DAC_MV` | CLK | majority vote: +1 if `7-dout ≥ 5`, −1 if `dout ≥ 5`, else hold | after 4 votes |
| `ST_Q_MV` | DQS, pair I→Q | vote on `dcdl_q`. Many 1s mean the gap is too long, so Q is late and its delay is reduced. | after 4 votes |
| `ST_IB_MV` | DQS, pair Q→IB | same on `dcdl_ib` | after 4 votes |
| `ST_QB_MV` | DQS, pair IB→QB | same on `dcdl_qb` | after 4 votes |

The Q/IB/QB sequence runs twice (`dcdl_update_num_cnt`), and then the flow goes back to
`ST_DAC_MV`. It does not go back to the SAR. The IDAC is therefore re-tracked between DCDL
rounds, and the loop follows slow drift.

Some points need care:

- **Discarded windows.** Whenever `sel` or `sel_dqs` changes, the next window may mix pulses
  of the old and new kind, so it is skipped. The same applies after reset and after `cal_on`
  was low.
- **IDAC first.** DQS-mode decisions are only meaningful once the IDAC is right. That is why
  the SAR runs first. It needs 5 windows instead of up to 32 single steps.
- **Saturation.** Codes stop at the ends of their ranges.
- **Reset values.** IDAC = 16 (the first SAR trial) and DCDL = 128, which is mid-range.
- **`cal_on` low.** Every register holds, so the DCDL codes are frozen. The pulse generator
  and the IDAC are disabled, and only the main path runs. When `cal_on` rises again, the flow
  resumes where it stopped.

## Delay lines (`dcdl`, `dcdl_decoder`, `fixed_delay_line`)

Each 8-bit DCDL is a coarse NAND-chain line with a 16:1 tap mux, plus a fine MOS-capacitor
load.

- `dcdl_decoder` is synthesizable. It turns `code[7:4]` into the 15-bit coarse thermometer
  and the 16-bit one-hot tap select. It turns `code[3:0]` into the 15-bit fine thermometer.
- `dcdl` is a behavioural model built on the decoder's outputs:
  `delay = 40 + 9.6·taps + 0.65·fine_caps` ps. The full range is 153.75 ps, and each step is
  below one coarse tap. The 16 fine steps (9.75 ps) overlap a coarse step (9.6 ps), so the
  range has no holes.
- `fixed_delay_line` delays I by 116.8 ps. This equals a DCDL at code 128, so each corrected
  strobe can move −76.8 to +76.95 ps relative to I.
- Both delay models are transport delays. Every input edge is queued and replayed, so short
  pulses pass unchanged.

## Test circuits (`dqs_generator`, `test_mux`, `qec_testchip`)

- `dqs_generator` shifts `data` through four flip-flops on `clk_4x`. With the pattern
  `1100` repeating, the four outputs are quadrature strobes a quarter period apart. Each
  output then passes through its own DCDL (`skew_code[k]`) to add a chosen skew.
- `test_mux` first picks, per lane k, one of `dqs_in[k]`, `dqs_out[k]` or `clk`
  (`sel_mux1[3k..3k+2]`, one-hot). It then picks one of the four lanes (`sel_mux2[0..3]`).
  Routing `clk` through each lane measures the lane mismatch.
- `qec_testchip` wires generator → corrector → test MUX. On the prototype, the skew codes,
  `cal_on` and the mux selects come from a serial control block and pads. Here they are
  plain top-level ports.

## Simulating

Every file uses `timescale 1ps/1fs`. The shared package is `rtl/qec_pkg.sv`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/qec_pkg.sv tb/tb_qec_testchip.sv --top-module tb_qec_testchip
./obj_dir/Vtb_qec_testchip +verilator+rand+reset+2
```

Modules are found through `-Irtl`. Any block testbench `tb/tb_<module>.sv` runs the same way.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The random reset
option checks that nothing depends on power-up values.

| testbench | what it shows |
|---|---|
| `tb_qec_testchip` | The whole chip at default parameters. Seamless calibration, then `cal_on` low (codes frozen, no pulses), then resume, then burst mode with a new skew, then test-MUX routing. It counts every mechanism: SAR steps, IDAC votes, Q/IB/QB updates, mode switches both ways, second DCDL rounds, glitch-free handovers, calibration off/on and burst pulses. Each must occur at least once. |
| `tb_qec` | The corrector against an ideal strobe source. It checks that every gap ends within 8.69 ps of T/4. Runs: a 1.6 GHz sweep of one strobe from −75 to +75 ps in 25 ps steps (seamless and burst); ±75 ps at 1.0, 1.2, 1.4, 1.6, 1.8 and 2.0 GHz; a mixed skew at 1.0 and 2.0 GHz; and the skew +41.87 / −20.62 / −40.63 ps between neighbours at 1.6 GHz in both modes. |
| `tb_<block>` | Each block against values computed in the testbench. |

Typical results in this model:

- At 1.2 GHz and above, the residual error is about 0.4–3.8 ps. This is set by the fine
  DCDL step and by the ±1 dither of the majority vote.
- At 1.0 GHz, a larger current step per IDAC code leaves about 7 ps.

## How far the model can be trusted

Synthesizable logic:

- the loop filter
- the DIV8 and counter
- the pulse generator with its glitch-free mux
- the IDAC and DCDL decoders
- the DQS generator's shift register
- the test MUX

Behavioural models, with delays in `real` picoseconds:

- the current DAC
- the capacitor and comparator detector and its switch buffers
- the delay lines

The loop's behaviour is exact with respect to those models. The analog limits of the real
circuit are not modelled. The most important ones:

- **Narrow pulses at high frequency.** At 2 GHz a large skew leaves a very narrow
  `dqs_pulse`. In silicon this can disturb or erase the loop-filter clock, which shrinks the
  correctable skew as frequency rises. In this model `clk_lf` survives any pulse width. The
  reachable skew is therefore set only by the DCDL range (about ±77 ps) at every frequency.
- **Comparator and capacitor errors.** Offset and mismatch of the comparator and capacitors
  appear only through `VOS_V`.
- **Delay-line linearity.** The DCDL model is perfectly linear, with no DNL.

Choices made here where the original circuit description gives no detail:

- the analog constants: IDAC offset and step, the 0.55 V threshold, DCDL intrinsic delay
  and steps, switch buffer delays
- the seven-decision window
- the vote and SAR polarity
- the discarded window after a change of mode or pair
- the reset values
- the saturating codes
- the active-low asynchronous reset `rst_n` on all flip-flops
- the one-hot select encoding of the test MUX

Each file's opening comment lists which parts follow the original design and which are
choices made here.

Not included:

- the serial control interface and the pads that set the control registers on the
  prototype
- power: the split between the loop filter and the analog and delay blocks is not modelled
