# Asynchronous SAR logic for an 11-bit, 375 MS/s SAR ADC core

A successive-approximation ADC makes one comparison per bit and then moves its
capacitive DAC before the next one. If every step took a slot of a fast
external clock, each step would have to fit the slowest comparison at the
worst corner. This logic is **asynchronous** instead. There is no clock inside
a conversion. Each comparator decision starts the DAC switching and the
comparator reset at once, and a trimmable delay line (the *temporizer*) decides
when the next comparison may start. The only clock is the sampling clock `clk`.
It is high for 1/8 of the period (sampling) and low for the remaining 7/8
(conversion).

The core makes **13 comparisons** to give an 11-bit result. Because the DAC is
redundant, an early wrong decision can be corrected later. The logic controls
12 DAC bits (`ctrl_p/ctrl_n[12:1]`). The 13th decision only ends the conversion
and enters the result.

The logic is built around two loops. Each is kept as short as possible because
its delay is paid 13 times per conversion:

* the **DAC control loop**: comparator decision → DAC control latch → DAC
  switch;
* the **comparator reset loop**: comparator decision → comparator reset →
  temporizer → next comparison.

With the default behavioural timing, one step takes about 140 ps: 75 ps
decision plus logic, then a 67 ps temporizer at tap 3. A conversion takes about
1.83 ns, which fits the 2.33 ns conversion window at 375 MS/s.

## Block structure

```
                 clk (1 = sample)        reset_n
                        |                   |
                 +------v-------------------v-----+
                 |        reset_mode_control      |  Start, Startbar, RST_DAC
                 +-----+-----------+----------+---+
                       |           |          |
 cmp_p, cmp_n --+-> valid = NAND --+--> sar_shift_register (P<1:13>, step)
                |                  |          |
                |                  |    E<i> = XNOR(P<i-1>, P<i>)
                |                  |          |
                +------------------|--> 13 x dynamic_latch_en ---> ctrl_p/ctrl_n
                |                  |                                   |
                +--> comparator_reset_loop (node A, temporizer) --> rst_cmp(_n)
                |                  |                                   |
                |                  +--> comparator_noise_control -> bw |
                |                                                      |
                |        end_of_conversion_generator <-- CTRL<13> -----+
                |             (end pulse, EoC, dout)
                |        dac_equalization_control --> equ, equ_n
                +--> metastability_detector (optional) --> met
```

| module | role |
|---|---|
| `sar_logic` | top level: wiring, `valid = NAND(cmp_p, cmp_n)`, optional detector |
| `reset_mode_control` | `Start = CLKbar & reset_n`, `RST_DAC_n = Start & ~EoC` |
| `dac_control_loop` | shift register, enable generation, 13 latches |
| `sar_shift_register` | 13 low-edge flip-flops clocked by `valid`, set by `Start` low |
| `dynamic_latch_en` | one DAC control latch with enable, triggered by the comparator edge |
| `comparator_reset_loop` | ratioed node A, comparator reset outputs, temporizer |
| `delay_inverter` | behavioural temporizer: 5-tap buffer chain, TG mux, NOR with P.D. |
| `comparator_noise_control` | switches the comparator's inter-stage capacitors after a chosen step |
| `end_of_conversion_generator` | end pulse, EoC SR latch, 13-bit output register |
| `sr_latch` | NOR-style SR latch, reset dominant |
| `dac_equalization_control` | shorts the two DAC halves after the conversion |
| `metastability_detector` | optional timing-window detector (`USE_MET_DETECTOR`) |
| `sar_pkg` | shared constants: 13 steps, 4 noise capacitors, 5 delay taps |

## One conversion, step by step

1. **Sampling (`clk` = 1).** `Start` is low. The shift register is set
   (`P` = all ones), every DAC control latch is reset to `ctrl_p = ctrl_n = 1`,
   node A is held low so the comparator stays in reset, and the noise-control
   flip-flop is cleared so `bw = bw_ini`.
2. **`clk` falls.** `Start` rises and the pull-down on node A is released. The
   temporizer output `B_i` is already high from the long reset, so node A rises
   at once and the comparator starts decision 1. The enable `E<1>`, which is
   `XNOR(Startbar, P<1>)`, is already active.
3. **Decision i.** One comparator output falls, and several things happen in
   parallel:
   * The enabled latch `i` fires straight from the inverted comparator output.
     A positive decision (`cmp_n` falls) pulls `ctrl_p[i]` low, and a negative
     one pulls `ctrl_n[i]` low. The DAC starts switching. This is the whole
     DAC control path: one latch.
   * `NAND(cmp_p, cmp_n)` pulls node A low, which resets the comparator.
   * `valid` rises. When the comparator has reset and both outputs are high
     again, `valid` falls. That falling edge shifts a 0 into `P<i>`, which
     closes `E<i>` and opens `E<i+1>`. The next latch is therefore only enabled
     once the comparator is in reset, so it cannot catch the old decision.
   * `step[i]` (= `~P<i>`) rises, and the noise control may switch `bw`.
4. **Temporizer.** Node A fell, and one temporizer delay later `B_i` rises.
   Node A is pulled up again, and decision i+1 starts. The reset time is also
   the time the DAC gets to settle.
5. **End.** Decision 13 sets `ctrl_p[13]` or `ctrl_n[13]`.
   `end = XOR(ctrl_p[13], ctrl_n[13])` rises. This pulse does three things:
   * it pulls node A low directly, so no 14th comparison starts;
   * it clocks the output register (`dout[i] = ~ctrl_p[i]`, so 1 means a
     positive decision);
   * it sets the EoC latch.

   EoC drives `RST_DAC_n` low, which resets all latches and so ends the
   `end` pulse. After that, `equ` goes high and the two DAC halves are equalized
   until the next sampling phase.

If `clk` rises before step 5, the conversion is abandoned. The DAC is reset,
`dout` keeps the previous result and EoC never rises. Running the core too fast
therefore gives no new result rather than a wrong one.

## Timing of the asynchronous loops

This section matters most for anyone who changes the delays.

### The comparator reset loop and its constraint

Node A is a *ratioed* node, so its pull-down network always wins over the
pull-up:

```
pull-down = NAND(cmp_p, cmp_n) | ~NOR(Startbar, EoC) | end | met
pull-up   = B_i & NOR(Startbar, EoC)          (only if no pull-down is active)
otherwise node A keeps its charge
rst_cmp_n = A,  rst_cmp = ~A,  B_i = temporizer(A) = NOR(S, pd)
```

Node A falls as soon as the comparator has decided. `B_i` rises one temporizer
delay after that fall (`tap × τ_buf + τ_tg + τ_nor`). However, node A can only
rise again once **both** `B_i` is high **and** the comparator outputs are back
high (NAND low). The comparator reset time is therefore

```
t_reset = max(temporizer delay, comparator's own reset time)
```

and the temporizer sets the DAC settling time only while it is the slower of
the two. The same argument applies in the other direction. `B_i` must still be
low (from the previous rise of A) when the comparator has reset. Otherwise a
stale high `B_i` would restart the comparator immediately. That holds when

```
decision time (comparator + logic) + comparator reset time  >  temporizer delay
```

With the defaults this is 75 ps + 40 ps > 67 ps. A much faster comparator, or a
much longer tap, would break it. The loop would then run at the comparator's
own speed and the DAC would get less than the intended settling time. The
end-to-end tests check the exact conversion time of every conversion against
this formula, including tap 1, where the 40 ps comparator reset is longer than
the 31 ps temporizer.

### Temporizer taps

| tap (`delay_sel`) | delay (default model) | use |
|---|---|---|
| 1 | 31 ps | shorter than the 60 ps minimum DAC settling time; the test model flags it |
| 2 | 49 ps | slow process corner (SS), where slower gates stretch it to about 71 ps; at nominal speed it is below the 60 ps DAC settling time |
| 3 | 67 ps | nominal, and the FS / SF corners |
| 4 | 85 ps | fast process corner (FF), where faster gates shrink it to about 62 ps |
| 5 | 103 ps | longest trim; still inside the constraint above with the default model (115 ps > 103 ps), not exercised by the tests |

The per-stage delays (`TMR_TAU_BUF_PS = 18`, `TMR_TAU_TG_PS = 8`,
`TMR_TAU_NOR_PS = 5`) are chosen so that tap 3 gives the 67 ps comparator
reset time measured for the circuit at nominal conditions. The tap-to-corner
assignment is the one used to trim the real circuit.

`pd` (temporal power down) forces `B_i` low. Node A then cannot rise, and the
comparator stays in reset for as long as `pd` is high. No separate external
comparator reset is needed.

### The DAC control loop

The latches have no clock. Latch `i` fires on the first inverted comparator
output to rise while `E<i>` is low. After that it holds until `RST_DAC_n`. The
enables form a one-hot window:

* `E<1> = XNOR(Startbar, P<1>)` is active from the start of the conversion
  until the comparator is reset after decision 1;
* `E<i> = XNOR(P<i-1>, P<i>)` is active from the reset after decision i−1 until
  the reset after decision i.

The shift register advances on the **falling** edge of `valid`, which comes
after the comparator has reset. This ordering is what keeps the result of
decision i out of latch i+1. It costs nothing on the critical path, because the
latch is already enabled when its decision arrives.

### The end-of-conversion loop

`ctrl[13] → end → EoC → RST_DAC_n → ctrl[13]` is a deliberate loop. Its only
purpose is to turn `end` into a pulse as long as the loop delay. The same
pulse clocks `dout` and, through `AND(EoC, endbar)`, delays the DAC
equalization until the DAC reset has happened. `end` also pulls node A down
directly, because EoC arrives too late to prevent one extra comparison.

### What synthesis reports, and why it stands

Synthesis reports latches and logic loops, and they are the circuit:

* node A and the EoC SR latch are level-sensitive storage (`always_latch`);
* node A → temporizer → node A is the self-timed oscillator, which runs only
  inside a conversion;
* the end/EoC/DAC-reset loop described above;
* the shift register, the latches, the output register and the noise-control
  flip-flop are clocked by derived signals: `valid`, comparator outputs, and
  `end`.

`delay_inverter` is a behavioural model with `#` delays. In synthesis it
becomes a plain mux plus a NOR, and the delays are lost. A real implementation
needs a hand-built delay line there.

## Comparator noise control

The comparator has four equal capacitors between its preamplifier and its
latch. Connecting more of them slows the decision but lowers the noise
referred to the latch input. Early decisions are redundant and must be fast,
while late ones need low noise. `noise_sel` (one-hot, 13 bits) selects the step
after which the code changes from `bw_ini` to `bw_fin`:

* a 13-to-1 mux takes `{1, step<1>, …, step<11>, 0}`;
* a flip-flop samples it on every rising edge of `valid`, so the code changes
  at the start of the comparator reset and the capacitors have the whole
  reset time to settle;
* `noise_sel[1]` uses `bw_fin` from decision 2 on, and `noise_sel[13]` never
  switches.

`Start` low clears the flip-flop, so every conversion starts with `bw_ini`.
The logic imposes no rule on which capacitor codes are allowed.

## Metastability

If the comparator input is close to zero, both outputs sag slowly together.
Because `valid` is a NAND (not an XOR), a sag below the gate threshold still
looks like a decision:

* node A is pulled down;
* the shift register advances;
* the enabled latch takes whichever input crossed first (the model takes the
  positive decision).

The stored bit may be wrong, but the error is within the redundancy (1 LSB),
and the conversion always completes. This is the default configuration
(`USE_MET_DETECTOR = 0`, `met` tied low).

With `USE_MET_DETECTOR = 1`, a timing-window detector is added:

* A second delay inverter (`MET_TAU_BUF_PS = 29`, 100 ps at `tcmp_sel` tap 3)
  is started when the comparator is released.
* At the end of the window, a low-edge flip-flop samples
  `XNOR(cmp_p, cmp_n)`. If there is still no decision, `met` rises.
* `met` then pulls node A low, is ORed into the shift-register clock, and forces
  a negative decision through `NAND(~met, cmp_p)`.
* The comparator reset clears it.

The detector costs power and is therefore an option rather than part of the
default logic. A NOR-gate detector, which relies on a shifted switching
threshold, cannot be expressed in RTL and is not provided.

## Interface of `sar_logic`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sampling clock: 1 = sample, 0 = convert (conversion gets 7/8 of the period) |
| `reset_n` | in | 1 | external reset, active low; aborts and holds everything in reset |
| `cmp_p`, `cmp_n` | in | 1 | comparator outputs, both high while reset, one falls on a decision |
| `pd` | in | 1 | temporal power down: keeps the comparator in reset |
| `delay_sel` | in | 5 | temporizer tap, one-hot |
| `tcmp_sel` | in | 5 | metastability window tap, one-hot (unused if the detector is off) |
| `noise_sel` | in | 13 | step after which `bw` switches, one-hot |
| `bw_ini`, `bw_fin` | in | 4 | capacitor codes before/after that step |
| `rst_cmp`, `rst_cmp_n` | out | 1 | comparator latch reset (active high) and preamp reset (active low) |
| `ctrl_p`, `ctrl_n` | out | 13 | DAC controls, 1 while undecided; bit 13 only feeds the EoC logic |
| `bw` | out | 4 | comparator capacitor switches |
| `step` | out | 13 | `step[i]` = 1 once comparison i is done (debug, noise control) |
| `dout` | out | 13 | raw redundant result of the last completed conversion, 1 = positive |
| `eoc` | out | 1 | conversion finished, until the next sampling phase |
| `equ`, `equ_n` | out | 1 | DAC equalization switch |
| `met` | out | 1 | metastability flag (constant 0 without the detector) |

All parameters default to the values used by the circuit: `N_STEPS = 13`,
`N_BW = 4`, `N_DELAY = 5`, with the temporizer and window delays listed above.
The delays only affect simulation.

## Simulating

Everything runs with plain Verilator 5 in timing mode. Each testbench prints
`TB_RESULT checks=… failures=…`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sar_pkg.sv \
    tb/tb_sar_logic.sv --top-module tb_sar_logic -Mdir obj && ./obj/Vtb_sar_logic
```

Replace `tb_sar_logic` with any other `tb/tb_<module>.sv`. All files use
`` `timescale 1ps/1ps ``.

* **Block tests.** Each block has `tb/tb_<module>.sv`, which drives the block
  and checks it against values computed in the testbench.
* **`tb_sar_logic`.** This runs the full logic at its default parameters
  against `tb/sar_adc_model.sv`, a behavioural sampler, redundant DAC and
  comparator, and checks the following:
  * every conversion against a reference successive approximation: raw bits,
    decoded value, and the exact conversion time;
  * the `bw` code seen by every decision;
  * the DAC reset and equalization after EoC.

  It counts these mechanisms and requires each to occur:
  * complete conversions;
  * noise-code switches;
  * metastable decisions;
  * `pd`;
  * an external reset during a conversion;
  * too fast a clock (no result);
  * a slow clock;
  * taps below the DAC settling time.
* **`tb_sar_logic_met`.** Same test, with the metastability detector fitted.
* **`tb_sar_workloads`.** A 50 mV input at 250, 312.5 and 375 MS/s with tap 3,
  then at 375 MS/s with taps 2 and 4. It then shortens the period to find the
  fastest rate of this model, about 2.12 ns (≈ 470 MS/s).
* **`tb_sar_corners`.** Four copies of the logic, one per process corner, each
  with its corner's tap (FF 4, SS 2, FS and SF 3). Temporizer stage delays and
  logic delay are scaled so that each corner's comparator reset (62 / 71 / 68 /
  66 ps) and logic delay match the figures measured for the circuit. It checks
  codes, exact conversion times and the 60 ps DAC settling minimum at
  375 MS/s, then reports each corner's fastest rate: about 508 / 461 / 483 /
  495 MS/s in this model.

The analog model has these defaults:
* 40 ps comparator decision plus 35 ps of lumped logic delay;
* 4 ps per connected noise capacitor;
* 40 ps comparator reset;
* 60 ps minimum DAC settling;
* a 250 ps metastable decision for inputs within 0.02 LSB.

The DAC weights are 512 280 152 84 46 25 14 8 4 2 1 1 (sum 1129). These are a
redundant set chosen for the test; the logic does not depend on them.

Two simulation details:

* Verilator has no X state and starts flops at random values. An asynchronous
  set or reset acts only on an edge. The top-level tests therefore run one
  throw-away sampling/conversion period after power-up.
* The metastability detector gates its output with a 1 ps delayed copy of the
  comparator reset. A random power-up 1 then cannot hold node A low forever.

## How far this can be trusted, and differences from the original circuit

* **Logic function.** The gate-level function follows the original transistor
  circuit, block by block. Dynamic and ratioed nodes are modelled as flip-flops
  with derived clocks and as `always_latch` storage, with the intended
  priorities (pull-down wins; DAC reset wins).
* **Timing.** All timing comes from behavioural delays: the temporizer stages
  in `delay_inverter` and the analog model. Gate delays inside the logic are
  zero, and the logic delay is lumped into the comparator model. Absolute
  speeds (the 472 MS/s limit) are those of the model, not silicon. The real
  circuit was reported to reach 375 MS/s at every corner except SS, where it
  reaches 346 MS/s. Corners are represented only by scaled delays
  (`tb_sar_corners`), which cannot reproduce that SS limit.
* **Output coding.** `dout` is the raw 13-bit redundant code. Converting it to
  11 bits needs the DAC weights and is left outside this logic.
* **DAC control gating.** The external gating of the DAC controls (AND gates on
  `ctrl`) and the separate external comparator reset are not present, matching
  the final version of the logic.
* **Metastability.** The detector polarity (a metastable step gives a negative
  decision) follows the NAND-on-`cmp_p` hook-up. The detector is off by default.
* **Not included.** The comparator, the capacitive DAC, the sampler, the clock
  generation and output multiplexing of the 8-channel time-interleaved
  converter, and the NOR-gate metastability detector are analog or
  threshold-based circuits. The analog parts appear only as the behavioural
  test model.
