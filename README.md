# Run-time delay calibration for a SAR-CD time-to-digital converter

A time-based ADC turns a voltage into a pulse width, then digitizes that
width with a time-to-digital converter (TDC). The TDC here uses successive
approximation with continuous disassembly (SAR-CD). A chain of N stages
resolves one bit each, and each stage compares the incoming pulse with a
locally generated reference pulse of weight 2^k LSB. The reference widths and
the timing between the two pulses come from analog delays: current-starved
inverters loading small capacitors. Process, supply and temperature move
these delays, and the converter's linearity collapses with them.

This design adds a digital calibration loop that re-tunes those delays while
the converter is in the system. It uses nothing but the converter's own input
and output. A multiplexer in front of the voltage-to-time converter (VTC)
lets the calibration logic apply known input levels. The calibration logic
reads the normal output word and sets an 8-bit control word for every delay:

- one word per stage for the reference-pulse generator;
- one word shared by all stages for the synchronization delay.

Small DACs turn these words into control voltages between 0.65 V and 1.2 V.

The calibration controller (`calib_ctrl`), the bit-correction logic
(`sarcd_correct`) and the input multiplexer (`in_mux`) are synthesizable RTL.
Everything analog is a timed behavioural model, accurate to the picosecond.
This covers the VTC, the control DACs, the delay cells, the pulse generators
and the TDC stages. With those models the whole loop can be simulated end to
end in plain Verilator.

## How a SAR-CD stage works

Stage k, from k = N-1 (MSB) down to 0, gets a residue pulse of width r. Its
rising edge triggers a pulse generator. After a fixed gate delay, the
generator emits a reference pulse `vr` of nominal width 2^k LSB. A copy of the
input, delayed by the synchronization delay so that it starts together with
`vr`, is XORed with `vr`. The XOR output lasts |r - 2^k LSB| and becomes the
residue for the next stage. A flip-flop on the falling edge of `vr` samples
the delayed input. It records `u[k] = 1` when the input is still high, that
is when r is longer than the reference.

Because each stage passes on an absolute difference rather than a signed
remainder, the raw decisions `u` are not yet a binary code. They are
corrected MSB first:

    b[N-1] = u[N-1]
    b[k]   = u[k] XNOR b[k+1]

This is `sarcd_correct`, which is purely combinational.

Two things make a stage wrong:

- **A reference width that is off.** This moves every code boundary below
  that stage.
- **A synchronization delay that does not match the pulse-generator delay.**
  The two XOR inputs then start at different times. The XOR emits a spurious
  sliver at the leading edge, and the residue is wrong. If the sliver is wide
  enough to trigger the next pulse generator, the rest of the chain converts
  garbage.

## The calibration connection (`tdc_calib_top`)

```
 vin_ext ─┐
          ├─ in_mux ─ vtc_model ─ sarcd_tdc_model ─ out register ─┬─ out
 vsig_cal ┘    ▲                       ▲     ▲                     │
               │ cal_sel          vc[k]│     │vc_synch             │
               │                  (DACs: vc_dac_model)             │
               └──────────────── calib_ctrl ◄──────────────────────┘
```

`clk` is the sampling clock: 34 ns in the reference configuration, which is
29.4 MHz. On each rising edge the VTC takes the selected (N+1)-bit input
level. The code 2·x+1 is the middle of output code x. The VTC emits:

- a 20 ps clear pulse for the stage flip-flops;
- then, 200 ps after the edge, a pulse of width `code · 31.5 ns / 2^(N+1)`.

The conversion has settled well before the next edge, where it is registered
into `out`. A sample taken at edge n therefore appears on `out` after edge
n+1.

Top-level ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sampling clock |
| `rst_n` | in | 1 | asynchronous active-low reset of the digital logic |
| `cal_start` | in | 1 | one-cycle pulse, starts a calibration |
| `vin_ext` | in | N+1 | external input level, 0 = 0.4 V, 2^(N+1) = 0.6 V |
| `out` | out | N | registered output word |
| `cal_busy` | out | 1 | calibration running; external input ignored |
| `cal_done` | out | 1 | high from the end of a calibration to the next start |
| `vc_code` | out | N×8 | per-stage pulse-generator control words |
| `vc_synch_code` | out | 8 | shared synchronization control word |

## The calibration sequence

This is the core of the design. The controller is a small state machine:
`CAL_IDLE → CAL_PG → CAL_SYNC → CAL_PG → CAL_DONE`. Each of its trials
changes one control bit or the input level, waits `CONV_CYCLES` = 2 clock
cycles, then reads `out`. One of those cycles is the conversion itself and
the other is the output register.

### Reference widths (CAL_PG)

The stages are tuned MSB first, each by an 8-step binary search over its
control word:

1. Start the word at mid-scale with the trial bit at bit 7.
2. Set the trial bit and run a conversion.
3. If the stage's own output bit `out[k]` is 1, the reference was shorter
   than the residue. The control voltage is then too high, so clear the bit
   again.
4. Move on to the next lower bit.

A higher control voltage gives more current and so a shorter pulse.

What the stage sees comes from the input level the controller applies. For
stage k that level is

    x_k = 2^(N+1) - 2^(k+1)     ((N+1)-bit input code)

This is a pulse of 2^N - 2^k LSB. Every stage above k then has a residue
exactly equal to its weight and decides 1, so the residue that reaches
stage k is exactly 2^k LSB. The boundary the search converges on is
therefore "reference width = stage weight". For the MSB, x is mid-scale: the
reference is set to half the full scale, 15.75 ns.

The stages above k have already been tuned when stage k is searched, so their
residues are right.

### Synchronization delay (CAL_SYNC)

The controller applies the maximum input level. While the synchronization
delay matches the gate delay of the pulse generators, the output is all ones.
The codes of `vc_synch` that give all ones form a window. Outside it, the
leading-edge sliver triggers the next stage and the output falls apart.

Two 8-step binary searches find the window's edges:

- The upper edge: a trial bit is kept while the output stays all ones.
- The lower edge: the same search on the complement of the word.

Both searches start at mid-scale. `vc_synch` is then set to the middle of the
window, `(hi + lo + 1) / 2`.

Taking the middle, rather than "the first code that gives the maximum", is
what makes this robust. Garbage outputs can also be large, so a greedy
search for the largest output can lock onto the wrong code.

### Second pass

The reference widths were found under the old synchronization setting. That
setting only has to be good enough for the searches to see the right bit, so
a second CAL_PG pass follows with the words reset to mid-scale (parameter
`REPEAT_PG`, default 1). A full calibration takes

    (2N + 2) · 8 · CONV_CYCLES = 320 cycles     (N = 9)

or 176 cycles without the second pass. The testbenches check the exact count.

## The analog models and how far to trust them

All models share one linear delay law, in `tdc_calib_pkg`:

    delay = base · corner · (1 + 0.4 · (0.925 V − Vc))

Here `corner` is the process/temperature factor. The law is this design's
own. It is monotonic, falls as Vc rises, and spans ±11 % over 0.65–1.2 V,
about 0.09 % of the base per control step. That step is finer than LSB/2 even
for the MSB reference.

Two separate corner factors exist:

- `GATE_CORNER` scales the fixed 150 ps gate delay in front of every pulse
  generator.
- `CS_CORNER` scales every current-starved delay: the references and the
  synchronization delay.

Calibration exists to absorb the difference between the two, plus a
per-stage spread of the reference widths (`MISMATCH`, default 3 %).

Other model details:

- **`cs_delay_model`** is a transport delay that keeps every edge. It holds
  an internal queue, so a second pulse inside one delay is not lost.
- **`pulse_gen_model`** ignores a trigger pulse narrower than 8 ps. This
  stands for the finite gain of a real pulse generator. Without it,
  zero-width XOR glitches would fire every later stage.
- **`vc_dac_model`** outputs the control voltage in µV as an integer:
  `650000 + code · 550000 / 256`.
- **`sarcd_tdc_model`** gives stage k the nominal width
  `31.5 ns · 2^k / 2^N · (1 + MISMATCH · m_k)`, where
  m_k = ((3k mod 5) − 2)/2.

### Limits

- **Capture range.** The first CAL_PG pass runs before the synchronization
  delay is tuned. It only finds correct words while the synchronization error
  at mid-scale, about `150 ps · |CS_CORNER − GATE_CORNER|`, is below the
  8 ps trigger threshold. That is roughly a 5 % relative skew between gate
  delays and current-starved delays. Beyond that the first pass reads
  garbage and the calibration does not converge.
- **Control range.** Each stage's required control voltage must fall inside
  0.65–1.2 V, which covers roughly ±10 % total delay error per stage.
- **Residues near a code transition.** A residue below 8 ps never triggers
  the next stage. An input within 8 ps (0.13 LSB) of a code transition can
  therefore come out far from its true code. This follows from the threshold
  model, not from the calibration. The ramp and sine testbenches place inputs
  in the middle of a code, so they do not measure this effect.
- **Temperature and process corners.** The method reports results across
  temperatures and corners. Here those appear only as the two corner factors,
  and how a real FF or SS corner maps onto them is unknown.

## Departures from the reference method

The reference method describes the MSB search in detail and says the others
work "in the same manner". The following points are this design's own:

- The input levels x_k for the lower stages.
- The window-centre search for the synchronization word. The reference
  method only says to tune for maximum output.
- The second reference-width pass.
- The fixed two-cycle wait per trial.
- The encoding of the input level as an (N+1)-bit code, and the clear pulse
  ahead of each conversion.
- The analog models: the delay law, the corner factors, the trigger
  threshold and the per-stage spread. These stand in for transistor-level
  circuits that the method designs but does not describe numerically.

The reference method's text names the MSB of its example as "bit 7" while
stating a 9-bit converter. This RTL follows the 9-bit figure (N = 9, MSB
index 8).

## Results in simulation

| testbench | setting | result |
|---|---|---|
| `tdc_calib_top_full_tb` | all defaults | before: 511 of 512 codes wrong; after 320 cycles: 0 wrong |
| `tdc_calib_top_tb` | gate ×1.03, delay cells ×1.06 | 0 codes wrong after calibration; every mechanism counted |
| `tdc_calib_enob_tb` | 1.75 MHz sine at 29.4 MHz, five corner pairs (×0.94 … ×1.08) | ENOB 3.5–5.6 bits before, 9.01 after, every corner |

The ENOB is computed from the error between `out + 1/2` and the exact sine.
9.0 bits is the ideal for a 9-bit quantizer.

The top-level testbenches count:

- searches that cleared a bit;
- searches that kept a bit;
- synchronization trials inside and outside the window;
- cycles with the multiplexer on the calibration input;
- returns of the multiplexer to the external input.

Each of these must occur.

## Files

| file | what |
|---|---|
| `rtl/tdc_calib_pkg.sv` | sizes, state enum, analog figures, delay law |
| `rtl/tdc_calib_top.sv` | the calibration connection (top) |
| `rtl/calib_ctrl.sv` | calibration state machine (RTL) |
| `rtl/sarcd_correct.sv` | XNOR bit correction (RTL) |
| `rtl/in_mux.sv` | external / calibration input select (RTL) |
| `rtl/vtc_model.sv` | ideal voltage-to-time converter (model) |
| `rtl/vc_dac_model.sv` | 8-bit control-voltage DAC (model) |
| `rtl/cs_delay_model.sv` | current-starved delay cell (model) |
| `rtl/pulse_gen_model.sv` | reference pulse generator (model) |
| `rtl/sarcd_stage_model.sv` | one SAR-CD unit cell (model) |
| `rtl/sarcd_tdc_model.sv` | N-stage TDC with bit correction (model) |
| `tb/<module>_tb.sv` | self-checking testbench per module |
| `tb/tdc_calib_top_full_tb.sv` | top at its defaults, one full calibration |
| `tb/tdc_calib_enob_tb.sv` | sine-wave ENOB before/after calibration at five corners |

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`.

## Simulating

The models use `#(real)` delays and need Verilator's timing support:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/tdc_calib_pkg.sv tb/tdc_calib_top_full_tb.sv \
    --top-module tdc_calib_top_full_tb -Mdir obj -o sim
./obj/sim
```

Replace the testbench and top module name to run any other bench. All of them
finish in seconds.

Verilator reports some warnings, which are expected:

- `ZERODLY` on the computed delays.
- `SYNCASYNCNET` on the clear net. It drives the asynchronous clear of the
  stage flip-flops by design.
- A few unused parameters and signals.

## Changing it

- **`N` and `VC_W`** (top, controller) change the resolution and the control
  word width. The calibration length follows the formula above.
- **`GATE_CORNER`, `CS_CORNER` and `MISMATCH`** move the analog models. Use
  them to explore the capture range.
- **`REPEAT_PG = 0`** drops the second pass. It then works only while the
  synchronization error is small.
- **`CONV_CYCLES`** must cover the conversion plus the output register. It
  must grow if anything is pipelined after `out`.
- **Replacing the models with real circuits.** `calib_ctrl` only needs
  `out` to be registered on `clk`, and a higher control code to shorten
  every delay. Invert the decision polarity if the real delay cell works
  the other way.
