# 4-bit bipolar triangle waveform generator (SFQ pulse-frequency DAC), cycle-level RTL

This is a cycle-level SystemVerilog model of a superconducting single-flux-quantum (SFQ)
circuit that synthesises a bipolar triangle voltage. The circuit is a frequency-modulation
DAC. Every SFQ pulse that passes a Josephson junction carries exactly one flux quantum
PHI0 = h/2e, so a junction that passes pulses at rate f has a mean voltage of exactly
PHI0 * f. To set the voltage, the circuit sets the pulse rate. For each reference pulse it
emits a burst of l(t) pulses (l = 0..7), and a voltage multiplier (VM) passes N = 5 flux
quanta per pulse:

    V = PHI0 * f_ref * l(t) * N

Such a voltage can only be positive. The trick here is to use **two** voltage multipliers
and to send the pulses to only one of them at a time. VM1 carries one unipolar triangle
(l = 1..7..1) while VM2 is idle. Then VM2 carries the next one while VM1 is idle. The
difference V1 - V2 is then a bipolar triangle that spans 28 steps of the code.

The RTL covers the digital part of the chip:

- the two DC/SFQ input converters;
- the code generator (CG);
- the 3-bit variable-pulse number multiplier (V-PNM), with its ring oscillator, variable
  counter and output demultiplexer;
- the two low-speed monitor chains (a divide-by-8 prescaler, then an SFQ/DC converter).

The two 5-fold voltage multipliers are analog parts. They are included as behavioural
models that count flux quanta. The differential amplifier that forms V1 - V2 is an off-chip
instrument and is not modelled. Its two inputs are brought out of the top level.

## Modelling SFQ logic as clocked RTL

SFQ gates have no global clock. Information is carried by single pulses, and each gate is
clocked by whichever pulse reaches it. This model puts all of them on one synchronous clock:

- **One clock cycle is one period of the on-chip ring oscillator.** The oscillator is
  designed for 10.1 GHz, so a cycle is about 99 ps.
- **An SFQ pulse is a signal that is high for exactly one cycle.**
- The external drive signals (V-PNM_IN, CG_IN) and the monitor outputs (COUNT1, COUNT2) are
  ordinary levels.
- A flux-storing cell (NDRO, DFF, T flip-flop) becomes a flip-flop that the relevant pulse
  sets, resets, toggles or reads.

This scale leaves the circuit's timing margins intact. The oscillator runs at 10.1 GHz and
the V-PNM input is specified up to 1.26 GHz. 10.1 / 1.26 = 8.0 ring periods per input
period, which is exactly enough for a start pulse plus a burst of up to 7 pulses. In the
model, V-PNM_IN edges must be at least 8 cycles apart. An assertion catches a violation.

## The code generator: a counter that skips two states

The code must step through this sequence, repeating every 14 CG_IN periods:

    l = 0, 1, 2, 3, 4, 5, 6, 7, 6, 5, 4, 3, 2, 1, 0, 1, ...

The output must move to the other multiplier each time l goes from 0 to 1.

The obvious way to make a triangle is a 4-bit binary counter whose lower three bits are
XORed with the top bit. That gives 0..7, 7..0, a 16-step wave in which the peak and the
zero each appear twice. This circuit avoids the repeats in the counter itself. Whenever the
counter's top T flip-flop toggles, it feeds one extra pulse back into the lowest stage. The
counter therefore jumps over 8 and over 0, and cycles through 14 states:

| counter  | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|----------|---|---|---|---|---|---|---|---|----|----|----|----|----|----|
| top bit  | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 1  | 1  | 1  | 1  | 1  | 1  |
| code l   | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 6 | 5  | 4  | 3  | 2  | 1  | 0  |

Three XOR gates form the code as `cnt[2:0] ^ {3{cnt[3]}}`. The step 15 -> 1 is the step
where l goes from 0 to 1. It is also the only step in which the top bit falls. A select T
flip-flop toggles on that edge. The new state reaches the demultiplexer as a pulse to one
of its two port cells. The burst in flight at that moment has length 0, so the switch never
splits a burst. An assertion in `vpnm` checks this.

CG_IN is asynchronous to the V-PNM. A D flip-flop clocked by V-PNM_IN stores the CG_IN
pulse, so a code change (a "CG event") happens only at a V-PNM_IN pulse. The V-PNM_IN pulse
that releases a CG event still produces a burst with the old code. The new code and any
select pulse are written one cycle later, and they apply from the next V-PNM_IN pulse on.

After reset, the counter holds 15, so l = 0 and VM1 is selected. The first CG event
therefore wraps the counter, gives l = 1 and selects VM2. From there, events 1 to 13 drive
VM2 (COUNT2) through 1..7..1, and events 15 to 27 drive VM1 (COUNT1). The waveform repeats
every 28 events.

## The variable-pulse number multiplier

`vpnm` combines three parts:

- **`ring_osc`**: a V-PNM_IN pulse starts it. It then emits one pulse per cycle, the first
  in the next cycle, until the stop pulse comes.
- **`var_counter`**: holds the 3-bit code (the circuit's bit1..bit3 NDRO cells). On each
  start it loads the held code into a down counter. It raises `stop` together with the l-th
  oscillator pulse, or together with the start if l = 0.
- **`dmx`**: two port cells hold the working port. Each pulse leaves on VM1 or VM2 in the
  same cycle it arrives.

Timing at the top level, for a V-PNM_IN rising edge that the clock first samples at edge c:

| cycle        | what happens                                       |
|--------------|----------------------------------------------------|
| c+2          | V-PNM_IN pulse (converter latency 3 edges)         |
| c+3 .. c+2+l | burst pulses on out1/out2                          |
| c+4 .. c+3+l | flux-quantum counts of the working VM grow by 5    |
| c+10         | the last possible update (l = 7) is complete       |

## Monitors and voltage outputs

- **COUNT1 / COUNT2.** Each multiplier's pulse train also feeds a prescaler of three
  T flip-flops (divide by 8), then an SFQ/DC converter that toggles its level on each pulse.
  With 8 V-PNM_IN periods per CG_IN period, a monitor toggles exactly l times per CG_IN
  period. That makes l directly readable at low speed.
- **v1_quanta_o / v2_quanta_o.** These count the flux quanta that each multiplier has
  passed, i.e. the time integral of V1 and V2 in units of PHI0. Both counts wrap at 2^32.
  The differential voltage over a window of T cycles is:

      V1 - V2 = PHI0 * (dq1 - dq2) * 10.1e9 / T   [V]

  With V-PNM_IN at 500 MHz, the peak value is PHI0 * 500e6 * 7 * 5 = 36.2 uV, so the wave
  spans about 72 uV peak to peak. The period is 28 CG_IN periods (35.7 Hz for a 1 kHz CG_IN).

## Files and hierarchy

```
tri_wavegen_top
├── dcsfq      x2   V-PNM_IN and CG_IN converters
├── code_gen        retiming DFF, select T flip-flop, XOR folding
│   └── bin_counter skipping 4-bit counter
├── vpnm
│   ├── ring_osc
│   ├── var_counter code register + pulse counter
│   └── dmx
├── vm         x2   5-fold voltage multipliers (behavioural)
├── prescaler  x2   divide by 8
└── sfqdc      x2   COUNT1, COUNT2
```

`sfq_pkg` holds the shared numbers (code width 3, counter width 4, VM factor 5, three
prescaler stages, ring period 1 cycle) and the `port_sel_e` type (SEL_VM1 / SEL_VM2). Every
module uses an active-low asynchronous reset `rst_n`.

### Top-level ports

| port          | dir | width | meaning                                                   |
|---------------|-----|-------|-----------------------------------------------------------|
| `clk`, `rst_n`| in  | 1     | ring-period clock, asynchronous active-low reset          |
| `vpnm_in_i`   | in  | 1     | V-PNM_IN drive level (one burst per rising edge)          |
| `cg_in_i`     | in  | 1     | CG_IN drive level (one code step per rising edge)         |
| `count1_o`    | out | 1     | COUNT1 monitor level                                      |
| `count2_o`    | out | 1     | COUNT2 monitor level                                      |
| `v1_quanta_o` | out | 32    | flux quanta passed by VM1                                 |
| `v2_quanta_o` | out | 32    | flux quanta passed by VM2                                 |
| `code_o`      | out | 3     | code held by the V-PNM (observation only)                 |
| `sel_o`       | out | 1     | working multiplier (observation only)                     |

Drive rules:

- Keep each level high and low for at least one cycle.
- Put V-PNM_IN rising edges at least 8 cycles apart.
- Give at most one CG_IN rising edge per V-PNM_IN period. A second one is lost, as it would
  be in the storing flip-flop.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the module against
a reference computed inside the testbench, and ends with a `TB_RESULT checks=N failures=M`
line.

`tb_tri_wavegen_top` runs the whole chip at its default parameters in three drive settings.
Each setting runs from reset through two full bipolar periods (58 CG_IN periods):

| setting | V-PNM_IN period     | V-PNM_IN per CG_IN | corresponds to                        | V1-V2 peak to peak |
|---------|---------------------|--------------------|---------------------------------------|--------------------|
| A       | 16 cycles (631 MHz) | 8                  | low-speed measurement ratio (8 kHz : 1 kHz) | 91.4 uV      |
| B       | 20 cycles (505 MHz) | 1000               | high-speed measurement, 500 MHz       | 73.1 uV            |
| C       | 8 cycles (1.26 GHz) | 1                  | designed maximum of both inputs       | 182.7 uV           |

The testbench predicts everything from the drive edges alone:

- which CG event each V-PNM_IN pulse follows;
- from that, the burst length and the working port;
- the exact quanta added to each multiplier by every burst;
- the COUNT transitions (one per 8 pulses, and l per CG_IN period in setting A);
- the differential quanta of every CG_IN period.

It checks all of these, and checks the peak-to-peak voltage against PHI0 * 5 * 7 * f * 2.
The measured chip gave 72 uV at 500 MHz, and the model gives 73.1 uV at 505 MHz. Setting B
uses 1000 V-PNM_IN periods per CG_IN period instead of the 500,000 of the measurement. The
voltage depends only on the V-PNM_IN rate, so this changes nothing but the run time. The
testbench also counts CG events, counter skips, port switches, zero-length and full-scale
bursts, and CG periods of each polarity. It fails if any of these never occurs.

`tb_highspeed` repeats the high-speed measurement using the top-level ports alone. It runs
V-PNM_IN at 505 MHz with 25,000 V-PNM_IN periods per CG_IN period, for 62 CG_IN periods. It
integrates V1 - V2 over every CG_IN period. It checks each window against l(t), checks the
peak-to-peak value (73.1 uV), and checks the period of the wave, found from its rising zero
crossings: 28 CG_IN periods, i.e. 35.7 Hz for a 1 kHz CG_IN. That run takes about 15 s.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl --top-module tb_tri_wavegen_top \
    rtl/sfq_pkg.sv tb/tb_tri_wavegen_top.sv
./obj_dir/Vtb_tri_wavegen_top
```

Replace the top module name with any other testbench in `tb/` to run that one. The whole
top-level run takes under a second.

## What follows the published circuit and what is this model's own

These parts follow the published circuit:

- the block structure and the connections between blocks;
- the 3-bit code, the 4-bit counter and the 14-step triangle sequence;
- the rule to switch ports when l goes from 0 to 1, with VM2 carrying the first triangle;
- the retiming of CG_IN by a flip-flop clocked by V-PNM_IN;
- the XOR folding;
- the three-stage prescalers and the factor 5 of the multipliers;
- the 10.1 GHz oscillator and the 1.26 GHz input limit.

These are the model's own choices:

- **Cycle timing.** The one-cycle latencies and the rule that a releasing V-PNM_IN pulse
  still uses the old code are choices. The real circuit's gate delays are not represented.
- **Variable counter insides.** The circuit counts with three resettable T flip-flops that
  the code presets. The model uses a loadable down counter with the same pulse count. The
  exact preset scheme of the original was not available.
- **Counter skip path.** The extra pulse that skips states 8 and 0 was inferred from the
  required 14-step sequence and the block diagram's feedback wiring. It was not given as
  text.
- **Reset.** Reset values are chosen so that the first CG event gives l = 1 on VM2. The
  original chip has no reset described; SFQ circuits simply start empty.
- **Input converter synchroniser.** The DC/SFQ converters contain a two-flop synchroniser,
  because the drive levels are asynchronous to the model clock.
- **Voltage multipliers.** These are flux-quantum counters. They say nothing about the
  analog behaviour, the noise or the bias margins of a real double-flux-quantum amplifier.
- **Differential amplifier.** The 100-fold amplifier is not modelled.
