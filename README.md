# Sub-threshold BFSK transmitter

This is a radio transmitter for very low data rates, such as sensor
networks and voice-band links. Its supply is at or below the transistor
threshold voltage, so it draws only leakage current. Such circuits are slow
and sensitive to process, voltage and temperature. For that reason the
transmitter is as digital as it can be, and all its logic is made of
precharged NOR-NOR programmable logic arrays (PLAs) connected into networks.

The modulation is binary frequency shift keying (BFSK). A data bit of 0 sends
one tone and a 1 sends another. BFSK was chosen over BPSK because it is the
easier of the two to build. The textbook BFSK transmitter has two oscillators
and a multiplexer. Here there is a single numerically controlled oscillator
(NCO), and the data bit chooses its frequency word.

```
data_in ──► phase accumulator ──► sine table ──► binary→thermometer ──► 19-leg current DAC ──► (amplifier, antenna)
            (16-level PLA net)     (NCO)          (3 PLAs, 1 level)      behavioural model
              │                     │                │
           falling-edge reg.    falling-edge reg.  falling-edge reg.
```

## Signal chain

| stage | module | what it does |
|---|---|---|
| phase accumulator | `phase_accumulator` | `phase += data_in ? FCW1 : FCW0` on every falling clock edge (16 bits) |
| NCO | `nco_sine_rom` | the top 8 phase bits address a 256-entry sine table; the result is an 8-bit unsigned sample |
| converter | `bin2therm` | the sample's upper nibble becomes 15 thermometer lines and the lower nibble passes through, giving the 19-bit DAC word |
| DAC | `dac_current_steering` | 15 legs of 16 unit currents each and 4 legs of 8, 4, 2 and 1, summed into an output resistor |
| modulator | `bfsk_modulator` | the first three stages |
| top | `bfsk_transmitter` | modulator plus DAC; the DAC output is brought out to ports |

The tone frequency is `f = FCW * f_clk / 2^16`. The defaults are
`FCW0 = 2048` and `FCW1 = 4096`, which give `f_clk/32` for a 0 and
`f_clk/16` for a 1. The two tones are orthogonal when their difference is a
whole multiple of the bit rate; the testbenches send one bit per 64 clocks,
so the difference is twice the bit rate. The bit rate is set by whatever
drives `data_in`, which is sampled on every falling edge. Changing the word
does not reset the phase, so the output stays continuous across bit
boundaries. The intended receiver is non-coherent (a pair of band-pass
filters), so it does not depend on that continuity.

The tone frequencies and the clock frequency are this design's own choices.
The size of the antenna implies a carrier of about 500 kHz: its half-wavelength
is about 300 m. With the defaults, 500 kHz for a 1 needs an 8 MHz clock. To
change the tones, set `FCW0` and `FCW1` on `bfsk_transmitter` or
`bfsk_modulator`. The PLA personalities of the adder are computed from these
parameters, so nothing else has to change.

## Clocking: precharge, evaluate, falling-edge registers

Each PLA precharges while its clock is low and evaluates while it is high.
The three stages are combinational, and each one's output is captured by a
register on the **falling** edge of `clk`. Each stage's inputs are
therefore steady through the whole high phase, while the PLAs evaluate.

Latency: the data bit sampled at falling edge *n* changes the phase at
edge *n*. The sample for that phase is registered at *n+1* and its DAC word
at *n+2*. After that, one DAC word comes out per clock.

Reset (`rst_n`, asynchronous, active low) is this design's own addition. It
clears the phase and loads the mid-scale sample (128) and its DAC word, so
the DAC output rests at the DC level of the sine.

## The PLA and PLA networks (`pla_nor_nor`)

One PLA has a fixed size: 8 inputs, 6 outputs and 12 cubes (product terms).
Each input drives two bit-lines, one for `x` and one for `~x`. Each cube is a
precharged row. A row is discharged by any connected bit-line that is high,
so it stays high only when every literal of the cube is true. Each output
line is discharged by any row connected to it, and the output buffer inverts
it, so each output is an OR of cubes. The personality is set by three
parameters:

- `CUBE_TRUE[c][i]`: cube `c` contains the literal `x[i]`.
- `CUBE_COMP[c][i]`: cube `c` contains the literal `~x[i]`.
- `OR_PLANE[j][c]`: output `j` includes cube `c`.

A cube with no literals is always true. An output with no cubes is always 0.

**Completion and cascading.** A dummy row and output line always discharge
during evaluation, and they form the completion signal `done`. The PLA also
gives `clk_out = clk_in & done`. In a network, only the first PLA is clocked
by `clk`; each later PLA is clocked by the `clk_out` of the PLA before it. So
the whole network precharges at once and then evaluates level by level. The
fastest clock is set by `1 / (T_precharge + N * T_eval)`, where *N* is the
depth of the network.

**What the RTL can and cannot show.** The RTL has zero delay, so an
evaluation completes the moment it starts, and `done` simply follows
`clk_in`. The `clk_out` chain is therefore a delayed copy of the clock in
hardware, but an exact copy in simulation. Each output `y` is given as the
value its line holds at the end of evaluation; it does not drop to the
precharge level while the clock is low. The falling-edge registers capture
it before a real precharge would disturb it. Modelling the precharge in `y`
would only add a race between the clock edge and the registers that read
`y`. Column folding is a layout technique that packs more logic into the
same area. It does not change the logic and is not modelled.

**Phase accumulator network.** The adder is a ripple-carry chain of 16 PLAs,
so it is 16 levels deep. PLA *i* has three inputs: phase bit `a`, data bit
`d` and carry `c`. Its 8 cubes are the 8 minterms of those inputs. Its OR
plane picks out the minterms of `sum = a ^ b ^ c` and `carry = maj(a, b, c)`.
Here `b = d ? FCW1[i] : FCW0[i]` is folded into the personality at
elaboration, so the multiplexer that chooses between the frequency words
costs no logic. `acc_clk_out`, the `clk_out` of the last PLA, marks the end
of the evaluation.

**Converter network.** There is one level of three PLAs working in parallel.
With `b = amp[7:4]`, thermometer line `t_k = (b >= k)`, and `therm[k-1] = t_k`:

- PLA A gives t1 to t6 from the cubes b3, b2, b1, b0, b1b0, b2b1 and b2b0.
- PLA B gives t7 to t12 from b3, b2b1b0, b3b2, b3b1, b3b0 and b3b1b0.
- PLA C gives t13 to t15 from b3b2b1, b3b2b0 and b3b2b1b0. Its other three
  outputs are spare.

The full equations are in the header of `rtl/bin2therm.sv`. `net_clk_out` is
the AND of the three PLAs' completions.

**NCO table.** The sine table is written as a table in RTL, not as a PLA
network. It holds `round(127.5 * (1 + sin(2*pi*k/256)))` for k = 0 to 255,
and a constant function computes it at elaboration, so no data file is
needed. Turning it into PLAs would take a logic-minimisation step, which
this design does not include.

## The DAC word and the DAC model

`bfsk_pkg::dac_code_t` is `{therm[14:0], bin[3:0]}`, 19 bits, one bit per
DAC leg. Thermometer coding of the upper bits makes the big steps out of
identical legs, which keeps the output monotonic. The 4 binary legs carry
the small steps.

`dac_current_steering` is a **behavioural model of an analog circuit** and is
for simulation only. Each leg takes a true and a complement input, as a
differential current switch does. The top drives the complements with
inverters. The model's outputs are:

- `i_units`, the current in units of the smallest leg current (0 to 255);
- `v_out = i_units * I_UNIT * R_OUT`, after a delay of `SETTLE`.

An assertion flags any leg whose two inputs are not complementary. The
values of `I_UNIT`, `R_OUT` and `SETTLE` are placeholders, not values from a
real circuit.

The common-source amplifier and the antenna that follow the DAC are analog
and have no RTL. `bfsk_transmitter` brings out `dac_i_units` and
`dac_v_out`, the signal that would drive the amplifier's gate. The
circuitry that compensates the sub-threshold logic for process, voltage and
temperature variation is not included either, because its workings are not
defined.

## Files

- `rtl/bfsk_pkg.sv`: widths, the PLA size, and `dac_code_t`.
- `rtl/pla_nor_nor.sv`, `rtl/phase_accumulator.sv`, `rtl/nco_sine_rom.sv`,
  `rtl/bin2therm.sv`, `rtl/bfsk_modulator.sv`: synthesizable.
- `rtl/dac_current_steering.sv`: behavioural model (it uses `real` and
  delays).
- `rtl/bfsk_transmitter.sv`: simulation top (modulator plus DAC model).
  Synthesize `bfsk_modulator` for the digital part alone.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends by
  printing `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Wno-fatal \
    rtl/bfsk_pkg.sv tb/tb_bfsk_transmitter.sv --top-module tb_bfsk_transmitter
./obj_dir/Vtb_bfsk_transmitter
```

For any other testbench, replace the testbench name. `-Irtl` lets
Verilator find each module in `rtl/<name>.sv`.

What the testbenches check:

- `tb_pla_nor_nor` runs all 256 inputs of a personality that uses true and
  complement literals, a shared cube, an empty cube and an unused output. It
  also checks `done` and `clk_out` in both clock phases.
- `tb_phase_accumulator` runs random data against a reference sum, plus
  wrap-around, the period for each bit value (32 and 16 clocks), holding
  while the clock is high, and the CLKOUT of the adder network.
- `tb_nco_sine_rom` checks all 256 phases against the sine formula and the
  four quarter points.
- `tb_bin2therm` checks all 256 samples, the one-cycle latency, the reset
  word and the network's completion.
- `tb_bfsk_modulator` compares the pipeline cycle by cycle against a
  reference model while random bits are sent. It also counts sine periods
  for each tone.
- `tb_dac_current_steering` checks every code, each leg weight, the voltage
  and the settling delay.
- `tb_bfsk_transmitter` runs end to end at the default parameters. It sends a
  32-bit message at 64 clocks per bit and checks every DAC output against a
  reference. It then demodulates the DAC voltage non-coherently: per bit, it
  compares the energy at the two tone frequencies. Every bit must decode
  correctly. It also applies an asynchronous reset mid-operation, and it
  counts tone switches in both directions, phase wraps, completed
  evaluations of both PLA networks and DAC updates. Each of these must
  occur.

## How far to trust it

- The logic of every digital stage is tested exhaustively or against an
  independent reference, and the whole chain is tested by decoding its own
  output.
- The timing behaviour of the sub-threshold PLAs is not simulated. This
  covers evaluation delay, completion timing and the throughput formula. In
  the RTL, the CLKOUT chain shows only the order of evaluation.
- The following are this design's own choices:
  - the accumulator width (16) and the table depth (256);
  - the offset-binary sine coding;
  - the tone words;
  - the division of the adder and the converter into PLAs;
  - the reset;
  - all of the DAC model's electrical values.

  The fixed numbers are the 19-bit DAC word (15 thermometer and 4 binary
  legs) and the PLA size of 8 × 6 × 12.
