# FPGA beam position and phase processor for a four-electrode BPM

This is synthesizable SystemVerilog for the digital part of a storage-ring beam
position monitor (BPM) that also measures the beam phase. Four pick-up
electrodes (A, B, C, D) are down-converted by an analog front end and sampled by
four 12-bit ADCs. The FPGA turns the four sample streams into the beam
intensity (sum signal), the horizontal and vertical position and the beam phase.
It produces one result per ADC clock. It also records triggered blocks of
results for a host computer and drives two monitor DACs.

The design follows the system described in "Beam Position and Phase
Measurements Using a FPGA for the Processing of the Pick-Ups Signals" (ESRF).
That paper gives the frequency plan, the processing steps, the acquisition
scheme and the block diagram. It does not give the insides of the FPGA
processing. The algorithms, the number formats and the control details here
are this implementation's own. Where they go beyond the paper is listed in
[What is taken from the paper and what is not](#what-is-taken-from-the-paper-and-what-is-not).

## The idea: a frequency plan that makes demodulation trivial

Everything in the FPGA depends on how the clocks are chosen. All of them come
from the 352.2 MHz RF of the ring:

| quantity | value | origin |
|---|---|---|
| RF frequency | 352.2 MHz | ring RF |
| harmonic number | 992 = 32 x 31 | ring |
| revolution frequency | 355 kHz | RF / 992 |
| bunch spacing, 16-bunch filling | 88.018 ns (5.68 MHz) | RF / 62 |
| ADC clock fs | 22.72 MHz | 2 x RF / 31, i.e. 4 samples per 16-bunch spacing, 64 per turn |
| local oscillator | 278.35 MHz | RF x 49/62 |
| IF | 73.85 MHz | RF - LO = 3.25 fs |

An IF of 3.25 fs aliases to exactly fs/4 after sampling. Two consecutive
samples of the IF carrier are therefore 90 degrees apart, and every group of
four samples spans one full carrier period. Demodulating to I and Q then needs
no local oscillator tables and no multipliers, only differences of samples and
sign changes. Because the ADC clock is locked to the RF, the carrier phase
seen by the samples is the beam phase relative to the RF.

## Processing chain

```
 adc_a ─► iq_demod ─► cordic_vec (|A|) ─┐
 adc_b ─► iq_demod ─► cordic_vec (|B|) ─┤           ┌► pos_div ─► x
 adc_c ─► iq_demod ─► cordic_vec (|C|) ─┼► sum_diff ┼► pos_div ─► y
 adc_d ─► iq_demod ─► cordic_vec (|D|) ─┘           └► delay ───► sum
   I,Q of all four summed ─► cordic_vec (angle) ────► delay ───► phase
                                                      │
            proc stream (bpm_pkg::proc_sample_t) ◄────┘
               ├─► acq_buffer (4 x 2048 words, host read port)
               └─► dac_out (2 monitor DACs)
```

`bpm_processor` holds the chain up to the processed stream. `bpm_top` adds
the acquisition memory and the DACs.

### Synchronous I/Q demodulation (`iq_demod`)

The signal is x[n] = A cos(n·π/2 + φ). For every new sample the block forms two
differences over a sliding window of four samples:

    u[n] = x[n]   − x[n−2] = 2A cos(n·π/2 + φ)
    v[n] = x[n−1] − x[n−3] = 2A sin(n·π/2 + φ)

Next it rotates (u, v) back by n·π/2. A 2-bit counter holds n mod 4, so the
rotation is just a swap and sign changes:

| n mod 4 | I | Q |
|---|---|---|
| 0 | u | v |
| 1 | v | −u |
| 2 | −u | −v |
| 3 | −v | u |

This yields I = 2A cos φ and Q = 2A sin φ for every sample. With a uniformly
filled ring, all 22.72 Msps are valid results. The differences also remove any
DC offset of the ADC. With the 16-bunch filling, each bunch passage covers four
samples. The output whose window lines up with a bunch is that bunch's I/Q,
and the turn-by-turn acquisition mode picks exactly such a slot (see below).

The n mod 4 counter starts at reset. The measured phase is therefore relative
to that counter, and between two resets it can move by a multiple of 90
degrees. Treat it as a calibration constant.

Widths: 12-bit samples go in and 14-bit I/Q comes out, which covers the full
range of −4095..+4095 and its negation. Latency is one clock.

### Amplitude and phase (`cordic_vec`)

Each channel's amplitude comes from a pipelined vectoring CORDIC. Stage 0 moves
the vector into the right half plane, and 16 micro-rotations then drive Q to
zero. The result is K·sqrt(I²+Q²) with the constant CORDIC gain K = 1.6468.
This gain is identical in all channels and cancels in the position ratio.
The vector carries 6 guard bits. The angle accumulates in 20 bits and is
rounded to a 16-bit phase (65536 = 2π). Latency is 17 clocks, and one vector
is accepted per clock.

The beam phase is the angle of the sum of the four I/Q vectors. A fifth
CORDIC, two bits wider, computes it. Its magnitude output is not used.

### Sum and position (`sum_diff`, `pos_div`)

The electrodes sit as in the pick-up drawing: A upper left, B upper right,
C lower right, D lower left. From the four amplitudes the design forms:

    sum = A + B + C + D
    dx  = (A + D) − (B + C)      positive towards the A/D side
    dy  = (A + B) − (C + D)      positive towards the A/B side

Positions are dx/sum and dy/sum. The position comes from amplitudes only,
which makes it almost insensitive to phase noise of the local oscillator.
Each ratio comes from a restoring divider that produces one quotient bit per
pipeline stage. That gives 16 stages, one new division per clock and a
latency of 18 clocks. The result is a signed Q1.15 fraction saturated to
±32767. A zero sum gives 0. Converting the fraction to millimetres needs a
geometry factor of the pick-up, which is left to the host.

`bpm_processor` delays the sum by 18 clocks, and the phase and the four
electrode amplitudes by 19 clocks. All fields of one `proc_sample_t` then
belong to the same ADC sample.
**Total latency from ADC sample to processed output is 37 clocks**, and
throughput is one result per clock.

### Number formats of the processed stream (`bpm_pkg::proc_sample_t`)

| field | width | format |
|---|---|---|
| `amp[0..3]` | 4 x 16 | unsigned, 2·K·A, 2·K·B, 2·K·C, 2·K·D in ADC LSB |
| `sum` | 18 | unsigned, 2·K·(A+B+C+D) in ADC LSB, always below 2^17 |
| `x`, `y` | 16 each | signed Q1.15, difference/sum |
| `phase` | 16 | signed, 65536 units per 2π |

## Triggered acquisition (`acq_buffer`)

The host reads four blocks of 2048 16-bit words. Which quantities they hold
is chosen per acquisition with `amp_mode`:

| block | `amp_mode = 0` | `amp_mode = 1` |
|---|---|---|
| 0 | sum, bits 16..1 of `sum` (saturated) | amplitude A |
| 1 | x | amplitude B |
| 2 | y | amplitude C |
| 3 | phase | amplitude D |

One acquisition runs as follows:

1. A rising edge on `acq_trig`, a low-rate trigger, arms the buffer (`acq_armed`).
2. The next rising edge of the revolution clock `rev_clk` starts the capture
   (`acq_busy`). Every acquisition therefore begins at the same point of the
   turn. A trigger during a capture is ignored.
3. The capture fills all four blocks at the same address for each stored
   record.
   * `turn_mode = 0`: every processed sample is stored. That is 2048
     consecutive samples, i.e. 32 turns.
   * `turn_mode = 1`: one sample per turn is stored, the `turn_offset`-th
     processed sample after each revolution edge. That is 2048 turns, or
     5.8 ms. With 64 samples per turn, the offset picks one bunch (and
     sampling phase) of the 16-bunch pattern, or the single bunch in
     single-bunch filling.
   `turn_mode` and `amp_mode` are latched at the start of the capture.
   `turn_offset` is read at every revolution edge.
4. After 2048 records `acq_done` rises and stays high until the next trigger.
   A new trigger overwrites the blocks.

`rev_clk` and `acq_trig` are synchronised with two flip-flops (`edge_sync`),
which costs 2–3 clocks. The revolution edge is not corrected for the 37-clock
processing latency. In turn mode, offset k therefore stores the result of
the ADC sample taken about k − 33 clocks after the revolution edge. To land
inside the turn, use k ≥ 36. For example, k = 40 lands 7 samples in.

Host read port: present `host_blk` and `host_addr`, and `host_data` holds the
word one clock later. It is a plain synchronous block-RAM read. The
compact-PCI bridge and the software that move the blocks to the control
system are outside this design.

## Monitor DACs (`dac_out`)

Two DAC channels each show one quantity chosen by `dac0_sel`/`dac1_sel`
(`SEL_SUM`, `SEL_X`, `SEL_Y`, `SEL_PHASE`). Signed quantities are sent as
offset binary with zero at mid-scale. The sum goes out as straight binary.
The codes are 12 bits (`DAC_W`), registered, and update with each valid
sample. After reset both outputs sit at mid-scale.

## Top-level interface (`bpm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 22.72 MHz ADC sampling clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `adc_a..adc_d` | in | 12 each | two's complement samples, one per clock |
| `rev_clk` | in | 1 | revolution clock, asynchronous |
| `acq_trig` | in | 1 | acquisition trigger, asynchronous |
| `turn_mode`, `turn_offset` | in | 1, 7 | acquisition mode, sample slot in turn mode |
| `amp_mode` | in | 1 | blocks hold amplitudes A–D instead of sum/x/y/phase |
| `dac0_sel`, `dac1_sel` | in | 2 each | DAC source |
| `host_blk`, `host_addr` | in | 2, 11 | host read address |
| `host_data` | out | 16 | read data, one clock later |
| `acq_armed`, `acq_busy`, `acq_done` | out | 1 each | acquisition state |
| `rev_seen` | out | 1 | one-clock pulse per synchronised revolution edge |
| `dac0`, `dac1` | out | 12 each | DAC codes |
| `proc_valid`, `proc` | out | 1, 130 | processed stream |

Parameters: `ADC_W = 12`, `BLOCK_LEN = 2048`, `N_BLOCKS = 4`, `DAC_W = 12`.
There are four blocks because there are four quantities in each set, so
`N_BLOCKS` is not meant to be changed on its own.

The analog front end sits outside the FPGA: band-pass filter at 352.2 MHz
with 10 MHz bandwidth, mixer, IF filter, the LO and clock synthesis, and the
AD9225 ADCs. None of it is modelled; the testbenches drive sampled IF values
directly.

## What is taken from the paper and what is not

From the paper:
* the frequency plan and the 22.72 MHz sample clock
* four 12-bit channels
* synchronous I/Q demodulation followed by amplitude and phase computation
* position from amplitude detection with difference/sum signals
* four blocks of 2048 processed words, started by the revolution clock after
  an acquisition trigger and read by a host
* two DAC outputs

This implementation's own choices:
* the sliding four-sample demodulator
* the CORDIC and the restoring divider, and all widths and number formats
* phase taken from the summed vector
* sign conventions of x and y
* which quantities go into the four blocks (two selectable sets)
* the turn-by-turn acquisition mode. The paper quotes turn-by-turn resolution
  and shows position spectra up to half the revolution frequency but does not
  describe the mode.
* what the DACs show
* synchronisers, reset behaviour and the host read port

Known limitations:
* The phase reference depends on the reset instant, in steps of 90 degrees.
* The turn-mode offset is not latency-compensated.
* Positions are ratios, not millimetres.
* There is no averaging or decimation beyond the one-sample-per-turn mode.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
floating-point or integer reference models written independently of the RTL:

| testbench | what it checks |
|---|---|
| `tb_iq_demod` | tones of random amplitude, phase and DC offset: I = 2A cos φ, Q = 2A sin φ within 3 LSB, 1-clock latency |
| `tb_cordic_vec` | random and corner vectors: magnitude within 4 LSB of K·\|v\|, angle within 2.5 units, 17-clock latency, one per clock |
| `tb_sum_diff` | exact sums and differences, including full scale |
| `tb_pos_div` | exact truncated quotients, saturation, zero divisor, 18-clock latency |
| `tb_bpm_processor` | 120 random tone sets with DC offsets: amplitudes, sum, x, y, phase against the formulas, 37-clock latency, full rate |
| `tb_edge_sync` | one pulse per rising edge, 2–3 clocks after it |
| `tb_acq_buffer` | full-rate, turn-by-turn and amplitude-set captures with gaps in the input stream, every word read back, ignored trigger |
| `tb_dac_out` | every source selection, code conversion, hold, reset value |
| `tb_bpm_top` | full-size end to end: a beam model with betatron and synchrotron oscillations, full-rate, turn-by-turn and amplitude-set captures at 2048 words, all 24 K words read back and compared, each turn-by-turn record compared with the beam model, all DAC selections. It counts each mechanism and fails if one never happened. |

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with Verilator,
for example:

```
verilator --binary --timing --assert -Irtl rtl/bpm_pkg.sv tb/tb_bpm_top.sv \
    rtl/bpm_top.sv rtl/bpm_processor.sv rtl/iq_demod.sv rtl/cordic_vec.sv \
    rtl/sum_diff.sv rtl/pos_div.sv rtl/delay_line.sv rtl/acq_buffer.sv \
    rtl/edge_sync.sv rtl/dac_out.sv --top-module tb_bpm_top -o sim
./obj_dir/sim
```

The full-size top-level test simulates about 430,000 clocks in about a
second.

## Files

* `rtl/bpm_pkg.sv`: widths, `proc_sample_t`, `quantity_e`, `sum_word`
* `rtl/bpm_top.sv`: top level
* `rtl/bpm_processor.sv`: processing chain
* `rtl/iq_demod.sv`, `rtl/cordic_vec.sv`, `rtl/sum_diff.sv`, `rtl/pos_div.sv`,
  `rtl/delay_line.sv`: datapath units
* `rtl/acq_buffer.sv`, `rtl/edge_sync.sv`: triggered acquisition memory
* `rtl/dac_out.sv`: monitor DACs
* `tb/tb_*.sv`: one testbench per module
