# Real-time audio effects between a 12-bit ADC and a 12-bit DAC

This is the FPGA logic of a small audio effects box. An analog signal is digitized by a 12-bit
AD7891 converter at 1 MHz. The FPGA applies an effect to every sample, and a 12-bit DAC turns the
result back into sound. Two effects are built, an **echo** and a **chorus**. Each has its own
datapath and its own sample memory, and both run on every sample. A set of DIP switches picks
which one is heard. Nothing is processed in batches: a sample leaves for the DAC a few clocks after
it is read from the ADC.

The design follows a published description of a Spartan-3 (XC3S200) board built for this purpose.
That description gives the board's signal chain, the FPGA pin names and widths, the echo datapath
block by block, and the chorus structure. It gives no timing, number formats or chorus
parameters, so those are this design's own choices. They are marked as such below and in each
file's header.

## Signal chain

```
 analog in ─ buffer ─ AD7891 ══db══> adc_if ──┬─────────────────────> fx_select ─> dac_if ══> dac_out[11:0], en[3:0]
                      (12 bit)                ├─> echo   (2k FIFO)  ──^   (DIP)
                                              └─> chorus (2 x 2k RAM)─^
```

| Module | Job |
|---|---|
| `audio_fx_top` | Top level; wires the blocks below and brings out the board pins |
| `reset_sync` | Asynchronous assert, synchronous release of the internal reset |
| `adc_if` | Runs the AD7891 handshake once per sample period, delivers `valid`/`sample` |
| `echo` | `y[n] = x[n] + g·x[n−D]` on a FIFO whose read side is armed by a counter |
| `sync_fifo` | 2048 × 12 FIFO with empty, full and fill-level flags (used by `echo`) |
| `chorus` | Dry path plus two voices with swept delays, three mix gains, one sum |
| `mod_delay` | Circular-buffer delay line whose length can change every sample (used by `chorus`) |
| `lfo` | Triangle sweep that moves a chorus delay (used by `chorus`) |
| `fx_select` | Registered 4-way choice: bypass, echo, chorus, mute |
| `dac_if` | Puts the sample on the DAC bus and pulses the enable of the chosen DAC channel |
| `audio_pkg` | Sample and gain types, the effect-mode enum, scaling and saturation helpers |

### Timing at the default parameters

The clock is 50 MHz. That rate is an assumption; the source names none. A sample period is
`CLK_HZ / FS_HZ` = 50 clocks. Counted from the clock on which the ADC read strobe `rd_ad` rises:

| Path | `dac_out` changes | `en[dac_sel]` rises |
|---|---|---|
| echo, chorus | +4 clocks | +5 clocks |
| bypass, mute | +2 clocks | +3 clocks |

`echo` and `chorus` each take 2 clocks. `fx_select` and `dac_if` take one clock each. The enable
follows the data by one clock, so the DAC sees settled data.

## Number formats

- **Samples** are 12-bit two's complement (`audio_pkg::sample_t`). The ADC is assumed to be used
  with a bipolar input range, so its result is taken as two's complement.
- **Gains** (`echo_gain`, `chorus_mix0..2`) are 8-bit unsigned with 7 fraction bits: 128 = 1.0,
  64 = 0.5, 255 ≈ 1.99. A product is shifted right arithmetically, so it rounds towards −∞.
- Every sum **saturates** to −2048 … +2047 instead of wrapping.
- **`dac_out`** is offset binary: the two's-complement MSB is inverted. A unipolar multiplying
  DAC such as the AD7541 expects this code. After reset, `dac_out` rests at mid-scale, `0x800`.

## The echo

The echo is the one effect whose inside the source gives in detail, as a block diagram. The RTL
keeps that structure:

```
 x ──┬──────────────────────────────────────────────┐
     └─> FIFO din/we        dout ─> × gain ─> (+) <──┘ ─> y
              re <── (counter == delay) ──┐
              counter.en <── NOT ─────────┘
```

Every incoming sample is written into the FIFO. A counter counts the incoming samples, and its
enable is the inverse of the FIFO read enable. While the counter is below `delay`, the FIFO only
fills and the echo term is zero. When the counter reaches `delay`, the comparator turns the read
enable on. That stops the counter, and a stopped counter keeps the comparator true. From then on,
every sample pushes one word and pops the word written `delay` samples earlier. The FIFO
therefore holds exactly `delay` samples, and the delay is exact with no pointer arithmetic. The
popped word is multiplied by `gain` and added to the current sample.

What this design adds:

- **Changing `delay` restarts the echo.** A change empties the FIFO and clears the counter. The
  new delay takes effect once the FIFO has refilled, and the echo term is zero until then.
  Without the restart, a smaller delay could never shrink the FIFO's contents.
- `delay = 0` switches the echo term off. The usable range is 1 … 2048, and at 2048 the FIFO runs
  full. For that case, `sync_fifo` accepts a push in the same cycle as a pop when it is full.
- The FIFO read has one clock of latency, as in block RAM. The echo registers the running sample
  for one clock to line it up with the popped word.

**Scale.** The store holds 2048 samples, which is the source's own figure. At 1 MHz that is only
2.048 ms of echo. The source also speaks of a 50–70 ms delay, and its block diagram compares the
counter against the constant 16000. Neither fits in a 2048-word FIFO: 50–70 ms at 1 MHz needs
50,000–70,000 samples. This design keeps the 2048-word store and makes the delay a runtime input.
For an audible 50–70 ms echo, either:

- feed the effect at an audio rate of about 29–40 kHz or less (decimate, or set `FS_HZ`); or
- raise `DEPTH`. The echo works unchanged at `DEPTH` = 70,000, and `tb_echo_workloads` runs it at
  50 and 70 ms. That store costs 840 kbit of RAM, more than the XC3S200 has.

## The chorus

The chorus sums three paths, each scaled by its own mix gain: the dry input and two delayed
voices. The delay of each voice is moved slowly by an LFO, so the voices drift in time and pitch
against the dry signal, like several players who are not quite together.

```
 out = sat( (mix0·x[n] + mix1·x[n − d1(n)] + mix2·x[n − d2(n)]) >>> 7 )
 d1(n) = BASE1 + tri(n / RATE_DIV)          (starts at BASE1, sweeping up)
 d2(n) = BASE2 + tri(SPAN + n / RATE_DIV)   (starts at BASE2 + SPAN, sweeping down)
 tri(m) = m mod 2·SPAN, folded at SPAN
```

The source gives only the structure: dry path, two delay blocks each with an LFO, three mix
gains, and adders. Everything numeric is this design's choice:

- **Delay ranges.** Voice 1 sweeps 256–768 samples and voice 2 sweeps 768–1280, each in a
  2048-word buffer.
- **LFO.** Each LFO is a triangle that moves one sample every 64 input samples. A full sweep
  therefore takes 65,536 samples, 65.5 ms at 1 MHz. The two LFOs start at opposite ends of their
  sweeps.
- **Sum.** The three products are added at full width and saturated once. This is equivalent to
  the two adders of the structure, without an intermediate overflow.

`mod_delay` is a RAM written at a write pointer and read at `wr_ptr − tap`. A voice outputs zero
until `tap` samples have been written, so the random power-up contents of the RAM are never
heard. The LFO ticks once per input sample, and the tap used for sample *n* is the LFO value after
*n* ticks. At 1 MHz, 256–1280 samples is 0.26–1.28 ms, which is shorter than a typical 10–30 ms
chorus delay. At a 48 kHz audio rate the same numbers give 5–27 ms. `BASE1`, `BASE2`, `SPAN` and
`RATE_DIV` are parameters of `chorus` and of the top.

## ADC side (AD7891, parallel mode)

The pin names and widths come from the board schematic: `mode_ad`, `eoc_ad`, `rd_ad`, `wr_ad`,
`convst_ad`, `cs_ad`, `adc_clk`, the 12-bit `db` bus and the 2-bit channel select `ch_adc`. The
handshake itself is this design's choice and follows the usual parallel-mode sequence of this
converter. Strobes are active low and each lasts `STROBE_CLKS` = 3 clocks.

1. **Write the channel address**, only when `ch_adc` has changed (and once after reset). `cs_ad`
   and `wr_ad` go low with `{0, ch_adc}` on `db[2:0]`. `cs_ad` and the data are held one clock
   after `wr_ad` rises. The write adds 4 clocks to that sample.
2. **Start the conversion**: a pulse low on `convst_ad`.
3. **Wait** for `eoc_ad` to go low.
4. **Read**: `cs_ad` and `rd_ad` go low. The result on `db` is latched as `rd_ad` rises, and
   `valid` pulses.

Other details:

- `mode_ad` is held high to select the parallel interface.
- `adc_clk` is `clk/4`.
- The bidirectional `db` is split into `db_in`, `db_out` and `db_oe`. An I/O pad or the board
  wrapper joins them.
- If a sample period begins while a conversion is still running, that period is skipped and
  `overrun` pulses. A converter with the AD7891's typical conversion time of about 1.6 µs does
  this every other period at 1 MHz, so it really samples at 500 kHz. Set `FS_HZ = 500_000`, or use
  a faster part, for an even 1 MHz.

## DAC side

For each sample, `dac_out` is updated first. One clock later, `en[dac_sel]` goes high for
`EN_CLKS` = 4 clocks while `dac_out` holds still. The four enables are one per DAC channel and
active high. Either use them as the latch strobes of four DACs, or use one of them alone.

`bit_trun[7:0]` clears bits of the output sample: each set bit *k* clears bit *k* of the sample.
This lowers the effective resolution, so the effect of coarser quantization can be heard.

## Control inputs

| Input | Width | Meaning |
|---|---|---|
| `fx_sel` | 2 | 0 bypass, 1 echo, 2 chorus, 3 mute |
| `echo_delay` | 12 | echo delay in samples, 1 … 2048; 0 = no echo |
| `echo_gain` | 8 | echo gain, Q1.7 |
| `chorus_mix0/1/2` | 8 each | dry / voice 1 / voice 2 gains, Q1.7 |
| `ch_adc` | 2 | ADC input channel |
| `dac_sel` | 2 | DAC channel whose enable pulses |
| `bit_trun` | 8 | low-bit truncation mask |

These inputs are meant to come from switches. They are used without synchronizers, so change them
only while the result does not matter, or add synchronizers in the board wrapper. `rst_n` is
asynchronous. `reset_sync` releases it on a clock edge two clocks after it rises.

## Departures from the source, and choices made where it is silent

- **`eoc_ad` direction.** The schematic draws every ADC pin, end-of-conversion included, as an
  output of the FPGA. End of conversion comes from the converter, so `eoc_ad` is an input here.
- **Echo scale.** The 16000 compare constant and the 50–70 ms delay do not fit the 2k store (see
  the echo section). The 2k store is kept; the delay is a runtime input.
- **Effect selection.** The DIP-switch selection is described for the Cyclone II evaluation kit
  on which the same effects were re-run. It is used here for the Spartan-3 board as well. Mute is
  an extra position.
- **Filled-in details.** The meaning of `bit_trun`, the enable timing, the offset-binary DAC code,
  the number formats and saturation, the restart of the echo on a change of delay, all chorus
  numbers, and the overrun behaviour are this design's choices.
- **Memory.** Memory use is 3 × 2048 × 12 = 73,728 bits. That fits the XC3S200's 216 kbit of block
  RAM and the Cyclone II's 1.15 Mbit. It is more than the roughly 30 kbit (Xilinx) and 5.8 kbit
  (Altera) reported for the original builds, probably because those did not hold the chorus and
  the echo at the same time.
- **Multipliers.** The design uses four 12 × 9 multipliers: one echo gain and three chorus mixes.
  The original Spartan-3 build also reports four.

## Not included

- The analog parts of the board: input buffer and channel multiplexer, the ADC and DAC chips
  themselves, and the reconstruction filter and amplifier.
- The PLL.
- The soft processor that the source proposes as a later upgrade.
- Vendor FFT and convolution cores.
- Reverberation, flanging, fading and equalization. These are mentioned as possible effects but
  not described, so there is nothing to build them from.
- The Cyclone II kit's 14-bit ADS5500/DAC904 converters, which belong to the comparison platform.
- A many-channel (32 or more) chorus array, mentioned as a possible extension.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. It compares the outputs
against an independent model written in the testbench and ends with a line
`TB_RESULT checks=N failures=M`. `tb/ad7891_model.sv` is a behavioural model of the converter's
bus protocol. It counts protocol errors: a read during a conversion, bus contention, and a write
strobe without chip select.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl -y tb rtl/audio_pkg.sv tb/tb_audio_fx_top.sv \
    --top-module tb_audio_fx_top -o sim
./obj_dir/sim
```

Use the same command with another testbench for one block. Always list `rtl/audio_pkg.sv`
first.

`tb_audio_fx_top` runs the top at its default parameters for about 33,000 samples (1.7 M
clocks, about a second of host time). It feeds the ADC model random samples. It checks every DAC
write against a model of the whole chain, including the pin-to-pin latency and the selected
enable. It also counts each mechanism and fails if one never happened:

- all four effect modes;
- the echo FIFO running full (delay 2048);
- saturation;
- bit truncation;
- an ADC channel switch (one control write each);
- all four DAC channels;
- both LFO turnarounds;
- ADC overruns, provoked by slowing the converter model.

`tb_echo_workloads` runs the echo with its store enlarged to 70,000 samples. It uses the delays
quoted for the effect: the 16000-sample setting of the original echo model at gain 1.0, and 50 ms
and 70 ms echoes at 1 MHz. The input is a pulse train. Every output is checked, and the first echo
must appear exactly *D* samples after the first pulse.

`adc_if` and `dac_if` carry concurrent assertions for their bus rules:

- read and write are never active together;
- a strobe only comes with chip select;
- `db` is not driven while the ADC reads;
- at most one DAC enable is high at a time.

Run the testbenches with `--assert` to check these.

The block testbenches use smaller memories (16 to 64 words) to reach full and wrap-around
conditions quickly. Timing against the real converter and DAC datasheets has not been checked,
and neither has synthesis for a specific FPGA.
