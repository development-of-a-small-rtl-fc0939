# GOSSIPO-2: a 16 x 16 pixel readout chip with a TDC in every pixel

GOSSIPO-2 is a prototype readout chip for a gas pixel detector. A charged
particle crossing about 1 mm of gas frees electrons. They drift to the chip,
are multiplied in a thin gap above it, and land on 55 um input pads. How long
each electron drifted tells how far above the chip it was freed. So the chip
does more than record *which* pad was hit: every pixel also measures *when*,
with a resolution of about 1.8 ns. The x/y pad position plus the drift time
gives a 3-D track.

The chip has to do this at very low power. Two ideas make that possible:

* **No fast clock is distributed.** Each pixel has its own small ring
  oscillator (560 MHz). It runs only from the moment the pixel is hit until
  the next edge of the 40 MHz event clock.
* **The counters are the readout register.** Each pixel has two 4-bit LFSR
  counters: one for the drift time, one for the trigger latency. In readout
  mode they become shift registers, and all pixels chained together form one
  2048-bit shift register. There is no readout controller on the chip.

This repository holds SystemVerilog for:

* the digital pixel logic (synthesizable);
* behavioural models of the analog parts (preamp/discriminator, threshold
  trim DAC, ring oscillator);
* the pixel cell, the matrix and the chip top;
* self-checking testbenches for all of them.

## How a hit becomes two numbers

This is the heart of the design, in `tdc_control.sv`. Follow one pixel
through one hit:

```
event_clk   __|‾‾|__|‾‾|__|‾‾|__|‾‾|__|‾‾|__ ... |‾‾|__|‾‾|__
disc        ____/‾‾‾‾‾‾\______________________________________
osc_go      ____/‾‾‾‾‾‾‾‾\____________________________________   hit -> first rising edge
osc (fast)      ||||||||||                                      fast LFSR counts these
count_events              |‾|  |‾|  |‾| ... |‾|                 latency LFSR counts these
clear_hit                                      /‾‾‾‾‾\          (only if en_clear and no read)
```

1. **Hit.** The discriminator output `disc` rises. This sets the `hit`
   flag, which starts the local oscillator (`osc_go`). The fast LFSR is
   clocked by the oscillator.
2. **End of the event cycle.** The first rising edge of `event_clk` after the
   hit sets `meas_done` and stops the oscillator. The oscillator's stop is
   glitch free: a started high phase is completed and no edge follows. The
   fast count N is the time from the hit to the end of the 25 ns cycle, in
   steps of 1.786 ns. The drift time within the cycle is therefore about
   25 ns − N × 1.786 ns. Counting backwards like this keeps the oscillator
   running only briefly.
3. **Latency.** From the next event clock edge on, the latency LFSR counts
   event clock cycles through a gated clock (`count_events`). This tells the
   readout system how many bunch crossings ago the hit happened, so hits can
   be matched to an external trigger that comes with a fixed delay.
4. **Self clear** (`en_clear = 1`). The latency counter stops in its last
   state, 14 cycles = 350 ns after the window closed. At the next falling
   clock edge `clear_hit` pulses for one clock period and clears the pixel.
   An old hit that nobody asked for disappears, and the pixel is live again.
5. **Hold** (`en_clear = 0`). The latency counter never starts. The pixel
   keeps its hit until it is read, so noise hits can be collected over a
   long window.
6. **Readout** (`read = 1`). Both LFSRs switch to shift mode and are clocked
   by the event clock. New hits are ignored, because the counters are busy
   being a shift register. When `read` falls, every pixel is cleared, from
   the fall of `read` until the next rising clock edge.

A pixel takes one hit at a time. A second discriminator pulse while a hit is
held is ignored.

### Rules for the user

* **`read` may change only while `event_clk` is low.** The fast LFSR's clock
  multiplexer and the latch-based clock gate depend on this. An assertion in
  `tdc_control` reports a violation.
* **Reset is asynchronous and active high.** The counters' clear line is
  `reset | clear_hit | rd_clear`. In a two-state simulator that starts
  flip-flops at random values, that line can already be high at time zero,
  and then the first reset edge does not reach the counters. The testbenches
  therefore pulse reset twice. Real hardware resets on the level and does not
  need this.
* **Latency that can be read:** 0 to 13 cycles. If the readout starts later,
  self clear wins and the pixel reads zero.

## The LFSR counters (`lfsr4.sv`)

Four flip-flops shift towards the MSB. A multiplexer feeds the first stage
with either the serial input (shift) or the XNOR of stages 3 and 4 (count).
A second multiplexer selects the clock: `clk_a` (oscillator) or `clk_b`
(event clock). The cell has no count enable; counting is controlled entirely
by which clock edges arrive.

The XNOR feedback gives a 15-state cycle starting from the cleared state
0000. The state 1111 is the lock-up ("dead") state and is never reached.
This is why a 4-bit counter gives 14 usable steps in 25 ns (25/14 = 1.78 ns,
hence the 560 MHz oscillator). To read a count, look the state up:

| count | 0    | 1    | 2    | 3    | 4    | 5    | 6    | 7    |
|-------|------|------|------|------|------|------|------|------|
| state | 0000 | 0001 | 0011 | 0111 | 1110 | 1101 | 1011 | 0110 |

| count | 8    | 9    | 10   | 11   | 12   | 13   | 14   |
|-------|------|------|------|------|------|------|------|
| state | 1100 | 1001 | 0010 | 0101 | 1010 | 0100 | 1000 |

`gossipo_pkg::lfsr_count()` and `lfsr_state()` convert between the two. The
step rule is `next = {q[2:0], ~(q[3] ^ q[2])}`.

## Readout and configuration chains

**Readout.** With `read = 1`, each event clock edge moves every bit one
place along a chain that runs through all pixels. Inside a pixel the chain is:

```
data_in -> fast[0] fast[1] fast[2] fast[3] -> lat[0] lat[1] lat[2] lat[3] -> data_out
```

Across the matrix the chain is a meander: up column 0 (row 0 to row 15),
down column 1, up column 2, and so on. Chain position k is pixel

```
col = k / 16,  row = (col even) ? k % 16 : 15 - k % 16
```

The chip input `previous` feeds position 0, and `next` is the output of
position 255, so chips can be daisy-chained. Sample `next` while the clock is
low, once before each rising edge. The 2048 bits then arrive
last-pixel-first, 8 bits per pixel, in the order
`lat[3] lat[2] lat[1] lat[0] fast[3] fast[2] fast[1] fast[0]`. Bits fed into
`previous` appear at `next` 2048 clocks later.

**Configuration.** Each pixel has a 6-bit register. The registers form a
second chain of 1536 bits (`contr_in` → `contr_out`, clocked by
`contr_clk`) that follows the same meander. A pixel's word is shifted in
first bit first: `enable_test`, `mask`, `dac[3]`, `dac[2]`, `dac[1]`,
`dac[0]` (the `pixel_cfg_t` struct). To load the whole chip, send the word
for chain position 255 first and position 0 last. Reset clears all
configuration.

## The analog parts, as behavioural models

These models simulate with a timing-capable simulator but do not
synthesize. Their ports carry analog quantities as integers.

* **`frontend`** (preamp + discriminator):
  * A charge arrives at the pad (`pad_strike` edge, `pad_charge_e`
    electrons), or through the common test line (`test_pulse` edge, only
    with `enable_test`). The test charge is the voltage step times 13.5 fF,
    about 84 electrons per mV.
  * The preamp pulse is 60 mV per 1000 electrons. It fires the discriminator
    if it exceeds `threshold_mv + offset_mv − trim_mv`; the threshold is
    measured from the preamp baseline.
  * `offset_mv` is the pixel's own threshold error. On the chip, comparator
    offset and gain and baseline variation spread the thresholds by about
    26 mV r.m.s. The trim DAC exists to cancel this. The offset is an input
    so that a test can give every pixel its own value.
  * The delay is 8 ns for a pulse at least twice the threshold, 30 ns
    otherwise. The output then stays high for 40 ns.
  * `mask` stands for pulling the threshold to the supply: a masked pixel
    never fires.
  * `noise_e` is the r.m.s. input noise in electrons (about 75 on the
    chip). Each pulse gets a Gaussian sample of that width added to its
    charge, made as the sum of twelve uniform random numbers. At 0 the model
    is exact, which most testbenches use.
  * Not modelled: hysteresis, gain spread.
* **`threshold_dac`** (4-bit trim): `trim_mv = code × range_mv / 15`.
  `range_mv` stands for the external bias that sets the DAC range; its
  nominal value is 130 mV.
* **`local_osc`** (NAND-gated ring of 12 inverters):
  * Half period `HALF_PERIOD_PS` = 893 ps (560 MHz); the output is low when
    idle.
  * The first rising edge comes half a period after `osc_go` rises.
  * Stopping is glitch free.
  * The speed follows the supply and temperature inputs (`vdd_mv`,
    `temp_c`): +0.1 % per mV and −0.2 % per °C around 1200 mV and 27 °C.
    About 60 mV or 30 °C moves a 25 ns window by one count.
  * A second instance on the top is the chip's stand-alone test oscillator
    (`osc_test_go`, `osc_test_out`).

## Module map

```
gossipo2                 chip top (pins, test oscillator)
└─ pixel_array           NROWS x NCOLS matrix, meander chains
   └─ pixel_cell         one pixel (not synthesizable: contains models)
      ├─ frontend        preamp + discriminator model
      ├─ threshold_dac   trim DAC model
      ├─ local_osc       ring oscillator model
      └─ pixel_logic     synthesizable pixel digital part
         ├─ tdc_control  hit / stop / latency / clear control
         ├─ lfsr4  x2    drift-time counter, latency counter
         └─ pixel_config 6-bit configuration register
gossipo_pkg              sizes, pixel_cfg_t, LFSR functions
```

Top-level ports of `gossipo2`:

| Port | Meaning |
|------|---------|
| `reset_in` | global reset |
| `event_clk` | 40 MHz event clock; also the readout clock |
| `read` | 1 = readout, 0 = data taking |
| `en_clear` | self clear enable |
| `test` | common test pulse line |
| `contr_clk`, `contr_in`, `contr_out` | configuration chain |
| `previous`, `next` | readout chain |
| `threshold_mv`, `dac_range_mv`, `test_step_mv` | analog settings, as integers |
| `vdd_mv`, `temp_c` | supply (mV) and temperature (°C); they set the oscillator speed |
| `noise_e` | r.m.s. front-end noise in electrons, shared by all pixels (not a chip pin) |
| `offset_mv[i]` | threshold offset of pixel i in mV, standing for the spread between pixels (not a chip pin) |
| `pad_strike[i]`, `pad_charge_e[i]` | pad charges, pixel i = row × 16 + col |
| `hit[i]`, `clear_hit[i]` | observation outputs (not chip pins) |
| `osc_test_go`, `osc_test_out` | stand-alone test oscillator |

`NROWS` and `NCOLS` default to 16.

Synthesized size of one pixel's digital part (`pixel_logic`): 18 flip-flops
and one clock-gate latch.

## Simulating

Build and run any testbench with Verilator 5. Here it is for the full chip:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/gossipo_pkg.sv tb/tb_gossipo2.sv --top-module tb_gossipo2
obj_dir/Vtb_gossipo2
```

`-Wno-fatal` is needed because Verilator warns that some computed delays
could be zero; they never are. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|-----------|---------------|
| `tb_lfsr4` | counting sequence, dead state never reached, clock select, shift, clear |
| `tb_local_osc` | period, first edge, edge count, glitch-free stop, supply and temperature shifts |
| `tb_pixel_config` | field order, 6-clock chain delay, reset |
| `tb_threshold_dac` | all codes at several ranges |
| `tb_frontend` | 8/30 ns delays, below threshold, trim, mask, test switch, merged pulses |
| `tb_tdc_control` | oscillator window, 14 latency edges, self-clear timing, hold, readout, clear after readout |
| `tb_pixel_logic` | drift counts at 40 hit offsets against an independent formula, latency 0–11, chain order, configuration |
| `tb_pixel_cell` | the same through the front end, plus trim, mask, test pulse |
| `tb_pixel_array` (3 × 4) | meander mapping of both chains, per-pixel drift and latency |
| `tb_gossipo2` (16 × 16, defaults) | end to end: configuration readback, self clear, in-time readout of 2048 bits with masked, below-threshold and trim-rescued pixels, hits during readout ignored, daisy-chain pass-through, hold mode, test pulse, test oscillator; each mechanism is counted and must occur; about 1 minute to build, seconds to run |
| `tb_delay_scan` (2 × 2) | test-pulse delay swept over 58 ns in 0.25 ns steps; drift and latency counts, reconstructed time monotonic and within half a step |
| `tb_trim_calibration` (4 × 4) | a calibration run: pixels with offsets over ±45 mV are scanned, given DAC codes from their scan edges and scanned again; the edge spread falls from 90 mV to within one DAC step |
| `tb_scurve` (2 × 2) | threshold scan with 75 e noise and 100 pulses per point; mean and width of each S-curve give back the pulse height and the noise |
| `tb_threshold_scan` (4 × 4) | threshold scans at 1685 e and 2528 e test charge with DAC codes 0–15; the gain (60 mV/1000 e) and the DAC step are recovered from the scan edges |

In `tb_gossipo2` and the scans, the expected counts come from the timing
rules above:

* the discriminator fires at t + 8 ns or t + 30 ns;
* the measurement window closes at the next rising event clock edge;
* the fast count is the number of oscillator edges (0.893 ns, then every
  1.786 ns) that fit in the window;
* the latency is the number of rising edges after that, up to the readout.

## What is taken from the chip's description and what is this design's own

Given by the chip's description, and followed:

* 16 × 16 pixels; 2048-bit readout, 1536-bit configuration;
* the 6 configuration bits and their meaning;
* 4-bit XNOR LFSRs with one dead state, reused as the readout register;
* the fast and slow clock multiplexers;
* a 560 MHz gated oscillator with glitch-free stop;
* the counting sequence: start on hit, stop at the first event clock edge,
  then count latency;
* self clear at the latency counter's last value (350 ns), or hold without
  self clear;
* no data taking during readout, and clear after readout;
* a meander readout path and chip-to-chip chaining;
* front-end numbers: 60 mV/1000 e gain, 13.5 fF test capacitor, 8/30 ns
  comparator delay, 130 mV trim range in 15 steps, mask by raising the
  threshold;
* oscillator drift of 0.1 % per mV of supply and 0.2 % per °C;
* a threshold spread of about 26 mV r.m.s. for the trim DAC to cancel;
* front-end noise of about 75 electrons r.m.s.

This design's own choices:

* the LFSR feedback taps (stages 3 and 4) and the clear state 0000;
* the bit orders in both chains and the meander's start corner;
* the exact timing of `clear_hit` and of the clear after readout;
* the latch-based clock gate and the rule on `read`;
* reset polarity, and that reset also clears the configuration;
* the 40 ns discriminator output width and the two-level delay rule;
* integer analog ports;
* the oscillator's reference temperature (27 °C);
* the threshold spread as one fixed offset per pixel;
* noise as one Gaussian sample per pulse;
* top-level pin directions (the pin names follow the chip's pads).

Where the measured chip differs from its design values, the models use the
design values. The oscillator measured 530 MHz at 1.2 V; set
`HALF_PERIOD_PS = 943` to model that. Raising `vdd_mv` to 1257 then brings
it back to 560 MHz, as tuning the supply did on the chip. The gain measured 55 mV/1000 e.
The chip's design notes give the oscillator drift signs opposite to its own
measurement, which found the frequency rising with supply and falling with
temperature. The model uses the measured signs.

## Limits

* `pixel_cell`, `pixel_array` and `gossipo2` contain the analog models, so
  only `pixel_logic` and the modules below it synthesize.
* The front-end model has no baseline below which every pixel fires, so
  a threshold scan shows only the falling edge of each pixel's curve.
* Not modelled:
  * bias circuits and the bandgap reference;
  * the three stand-alone analog test pixels and the stand-alone digital
    test pixel;
  * the output buffers and pads;
  * the post-processed grid and protection layer;
  * power.
* Metastability is not modelled. This covers a hit arriving right at an
  event clock edge, and `read` rising while the oscillator of a
  just-hit pixel is still running.
