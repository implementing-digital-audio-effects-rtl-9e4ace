# Hardware audio effects with a processor as the patch bay

This is synthesizable SystemVerilog for the FPGA side of a real-time audio
effects system. Every effect is a dedicated hardware unit that turns one dry
24-bit sample into one wet sample within a clock or a few hundred clocks. A
small soft processor does no signal processing. It decides which effects a
sample passes through and in what order, it writes the effect parameters
(from a MIDI foot controller), and it moves buffer words between the effects
and the external SDRAM. Only the processor can reach the SDRAM. The hardware
therefore gives fixed low latency and guaranteed throughput, while routing and
control stay in software.

The design follows the system described in *Implementing Digital Audio
Effects Using a Hardware/Software Co-Design Approach* (an Altera Cyclone II
board with a NIOS II processor, a TLV320AIC23B codec and 16 MB of SDRAM).
Where that description stops, this RTL makes its own choices. Each choice is
listed below and in the header comment of each file.

## System at a glance

```
                 +-------------------- dafx_top --------------------+
 codec  ADC ---> | i2s_rx  --> rx_left/right, rx_valid  ------------+--> processor
 (slave) DAC <-- | i2s_tx  <-- tx_left/right, tx_valid  <-----------+--- processor
 MCLK/BCLK/LR <- | codec_clkgen (48 MHz / 1088 = 44117 Hz frames)   |
                 |                                                  |
                 | delay_fx   dry/wet + params + RAM read/write  <--+--> processor <-> SDRAM
                 | chorus     dry/wet + params + RAM read/write  <--+--> processor <-> SDRAM
                 | flanger    dry/wet + params + RAM read/write  <--+--> processor <-> SDRAM
                 |   (dds)                                          |
                 | wahwah     dry/wet + params (ROM on chip)     <--+--> processor
                 | nlms_echo_canceller u,d -> e,y (memory on chip) <+--> processor
                 +--------------------------------------------------+
```

Everything runs on one 48 MHz clock `clk`, with an asynchronous active-low
reset `rst_n`. The codec is an I2S slave, so the FPGA makes all its clocks:

- 12 MHz master clock (clk/4);
- 3 MHz bit clock (clk/16);
- word clock of 2 x 34 bit clocks = 1088 system clocks per stereo frame.

The sample rate is 48 MHz / 1088 = 44117 Hz. Every number in samples in this
design assumes that rate. So does the clock budget of the echo canceller:
1088 clocks per sample.

`dafx_top` only instantiates and wires the units. Each effect's ports are
brought out unchanged as top-level ports, prefixed `dly_`, `cho_`, `fla_`,
`wah_` and `aec_`. These are the wires the processor's parallel I/O ports
attach to. The processor, its SDRAM controller, the MIDI UART and the SPI
configuration ports are not part of this RTL.

## The effect-unit interface

All effects share one interface. It has parameter inputs, a dry sample with a
valid pulse, and a wet sample with a valid pulse. Audio is 24-bit two's
complement, Q1.23, the codec's word width. The units that need a large delay
line also have the memory ports:

| port | dir | meaning |
|---|---|---|
| `ram_rd_addr_o` [22] | out | relative address of the word the *next* sample needs |
| `ram_rd_data_i` [24], `ram_rd_valid_i` | in | that word, fetched by the processor |
| `ram_wr_addr_o` [22], `ram_wr_data_o` [24], `ram_wr_valid_o` | out | a word to store |

The addresses are relative, from 0 up to the unit's ring size. The processor
adds a base address per effect. 22 bits cover the 16 MB SDRAM in 32-bit
words.

This handshake is the part of the design that is easiest to get wrong, so
here it is in full:

1. Between samples, `ram_rd_addr_o` is stable. It shows the address that the
   next sample will read. The processor may fetch that word at any time.
2. The processor delivers the dry sample (`dry_valid_i`) and the read word
   (`ram_rd_valid_i`). Each is a one-clock pulse. They may come in either
   order, or in the same clock.
3. In the clock after the later of the two, the unit issues three things in
   the same clock: `wet_o` with `wet_valid_o`, `ram_wr_addr_o` and
   `ram_wr_data_o` with `ram_wr_valid_o`, and a step of its pointers.
   `ram_rd_addr_o` takes its new value in the following clock.

```
clk            _/‾\_/‾\_/‾\_/‾\_/‾\_
ram_rd_valid_i ___/‾‾‾\_____________
dry_valid_i    _______/‾‾‾\_________
wet_valid_o    ___________/‾‾‾\_____   (ram_wr_valid_o in the same clock)
ram_rd_addr_o  ==== A ========X= A' =
```

There is no read-request line. The processor knows that one read and one
write belong to each sample. The chorus is the exception: it needs one read
per voice.

## Effects

### Delay (`delay_fx`): echo and slapback

A ring buffer of `delaytime_i` words lives in SDRAM. The pointer `ptr` runs
from 0 to `delaytime_i`-1 and wraps. The same word is read and then
overwritten:

```
y = sat(x + buf[ptr]);      buf[ptr] <= sat(level * y);     ptr++
```

So y[n] = x[n] + level·y[n-D], with D = `delaytime_i`: a decaying series of
repeats. D of 441 to 1103 samples (10 to 25 ms) gives slapback, D above
2206 (50 ms) gives echo. The unit is the same in both cases; only the
parameter the software writes differs. `level_i` is Q1.23, and negative
values invert the repeats.

### Chorus (`chorus`)

The chorus adds `VOICES` copies of the input (two by default). Each copy is
delayed by a fixed delay plus its own triangle-swept delay:

```
D_v = fixdelay + sweep * tri_v / 2^23                 v = 0 .. VOICES-1
y   = sat(x + buf[wp - D_0] + ... + buf[wp - D_{V-1}]);      buf[wp] <= x
```

- `tri_v` comes from a 24-bit phase accumulator that advances by
  `lfo_inc_i` each sample. Voice v reads the accumulator offset by
  v/VOICES of a period and folds it into a triangle that rises from 0 and
  falls back. With two voices, one delay grows while the other shrinks.
- The sweep frequency is `lfo_inc_i`·44117/2^24. 1 Hz is about 380 and 5 Hz
  about 1901.
- The ring is 2048 words, enough for the intended 15 to 20 ms fixed plus
  4 to 8 ms swept delay (at most 1236 samples).
- Each voice needs its own buffer word, but there is only one read port.
  The chorus therefore asks for its words one voice after another. After
  each `ram_rd_valid_i`, `ram_rd_addr_o` moves to the next voice in the next
  clock. The dry sample may arrive anywhere in this sequence. Wet output and
  write follow in the clock after both the dry sample and the last voice's
  word have arrived. With `VOICES = 1` this is exactly the handshake above.
- No feedback. The voices are summed unscaled, and the sum saturates.
  Gain staging is left to the software.

### Flanger (`flanger`, `dds`)

The flanger is the delay structure, with feedback through `level_i`. Its read
pointer trails the write pointer by a delay that a sine oscillator sweeps:

```
D = base + depth * (s + 32768) / 65536        s = 16-bit DDS sine
y = sat(x + buf[wp - D]);     buf[wp] <= sat(level * y)
```

The delay changes in whole samples, so there is no fractional interpolation.
`dds` is a 24-bit phase accumulator that steps once per sample. It indexes a
256-entry, 16-bit full-period sine table:
`round(32767·sin(2πk/256))`. The table is computed during elaboration by a
fixed-point Taylor series in `dafx_pkg`. The ring holds 1024 words (23 ms).

### Wah-wah (`wahwah`)

A band-pass whose centre frequency the pedal moves, built from a second-order
allpass:

```
A(z) = (-c + k z^-1 + z^-2) / (1 + k z^-1 - c z^-2),     k = d (1 - c)
c = (tan(π fb/fs) - 1) / (tan(π fb/fs) + 1)          (bandwidth fb)
d = -cos(2π fc/fs)                                    (centre frequency fc)
band-pass   y = (x - A x) / 2        (mode_i = 0)
band-reject y = (x + A x) / 2        (mode_i = 1)
```

At fc the allpass shifts the phase by 180°. Subtracting it from the input
therefore passes fc at unity gain and cancels frequencies far from fc.

The numerator mirrors the denominator, so the filter needs only c and k. It
costs four multiplications per sample, all done in parallel in one clock.

- The bandwidth is fixed at `FB_HZ` = 800 Hz, so c is a constant.
- k comes from a 1024 x 24-bit ROM, addressed by `fc_idx_i`. Entry i holds k
  for fc = 200 + i·1800/1023 Hz. The ROM is computed at elaboration, so
  `FB_HZ`, `FS` and the frequency range can be changed as parameters.
- c and k are Q2.22. The allpass state has two guard bits, because the
  allpass output of a loud signal can exceed full scale. The output
  saturates.
- A new `fc_idx_i` takes effect after the registered ROM read. Outputs
  follow inputs by one clock.

### Echo canceller (`nlms_echo_canceller`, `nlms_part`, `seq_divider`)

This is the largest unit. It takes the far-end signal u (sent to the
loudspeaker) and the microphone signal d (which contains u's echo). It
estimates the echo with an adaptive FIR filter of 1300 taps, which is 30 ms
at 44117 Hz, the time for about 10 m of reflection path. It outputs the
echo-free error e:

```
y(n)   = Σ_k w_k u(n-k)                        (aec_y_o, the echo estimate)
e(n)   = d(n) - y(n)                           (aec_e_o)
w(n+1) = w(n) + μ e(n) u(n) / (δ + ||u(n)||²)  (normalised LMS)
```

Each sample needs 1300 multiply-adds for y and 1300 for the update, but
there are only 1088 clocks per sample. The filter is therefore split into
five `nlms_part` sections of 260 taps. They run in parallel, each with its
own sample memory, weight memory and one multiplier. Per sample the
controller does the following:

| step | clocks | what happens |
|---|---|---|
| shift | 2 | u enters section 0. Each section hands its oldest sample to the next (two-phase: read everywhere, then write everywhere). The sample leaving section 4 is x[n-1300]. The running energy is updated: `norm += u² - x[n-1300]²`. |
| convolution | 263 | Every section forms Σ (w·u)>>30 over its 260 taps. The five partial sums are added, and y and e are output (`aec_valid_o`). |
| step size | 79 | `g = μ·e / (δ + norm)` by a restoring divider, one bit per clock. |
| update | 263 | Every section applies `w += (g·u)>>23`, saturating, one tap per clock, reusing its multiplier. |

That totals 609 clocks per sample, with y and e available about 270 clocks
after the input.

`ready_o` is high when a sample can be taken. A sample offered while the unit
is busy is dropped, and `aec_overrun_o` pulses. After reset the sections
spend 260 clocks clearing their memories.

Formats:

- u, d, e, y: Q1.23;
- weights: Q2.30 (32 bits);
- energy: Q.46 in 64 bits;
- g: 40 bits with 30 fraction bits, saturating;
- μ (`aec_mu_i`): unsigned Q1.23;
- δ = 2^-10, parameter `DELTA`.

The normalisation is one division per sample. The source system replaced the
division by a multiplication without saying how.

### Codec interface (`codec_clkgen`, `i2s_rx`, `i2s_tx`)

The codec uses standard I2S framing:

- word select low means left, high means right;
- word select changes on a falling bit-clock edge;
- one delay slot, then 24 bits MSB first, then don't-care slots up to 34 per
  channel.

`i2s_rx` samples on rising bit-clock edges. It pulses `rx_valid_o` once per
stereo pair, after the right word, with both channels stable. `i2s_tx`
buffers the pair offered with `tx_valid_i`, starts sending it at the next
left word, and repeats the last pair if no new one arrives. Both sample the
bit and word clocks with `clk`. That needs no synchroniser, because the same
design generates those clocks.

## Where this RTL departs from, or goes beyond, the source system

- **The processor side is ports, not logic.** The processor, its software,
  the SDRAM and its controller, the PLL for the SDRAM clock, the MIDI UART,
  the SPI ports, the parallel I/O peripherals, the codec and the
  programmable clock chip are outside this RTL. The PS/2 mouse interface,
  used only for debugging, is also outside.
- **Memory handshake.** The sequence above is this design's own. The source
  names the signals but not their timing.
- **Number formats are wider than the FPGA's 18-bit multipliers.** The
  source system used 18-bit multipliers: 4 for the wah-wah, and about 5 of
  the chip's 35 for the echo canceller. Here the echo canceller uses
  40 x 24 and 24 x 24 products, and the wah-wah uses four 24 x 24. Counted in
  18 x 18 pieces, the design needs about 69 multipliers, more than a Cyclone
  II EP2C35 has. Narrowing the weights and the step size, or time-sharing
  the wah-wah multipliers, would bring it back. Neither is done here.
- **Coefficient ROM size.** The source gives 1024 values of 24 bits but
  quotes 18432 bits for them, which is 1024 x 18. This RTL stores 24-bit
  words (24576 bits).
- **Frequency mapping and bandwidth.** The table's linear 200 Hz to 2 kHz
  mapping and the 800 Hz bandwidth are choices. The 800 Hz comes from the
  source's example response, which was plotted for fs = 48 kHz.
- **Chorus options.** The source does not give the number of voices; two
  is this design's default. Only the triangle LFO is built. A sine or
  logarithmic LFO is mentioned in the source as an option and is not built.
- **Additions.** The overrun flag and ready signal of the echo canceller,
  the δ regulariser, saturation everywhere, and the I2S sample-repeat
  behaviour are additions.
- **Not reproduced.** The wah-wah's 60 MHz timing and its size of about 400
  logic elements are not checked here.

## Files

`rtl/` has one module or package per file:

- `dafx_pkg.sv`: the shared package. It defines `audio_t`, `ram_addr_t`,
  `sat_audio`, and the elaboration-time fixed-point sin/cos/allpass-c
  functions used to build the ROMs.
- `dafx_top.sv`: the top.
- The units: `codec_clkgen`, `i2s_rx`, `i2s_tx`, `delay_fx`, `chorus`,
  `flanger`, `dds`, `wahwah`, `nlms_echo_canceller`, `nlms_part` and
  `seq_divider`.

`tb/` has one self-checking testbench per unit, `tb_<unit>.sv`, plus
`tb_dafx_top.sv`. Each prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dafx_pkg.sv rtl/*.sv \
          tb/tb_dafx_top.sv --top-module tb_dafx_top -Mdir obj_top
./obj_top/Vtb_dafx_top
```

Any other testbench works the same way; replace the name. Listing all of
`rtl/*.sv` is simplest, and the package must come first. The simulator has
only two states, so every register that is read is reset, and memories are
cleared by logic (the echo canceller) or by the testbench (effect memory).

What the testbenches establish:

- **`tb_dafx_top`** runs the whole design at its default sizes for 4696 codec
  frames (about 5 million clocks, a few seconds). It plays both the codec and
  the processor software:
  - I2S in and out through the design's own clocks;
  - left channel through delay and then wah-wah;
  - right channel through the two-voice chorus and then flanger;
  - the echo canceller on (left, echoed left);
  - memory traffic served from testbench arrays.

  Every output is compared with the testbench's own models: ring buffers for
  the delay units, a floating-point allpass (to 2^-12), and a bit-exact NLMS
  model. The test also requires each mechanism to occur at least once: ring
  wrap, triangle turn, flanger sweep to both ends, a wah-wah centre-frequency
  change and mode switch, echo reduction below 5 % of the echo energy, and an
  overrun.
- **`tb_nlms_echo_canceller`**, at full size, matches every y and e of 3000
  samples bit for bit. It measures 609 clocks per sample against the budget
  of 1088, and sees the residual echo fall to about 0.2 % of the echo
  energy.
- The unit testbenches cover the rest:
  - edge cases such as saturation, rings that shrink while running, and
    dry sample and read words arriving in any order;
  - the DDS table against `$sin` to within one LSB;
  - band-pass and band-reject behaviour at and away from fc;
  - exact clock ratios of the codec clocks;
  - I2S framing in both directions.

All of this is simulation against models written from the same equations. It
has not been checked against the source system's hardware or against
recorded audio.

## Changing it

- **Sample rate or clock.** Change the `codec_clkgen` ratios. Then change
  `FS` of `wahwah`, or `FS_HZ` in the package. The ms-to-samples values the
  processor writes also change.
- **Echo-canceller size.** Set `TAPS` and `PARTS`; `TAPS` must be a multiple
  of `PARTS`. One sample takes about 2·TAPS/PARTS + 90 clocks, and this must
  stay below the clocks per sample.
- **Ring sizes.** Set `BUF_AW` of `chorus` and `flanger`. The top's
  parameter ports are sized for the defaults: 11 and 10 bits.
- **Wah-wah range and resolution.** Set `F_MIN_HZ`, `F_MAX_HZ`, `ROM_DEPTH`
  and `FB_HZ`.
