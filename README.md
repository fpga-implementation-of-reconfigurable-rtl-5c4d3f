# Reconfigurable AM/FM software radio: FPGA datapath

This RTL implements the FPGA side of a small software-defined radio for voice.
It has two modulation schemes, AM and FM, each of which is a complete FPGA
bitstream. The FPGA boots the AM bitstream. When the user asks for FM, the
running design writes a short command sequence into the FPGA's own
configuration port (ICAPE2 on Xilinx 7-series). The device then reloads
itself from a different region of the attached BPI flash. This is
*multiboot*: only one modem is ever in the fabric, and the switch needs no
external programmer and no power cycle.

Every bitstream has the same shell around its modem:

```
 processor (GPMC, 100 MHz)                         125 MHz sample clock
 ─────────────────────────┐                       ┌──────────────────────────────────────────┐
   TXDATA writes ──► gpmc_if ──► write FIFO ──►(8 kHz tick)──► interpolator ──► AM/FM modulator ──► dac_data
                                                                (8k→125 MSPS)     (21.4 MHz IF)
   RXDATA reads ◄── gpmc_if ◄── read FIFO ◄── AM/FM demodulator ◄────────────────────────────── adc_data
   irq          ◄──┘                               (IF → 8 ksps)
   RECONFIG write ──► pulse_sync ──► reconfig_icap ──► icap_csib / icap_rdwrb / icap_i (to ICAPE2)
```

The audio is 16-bit at 8 ksps. The IF is 16-bit at 125 MSPS, centred on
21.4 MHz. The processor moves samples in and out over the GPMC bus and
waits on `irq` before it reads received audio.

## Files

| file | what it is |
|---|---|
| `rtl/sdr_pkg.sv` | rates, carrier phase increment, GPMC register map, ICAP command words, CORDIC angle table |
| `rtl/sdr_top.sv` | one bitstream's top level; `REVISION` 0 = AM, 1 = FM |
| `rtl/gpmc_if.sv` | GPMC slave and register file |
| `rtl/async_fifo.sv` | dual-clock FIFO (used as the write and the read buffer) |
| `rtl/sample_tick.sv` | 8 kHz clock enable from 125 MHz |
| `rtl/interpolator.sv` | linear interpolator 8 ksps → 125 MSPS |
| `rtl/am_modulator.sv`, `rtl/fm_modulator.sv` | modulators onto the 21.4 MHz IF |
| `rtl/am_demodulator.sv`, `rtl/fm_demodulator.sv` | demodulators back to 8 ksps |
| `rtl/reconfig_icap.sv` | multiboot controller driving ICAPE2 |
| `rtl/cordic_rotate.sv`, `rtl/cordic_vector.sv`, `rtl/integrate_dump.sv`, `rtl/reset_sync.sv`, `rtl/pulse_sync.sv` | helpers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_sdr_top.sv` | end to end: AM loopback, reconfiguration to FM, FM loopback, FIFO overflow |
| `tb/tb_sdr_top_full.sv` | one complete AM operation and trigger at default parameters |
| `tb/tb_voice_link.sv` | 20 ms of speech-band multi-tone audio through the AM and the FM radio side by side |

## Reconfiguration: the multiboot controller

`reconfig_icap` is the part taken most directly from the source design: its
signal names, its five state codes and their order, and its final count of 9.
It runs on the 125 MHz clock.

| state | code | what happens in it |
|---|---|---|
| `S_RESET` | 000 | idle; `ce` (CSIB) and `write_out` (RDWRB) high. `trigger` high starts the sequence and latches `rev_sel` |
| `S_WRT`   | 001 | RDWRB driven low (write direction); `done_wrt` |
| `S_CE`    | 010 | CSIB driven low with the first word on `icap_i`; `done_ce`; `count` = 1 |
| `S_ICAP`  | 011 | one word per clock while `count` runs 1…8; then CSIB goes high, `done_icap` is set and `count` ends at 9 |
| `S_ERROR` | 100 | RDWRB high, `error_output` high. Only reset leaves this state |

ICAPE2 captures `I` on every rising edge while CSIB is low. It therefore sees
exactly these eight words on consecutive clocks:

| # | word | meaning |
|---|---|---|
| 0 | `FFFFFFFF` | dummy |
| 1 | `AA995566` | sync |
| 2 | `20000000` | type-1 no-op |
| 3 | `30020001` | type-1 write, 1 word, WBSTAR |
| 4 | WBSTAR | `{rev_sel[1:0], RS_TS_B=1, START_ADDR[28:0]}` |
| 5 | `30008001` | type-1 write, 1 word, CMD |
| 6 | `0000000F` | IPROG |
| 7 | `20000000` | no-op |

With `BIT_SWAP` = 1 (the default), each byte goes out bit-reversed, because
that is how ICAPE2 expects its input.

On IPROG the device resets its configuration logic and loads the bitstream
that WBSTAR points to. `rev_sel` drives the flash's revision-select pins
RS[1:0], which sit on flash address bits [25:24]. Each bitstream can
therefore live at address 0 of its own region, and `START_ADDR` stays 0.
Revision 0 holds AM and revision 1 holds FM; a fully populated flash has
room for four. In hardware the fabric is gone before `S_ERROR` matters. If
the logic is still running there, the reload failed, and that is why the
state and its flag carry the name "error".

The processor starts a reconfiguration by writing `0x8000 | rev` to the
RECONFIG register. The write pulse crosses into the 125 MHz domain through a
toggle synchroniser (`pulse_sync`), and `rev_sel` crosses through two
flip-flops. RECONFIG latches `rev_sel` in the GPMC domain, so `rev_sel` is
stable long before the pulse arrives. The command words are the standard
7-series IPROG sequence. The source design names WBSTAR but does not list
the words.

## The modems

All numeric choices below belong to this implementation. The source gives
the rates, the 16-bit widths and the 21.4 MHz IF, but not how each block
works inside.

**Carrier.** A 32-bit phase accumulator steps by 735 298 401 per clock, which
is round(21.4/125 · 2³²). Its top 16 bits drive a 16-stage pipelined CORDIC
(`cordic_rotate`). The CORDIC starts from 32000·K, where K = 0.60725 is the
CORDIC gain, so its cosine and sine have a peak of 32000 without a
multiplier. Latency is 17 clocks.

**Interpolator.** On each 8 kHz tick the output starts from the previous
sample. It then climbs in 15 625 equal steps of (new − old) · round(2³²/15625)
/ 2³². Because every tick restarts from the exact old sample, the error of
the rounded reciprocal never builds up. A sample reaches the output one
8 kHz period (plus one clock) after it is loaded. If the write FIFO is empty
at a tick, the shell loads 0 (silence).

**AM modulator.** The output is `(16384 + audio/2) · cos / 2^15`. A
full-scale audio sample therefore gives 100 % modulation, and the output
never exceeds ±32000.

**FM modulator.** The phase increment is `735298401 + KF·audio`. With
KF = 5, full-scale audio gives a peak deviation of ±4.77 kHz.

**AM demodulator.** The stages are:

1. Full-wave rectify the IF.
2. Sum 15 625 samples (integrate and dump). The sum is 15625 · (2/π) ·
   envelope.
3. Track the carrier level with a leaky average of the sums (time constant
   256 output samples, about 32 ms). The tracker is seeded from the first sum
   after reset. Subtract this level.
4. Scale by 216/2²⁰ ≈ π/15625 · 32768/32000.

Step 4 makes the AM modulator → demodulator loop unity gain. The 15 625-sample
window holds exactly 2675 periods of the sampled 21.4 MHz carrier, so no
carrier ripple survives.

**FM demodulator.** The stages are:

1. Mix with cos and −sin of a local 21.4 MHz NCO.
2. Integrate and dump 625 samples, giving I/Q at 200 ksps. 625 samples hold a
   whole number of periods of the 42.8 MHz mixing image, so the image sums to
   zero.
3. `cordic_vector` turns each I/Q pair into a 16-bit phase (one turn = 2¹⁶).
4. Take the wrapped difference between successive phases. This is the
   instantaneous frequency.
5. Sum 25 differences. The result is the phase advance over one 8 kHz period,
   which is proportional to the mean audio over that period.
6. Scale by GAIN/2¹⁴, with GAIN = round(2³⁰/(KF·15625)) = 13744. This makes
   FM loopback unity gain.

A KF changed in the modulator must also change in the demodulator.

Both demodulators deliver one sample per 15 625 clocks, with `audio_valid`
high for one clock, and saturate to 16 bits. Each output is a boxcar average
of the audio over one 8 kHz period. This is a modest anti-alias filter, which
suits voice but is not a sharp one.

## GPMC interface

The bus is synchronous, 16-bit, with multiplexed address and data, clocked by
the processor at 100 MHz (`gpmc_clk`). The bidirectional AD bus appears as
separate `gpmc_ad_i`, `gpmc_ad_o` and `gpmc_ad_oe` ports; the tristate pad
buffer sits outside this RTL.

* An access begins on a clock with `csn` = 0 and `advn` = 0. The word address
  is `ad[3:0]`.
* A write stores `ad` on the first later clock with `wen` = 0. Holding `wen`
  low longer does not write twice.
* A read drives `ad_o` from the clock after `oen` is first seen low (a read
  latency of one clock after that edge) until `csn` or `oen` rises.

| addr | name | dir | content |
|---|---|---|---|
| 0 | TXDATA | W | audio sample into the write FIFO. Dropped if the FIFO is full |
| 1 | RXDATA | R | oldest demodulated sample, popped. Reads 0 when empty |
| 2 | STATUS | R | [0] write FIFO full, [1] read FIFO empty, [2] a TXDATA write was dropped (cleared by this read), [5:4] revision |
| 3 | RECONFIG | W | [1:0] revision to load, [15] start |
| 4 | ID | R | revision of this bitstream (0 AM, 1 FM) |

`irq` is high while the read FIFO holds data.

Each FIFO is 512 × 16 (`FIFO_AW` = 9), about 64 ms of audio. The FIFOs use
Gray-coded pointers and first-word fall-through reads.

## Clocks, resets and timing

* Clocks: `gpmc_clk` at 100 MHz and `dsp_clk` at 125 MHz.
* Clock crossings: only the two FIFOs, the trigger pulse and the 2-bit
  revision select cross between the two clocks.
* Reset: `rst_n` asserts asynchronously and is released synchronously in
  each domain. `reconfig_icap` takes an active-high synchronous `reset`.
* Audio latency, write to IF: TXDATA write → IF output takes one to two
  8 kHz periods.
* Audio latency, full loop: in loopback simulation the k-th sample read from
  RXDATA is the one-period average of the audio around written sample k − 2.
* Reconfiguration: ICAPE2 captures the first word on the fourth clock edge
  after `reconfig_icap` samples its trigger, then one word per clock, 8 in
  all.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `sdr_top` | `REVISION` | 0 | 0 = AM bitstream (boots first), 1 = FM |
| `sdr_top` | `FIFO_AW` | 9 | FIFO depth 2^9 |
| modulators, `fm_demodulator` | `PHASE_INC` | 735298401 | 21.4 MHz at 125 MHz |
| `am_modulator` | `CARRIER_LEVEL`, `MOD_SHIFT` | 16384, 1 | envelope = level + audio/2^shift |
| `fm_modulator`, `fm_demodulator` | `KF` | 5 | deviation per audio LSB, in 125e6/2³² Hz |
| `am_demodulator` | `R`, `DC_SHIFT`, `GAIN` | 15625, 8, 216 | |
| `fm_demodulator` | `R1`, `R2`, `GAIN` | 625, 25, 13744 | R1·R2 must be 15625 |
| `interpolator` | `RATIO`, `FRAC` | 15625, 32 | |
| `reconfig_icap` | `START_ADDR`, `BIT_SWAP` | 0, 1 | |

## Simulating

Any testbench builds and runs with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sdr_pkg.sv tb/tb_sdr_top.sv --top-module tb_sdr_top
./obj_dir/Vtb_sdr_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also
has a watchdog that counts a failure if the test hangs.

* Unit testbenches compare against floating-point models computed in the
  testbench: an ideal cosine carrier, a synthetic AM or FM IF signal, and the
  mean of the audio over a window. The pipeline delay is found by a search
  rather than hard-coded.
* `tb_sdr_top` holds two instances of the top, standing for the two
  bitstreams. A small ICAPE2/multiboot model decodes the IPROG sequence and
  "loads" the instance that WBSTAR names. It checks:
  - a 1 kHz tone through AM loopback (measured mean error about 54 LSB for a
    12000-LSB tone);
  - the switch to FM and the ID register after it;
  - the same tone through FM loopback (mean error about 13 LSB);
  - a write-FIFO overflow.

  It also counts each mechanism: underrun, overflow, irq-driven reads,
  reconfiguration, AM output and FM output. It runs in a few seconds.
* `tb_sdr_top_full` runs the default top (AM) through one tone and one
  reconfiguration trigger.
* `tb_voice_link` sends five tones between 300 Hz and 3.1 kHz through both
  configurations. Measured signal-to-error ratios are about 40 dB for AM
  (30 dB required) and about 49 dB for FM (40 dB required). The reference
  already includes the band-limiting of the interpolation and of the
  one-period averaging, so the ratio measures only the modem's own error.

## How far to trust it, and where it departs from the source design

* **Follows the source:**
  - the block structure and the order of the signal chain;
  - the rates (8 ksps, 125 MSPS, GPMC at 100 MHz), the 16-bit widths and the
    21.4 MHz IF;
  - the GPMC interrupt before reading;
  - the two bitstreams, with AM booted first;
  - multiboot through ICAP with WBSTAR choosing the bitstream;
  - the reconfiguration controller's names, state codes, state order and
    final count.
* **This implementation's own design, where the source gives only a block's
  purpose:**
  - the interpolation method;
  - the AM modulation depth and the FM deviation;
  - both demodulator algorithms and their gains;
  - the CORDIC carrier generation;
  - the FIFO depth;
  - the GPMC signal protocol and register map;
  - the underrun/overrun policy;
  - what each controller state drives;
  - the meaning of `S_ERROR`;
  - the `rev_sel` input.
* **ICAP clock:** the controller runs on the 125 MHz sample clock, as in the
  original design's simulation. The 7-series data sheet limits ICAPE2 to
  100 MHz. On hardware, check this, or clock `reconfig_icap` from
  `gpmc_clk` (100 MHz); the controller does not depend on the clock rate.
* **ICAP readback:** the controller only writes to ICAP. The configuration
  status that ICAPE2 can return on its output port is not read.
* **Outside the RTL:** the ICAPE2 primitive, the DAC and ADC, the RF front
  end, the BPI flash, the processor and codec, and the front-panel switch.
  The processor is expected to read the switch and write RECONFIG.
* **Single source for both bitstreams:** the AM and FM bitstreams come from
  one source through `REVISION`, rather than two separate top-level designs.
* **Verification:** everything is checked in simulation only; nothing has run
  on hardware. The demodulators were only tested with signals at the exact
  IF and without noise, frequency offset or gain error. In particular, the
  FM discriminator has no carrier-offset tracking. The AM carrier tracker
  follows slow level changes but has no AGC.
