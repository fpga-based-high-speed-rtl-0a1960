# High-speed data acquisition card: FPGA logic

This is the FPGA design of a 6U cPCI acquisition card built around a Virtex-5.
A dual 12-bit ADC samples two analog inputs at 1 GS/s each. The FPGA stores
one channel in a 2 GB DDR2 buffer, keeping a programmable stretch of history
from before a trigger, and then streams the record to a PC through a 32-bit,
33 MHz cPCI bridge. The same card also runs a second, independent
application: a direct-sampling low-level RF (LLRF) controller. It measures
the phase and amplitude of a cavity signal and drives a DAC with a corrected
sine wave.

Both applications are in `daq_card_top`, side by side, each with its own
ports. The parts outside the FPGA are not modelled in `rtl/`:

- the ADC,
- the DDR2 memory controller and memory,
- the PCI bridge,
- the DAC,
- the clock synthesizer.

Their signals are brought out as ports. The end-to-end testbenches drive
them with behavioural models.

## Acquisition path

```
ADC ch I: DI, DId (12-bit DDR, DCLKI 250 MHz)
  -> iddr x2 -> sample_packer -> async_fifo (FIFO_I, 64 x 128) --+
ADC ch Q: DQ, DQd (12-bit DDR, DCLKQ 250 MHz)                     |
  -> iddr x2 -> sample_packer -> async_fifo (FIFO_Q, 64 x 128) --+-> acq_writer (channel select,
                                                                       ring buffer, pre-trigger)
                                                                           |  memory command port
                                                                       DDR2 (2^27 x 128 bit)
                                                                           |
                       acq_reader -> async_fifo (FIFO_DDR) -> sample_unpacker -> 32-bit stream
```

### From DDR pins to 128-bit words

The ADC runs in 1:2 demux, non-DES mode. Each channel arrives on two 12-bit
buses: a direct bus (`DI`) and a delayed bus (`DId`). Both buses are double
data rate on the channel's own 250 MHz `DCLK`. So one DCLK period carries four
samples per channel, which gives 1 GS/s.

- **`iddr`** models the FPGA input DDR register. It has two flip-flops on D:
  - Q0 is clocked by C0 (`DCLK+`).
  - Q1 is clocked by C1 (`DCLK-`).

  At each C0 rising edge, logic clocked by C0 sees two consecutive samples:
  Q0 holds the one from the previous rising edge and Q1 the one from the
  falling edge in between.
- **`sample_packer`**, one per channel, reads the four IDDR outputs each DCLK
  cycle. It puts the samples in time order and zero-extends each 12-bit
  sample to a 16-bit lane. Two cycles (eight lanes) make one 128-bit word,
  with the oldest sample in bits `[15:0]`.
  - Assumed time order: the delayed bus carries the older sample of each pair,
    so the order is `Id.q0, I.q0, Id.q1, I.q1`.
  - Each channel produces a word every second DCLK cycle, that is 125 M
    words/s at 1 GS/s.
- **`async_fifo`**, used as FIFO_I and FIFO_Q, moves the words from each DCLK
  domain into the memory clock domain. It is a standard dual-clock FIFO:
  - Gray-coded pointers with two-flop synchronizers.
  - Show-ahead read data.
  - A sticky `wr_overflow` flag, set when a word arrives while the FIFO is full.
  - Its full and fill-level outputs can only err towards "fuller", never
    "emptier".

### Ring buffer with pre-trigger (`acq_writer`)

This is the part of the design that takes the most care. The writer uses the
whole DDR2 buffer, 2^`AW` words, as a ring. It works in four states:

1. **`ACQ_IDLE`**: both FIFOs are drained and the data discarded. A new capture
   therefore never starts with stale samples.
2. **`arm`** moves it to **`ACQ_ARMED`**. The selected channel (`ch_sel`, the
   channel-select multiplexer) is written to consecutive addresses from 0,
   wrapping at the end of the buffer. The other channel's FIFO keeps being
   drained.
3. The trigger input is asynchronous and passes a two-flop synchronizer. On a
   **rising edge of `trigger`**, it checks whether at least `pretrig_words`
   words have been written since arming:
   - If not, the trigger is ignored and `early_trig_count` increments.
   - If so, the next word loaded becomes the *trigger word*. The writer then
     goes to **`ACQ_POST`** and writes `capture_words - pretrig_words` more
     words, the trigger word included.
4. **`ACQ_DONE`**: the record is `capture_words` words long. It starts at
   `rec_addr = trig_addr - pretrig_words`, modulo the buffer size, and may wrap
   past the end of the buffer.

Because `capture_words <= 2^AW`, the post-trigger writes never overwrite the
pre-trigger history they belong to. The trigger resolves to one 128-bit word,
which is 8 samples or 8 ns at 1 GS/s. The trigger word is the first word
popped from the FIFO after the synchronised edge. Samples still waiting in
FIFO_I/FIFO_Q at that moment count as pre-trigger samples.

On the memory side there is one command per 128-bit word, with a
`wr_valid`/`wr_ready` handshake. A beat stays stable until it is accepted, and
an assertion checks this. Back-pressure from the memory reaches the FIFOs.
If it lasts long enough, the ADC-side FIFO overflows and raises
`fifo_i_overflow` or `fifo_q_overflow`.

### Read-back (`acq_reader`, FIFO_DDR, `sample_unpacker`)

After `ACQ_DONE`, a `read_start` pulse makes `acq_reader` read the record in
order from `rec_addr`. Each returned word goes into FIFO_DDR.

The memory port is assumed to return read data in order and cannot be
stalled. So the reader only issues a command when FIFO_DDR has room for that
word plus every read still in flight:

    fill level (write-side view) + reads in flight < FIFO depth

The FIFO can therefore never overflow, however slow the PCI side is. An
assertion in the top checks this. `read_credit_stalls` counts the cycles the
reader waited for room. While the reader is busy it owns the memory port, and
the writer owns it otherwise.

FIFO_DDR carries the words into the PCI clock domain. There `sample_unpacker`
splits each word into four 32-bit beats. Each beat holds two consecutive
16-bit samples, the older in bits `[15:0]`. The output uses a
`pci_valid`/`pci_ready` handshake and runs at one beat per clock.

## LLRF controller (`llrf_top`)

All four stages run on one 250 MHz sample clock and take one sample per clock.

1. **`ddc_custom`**: a `dds_core` local oscillator at `ddc_phase_inc` (the
   cavity frequency, e.g. 75 MHz = `0x4CCCCCCD` at 250 MHz) mixes the IF down:
   `I = x*cos`, `Q = -x*sin`, scaled by 2^-11. Two `fir_lpf` filters then
   remove the sum tone, which sits at 150 MHz and aliases to 100 MHz.
   - The filter is a 31-tap Hamming-windowed sinc, with cutoff 0.05 cycles per
     sample and unity gain at DC, so that it stops everything above 25 MHz.
   - Its coefficients are computed during elaboration. The formula is in
     `fir_lpf.sv`.
   - For an input `A*cos(wt + phi)`, the outputs settle to `I = 8A cos(phi)`
     and `Q = 8A sin(phi)`.
2. **`pmc`** (phase and magnitude comparator): a 16-stage pipelined CORDIC in
   vectoring mode finds `atan2(Q, I)` and `|I + jQ|`.
   - Its angles come from an arctangent look-up table. Vectors in the left
     half-plane are first rotated by 180°. Four guard bits keep the rounding
     error below one input LSB.
   - It outputs `phase_shift = good_phase - atan2(Q, I)`, where 2^32 = 360°.
   - It outputs `scale_fact = good_mag / |I + jQ|` in s1.14 format
     (16384 = 1.0). A 15-stage restoring divider computes this, and the
     result saturates at 32767.
3. **`ma_filter`** x 2: a 16-tap moving average over each correction, using a
   running sum. The phase is averaged as a signed angle so that a phase
   hovering around 0° does not average to 180°.
4. **`dds_custom`**: a `dds_core` at `dds_phase_inc`, shifted by the averaged
   `phase_shift`. Its output is multiplied by the averaged `scale_fact`,
   shifted right by 14 and saturated to the 16-bit DAC sample.

`dds_core` is a 32-bit phase accumulator plus `phase_shift`. The top 12 bits
address a sine table, which holds one quarter of a 4096-point period sampled
at half-step centres:

    SIN_QTR[k] = round(32767 sin(2*pi*(k + 0.5)/4096))

The table is computed during elaboration in `llrf_pkg`. Because of the
half-step sampling, mirroring and negating the quarter gives the exact other
three quarters. Cosine is the same table, a quarter period ahead.

The chain follows the set-points directly. It does not integrate the error,
so it is a comparator followed by a filtered actuator, not a PI loop.

## Timing

| Path | Latency (clocks) |
|---|---|
| `iddr` D to Q0/Q1 | 1 edge of C0 or C1 |
| `sample_packer` quad to word | 1 after its second quad |
| `dds_core` phase_shift to sin/cos | 3 |
| `fir_lpf` din to dout | 2 |
| `pmc` I/Q to both outputs | 35 (`ITER` + 19) |
| `ma_filter` | 1, full step after 16 |
| `dds_custom` phase_shift / scale_fact to dac_out | 5 / 2 |
| `llrf_top` adc_in to first effect on dac_out | 47 |
| `acq_writer` trigger to decision | 3 (synchronizer + edge detect) |

## Parameters and sizes

| Parameter | Default | Where |
|---|---|---|
| `AW` | 27 (2^27 x 128 bit = 2 GB) | `daq_card_top`, `acq_writer`, `acq_reader` |
| `FIFO_DEPTH` | 64 words of 128 bits | `daq_card_top` (FIFO_I, FIFO_Q, FIFO_DDR) |
| `SAMPLE_W` / `LANE_W` / `WORD_W` | 12 / 16 / 128 | `daq_pkg` |
| `PHASE_W` / `SCALE_W` / `LUT_AW` | 32 / 16 / 12 | `llrf_pkg` |
| `N_TAPS` / `FC` | 31 / 0.05 | `fir_lpf` |
| `ITER` | 16 | `pmc` |
| `TAPS` | 16 | `ma_filter` |

All resets are synchronous and active high. Each must be held for a few
cycles of every clock that uses it.

## Where this design makes its own choices

The block structure and these sizes come from the card's published
description:

- 12-bit samples padded to 16 bits, 128-bit FIFOs of 64 words, 2 GB buffer,
  32-bit output made of two 16-bit samples;
- pre-trigger acquisition;
- the DDC, phase/magnitude, moving-average and DDS chain, with its 16-tap
  average, 12-bit DDS table, 32-bit phase and s1.14 scale;
- the 25 MHz stop band.

The following are choices made here:

- the sample order of the delayed and direct buses, and the lane order;
- dual-clock FIFOs, and the overflow and credit flow control;
- the ring-buffer pre-trigger scheme, with trigger granularity of one word and
  early triggers ignored;
- the simplified memory port (one word per command, in-order reads), which
  stands in for the vendor memory-controller interface;
- a valid/ready output stream instead of the PCI bridge's local bus;
- the FIR design (window, taps, cutoff);
- the CORDIC and divider inside the comparator, and the exact definitions of
  `phase_shift` and `scale_fact`;
- averaging the phase as a signed value;
- rounding and saturation;
- all reset behaviour.

Not implemented:

- configuration of the clock synthesizer and of the ADC: their register
  contents are not given;
- the USB, LCD, flash, SFP, LED and switch peripherals.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`. The end-to-end tests are:

- `tb_daq_card_top`: a 256-word ring, so the buffer wraps.
- `tb_daq_card_full`: every parameter at its default.

Both use `tb/daq_card_harness.sv` with `tb/adc12d1000_model.sv`, a sparse
DDR2 model and a cPCI sink. The harness runs three captures and reads each one
back:

- channel I with pre-trigger history and an early trigger;
- channel Q with no pre-trigger history;
- channel I with nearly all of the record before the trigger.

Every received sample is checked for continuity. The harness then forces a
FIFO overflow, and checks the LLRF corrections for a 45° tone. It counts each
mechanism (ring wrap, early trigger, memory stall, credit stall, PCI stall,
channel switch, overflow) and fails if one never happens. At full size the
ring wrap is not required.

`tb_pulse_acq` runs the card as a nuclear pulse digitizer, with every parameter
at its default. `tb/adc_pulse_model.sv` produces preamplifier-shaped pulses:
a 20 ns linear rise, then an exponential decay with a 150 ns time constant.
Its discriminator output is the trigger, 50 ns after each pulse begins. Four
pulses are captured with pre-trigger lengths of 16 to 100 words. For each
record the test checks:

- the pulse onset lies inside the record, close to the trigger point;
- only baseline comes before the onset;
- every sample equals the sample that was sent;
- the peak equals the pulse amplitude.

The onset lands about 40 samples before the trigger point. That lead is the
history that pre-trigger mode exists to keep.

With plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/daq_pkg.sv rtl/llrf_pkg.sv tb/tb_daq_card_top.sv --top-module tb_daq_card_top
./obj_dir/Vtb_daq_card_top
```

Replace the testbench name to run any other test. For lint, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/daq_pkg.sv rtl/llrf_pkg.sv
rtl/<module>.sv`. Verilator flags some signals as unused, for example the
FIFO fill levels that the top does not need. It reports no latches, loops or
multiple drivers.
