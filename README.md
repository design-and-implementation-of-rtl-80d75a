# Synchronous 8-channel acquisition for accelerator magnet power supplies

In a synchrotron, the beam orbit depends on many magnets working together,
and each magnet has its own power supply. To judge whether those supplies
really move together, their output currents have to be recorded at the same
instants. Any skew the recorder adds shows up as a false synchronisation
error. The requirement here is under 5 µs between channels, sampled at 1 MHz.

This RTL is the programmable-logic half of a Zynq-7020 based recorder. It
samples up to eight analog signals together with one AD7606C-16 ADC (16 bits,
up to 1 MS/s per channel). The eight results of each conversion are packed
into one 128-bit **frame**, and the frames are streamed into the processor's
DDR memory by DMA. The logic adds no skew: one CONVST edge samples every
channel, and a frame is never split.

There are three acquisition modes:

| mode | value | output rate | what reaches memory |
|------|-------|-------------|---------------------|
| 1 MHz | 0 | 1 MHz | every ADC frame, untouched |
| 5 kHz | 1 | 5 kHz | one ADC frame in 200 |
| 5 kHz filtered | 2 | 5 kHz | one frame in 200, through a 4th-order IIR low-pass at 100 Hz |

The filtered mode exists because the field noise on these supplies sits at
about 417 Hz and above. More than 99 % of the wanted signal's energy lies
below 100 Hz.

```
 AD7606C-16 ──► ad_driver ──► decim_filter ──► axis_fifo ──► dma_s2mm ══► AXI4 HP port (64 bit) ──► DDR
   (pins)      128-bit frame   mode 0/1/2       512 frames    bursts
                    ▲               ▲                             │ done/error
                    └── ctrl_regs ◄─┴── AXI4-Lite from the ARM ◄──┘ irq
```

Everything runs on one 50 MHz clock. This is the HP port clock, and 50 clocks
make one 1 µs sample period.

## Reading the ADC: `ad_driver`

The controller is a five-state machine, and the states follow the original
acquisition flowchart:

| state | name | what happens |
|-------|------|--------------|
| S0 | init | RESET pin high for 5 clocks, then a 5 ms power-up wait (`INIT_CYCLES` = 250 000; the only requirement is that it stays under 10 ms). `ready` rises at the end. |
| S1 | idle ("signal reset") | CONVST high, CS_n and RD_n high. Waits for the next 1 µs tick while `enable` is set. |
| S2 | convert | CONVST low for 2 clocks, then high. The rising edge samples all 8 channels at once. |
| S3 | chip select | CS_n low. Waits until BUSY (after a 2-flop synchroniser) has been high and has fallen again. |
| S4 | read | 8 RD_n pulses (2 clocks low, 1 high). DB is captured on the last low clock, channel 1 first. Then `frame_valid` pulses for one clock and the machine returns to S1. |

The 1 µs tick comes from a free-running divide-by-50 counter, not from the end
of the previous frame. Conversions therefore sit on an exact 1 MHz grid,
however long the reads take. The cost is a fixed budget: of the 50 clocks,
about 30 go to CONVST, the synchroniser and the reads. That leaves about 20
clocks (400 ns) for the ADC to convert. If a frame is still in progress when a
tick arrives, that tick is skipped and `overrun` pulses. `daq_top` leaves
`overrun` unconnected. Check the conversion time in the ADC data sheet against
this budget. If it is longer, shorten the RD timing or raise the clock.

## Decimation and the three modes: `decimator`, `decim_filter`

The 5 kHz modes keep the first frame and then every 200th (`RATIO`). There is
no anti-alias filter before this step. The low-pass works at the 5 kHz rate
behind it, because that is the rate it was designed for.

`decim_filter` selects the output by mode. Its latency from the ADC frame to
its output is 1 clock in the 1 MHz mode, 2 clocks in the 5 kHz mode, and 12
clocks in the filtered mode.

A change of mode restarts the decimator and clears the filter history, and so
does a `restart` pulse. The top level gives that pulse whenever the ADC is
switched on. Every capture therefore begins with the frame converted first and
with an empty filter. Without this, a conversion that is still in flight when
the ADC is switched off would move the decimation phase of the next capture.

## The 4th-order low-pass: `iir_biquad` ×2

This is the part that needs the most care.

**Structure.** Two second-order sections in direct form II run in cascade.
For each channel, one section keeps two delay elements and computes

```
w(n) = x(n) − a1·w(n−1) − a2·w(n−2)
y(n) = b0·w(n) + b1·w(n−1) + b2·w(n−2)
```

**Coefficients.** The coefficients are 24-bit signed integers scaled by 2^22,
so a0 = 4 194 304 stands for 1.0. The scale was chosen from the largest
coefficient, |a1| ≈ 1.89. It is rounded up to a power of two, so 2^23 in
24 bits represents 2.0.

| section | b0 | b1 | b2 | a1 | a2 |
|---------|----|----|----|----|----|
| 1 | 15 780 | 31 560 | 15 780 | −7 941 560 | 3 810 375 |
| 2 | 14 821 | 29 642 | 14 821 | −7 458 787 | 3 323 766 |

Section 1 is the set given in the original description (floating point:
0.003762, 0.007524, 0.003762, 1, −1.893415, 0.908464). Only section 1 was
given, so section 2 is reconstructed here:

* Section 1 is exactly the high-Q pole pair of a 4th-order Butterworth
  low-pass with a 100 Hz cut-off at 5 kHz, scaled to a DC gain of 1.
* Section 2 is the other pole pair of that same Butterworth filter
  (a1 = −1.7783135, a2 = 0.7924475). It is also scaled to a DC gain of 1 and
  quantised in the same way.

To use different coefficients, override `COEF1` or `COEF2` on
`decim_filter`. They have type `biquad_coef_t` from `daq_pkg`.

**Sign of the feedback terms.** The a-terms are *subtracted*. This is the
usual convention for coefficients like these. Adding them, as a literal
reading of the difference equation in the original text would do, puts a
pole at z ≈ −2.3 and makes the filter unstable.

**Response** with the quantised coefficients:

| frequency | gain |
|-----------|------|
| 0 Hz | 0 dB |
| 50 Hz | −0.02 dB |
| 100 Hz | −3.0 dB |
| 400 Hz | −48.9 dB |
| 417 Hz | −50.4 dB |
| 1 kHz | −85 dB |

The step response overshoots by 11 % and settles to within 1 % after 83
output samples (16.6 ms).

**Fixed point.** The delay elements are 40 bits wide (`STATE_W`). They carry
8 bits of fraction (`STATE_FRAC`) beyond the 16-bit sample scale, because the
poles lie close to z = 1 and would lose resolution otherwise. Each sum is
rounded back by 2^22. Each section's output is rounded to 16 bits and
saturated, and then goes into the next section.

Over long random and sine tests, each section stays within about half an
LSB of a floating-point model of the same coefficients (the worst case
measured was 0.50 LSB). The cascade reproduces, bit for bit,
a floating-point model that rounds after each section.

**Schedule.** A decimated frame arrives at most every 200 µs. One datapath per
section is therefore shared by all eight channels, one channel per clock, with
per-channel delay elements. The eight results are regathered into a frame. A
section is a single registered stage with five multiplies of 40 × 24 bits. If
that path is too slow for your device at 50 MHz, pipeline it: neighbouring
clocks always carry different channels, so adding pipeline stages creates no
data hazard.

## Into memory: `axis_fifo`, `dma_s2mm`

The ADC can never be held back, so `axis_fifo` (512 frames of 128 bits,
first-word-fall-through) absorbs the memory port's stalls. If a frame finds
the FIFO full, it is **dropped and counted**: DROPS register, sticky STATUS
bit. While the ADC is off and the DMA idle, the FIFO is held empty, so a new
capture never starts with old frames.

`dma_s2mm` is a minimal stream-to-memory engine:

1. A start pulse latches the address and the length. The address is aligned
   to 16 bytes. The length is counted in whole 16-byte frames.
2. The engine issues INCR bursts of up to 16 beats of 8 bytes each, cut short
   so that no burst crosses a 4 KiB boundary.
3. There is one burst in flight at a time: address, then data, then response.
4. Each frame becomes two beats, channels 1–4 first. In memory, the channels
   are in order and little-endian, 16 bytes per conversion. A dump reads
   `ch1_lo ch1_hi ch2_lo … ch8_hi`.
5. `done` pulses at the end. An SLVERR or DECERR on any burst also raises
   `error`.

At 64 bits × 50 MHz, the port offers 3.2 Gbit/s. The 1 MHz mode needs
128 Mbit/s.

## Registers (`ctrl_regs`, AXI4-Lite, 32-bit)

| offset | name | bits |
|--------|------|------|
| 0x00 | CTRL | [0] ADC enable, [2:1] mode |
| 0x04 | STATUS | [0] ADC power-up done (RO), [1] frame dropped (sticky, write 1 to clear) |
| 0x08 | FRAMES | frames accepted into the FIFO (RO) |
| 0x0C | DROPS | frames lost to a full FIFO (RO) |
| 0x10 | DMA_CTRL | [0] start (write 1, reads 0, ignored while busy), [1] interrupt enable |
| 0x14 | DMA_STATUS | [0] busy, [1] done (sticky, W1C), [2] error (sticky, W1C) |
| 0x18 | DMA_ADDR | destination byte address |
| 0x1C | DMA_LEN | length in bytes |

`irq` = done AND interrupt enable. Starting the DMA clears done and error.

A capture goes like this:

1. Write CTRL with the mode and enable = 0.
2. Write DMA_ADDR and DMA_LEN.
3. Write DMA_CTRL = 3 (start, with interrupt).
4. Write CTRL with the mode and enable = 1.
5. Wait for `irq`, or poll DMA_STATUS[1].
6. Write CTRL with enable = 0.

The ADC starts converting at the first 1 µs tick after it is enabled.

## How this differs from the original system

* **DMA.** The original uses the vendor's AXI DMA core. `dma_s2mm` only
  stands in for it: it has the same job but not the same registers or
  descriptor model.
* **Register map.** The register map, the W1C flags, the drop counter, the
  FIFO flush and the restart on enable are choices made for this design.
* **Three modes.** The original control offers a choice between 1 MHz and
  5 kHz filtered. The plain 5 kHz mode (decimated, unfiltered) is kept here
  as its own setting, because the decimated stream exists anyway.
* **Filter section 2.** Only section 1's coefficients were given; section 2
  is reconstructed as described above.
* **Feedback sign.** The sign of the feedback terms follows the coefficient
  table, not the literal difference equation in the original text.
* **Measured 1 µs offset.** Measurements on the original hardware showed a
  steady 1 µs offset between channels 7 and 8, which is exactly one sample
  period. Nothing in this logic produces such an offset: both channels come
  from the same conversion and sit in the same frame. `tb_daq_sync`
  measures zero. If you see it on hardware, look at the analog side or the
  post-processing.
* **Not modelled.** The ADC chip, its input protection, the ARM processor,
  DDR, Linux and the user-space driver are not part of this RTL. The
  testbenches use behavioural models of the ADC and of an AXI memory.
* **Clock domains.** There is a single clock domain. If the ADC interface
  and the HP port are to run on different clocks, the FIFO must become
  asynchronous.
* **Configuration pins.** The ADC's oversampling, range and
  serial/parallel select pins are not driven by this logic. They are expected
  to be tied on the board: no oversampling, parallel interface.

## Verification

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_ad_driver` | RESET pulse and power-up wait; every frame holds its own conversion in channel order; frames exactly 50 clocks apart; no read during BUSY or without CS_n; nothing while disabled |
| `tb_decimator` | frames 0, 200, 400 … kept with random input gaps; `clear` restarts the count |
| `tb_iir_biquad` | both coefficient sets, 8 channels with different signals, against a floating-point model (±2 LSB); one-clock latency; DC gain 1; 50 Hz passes, 400 Hz suppressed; `clear` |
| `tb_decim_filter` | all three modes with their latencies; 3000 filtered frames against a floating-point cascade; restart on mode change and on `restart` |
| `tb_axis_fifo` | random traffic against a queue model, full and empty reached, flush |
| `tb_dma_s2mm` | aligned 1 KiB in 8 bursts, a 4 KiB-crossing transfer split correctly, an error response, zero length; random stalls on both sides |
| `tb_ctrl_regs` | every register, byte strobes, start pulse (none while busy), sticky/W1C flags, irq enable, counters |
| `tb_daq_top` | whole design at reduced sizes (decimation 20, FIFO 16, 200-clock power-up). It runs captures in all three modes, forces a FIFO overflow, a 4 KiB split, memory back-pressure, an interrupt and an error response, and fails if any of these never happened. |
| `tb_daq_full` | whole design at default sizes. It captures 1 MiB at 1 MHz (65 536 frames, every word checked, 65.5 ms simulated), then a 5 kHz filtered capture with a 50 Hz sine on channel 8 (out: 5989 of 6000 codes) and a 400 Hz sine on channel 7 (out: 22 codes). It runs in a few seconds. |
| `tb_daq_sync` | whole design at default sizes, in the 1 MHz mode. The same 10 kHz, 1 Vpp sine drives channels 7 and 8, as a continuous function of time, for 2000 frames. Checks: CONVST exactly 1000 ns apart (1.000000 MHz); every stored code equal to the input at its CONVST edge; the channel 7/8 time difference from DFT phases under 1 ns (measured: 0); NRMSE 0.025 %; correlation 1.000000. |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/daq_pkg.sv tb/tb_daq_full.sv \
          -y rtl -y tb +libext+.sv --top-module tb_daq_full
./obj_dir/Vtb_daq_full
```

Replace `tb_daq_full` with any testbench name from the table. The
testbenches work with two-state simulation and random initial values
(`+verilator+rand+reset+2`): they drive inputs half a clock away from the
active edge and sample outputs on the falling edge.

## Files

* `rtl/daq_pkg.sv`: channel count, frame type, mode enum, coefficient struct
  and both coefficient sets.
* `rtl/ad_driver.sv`, `rtl/decimator.sv`, `rtl/iir_biquad.sv`,
  `rtl/decim_filter.sv`, `rtl/axis_fifo.sv`, `rtl/dma_s2mm.sv`,
  `rtl/ctrl_regs.sv`: the blocks.
* `rtl/daq_top.sv`: the top level. Its ports are the ADC pins, an AXI4-Lite
  slave, a 64-bit AXI4 write master and `irq`.
* `tb/ad7606_model.sv`, `tb/axi_mem_model.sv`: behavioural models, used by
  the testbenches only.
* `tb/tb_*.sv`: the testbenches listed above.

Top-level parameters, with their defaults:

| parameter | default |
|-----------|---------|
| `CLK_HZ` | 50 000 000 |
| `SAMPLE_HZ` | 1 000 000 |
| `INIT_CYCLES` | 250 000 |
| `DECIM_RATIO` | 200 |
| `FIFO_DEPTH` | 512 |
| `MAX_BURST` | 16 |
