# Two-channel 8-bit FADC readout for a dual-PMT scintillator cell

A liquid-scintillator cell has one photomultiplier (PMT) at each end. Both PMT
signals are digitised by one HMCAD1511 ADC: 8 bits at 500 MS/s per channel,
or 1 GS/s on a single input in a test mode. The FPGA fabric of a Zynq module
has three jobs:

- receive the ADC's serial LVDS stream,
- decide in real time which stretches of the waveforms are worth keeping:
  threshold crossings in both PMTs (coincidence) or in only one
  (anticoincidence),
- buffer those events in on-chip dual-port RAM, where the ARM side's DMA
  engine collects them and moves them into DDR3. Software then sends them out
  over Gigabit Ethernet.

This repository holds the SystemVerilog for that programmable-logic part,
plus self-checking testbenches. The ADC and the processor side appear only as
testbench models.

```
            lclk 500 MHz DDR                    clk (AXI, >125 MHz)
 ADC lanes ─┐
 1A..4B, FCLK│  ┌──────────┐ 64-bit frames ┌───────────────┐ trig, frame no.
             └─►│ hmcad_rx │──────────────►│ trigger_logic │──────────┐
                │ DDR cap. │   125 M/s     └───────────────┘          ▼
                │ bit slip │──────────────────────────────────►┌───────────────┐
                │ CDC FIFO │                                   │ event_builder │
                └──────────┘                                   │ 256-frame ring│
 ext_trig ─────────────────────────► trigger_logic             └──────┬────────┘
                                                                      │ header + frames
                ┌───────────┐  AXI4-Lite  ┌───────────┐        ┌──────▼──────┐
 ARM software ─►│ fadc_regs │────────────►│ cfg, ptrs │        │ event DPRAM │
                └─────┬─────┘             └───────────┘        │ 4096 x 64b  │
                      │ irq, ADC cmd                           └──────┬──────┘
                ┌─────▼──────────┐                              ┌─────▼─────────┐
                │ adc_spi_master │─► ADC serial port    DMA ◄───│ evt_axi_slave │
                └────────────────┘                   (64-bit)   └───────────────┘
```

## The ADC link (`hmcad_rx`)

This is the part that takes the most care.

The ADC sends its data on ten LVDS lines:

- eight data lanes, named 1A, 1B, 2A, 2B, 3A, 3B, 4A and 4B;
- a bit clock, LCLK;
- a frame clock, FCLK.

In dual-channel mode the ADC's input clock is 500 MHz. LCLK runs at the same
500 MHz, and data is valid on both of its edges, so every lane carries
1 Gb/s. FCLK runs at a quarter of the input clock, 125 MHz. One FCLK period
therefore holds 8 bits per lane: exactly one 8-bit sample per lane. The
lanes are assigned like this:

| lanes | carry, in one frame |
|---|---|
| 1A, 1B, 2A, 2B | samples N-4, N-3, N-2, N-1 of input 1 (oldest on 1A) |
| 3A, 3B, 4A, 4B | the same four sample times of input 2 |

The bits of a sample go out D0 first. This design takes D0 as the least
significant bit.

The receiver works as follows:

1. **DDR capture.** Each of the nine lines (eight lanes plus FCLK) is sampled
   by one flip-flop on the rising LCLK edge and one on the falling edge. At
   each rising edge the pair is pushed into a 16-bit history: the
   rising-edge bit is the earlier one, so it goes first. The line is assumed
   to be timed so that both edges land inside a bit, which is the usual
   centre-aligned LVDS output.
2. **Framing by bit slip.** Every fourth LCLK cycle, an 8-bit window is cut
   out of every history at one common offset, the *slip*, which ranges from 0
   to 7. FCLK is treated as a ninth data line, and its window is compared
   with `FCLK_PATTERN`. The default is `8'h0F`: high for the first four bit
   times (D0..D3) and low for the last four. On a mismatch the slip advances
   by one bit. After `LOCK_FRAMES` matches in a row, the receiver reports
   `aligned` and starts passing frames on. A 4/4 FCLK pattern matches at
   exactly one slip out of eight, so lock is unambiguous. If your board's
   FCLK edge sits elsewhere relative to D0, change the parameter.
3. **Clock crossing.** Each frame is a 64-bit word (byte *i* = lane *i*). It
   is written into an 8-deep dual-clock FIFO with Gray-coded pointers and
   read out in the AXI clock domain as `frame`/`frame_valid`. The AXI clock
   must be faster than the 125 MHz frame rate, for example 150 MHz. If
   frames arrive faster than they are drained, a frame is lost and the
   sticky `ovf` flag is set.

The receiver does not depend on the ADC mode. In single-channel mode (1 GS/s)
the lanes carry eight consecutive samples of one input. This design assumes
lane *l* holds sample 8f+*l*. Only the trigger needs to know which mode is
active.

The LVDS input buffers, and any per-lane delay tuning a real board may need
at 1 Gb/s, are vendor primitives. They are not part of this RTL: the top
takes the single-ended outputs of the buffers.

## Trigger (`trigger_logic`)

All decisions are made on whole frames, that is 8 ns steps.

- **Discriminator.** A channel is *over* in a frame if any of its samples is
  beyond its threshold: below it for negative PMT pulses, above it for
  positive ones. Samples are offset-binary codes with a baseline near
  `0x80`. A *hit* is the first frame of an over period, so a long pulse gives
  a single hit.
  - In dual mode, bytes 0-3 of a frame belong to channel 1 and bytes 4-7 to
    channel 2.
  - In single-channel mode, all eight bytes belong to channel 1.
- **Frame numbers.** Every frame is numbered by a counter of valid frames. A
  trigger carries the number of the frame its event belongs to (`trig_ts`),
  not the frame on which the decision was made. That lets the decision take
  as long as the window needs.
- **Modes** (set in `CTRL[3:2]`):
  - `0` coincidence: a hit on one channel opens a window of `WINDOW` frames.
    A hit on the other channel inside that window (distance ≤ `WINDOW`)
    fires a trigger stamped with the first hit's frame. Hits on both
    channels in the same frame fire at once.
  - `1` anticoincidence: a hit on one channel fires only if the other
    channel stays quiet for `WINDOW` frames. The decision is therefore made
    when the window closes. A partner hit vetoes the event.
  - `2` single: every channel-1 hit fires. This is for the test mode with the
    ADC in single-channel operation.
  - `3` external: the rising edge of the asynchronous `ext_trig` input fires,
    after a two-flop synchroniser, stamped with the current frame.
- **Timing.** A trigger comes out two clocks after the frame that completes
  the decision. In anticoincidence mode, that frame is `WINDOW`+1 frames
  after the hit.

## Event buffering (`event_builder`, `sdp_ram`)

Every incoming frame is written into a ring of 256 frames (2 µs of data),
addressed by its frame number. For each accepted trigger at frame T, the
builder writes one event into the event DPRAM, which holds 4096 words of
64 bits (32 KB):

| word | contents |
|---|---|
| 0 | `[63:48]` = `16'hFADC`, `[47:32]` = length in words including this header, `[31:0]` = event number |
| 1 | `[63:32]` = T, `[31:24]` = pre, `[23:16]` = post, `[15:8]` = flags {4'b0, mode[1:0], hit[1:0]}, `[7:0]` = 0 |
| 2 … | frames T−pre … T+post−1, one 64-bit frame per word, byte *i* = lane *i* |

Frames after T are copied as they arrive. Frames already in the ring are
copied at one word per clock.

The event DPRAM is a ring shared with software:

- The builder publishes `WR_PTR` only once a whole event is in the memory,
  one cycle after its last word was written.
- Software returns space by writing `RD_PTR`.
- Both pointers count 64-bit words and carry one extra wrap bit.

An event is built only if `pre + post + 2` words are free. Otherwise the
trigger is dropped and counted in `DROP_FULL`. A trigger that arrives while
an event is still being copied is dropped and counted in `DROP_BUSY`; this is
the system's dead time, about `post` frames per event.

Constraint on the settings: `pre` plus the trigger delay (`WINDOW` + a few
frames) must stay below 256. Otherwise the oldest frames of an event have
already been overwritten in the ring. Nothing in the hardware enforces this.

## Readout to the processor (`evt_axi_slave`, `fadc_regs`)

The processor side reads events with its central DMA engine over a 64-bit
high-performance AXI port. `evt_axi_slave` is an AXI4 read-only slave on the
event DPRAM:

- Byte address = 8 × word index. Addresses wrap modulo the memory size, so a
  burst may run over the end of the ring.
- INCR bursts of 1-256 beats are supported. FIXED repeats one word. WRAP is
  treated as INCR. Only full 64-bit beats are allowed, which an assertion
  checks.
- The RAM's output register *is* the R-channel register. A new word is read
  whenever that register is empty or being taken, so the port delivers one
  beat per clock with no extra buffering. At 125 MHz that is 1000 MB/s,
  above the roughly 810 MB/s that the DDR3 side of this module sustains.
- An assertion checks the AXI rule that `RVALID` and the data hold until
  `RREADY`.

The software loop is:

1. Wait for `irq`, which is high while `WR_PTR ≠ RD_PTR`.
2. Read `WR_PTR`.
3. For each event: read the 2-word header, then DMA `length` words.
4. Write the new `RD_PTR`.

Register map (`fadc_regs`, AXI4-Lite, 32-bit):

| addr | name | access | fields (reset value) |
|---|---|---|---|
| 0x00 | CTRL | rw | [0] enable (0), [1] single-channel mode (0), [3:2] trigger mode (0), [5:4] negative polarity ch1/ch2 (11) |
| 0x04 | THRESH | rw | [7:0] ch1, [15:8] ch2 (0x70, 0x70) |
| 0x08 | WINDOW | rw | [7:0] coincidence window, frames (4) |
| 0x0C | EVTWIN | rw | [7:0] pre (8), [15:8] post (24) frames |
| 0x10 | RD_PTR | rw | read pointer, words + wrap bit |
| 0x14 | WR_PTR | ro | committed write pointer |
| 0x18 | EVT_CNT | ro | events built |
| 0x1C | DROP_BUSY | ro | triggers lost to dead time |
| 0x20 | DROP_FULL | ro | triggers lost to a full memory |
| 0x24 | SPI_CMD | w/r | [23:16] ADC register, [15:0] value; a write starts an ADC register write (ignored while one runs) |
| 0x28 | STATUS | ro | [0] LVDS aligned, [1] LVDS FIFO overflow, [2] ADC write busy, [3] event copy busy, [4] irq |

Change `CTRL` with enable cleared, then set enable again. A pending
coincidence window is discarded while the trigger is disabled.

## ADC configuration (`adc_spi_master`)

The HMCAD1511 registers are written over a three-wire serial port, in the
usual frame for this ADC:

- CSN goes low.
- 24 bits follow, most significant first: an 8-bit address, then 16 data
  bits. SDATA changes while SCLK is low and is latched on each rising edge.
- CSN rises half an SCLK period after the last falling edge.

SCLK is `clk/(2·CLK_DIV)`, which is 18.75 MHz at 150 MHz with the default
`CLK_DIV` = 4. A write takes `49·CLK_DIV + 1` clocks. Switching the ADC
between dual- and single-channel mode is such a write, followed by setting
`CTRL[1]` and the trigger mode. Register numbers and values come from the
ADC data sheet and are not built into the RTL.

## Clocks and reset

- `lclk`: the ADC bit clock. It drives only the capture, framing and FIFO
  write side of `hmcad_rx`.
- `clk`: everything else. The AXI ports are synchronous to it. It must be
  faster than 125 MHz, for example the 150 MHz AXI clock.
- `rst`: synchronous to `clk`, active high. It is synchronised into the
  `lclk` domain inside `hmcad_rx`, asynchronous assert and synchronous
  release.

Memory contents are not reset. Everything that is read before it is written
has a reset value.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `SAMPLE_W`, `N_LANES` | 8, 8 | `fadc_pkg` | ADC resolution and data lanes (fixed by the ADC) |
| `FCLK_PATTERN` | 8'h0F | `hmcad_rx` | FCLK bits expected at the frame boundary, D0 in bit 0 |
| `LOCK_FRAMES` | 4 | `hmcad_rx` | matching frames before `aligned` |
| `FIFO_AW` | 3 | `hmcad_rx` | log2 depth of the clock-crossing FIFO |
| `RING_AW` | 8 | top, `event_builder` | log2 of the pre-trigger ring, in frames |
| `EVT_AW` | 12 | top, builder, AXI port, registers | log2 of the event DPRAM, in 64-bit words |
| `ID_W` | 4 | top, `evt_axi_slave` | AXI ID width |
| `SPI_DIV` / `CLK_DIV` | 4 | top / `adc_spi_master` | SCLK half period, in clocks |

The memory sizes are this design's choice. A 32 KB DPRAM and a 2 KB ring sit
easily in the block RAM of a small Zynq (XC7Z010).

## What follows the original system and what is this design's

These come from the original readout system:

- the ADC and its modes (2 × 500 MS/s, 1 × 1 GS/s test mode);
- the LVDS lane format: the lane-to-sample order, DDR on LCLK, FCLK = LCLK/4,
  8 bits per lane per frame, D0 first;
- the data flow: threshold trigger and anticoincidence logic in the FPGA,
  buffering in a DPRAM, DMA by the processor side over the 64-bit AXI port
  into DDR3;
- the serial configuration port of the ADC;
- the external trigger input.

The original description gives no logic-level design for the trigger,
buffer or software interface. These parts are therefore this design's own:

- the discriminator (leading-edge, per frame);
- the window rule and its frame-number stamping;
- having coincidence, anticoincidence, single and external modes side by side;
- the pre-trigger ring, the event format, the pointer protocol and dead-time
  handling;
- the AXI slave structure and the register map;
- the SPI frame format (taken from the ADC's data sheet convention);
- the bit order inside a sample (D0 = LSB);
- the FCLK phase at the frame boundary;
- the lane order in single-channel mode;
- the clock-crossing FIFO and all memory sizes.

The following are outside this RTL:

- the ADC itself (a behavioural model of its LVDS output is in
  `tb/hmcad1511_model.sv`);
- the LMK04803B clock synthesiser;
- the analog front end, the clock-limiter diodes and the power supplies;
- the LVDS input buffers;
- the ARM cores, DDR3, HP ports and the DMA engine (the testbench issues the
  AXI bursts the DMA engine would);
- Ethernet and the TCP/IP software;
- the boot flash.

## Verification

Each block has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_hmcad_rx` | Lock from an arbitrary bit offset. Every frame's byte lanes against a ramp (ch1) and an affine sequence (ch2). No frame lost or repeated. 1000 frames per 8 µs. The same in single-channel mode. |
| `tb_trigger_logic` | Hand-derived triggers for: coincidence inside, at the edge of and outside the window; a long pulse; at-threshold samples; positive polarity; anticoincidence with and without veto; single-channel mode; external trigger; disabled operation. Also the 2-cycle latency. |
| `tb_event_builder` | Header words, event numbers and every copied frame. Waiting for frames not yet arrived. Busy drop. Full drop with a 64-word memory. Release and wrap-around. Copy time. |
| `tb_evt_axi_slave` | Data, RID, RRESP and RLAST for INCR, FIXED and wrapping bursts of 1-256 beats, with and without random back-pressure. One beat per clock. |
| `tb_fadc_regs` | Reset values, read-back, byte strobes, decoded fields, status inputs, ADC write start (and refusal while busy), irq. |
| `tb_adc_spi_master` | The serial word, 24 rising edges, SDATA stable while SCLK is high, SCLK half period and transfer time for two dividers. |
| `tb_readout_bandwidth` | The whole design at a 125 MHz AXI clock, reading 259-word events with 256-beat bursts. The measured readout rate (about 977 MB/s, address cycles included) must be at least 810 MB/s, the rate the original system reached between its DPRAM and DDR3. The receiver must keep up with the ADC at this clock. |
| `tb_fadc_readout_top` | The whole design at default sizes, driven by the ADC model with a noisy baseline and scheduled PMT-like pulses. Software and DMA are modelled through the register and AXI ports. |

The top-level test runs five phases:

1. coincidence, including triggers dropped while busy;
2. anticoincidence, with vetoes;
3. filling the event memory until triggers are dropped for lack of room,
   then draining it across the ring's end;
4. external triggers;
5. switching the ADC to single-channel mode over the serial port, then
   single-channel triggers.

Every event read back is compared word by word with the model waveform,
including its trigger frame number. Each mechanism must occur at least once.
The test covers about 19,600 frames (157 µs of ADC data) and runs in well
under a second.

Running a test with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fadc_pkg.sv tb/tb_fadc_readout_top.sv --top-module tb_fadc_readout_top
./obj_dir/Vtb_fadc_readout_top
```

Replace the testbench name to run another one. All modules are found through
`-y`; only the package has to be listed first.

## Limits and open points

- **Not tested on hardware.** Timing at 500 MHz DDR needs the FPGA's
  dedicated input serialisers, or at least IDDR primitives and delay
  calibration per lane. The generic rising/falling flip-flop capture here is
  functionally right but is not a timing-closed implementation.
- **Trigger algorithm.** The trigger is the simplest one that matches the
  system's stated purpose. An experiment may want, for example:
  - baseline subtraction,
  - a constant-fraction discriminator,
  - sample-level (rather than frame-level) coincidence timing,
  - pulse-shape information.
- **The DMA engine is not modelled.** The AXI read port follows AXI4 for the
  subset it claims. The central DMA engine's behaviour (address generation,
  4 KB boundary splitting) is left to the processor side.
- **Ring depth is not checked.** The `pre` + trigger-delay constraint on the
  ring depth is documented but not enforced in hardware.
- **AXI clock of exactly 125 MHz.** The original system ran its PS-PL clock
  at 125 MHz. The block diagram allows up to 150 MHz for this link and the
  processor's ports up to 200 MHz. At exactly 125 MHz the AXI clock equals
  the ADC frame rate. The receiver's crossing FIFO then keeps up only if that
  clock is locked to the ADC clock, as in `tb_readout_bandwidth`. With an
  independent 125 MHz oscillator, frames would now and then be lost, which
  `STATUS[1]` would flag. Run the fabric a little faster, for example at
  150 MHz.
