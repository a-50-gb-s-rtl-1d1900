# 32 × 32 byte-wide crossbar with asymmetric serial links

This is the logic of a single-chip 32-port crossbar switch. Each of the 32 ports
connects to the chip through one pair of 1.6 Gb/s serial lines, one line in each
direction. That gives about 51.2 Gb/s of raw bandwidth through the chip.

Clock recovery is the expensive part of a serial link. The idea here is to make
the links *asymmetric*:

- The crossbar end (the "dumb end") never moves its clocks. Every link on the
  crossbar samples and transmits on the same fixed 800 MHz clock tree.
- The port chip at the other end (the "smart end") shifts its own receive and
  transmit clock phases until the data lines up.

To make this work, the dumb end only has to do three things:

- measure whether the smart end's data arrives early or late;
- report that back to the smart end;
- tell the smart end whether byte and frame alignment have been reached.

All of that runs over the links themselves, inside special *calibration frames*.
No phase-adjusting circuit is needed anywhere on the crossbar.

The RTL covers everything on the crossbar that is logic:

- the serializers and deserializers;
- byte and frame alignment;
- the calibration protocol;
- the PRBS-7 self-test;
- the switch core with its reverse-routing tag decoders;
- the controller that enables ports;
- the byte clock divider;
- the digital control of the two link blocks that can also work as smart
  ends.

These analog parts are not in the RTL:

- the PLL;
- the differential clock input converter;
- the delay-matching elements;
- the wiring of the clock tree;
- the line drivers, receivers and terminations.

The 800 MHz PLL output enters the design as an input pin. Each serial line is
one logic bit per half clock period.

## Clocks and rates

| Clock | Frequency | Used by |
|---|---|---|
| `vco_clk` (or `scan_clk` when `scan_mode` is high) | 800 MHz | serial shift registers, both clock edges |
| `byteclk` = tree clock / 4 | 200 MHz | all byte logic: aligner, calibration, core, controller |

- A line carries two bits per 800 MHz cycle, one per clock edge. That is 1.6 Gb/s,
  or one byte per byte clock.
- The 2-bit divider counter (`phase`) is also used to time the crossbar between
  the two domains:
  - The serializer takes a new byte at the 800 MHz edge that ends phase 1.
  - The deserializer hands over its word at that same edge.
  - That edge falls in the middle of the byte clock period, so the byte-clock
    flops see stable data.
- The divider has no reset. It runs as soon as the clock runs, so logic on the
  byte clock can be reset synchronously.
- `rst` is synchronous to `byteclk`. Hold it for at least two byte clocks.

## Frames

Everything on a link travels in 9-byte frames, one byte per byte clock, most
significant bit first. All 32 ports share one frame timing. The controller
counts byte positions 0..8 (`pos`), and position 0 is the header on every port
at once.

Data frame, header byte (position 0):

| bit 7 | bits 6..2 | bits 1..0 |
|---|---|---|
| idle | reverse routing tag | reserved |

Bytes 1..8 are payload. A frame with the idle bit set carries no data.

Calibration frame:

| position | content |
|---|---|
| 0 | control byte: bit 7 idle (=1), 6 clock early, 5 clock late, 4 byte sync, 3 frame sync, 2..0 reserved (0) |
| 1 | `11001111` framing byte |
| 2 | `00001100` framing byte |
| 3..8 | `01010101` timing bytes |

The early, late, byte sync and frame sync bits describe the *other* line of the
pair. The dumb end uses them to tell the smart end how its transmitter looks
from the crossbar side.

## Link calibration

A link pair is brought up in this order:

1. After power-up or recalibration, the crossbar sends calibration frames. The
   smart end sends `11000001` over and over. That pattern has no run of four
   ones, so the framing bytes can never be found in it and the crossbar cannot
   lock on it falsely.
2. The smart end aligns its own receiver to the crossbar's calibration frames,
   then starts sending calibration frames of its own.
3. On each crossbar link, the aligner (`asl_rx_align`):
   - keeps the last three deserialized words as a 24-bit window;
   - searches the window for the two framing bytes at all eight bit offsets;
   - realigns the byte stream to the offset it found.

   Byte sync needs two hits in a row at the same offset. Frame sync also needs
   the second framing byte to arrive exactly when the chip-wide position counter
   is 2. So the port's frames must line up with the crossbar's common framing.

   When the aligner has byte sync but not frame sync, the smart end sees that
   in the control byte and delays its frames by whole bytes until they line up.
4. Early/late: the smart end transmits its timing bytes with its clock shifted
   90°. What the crossbar's receiver sees in them therefore tells it which way
   the smart end's transmit clock is off. `asl_cal_monitor` compares bytes 5..8
   of each calibration frame (positions 4..7) with `01010101`:
   - more than 16 of the 32 bits match: vote "early";
   - fewer than 16 match: vote "late";
   - exactly 16: no vote.

   The vote goes back in the next calibration frame's control byte.
5. A link is ready once all of these hold:
   - its own byte sync and frame sync;
   - the far end reports byte sync and frame sync on the control byte it sends.

   The controller (`xbar_ctrl`) lets the port into the switch only at a frame
   boundary. A port that never synchronises stays out, and the crossbar keeps
   sending it calibration frames.

Once a link is ready, its aligner holds its offset. Payload bytes can contain
the framing pattern, and must not move the alignment.

`recal` restarts calibration on all links. The controller waits for the next
frame boundary, disables every port, and clears all link state for one byte
clock.

Calibration frames also fill the gaps in traffic:

- A ready link whose outgoing frame is idle sends a calibration frame in its
  place.
- A link that is not ready always sends calibration frames.

This way the smart end keeps getting timing information during normal
operation.

## Switch core

`switch_core` is a 32 × 32 byte-wide synchronous crossbar. Its stages are:

1. An input register for all 32 ports.
2. For each output, a 32:1 multiplexer (`mux32_tree`) built as three stages in
   series: 2:1 between neighbouring ports, 4:1 within groups of eight, and 4:1
   across the four groups.
3. An output register.

From `din` to `dout` takes two byte clocks.

Routing is *reverse*: the tag in the header that port *i*'s chip sends names
the **input** that output *i* should listen to for the frame. So each output
picks its own source, and several outputs may pick the same input. Multicast
costs nothing and there are no conflicts to resolve.

The per-port `tag_decoder`:

- stores the tag on the header byte;
- turns it into the three stage selects (`sel2 = tag[0]`, `sel4a = tag[2:1]`,
  `sel4b = tag[4:3]`);
- applies the new tag already in the header cycle, so a frame's header and
  payload take the same path.

An idle header, or a port that is not enabled, makes the output select its own
input. An input that is not enabled is replaced by an idle frame (header `0x80`,
zero payload). Calibration traffic therefore never reaches another port as
data.

## Smart end

`asl_smart_end` is the digital half of the port-chip end of a link pair. Links
30 and 31 contain one (`SMART_MASK`). While that link's bit of `smart_mode` is
high, the chip can act as the port chip for another crossbar, or for one of
its own links.

The smart end's clocks come from two phase interpolators: one for receive, one
for transmit. The interpolators are analog and sit outside the RTL. The module
drives them through these outputs:

- `rx_code` and `tx_code` (6 bits): the interpolator settings.
- `rx_shift` and `tx_shift`: ask for the 90° offset during the last five
  timing bytes of a calibration frame (positions 4..8).

Bring-up has four steps:

1. Send `11000001` until two things have happened:
   - the receiver has byte and frame sync on the crossbar's calibration
     frames;
   - the receiver has bit sync, meaning its early/late votes have tied or
     reversed once.

   The receiver's frame counter follows the received framing bytes.
2. Send calibration frames that report the receiver's vote and sync status.
3. Adjust from what the crossbar reports:
   - Each early/late vote of the smart end's own receiver steps `rx_code` by
     one: early increments it, late decrements it.
   - Each early/late bit in the crossbar's control bytes steps `tx_code` the
     same way.
   - Byte sync without frame sync in a crossbar control byte makes the
     transmitter stretch one frame by a byte (a slip). At most one slip happens
     per four control bytes, so the crossbar can re-check before the next one.
4. With sync in both directions, send the frames presented on `smart_data`.
   `smart_frame` marks the header slot. Idle frames still go out as
   calibration frames.

The codes never settle on one value. Like any bang-bang loop they dither by a
step or two around the ideal setting, and that keeps tracking drift.

While a link works as a smart end, its dumb end is held cleared. The
controller therefore keeps that port out of the switch.

## PRBS self-test

The links chosen by `PRBS_MASK` each have a PRBS-7 generator and checker, with
polynomial x⁷ + x⁶ + 1. The default is links 0..3. While `prbs_mode` is high,
these links work as follows:

- They transmit the PRBS stream instead of frames.
- They check the stream they receive.
- They count checked bytes and bit errors (`prbs_err`, `prbs_bytes`, 16-bit
  saturating counters).
- They report not ready, so the controller keeps them out of the switch.

The checker synchronises itself: it predicts each bit from the seven bits
before it. No seed or alignment is needed. Because of that, one flipped bit on
the line shows up as three errors.

`prbs_mode` leaves the aligner's offset as it was. The link is ready again when
the mode ends.

## Files

| File | Content |
|---|---|
| `rtl/xbar_pkg.sv` | sizes, framing constants, header and control byte structs |
| `rtl/xbar_top.sv` | the chip: clock divider, 32 links, core, controller |
| `rtl/byte_clock_gen.sv` | clock tree input mux and divide-by-4 |
| `rtl/asl_dumb_end.sv` | one crossbar-side link: the five blocks below plus PRBS |
| `rtl/asl_smart_end.sv` | port-side link logic: bring-up, slips, interpolator codes |
| `rtl/asl_serializer.sv`, `rtl/asl_deserializer.sv` | byte ↔ two bits per 800 MHz cycle |
| `rtl/asl_rx_align.sv` | byte and frame sync |
| `rtl/asl_cal_monitor.sv` | far-end status and early/late vote |
| `rtl/asl_tx_framer.sv` | calibration frame or core frame, per frame |
| `rtl/prbs7_gen.sv`, `rtl/prbs7_check.sv` | self-test |
| `rtl/switch_core.sv`, `rtl/tag_decoder.sv`, `rtl/mux32_tree.sv` | switch core |
| `rtl/xbar_ctrl.sv` | frame position counter, port enables, recalibration |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/port_card_model.sv` | behavioural port chip used by the link and chip tests |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, this runs the full chip test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    +libext+.sv rtl/xbar_pkg.sv tb/tb_xbar_top.sv --top-module tb_xbar_top --Mdir obj
./obj/Vtb_xbar_top +verilator+rand+reset+2
```

Replace `tb_xbar_top` with any other testbench name to run that one. Delays in
the testbenches are in nanoseconds: the 800 MHz clock toggles every 0.625 ns.

`tb_xbar_top` runs the whole chip at its default size: 32 ports, 800 MHz, and
PRBS on links 0..3. It attaches 32 port models, each with:

- a different bit offset on the line;
- a different starting clock phase error;
- port 5 holding back its calibration for a long time.

The test has four parts:

1. Power-up calibration. The votes move each model's phase error to zero, and
   frame slips line up the framing. Port 5 stays disabled while the others
   switch.
2. Switching with pseudo-random tags. The tags change every 8 frames, with idle
   frames mixed in. Every received frame is checked for its source port and
   payload.
3. The PRBS test, with one injected bit error.
4. Recalibration, then switching again.
5. Link 31 switched to a smart end, looped to link 30. The test models the
   interpolators and checks three things:
   - the pair comes up;
   - both codes settle near their hidden targets;
   - the smart end's frames come back to it through the switch core.

   The port models that pick input 30 at this stage print the smart end's
   frames as unexpected. They are no longer checked.

The test counts each mechanism and fails if one never happened:

- votes;
- phase adjustments;
- slips;
- refusing to lock on `11000001`;
- disabled ports;
- idle frame replacement;
- unicast and multicast;
- calibration frames;
- smart end phase steps and slips.

It takes about a second.

`tb_asl_smart_end` brings one smart end up against one crossbar link in six
random trials. Each trial has random line delays and random interpolator
targets, and checks:

- the crossbar never locks during pre-calibration;
- the pair becomes ready;
- both codes settle near their targets;
- data flows both ways at one frame per nine byte clocks.

The interpolator model works on bits, not on time. While a shift is requested,
each bit of a timing byte comes out inverted if that clock is late and
unchanged if it is early. On target it alternates from frame to frame.

The port model is behavioural. Its clock phase error is a number that decides
what its timing bytes look like; nothing is actually delayed in time. Bit
offsets on the line are real delays, a whole number of bits long.

## What follows the source design and what does not

These points follow the original design:

- 32 ports, an 8-bit datapath, 9-byte frames, a 5-bit tag, the header layout.
- The calibration frame bytes.
- The majority vote on bytes 5..8.
- The `11000001` pre-calibration pattern.
- An 800 MHz double-data-rate link and a 200 MHz byte clock.
- The 2:1/4:1/4:1 multiplexer.
- Reverse routing with the tag decoder bypass on the header.
- Synchronous common framing.
- The controller that disables unsynchronised links.
- PRBS-7 on four links.

These are this design's own choices, where the original says nothing:

- the bit order on the line (MSB first);
- the bit order inside the control byte;
- the polarity of the vote (a match with `01010101` means early);
- the two-hit rule for byte sync;
- using the common position counter to judge frame sync;
- keeping sync until recalibration (there is no loss-of-sync detection);
- idle frames for disabled ports;
- self-routing of idle frames;
- how recalibration is requested and sequenced;
- the PRBS polynomial, which links carry PRBS, and the counter widths;
- which links carry smart ends, and the smart end's code width, step and
  slip rules;
- the reset style.

Known differences from the original chip:

- **Smart ends.** The original test chip has two link blocks that can also act
  as smart ends, with their own dual-loop PLLs and phase interpolators. Here
  only their digital control is built:
  - The interpolator codes and shift requests are ports.
  - The shift registers run on the chip's clocks, not on interpolated ones.
  - The smart receiver counts as bit-synchronised when its votes first tie or
    reverse, meaning the loop has reached the middle of the eye. The phase
    loops keep running after that.
  - The step size, the code width and the slip rule are this design's own.
- **Clock tree.** The original has one divide-by-4 counter at each tail of the
  clock tree, synchronised to each other. Here a single counter serves the
  whole chip.
- **Scan chain.** The scan chain is not built. Only its clock input to the
  clock tree mux is present.
- **Tri-state buses.** The 4:1 multiplexer stages use tri-state buses in the
  original. Here they are ordinary multiplexers.
- **Core latency.** The original states a core latency of one byte clock, from
  the input register to the output register. From `din` to `dout` it is two
  byte clocks here, counting both registers.
- **Timing bytes.** In the calibration frame, the vote looks at bytes 5..8. How
  the smart end marks which timing bytes were sent with a shifted clock is left
  to the smart end.
- **Speed.** Nothing in the RTL says anything about speed: 1.6 Gb/s or
  1.92 Gb/s is a property of the circuits, not of the logic.
- **Lint warnings.** Some warnings about unused bits remain, and they are
  deliberate:
  - The reserved fields of the header and control byte are not used.
  - The aligner's hit strobe and bit offset outputs are unused in the link
    block.
  - The PRBS logic is absent in links built without it.
