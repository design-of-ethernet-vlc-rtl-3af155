# Ethernet to visible-light bridge

This design connects a Gigabit Ethernet port to a 625 Mbit/s visible-light
(VLC) link. Frames received from an RGMII Ethernet PHY are checked, packed
into 32-bit words, slowed down through a deep clock-crossing buffer, and
sent as VLC frames to an FPGA serial transceiver. The transceiver adds
8B/10B coding and drives the LED. Light received on the other side goes
through the same path in reverse and leaves on Ethernet.

The light path carries 625 Mbit/s on the line. After 8B/10B that is
500 Mbit/s of data, half the Ethernet rate. The design does not flow-control
Ethernet. When the light path is full it drops whole frames and leaves
recovery to the retransmission of the higher protocol layers. Three more
behaviours follow from this:

- Only whole, checked frames are ever passed on.
- A frame damaged on the light path, for example when the beam is
  interrupted, is thrown away on the receive side.
- Traffic resumes by itself once the path is restored.

## Data path

```
          eth_clk 125 MHz                          |  vlc_clk 15.625 MHz
                                                   |
RGMII -> rgmii_rs -> eth_rx -> width_8to32 -> frame_buffer (8192 words) -> vlc_packer   -> tx_data/tx_charisk
                                                   |
RGMII <- rgmii_rs <- eth_tx <- width_32to8 <- frame_buffer (1024 words) <- vlc_depacker <- rx_data/rx_charisk/rx_err
                                                   |
MDC/MDIO <-> mdio_smi  (link_up enables eth_rx and eth_tx)
```

The top level is `eth_vlc_top`. The transceiver (8B/10B coder, serialiser,
clock recovery, comma alignment) and the Ethernet PHY are outside it.

- The transceiver's 32-bit parallel ports are top-level ports on `vlc_clk`.
  Byte lane 0 (bits 7:0) is the byte sent first. `tx_charisk` and
  `rx_charisk` mark K characters.
- The PHY's RGMII and MDIO pins are top-level ports. MDIO is split into
  `mdio_o`, `mdio_oe` and `mdio_i` for an external tri-state pad.
- The `eth_ev` and `vlc_ev` outputs are one-clock event pulses, one per
  clock domain (types in `vlc_pkg`). They cover frames received, dropped
  and sent, buffer pauses, fragments and flushes. They exist for monitoring
  and counting only.

Both resets are asynchronous and active low, and must be asserted together.

## Ethernet side

`rgmii_rs` turns the double-data-rate RGMII nibbles into bytes and back.

- On receive, the low nibble is taken on the rising edge and the high
  nibble on the falling edge. RX_ER is recovered as the xor of the two
  RX_CTL samples.
- The PHY's receive clock is taken to be the same 125 MHz clock as
  `eth_clk`, phase-aligned. A board with a free-running PHY receive clock
  needs a small clock-domain crossing in front of `eth_rx`.
- The transmit DDR output is written as a clock-selected multiplexer. On
  an FPGA, replace it with the vendor's output DDR register.

`mdio_smi` brings the PHY up with IEEE 802.3 clause-22 management frames:

1. Write BMCR = 0x8000 (PHY reset).
2. Poll BMCR until the reset bit clears.
3. Write BMCR = 0x1200 (start auto-negotiation).
4. Poll BMSR until both "auto-negotiation complete" and "link up" are set.

`link_up` then enables the Ethernet receive and transmit logic. BMSR keeps
being polled, so a lost link drops `link_up` again. MDC runs at
125 MHz / 50 = 2.5 MHz. The PHY address is a parameter, default 0.

`eth_rx` finds the preamble and the `0xD5` delimiter and forwards every
byte after it, FCS included. It runs the CRC-32 over the frame. One clock
after the last byte it gives a verdict: good only if all of these hold:

- the CRC residue is right;
- RX_ER was never seen;
- the length is between 64 and 1518 bytes.

`eth_tx` sends a frame behind seven `0x55` bytes and `0xD5`. It raises
`ready` for the next frame only after 12 idle clocks, the 96 ns minimum
gap of Gigabit Ethernet. The FCS that came across the light path is sent
unchanged, so frames leave byte-identical to how they arrived. With the
`CRC_CHECK` parameter set (the default) `eth_tx` also re-checks the FCS as
the bytes stream through its eight-byte preamble delay line. If the FCS
is wrong it raises TX_ER on the frame's last byte, so the PHY turns the
frame into an invalid one.

## Width conversion: pointers over a 2 KB RAM

`width_8to32` (Ethernet to light) and `width_32to8` (light to Ethernet)
each use a 2048-byte simple dual-port RAM and a small FIFO of frame
lengths (11 bits x 32 entries, since 2048 / 64 = 32 minimum frames).
Three pointers manage the RAM:

- **WP** (write pointer) advances with every byte or word written.
- **VP** (valid pointer) marks the end of the last frame that passed its
  check.
- **RP** (read pointer) follows the reader.

When a frame ends good, its length goes into the length FIFO and VP jumps
to WP. WP is first rounded up to a multiple of four bytes, so every frame
starts on a word boundary. When a frame ends bad, WP simply returns to VP.
The bad frame is then overwritten as if it had never been written.

A frame is dropped the same way if it would overrun unread data or the
length FIFO is full. This is how excess Ethernet traffic is shed: while
the buffer behind is paused, the converter fills up and refuses frames.

The length FIFO exists so that a short frame can finish while a long one
is still being read out, without its length being lost.

Readout starts only when a length is waiting and the stage behind can take
a whole frame. For `width_8to32` that stage is the buffer. For
`width_32to8` it is the transmitter's `ready`. The first byte of a frame
sits in bits 31:24 of its first word.

## Frame buffers: thresholds and fragment cleaning

`frame_buffer` is used once per direction. It holds two dual-clock FIFOs
with Gray-coded pointers:

- **DFIFO** holds the data words.
- **IFIFO** holds one length entry per complete frame.

A frame's length is written to IFIFO only after its last word has been
written and found good. The reader always takes the length first and then
exactly that many words. So any words in DFIFO that have no IFIFO entry
are a *fragment*: the remains of a frame that ended bad, or was cut off
when the DFIFO or IFIFO filled. Fragments are the hard part of this
design.

### Pause and resume

When the DFIFO word count rises above the upper threshold, or the IFIFO
count rises above its own upper threshold, writing pauses. It resumes
only when both counts fall below their lower thresholds. The pause takes
effect at frame boundaries only: a frame already being written finishes,
and a frame that starts during a pause is refused whole.

Ethernet to light:

- DFIFO: 8192 words.
- Upper threshold 7811 = 8191 − 2 × 190. A 1518-byte frame is 380 words,
  so this leaves room for one more maximum frame after the threshold is
  crossed.
- Lower threshold 3715 = 4095 − 2 × 190.

Light to Ethernet:

- DFIFO: 1024 words, room for two back-to-back maximum frames.
- IFIFO thresholds 495 / 8, so that a flood of minimum-size frames cannot
  fill the 512-entry IFIFO.
- This direction speeds up from 500 Mbit/s to 1 Gbit/s, so it has no DFIFO
  threshold.

### Fragment cleaning

After writing a fragment, the write side stops accepting frames and
raises a request that crosses to the read clock domain.

The read side first finishes every good frame ahead of the fragment. It
then waits until IFIFO is empty and discards the DFIFO contents. Next it
acknowledges the request. Request and acknowledge form a four-phase
handshake across the two clocks, and writing resumes after it.

Frames arriving during the clean are dropped. On the light-to-Ethernet
side, this is how frames marked bad by the VLC receiver are kept off the
Ethernet.

The write-side count includes words until they are actually popped, so
the thresholds are conservative.

## VLC framing

`vlc_packer` wraps each frame into these 32-bit words:

| word | value | K flags |
|---|---|---|
| sync | `0xFF0001BC` | lane 0 (K28.5) |
| start delimiter | `{0xFF, length[15:0], 0xFB}` | lane 0 (K27.7) |
| payload | ceil(length/4) words, first byte in lane 0 | none |
| check | CRC-32 (inverted) over delimiter and payload | none |
| idle | `0xBCBCBCBC`, at least 2 words between frames and whenever idle | lane 0 (K28.5) |

A 64-byte frame is therefore announced as `0xFF0040FB`. The CRC is the
Ethernet CRC-32, run with lane 0 first.

`vlc_depacker` hunts for the sync word and reads the delimiter. It then
takes the payload and compares the check word. Its output is delayed by
one word, so the frame's verdict rides on its last word.

A frame is cut short and marked bad on any of these:

- a K character or transceiver code error inside the frame;
- a length of 0 or above 1518 bytes;
- a CRC mismatch.

After a bad frame the depacker hunts for the next sync word. So when the
beam comes back, the first complete frame gets through.

A frame whose sync word itself falls inside an outage is never seen. It is
simply lost, and the higher layers retransmit it.

## Throughput

At 15.625 MHz × 32 bits the light path carries 500 Mbit/s of data. Each
frame also costs six extra words:

- sync;
- start delimiter;
- check;
- two idle words;
- one word while the buffer hands the next frame to the packer.

A 1518-byte frame is 380 payload words, so it takes 386 words. That gives
1518 × 8 / (386 × 64 ns) = 491.6 Mbit/s of Ethernet frames.

A 64-byte frame is 16 payload words, so it takes 22 words. That gives
363.6 Mbit/s.

The end-to-end testbench sends maximum-size frames, then minimum-size
frames, back to back at 1 Gbit/s. It measures exactly these two rates
coming back. The rest of the offered traffic is dropped as described above.

## Where this departs from, or fills in, the source description

The architecture follows the original description. This includes:

- the WP/VP/RP pointer scheme;
- the 2048-byte RAM and 11 × 32 length FIFO;
- DFIFO and IFIFO buffers with the 8192/7811/3715 and 1024, 495/8 figures;
- fragment cleaning;
- the sync, delimiter, CRC and idle framing;
- the 12-clock gap;
- PHY reset and auto-negotiation before enabling the link.

These details were not specified and are choices made here:

- **Start delimiter and sync word.** The description prints both
  inconsistently. The values used are the ones in its transmitter and
  receiver waveforms: `ff0040fb` as the delimiter of a 64-byte frame,
  and `ff0001bc` as the sync word, where the prose gives `ff0000bc`. The
  idle word likewise has only lane 0 flagged as K, as in the waveforms.
- **CRC.** The byte order inside the CRC word, and whether the sync word is
  covered (it is not), are choices.
- **Direction naming.** The description calls the same direction both
  "uplink" and "downlink" in different places. The code names directions
  by function: Ethernet to light is the slow-down path with the 8192-word
  buffer.
- **IFIFO size.** The IFIFO depth of 512 comes from the 511 in the
  threshold formula. The Ethernet-to-light buffer has no IFIFO threshold,
  and the light-to-Ethernet buffer has no DFIFO threshold, since neither
  was given.
- **Gap and handshakes.** The minimum gap of 2 idle words, the frame-level
  pause, the explicit request/acknowledge for fragment cleaning, and the
  "room for a whole frame" handshakes between stages are all choices.
- **Management.** The MDIO register values, polling and MDC rate are
  standard clause-22 practice.
- **Transmit CRC.** The transmit-side CRC check is marked optional and not
  described further. Here it is a parameter, on by default. Since the frame
  is already streaming, it flags a bad FCS with TX_ER rather than dropping
  the frame.

The transceiver's 8B/10B coder, serialiser and clock recovery are not part
of this RTL. Neither is the PHY.

## Files

`rtl/`:

| file | contents |
|---|---|
| `vlc_pkg.sv` | constants, event structs, CRC-32 functions |
| `eth_vlc_top.sv` | top level |
| `rgmii_rs.sv`, `mdio_smi.sv`, `eth_rx.sv`, `eth_tx.sv` | Ethernet side |
| `width_8to32.sv`, `width_32to8.sv`, `sync_fifo.sv` | width converters and their length FIFO |
| `frame_buffer.sv`, `async_fifo.sv` | clock-crossing buffers |
| `vlc_packer.sv`, `vlc_depacker.sv` | VLC framing |

`tb/`:

- one self-checking testbench `tb_<module>.sv` per module, except the two
  FIFOs, which are tested inside the converters and buffers;
- `tb_eth_vlc_top.sv`, the end-to-end test;
- `tb_util_pkg.sv`, a reference CRC and frame generator;
- `phy_mdio_model.sv`, a behavioural PHY management model.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the top of the tree:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/vlc_pkg.sv tb/tb_util_pkg.sv tb/tb_eth_vlc_top.sv \
  --top-module tb_eth_vlc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The end-to-end test runs
the top level at its default sizes and takes a few seconds. It connects
the transmit words back to the receive side through a two-word "light
path" and goes through five phases:

1. Bring the link up over MDIO.
2. Send frames at a moderate rate, including one with a bad FCS and a
   runt.
3. Send 120 maximum frames, then 1200 minimum frames, at full line rate.
4. Cut the light path twice while traffic flows.
5. Check that traffic recovers.

Every returned frame is compared byte for byte, in order, with its
preamble and inter-frame gap. The test also checks that each mechanism
actually happened at least once:

- Ethernet drops;
- buffer pause;
- bad VLC frames;
- fragment cleaning;
- the returned data rate.
