# 8B13B SerDes for visible-light communication

This is a serializer/deserializer for a visible-light link: a bank of white LEDs
sends data by on-off keying, and a photodiode receiver picks it up a few metres
away. Phosphor white LEDs switch slowly. At 160 ns per bit their pulses come out
stretched or shrunk depending on the surrounding bits. A receiver that decodes
pulse *widths* then misreads bits.

The main idea of the design is a line code whose information is carried only by
**rising edges**. Each byte becomes a 13-bit codeword (8B13B) that starts with
a 0 and holds exactly six 1s. A 0-to-1 transition marks a 1 and nothing else
matters. The receiver first turns every rising edge into a fixed 130 ns pulse,
which makes any pulse-width distortion irrelevant. It then recovers the bit
clock with a small delay-locked loop and maps each 13-bit edge pattern back to
its byte. A CRC-16 protects every packet, and the receiver also uses it to
correct single-bit errors.

The RTL is one FPGA design that works either as transmitter or as receiver. A
switch selects the role. A host computer (SPI master) supplies payloads to the
transmitter and collects them from the receiver.

```
 host --SPI--> [spi_slave] -> [serializer: 8B13B + CRC] --led_out--> LED driver ~~light~~>
   ^  data_req  [timing_ctrl] -> start/active
   |
 host <--SPI-- [spi_slave] <- [deserializer: shaper, DLL, framing, CRC fix, DECODE8B13B] <--pd_in-- photodetector + comparator
      recv_req
```

Everything runs from one 100 MHz clock (`clk`), with an asynchronous active-low
reset (`rst_n`). One line bit is 16 clocks long.

## The 8B13B code

Each codeword has these properties:

* It has 13 bits, and bit 12 is sent first.
* Bit 12 is always 0, so every codeword begins with the line low. The first 1
  of a codeword is therefore always a rising edge, whatever the previous
  codeword ended with.
* It holds exactly six 1s. This keeps the average light level constant (no
  flicker) and the line DC-balanced.
* Its *rising-edge form* is unique. The rising-edge form is `w & ~(w >> 1)`: the
  bits where the line goes from 0 to 1. The receiver sees only this form, so no
  two codewords may share it.

Here is an example: byte 3 is sent as `0001010111010`. The receiver reads it as
`0001010100010`, because the run `111` shows only its first edge.

The table is `CODE_TABLE` in `vlc_pkg.sv`. A constant function computes it
when the design is elaborated, so synthesis sees a plain 256 x 13 ROM and no
table file is needed. Entry *v* is the codeword of byte *v*. It follows this
rule:

1. Take all 13-bit words with a leading 0 and six 1s.
2. Group the words by rising-edge form, and keep the numerically largest word of
   each group. This leaves 345 words.
3. Sort the kept words in ascending order.
4. Byte 0 takes the word `0001010110101`, byte 1 the next word, and so on up to
   byte 255.

The rule gives exactly the published codewords for the bytes 0 to 5. The
published table beyond those six entries was not available. **Bytes 6 to 255
therefore follow this rule, not necessarily the original table.** This RTL can
talk to itself, but possibly not to an implementation that uses the original
table. `tb_enc8b13b` rebuilds the table independently, with its own code for
the rule, and checks the encoder against it.

The coding rate is 8/13 = 0.615. This is better than a 4B7B code with the same
properties (0.571).

## Packet and line format

```
| preamble 1010...10 | start bits | 65 codewords x 13 bits | CRC-16, 1B3B coded |
|      36 bits       | 1111/0000  |       845 bits         |      48 bits       |
```

* **Preamble.** The preamble alternates 1 and 0. Between packets the
  transmitter keeps sending the same alternating pattern. The LEDs thus stay at
  half brightness rather than going dark, and the receiver stays locked. A
  packet begins at the next 1 of the pattern, with 36 preamble bits.
* **Start bits.** The start bits are `1111` if the transmitter got a fresh
  payload from its host for this frame (`active`). They are `0000` if it did
  not. A receiver throws a `0000` packet away. The light keeps flowing either
  way.
* **Data.** The 65 payload bytes follow, byte 0 first, each as its codeword.
* **CRC.** The CRC is CRC-16-CCITT (x^16 + x^12 + x^5 + 1, preset 0xFFFF). It
  is computed over the *rising-edge form* of the 845 code bits, because that is
  what the receiver can reproduce. It is sent MSB first, and each CRC bit
  becomes three line bits: `0 -> 001`, `1 -> 010`. These triplets are also
  edge-safe.

A packet is 933 bits x 160 ns = 149.28 us. That carries 65 bytes, or
3.48 Mbit/s while the packet is on the line.

## Transmit side

`timing_ctrl` divides the clock into 640 ns ticks. A tick counter runs from 0
to 38600 and wraps, so one frame is 24.7 ms. The frame proceeds as follows:

1. At tick 1, `data_req` rises and `active` is cleared.
2. The host answers with one SPI frame of exactly 65 bytes. This sets `active`,
   drops `data_req`, and makes the `serializer` encode the bytes (one per
   clock) and run the CRC (845 clocks).
3. At tick 11000 (7.04 ms after the request), `start` makes the serializer send
   the packet.

If the host did not answer in time, the packet still goes out with start bits
`0000`.

`data_req` stays high until the frame arrives or until tick 11000. A host can
therefore poll it or take it as an interrupt. The 7 ms gap is there for the
host's response time. It is the `START_TICK` parameter; a faster host can use a
smaller value.

`spi_slave` uses SPI mode 0, MSB first, with SCLK oversampled by `clk`. SCLK
must stay below about `clk/4`; the host runs it at 3.9 MHz. A frame counts only
if chip select frames exactly 65 bytes (`frame_ok`). Otherwise the slave pulses
`frame_bad`.

## Receive side

### Pulse shaper

`pulse_shaper` first passes `pd_in` through a two-flop synchroniser. Each rising
edge then gives a 13-clock (130 ns) pulse. Edges that arrive during a pulse are
ignored; genuine edges are at least two bits (32 clocks) apart.

### Delay-locked loop

`dll_cdr` recovers the bit clock. It is the least obvious part of the design:

* **Phase detector.** The shaped signal enters a 32-bit shift register, newest
  sample in bit 0. A 1/16 divider (`ph`) ends a bit window every 16 clocks
  (`bit_valid`). At that moment the newest 16 positions are the current window.
  A 0-to-1 step at position *k* means that a 1 bit began *k* clocks ago, so
  `bit_out` = 1.
* **Ideal phase.** Ideally the edge sits mid-window, at *k* = 8. This leaves a
  margin of ±7 clocks for jitter.
* **Acquisition.** While the loop is unlocked, every edge restarts the divider,
  so that the window closes 8 clocks later. The preamble has one edge every two
  bits. After 16 alternating bits the loop declares lock.
* **Tracking.** Once locked, the divider runs freely and is corrected by at
  most one clock per received edge:
  * Edge at *k* < 7: the window closed too early. The divider is held for one
    clock (`dec`), so the next window is 17 clocks long.
  * Edge at *k* > 9: the window closed too late. The divider skips a count
    (`inc`), so the next window is 15 clocks long.

  A 1000 ppm difference between the two boards' clocks drifts by only 0.016
  clock per bit, far inside this range.
* **Loss of lock.** The loop drops lock after 24 bits with no edge.

### Framing

The `deserializer` state machine works on the recovered bits. Start bits `1111`
become a single edge after the shaper, so they would look like one more
preamble 1. To tell them apart from `0000`, the raw synchronised line level is
sampled at every bit strobe as well. Once at least 16 alternating bits have been
seen:

* Two raw 1s in a row mean `1111`. Two more start bits follow.
* A missing edge (two 0 bits in a row) means `0000`. Three more start bits
  follow, and the packet is marked for discard.

Then the state machine stores 845 code bits. Of the 48 CRC line bits it keeps
each triplet's middle bit. A lost pulse in a `010` triplet therefore becomes an
ordinary one-bit CRC error, which can be corrected. A lost pulse in a `001`
triplet does no harm at all, because that bit is not read.

### CRC check and single-bit correction

The syndrome is S = CRC(received 845 bits) xor (received CRC). The register
update is linear, so S depends only on the error pattern. For a single flipped
bit *p* positions before the end of the 861-bit word, S = x^p mod g(x):

* *p* = 0 is the last CRC bit.
* *p* = 16 is the last data bit.

`crc_corrector` steps r = x^p mod g for p = 0, 1, 2, … (one step per clock) until
r = S. It then flips that bit, or gives up after 861 steps. CRC-16-CCITT has
minimum distance 4 at this length, so a double error is never mistaken for a
single one.

On a radio channel a lost light pulse would corrupt several data bits. Here it
removes exactly one rising edge, which is one bit of the edge form, so
single-bit correction matches the dominant error of this channel.

### Decoding, counters and hand-over

`decode8b13b` compares each 13-bit pattern with the edge forms of all 256
codewords in one clock, so a packet takes 66 clocks. A pattern that matches no
codeword sets `code_err`.

The counters work as follows:

* Every nonzero syndrome increments `num_error`.
* A packet that decodes after a correction also increments `num_corr`.
* Packets that cannot be corrected, or that hold a non-codeword, are dropped. A
  non-codeword with a clean CRC also counts in `num_error`.

A good packet is copied to the output buffer and raises `recv_req`. It stays
there until the host has read it with a 65-byte SPI frame. When the `stat_sel`
switch is on, the last four bytes of that payload carry `num_error` and
`num_corr`, most significant byte first.

All checking ends within about 18 us after the last line bit, far inside the
24.7 ms frame.

## Modules

| file | role |
|---|---|
| `vlc_pkg.sv` | constants: bit time, field sizes, CRC, timing counter values; `edge_form()` |
| `vlc_serdes_top.sv` | top: mode switch, SPI, timing controller, serializer, deserializer |
| `timing_ctrl.sv` | 640 ns tick counter, `data_req`, `start`, `active` |
| `spi_slave.sv` | SPI mode 0 slave, 65-byte frames both ways |
| `serializer.sv` | packet preparation (uses `enc8b13b`, `crc16_ccitt`) and line output |
| `enc8b13b.sv` | codeword lookup in `CODE_TABLE` |
| `crc16_ccitt.sv` | bit-serial CRC-16 with start/strobe handshake |
| `deserializer.sv` | receive chain, framing, counters, output buffer |
| `pulse_shaper.sv` | 130 ns monostable on rising edges |
| `dll_cdr.sv` | bit clock recovery |
| `crc_corrector.sv` | single-bit error location from a syndrome |
| `decode8b13b.sv` | edge patterns to bytes, start/strobe handshake |

Top-level ports:

* `tx_mode`, `stat_sel`: the two switches.
* `spi_*`: the SPI port.
* `data_req`, `recv_req`: request lines to the host.
* `led_out`: the serial line to the LED driver. It is held low in receive mode.
* `pd_in`: from the comparator after the photodetector.
* The rest are status outputs for LEDs or debugging: lock, packet events, DLL
  corrections and the two error counters.

The analog parts of a complete link are outside this RTL:

* the LED fan-out and switching boards;
* the photodiode amplifiers;
* the comparator with its fixed threshold;
* the host computers.

## Simulation

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The
testbenches share these helpers:

* `tb_util_pkg.sv`: reference CRC, table rule and packet builder, written
  independently of the RTL.
* `spi_master_model.sv`: a host model.
* `line_model.sv`: an optical link model. It can give the sender a different
  bit time, shrink pulses, or drop chosen pulses.

`tb_vlc_serdes_top` is the end-to-end test. It runs with all parameters at
their defaults: two boards, transmitter and receiver, on clocks 0.1 % apart,
over five 24.7 ms frames. The frames exercise, in order: a normal packet, a
missed SPI request (a `0000` packet, discarded), a corrected lost pulse, an
uncorrectable double loss, and the counter read-out.

`tb_packet_run` is a packet-loss run on the receive path. It sends 400
packets that carry a serial number, each with a random clock offset within
±1000 ppm and random pulse shrinkage. About 20 % of the packets lose one pulse
and 10 % lose two, at random places in the data and CRC fields. A host model
reads every delivered packet. The test checks that:

* every packet with at most one loss arrives intact;
* every packet with two losses shows as a gap in the numbering;
* `num_error` and `num_corr` match the damage exactly.

Change `NPKT` for longer runs; each 100 packets take about 2 s.

To build and run a testbench, for example the end-to-end one, go to the
directory that holds `rtl/` and `tb/` and run:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/vlc_pkg.sv tb/tb_util_pkg.sv tb/tb_vlc_serdes_top.sv --top-module tb_vlc_serdes_top
./obj_dir/Vtb_vlc_serdes_top
```

The end-to-end run simulates about 106 ms, which takes roughly half a minute.
The unit testbenches take well under a second each. For another testbench,
replace both occurrences of `tb_vlc_serdes_top`.

## What is taken from the published design, and what is not

Taken from the published design:

* the code properties and the six codewords for bytes 0 to 5;
* the packet fields and sizes (65 bytes, four start bits, 48-bit 1B3B CRC) and
  the CRC-16-CCITT polynomial;
* 160 ns per bit as 1/16 of 100 MHz;
* the 130 ns edge-triggered monostable;
* the 32-bit shift-register phase detector, with a /16 divider that is nudged
  up or down;
* locking on the alternating preamble;
* the tick counter values (640 ns, 38600, request at 1, start at 11000) and the
  `active` / start-bit rule;
* CRC-based detection and correction with `num_error` and `num_corr`, and the
  counter read-out switch;
* the block partitioning: timing controller, spi_slave, serializer with CRC,
  deserializer with CRC and DECODE8B13B, with start/strobe handshakes.

Choices of this design:

* **Code table.** Bytes 6 to 255 follow the rule above.
* **Preamble.** It is 36 bits, and the line carries the preamble pattern while
  idle.
* **CRC.** It is taken over the rising-edge form, with preset 0xFFFF.
* **Start-bit detection.** It uses the raw line level.
* **DLL window and thresholds.** The original corrects when a 5-bit selector
  value is at most 2 or at least 29. How that value relates to the edge
  position is not described, so this design keeps the edge within ±1 clock of
  mid-window (`DEADBAND`) instead. The original also acquires with a separate
  half-rate (320 ns) clock on the preamble; here the /16 divider is simply
  restarted at each edge until lock. Lock after 16 alternating bits and loss
  after 24 bits without an edge are also this design's choices.
* **Error correction.** The search method and the use of the middle bit of each
  CRC triplet.
* **SPI.** Mode 0, MSB first, exactly 65 bytes per chip-select frame.
* **`data_req`.** It is a level, not a pulse.
* **Counter placement.** The counters go in the last four payload bytes.
* **Clock.** A single 100 MHz clock (the original also has a 50 MHz system
  clock).
* **Decoder width.** The decoder input is 845 bits wide. A 448-bit port width
  hinted at by an original signal name could not be reconciled with 65 x 13
  bits.

## Limits

The sustained payload rate is one 65-byte packet per 24.7 ms frame, about
21 kbit/s. The line rate is 3.48 Mbit/s, but the host SPI interval sets the
frame rate. Shortening `CNT_MAX` and `START_TICK` in `timing_ctrl` raises the
payload rate, as far as the host can keep up.

Video at several hundred kbit/s would need such shorter frames or larger SPI
transfers.

The error counters are 16 bits wide and wrap.
