# 13.56 MHz RFID emulator (ISO 14443-A), card and reader in one FPGA design

This design lets one FPGA act either as a contactless card (a *PICC*, Proximity
Integrated Circuit Card) or as a card reader (a *PCD*, Proximity Coupling Device).
Both speak ISO 14443 type A at 13.56 MHz. The FPGA sits behind a small analog
front-end board. That board filters the FPGA's carrier onto a loop antenna,
switches a load for card-to-reader signalling, and turns the antenna signal into
an envelope that a 10-bit ADC digitises. Everything digital is here:

- carrier and subcarrier generation;
- both line codes, in both directions;
- detection of modulation in the raw ADC stream;
- bit-stream decoding with parity checks;
- the ISO 14443-3 start-up handshake on both sides (REQA, ATQA, anticollision,
  SELECT, SAK), with its UID check byte and CRC;
- the control pins of the front-end.

The main use is card emulation. A reader that identifies people by a card's
4-byte UID (access control, for example) cannot tell the emulator from a real
card. The emulator can store several cards and presents the one that `card_sel`
picks. The reader side runs the same handshake from the other end and reports
the UID it read.

Only the start-up handshake of ISO 14443-3 is built. This is all that a
UID-based access check uses. The later protocol (ISO 14443-4), encrypted
exchanges, the faster bit rates (fc/64 to fc/16), 7- and 10-byte UIDs
(cascade levels) and bit-wise anticollision between several cards in the
field are not built.

## The air interface in brief

The bit rate is fc/128: one bit lasts 128 periods of the 13.56 MHz carrier
(9.44 µs). Each direction uses a different code:

| direction | how | bit coding |
|---|---|---|
| reader → card | the reader switches its carrier off for short pauses | *modified Miller*: a 1 pauses at ½ to ¾ of its bit. A 0 that follows a 0, or that starts the frame, pauses during the first ¼. A 0 after a 1 has no pause. |
| card → reader | the card switches its antenna load at the fc/16 subcarrier (847.5 kHz: 8 periods on, 8 off) | *Manchester*: a 1 is load-modulated in the first half of its bit, a 0 in the second half. |

Reader frames are built as follows:

- They begin with a start bit 0 and end with an end bit 0.
- A *short frame* carries 7 bits without parity (REQA = 0x26, WUPA = 0x52).
- A *standard frame* carries 1 to 9 bytes, each followed by an odd-parity bit.

Card frames begin with a start bit 1 and carry 1 to 5 bytes with odd parity.
They have no end bit. All bytes are sent LSB first, byte 0 first.

The handshake, for a card with a 4-byte UID:

```
reader                     card
REQA (short, 0x26)   -->
                     <--   ATQA 04 00
93 20                -->                 (anticollision, cascade level 1)
                     <--   UID0 UID1 UID2 UID3 BCC      BCC = XOR of UID bytes
93 70 UID0..3 BCC CRC -->                (SELECT, CRC_A over the first 7 bytes)
                     <--   SAK 08, CRC_A
```

There must be at least 1172 carrier periods between the end of one frame and
the start of the answer. There must be at least 7000 periods between two
requests from the reader.

## Clocking: one clock and a carrier tick

Everything runs on one 135.6 MHz clock, ten times the carrier. `clock_gen`
derives three things from it:

- the carrier `fc`, which toggles every 5 cycles and also clocks the ADC;
- one-cycle strobes at the rising and falling edges of `fc`;
- the subcarrier, which toggles every 8 carrier periods.

The rising-edge strobe is the *tick*. Every protocol counter in the design
advances on it, so all timing parameters are counted in carrier periods. The
ADC word is captured on the falling-edge strobe, half a carrier period after
the ADC's clock edge. The ten main-clock cycles between ticks give the
detectors room to register their intermediate results.

## Block structure

```
                         +-------------- rfid_emulator --------------+
adc_data[9:0] --> adc_decoder --pcd_mod--> pcd_in --> pcd_ctrl --> pcd_out --pause--+
                      |                                 (reader side)               |
                      +------picc_mod--> picc_in --> picc_ctrl --> picc_out --mod---+
                                                 ^    (card side)                   |
                                      card_bank -+ uid                              v
clock_gen: fc, tick, subcarrier ---------------------------------------------> afe_ctrl
                                        signal_in, load_mod, mux_sel, gain <------+
```

| module | role |
|---|---|
| `rfid_pkg` | frame structs (`pcd_frame_t`: 72 data bits, byte count, short flag; `picc_frame_t`: 40 data bits, byte count), command codes, multiplexer codes, parity and BCC functions |
| `clock_gen` | carrier, edge strobes, subcarrier |
| `adc_decoder` | captures one ADC word per carrier period; holds both detector chains |
| `subcarrier_correlator` | reader side: correlates 32 samples with the subcarrier |
| `envelope_thresholder` | card side: compares each sample with a 128-sample running average |
| `mod_detector` | 20-of-32 majority filter; one instance on each side |
| `pcd_in`, `picc_in` | turn the "modulation present" level into bits, check length and parity, strip framing |
| `pcd_out`, `picc_out` | serialise a frame, insert parity on the fly, and say when to pause the carrier or modulate the load |
| `pcd_ctrl`, `picc_ctrl` | the handshake state machines |
| `crc_a` | bit-serial CRC_A LFSR; one instance in each controller |
| `card_bank` | UID table of the emulated cards |
| `afe_ctrl` | front-end mode, multiplexer, carrier gating, load-modulation pin, gain pins |

A controller and its serial units exchange a whole frame in one cycle:

- a frame bus (`tx_frame` or `rx_frame`);
- a one-cycle valid strobe (and, from a receiver, the frame age, see below);
- `tx_busy` back from the transmitter;
- `rx_en` to the receiver, which is high only while the controller expects a
  frame.

`mode` chooses the side that owns the front-end. The other side's controller
is held at its start. A change of `mode` restarts both sides.

## Finding modulation in the envelope

The receivers are the hardest part. The ADC delivers an amplitude per carrier
period, and the two directions look very different in it.

**Reader side: subcarrier correlation.** A card's load modulation is a small
ripple at fc/16 on a steady envelope. `subcarrier_correlator` keeps the last
32 samples and their sum. It processes the window in three steps:

1. Each sample becomes +1 if it is at or above the window mean and −1
   otherwise. The comparison is `sample·32 ≥ sum`, so no divider is needed.
2. The ±1 vector is multiplied with a fixed square wave of period 16.
3. The output is the absolute value of the product.

The output is 0 for a flat or random input and 32 for a subcarrier in phase or
in antiphase. The reference wave is fixed while the window slides over the
input, so a clean subcarrier gives a triangle between 0 and 32. It is at or
above 10 in exactly 20 of every 32 samples. A `mod_detector` therefore calls
the input modulated when at least 20 of the last 32 correlator outputs are at
least 10.

In the end-to-end simulation, a 64-period modulated half bit is reported for
about 28 periods, about 49 periods late. A 128-period run (a 0 followed by a
1, see below) is reported for about 92 periods. The flag flickers at the
edges of a run. After a long run it can report a short false run.

**Card side: pause threshold.** A reader pause drops the envelope almost to
zero. `envelope_thresholder` keeps a running average of the last 128 samples.
A new sample is "low" when it is 20 LSB or more below that average. A second
`mod_detector` reports a pause when at least 20 of the last 32 samples were
low, which is about 20 periods after the pause begins.

**Glitch filter (both receivers).** Each receiver first passes the detector
level through an up/down counter. The counter counts up while modulation is
reported and down while it is not, saturating at `GLITCH_FC`. The filtered
level turns on at the top and off at zero. Its depth is 16 on the reader side
and 8 on the card side. The filter delays both edges by the same amount, so
spacings survive. It absorbs dropouts and false runs shorter than its depth.

## Decoding by onset spacing

Neither receiver recovers a bit clock. Both measure the distance from one
modulation *onset* to the next, round it to half bits (64 periods), and map it
to bits. The fixed detection delay drops out because only differences are
used.

**`pcd_in` (Manchester, card → reader).** The first onset is the start bit 1.

- Same bit twice (1→1 or 0→0): the next onset comes 128 periods later, or 2
  half bits.
- 1→0: the next onset comes 192 periods later, or 3 half bits.
- 0→1: the 0's second half and the 1's first half form one run twice as long,
  with no onset in between.

The receiver keeps a reference at the onset of the last decoded bit. When a
filtered run exceeds `DOUBLE_MIN_FC` (60 periods), the receiver appends a 1
and moves the reference half a bit later, where the 1's onset would have been.

**`picc_in` (modified Miller, reader → card).** The first pause is the start
bit 0. Pause onsets are 2 half bits apart for 1→1 and 0→0. They are 3 half
bits apart for 1→0→0 and for 0→1, and 4 half bits apart for 1→0→1. After a
1, a spacing of 3 or 4 yields two bits at once. An end bit that follows a 1
has no pause. The receiver therefore appends it at frame end when the last
decoded bit is a 1.

**Frame end (both).** When no onset has come for `END_FC` (320) periods, the
receiver closes the frame. It then checks the length:

- `pcd_in` needs 1 + 9n bits, with n from 1 to 5.
- `picc_in` accepts 9 bits as a short frame, or 2 + 9n bits with n from 1
  to 9 as a standard frame.

The receiver also checks every byte's odd parity. If everything holds, it
removes the start, parity and end bits and passes the bytes on with
`rx_valid`. If not, it pulses `rx_error`. An impossible spacing, or a run that
is far too long, makes the receiver wait for `END_FC` quiet periods and then
report `rx_error`.

**Frame age.** The report comes `END_FC` periods after the last onset, long
after the frame ended. The frame delay must be counted from the frame's end,
so each receiver sends an `rx_age` with the frame. This is the number of
carrier periods already passed since the last bit ended, and follows from
the last bit:

- `picc_in`: if the last pause was the end bit's, the frame ended 128
  periods after that pause began, so the age is `END_FC` − 128. If the last
  pause was a 1 followed by the silent end bit, the age is `END_FC` − 192.
- `pcd_in`: if the last bit is a 1, it is modulated from its start and the
  age is `END_FC` − 128. If the last bit is a 0, it is modulated from its
  middle and the age is `END_FC` − 64.

The receivers cannot know the detection delay, so the age is short by that
much. An answer timed from it is therefore never early.

## Transmitters

`pcd_out` and `picc_out` are the same kind of sequencer:

- a 7-bit counter of carrier periods within the bit;
- the current bit and the previous one;
- a shift register holding the frame;
- a bit-in-byte counter whose ninth position is the parity bit;
- a running XOR that forms the parity as the byte goes out.

Neither transmitter drives the antenna itself. `pcd_out` outputs `pause`:
quarter-bit pauses placed by the modified Miller rules, with a start bit 0
and an end bit 0. `picc_out` outputs `mod_en`: the modulated half of each
Manchester bit, with a start bit 1 and no end bit. `afe_ctrl` turns these
into pins. It gates the carrier with `pause` onto `signal_in`. It ANDs
`mod_en` with the subcarrier onto `load_mod`. It also sets the multiplexer to
one of four settings:

- reader transmit;
- reader receive, with an unbroken carrier;
- card transmit;
- card receive.

Load modulation has its own pin, separate from `signal_in`. A frame lasts
exactly (number of bits) × 128 carrier periods.

## Handshake controllers

**`picc_ctrl` (card).** The card states are IDLE, READY, ACTIVE and HALT, as
in ISO 14443-3:

- REQA in IDLE, or WUPA in IDLE or HALT, is answered with ATQA 0x0004 and
  moves the card to READY.
- In READY, `93 20` is answered with UID0..3 and the BCC.
- In READY, `93 70` with the card's own UID and BCC is accepted only if the
  CRC_A LFSR, run over all nine bytes, leaves zero. The card then answers
  SAK 0x08 with its CRC, which the same LFSR computes, and enters ACTIVE.
- In ACTIVE, HLTA (`50 00` with a good CRC) leads to HALT with no answer.
- Any other frame in READY, or a receive error in READY or ACTIVE, returns
  the card to IDLE.

Each answer starts `FDT_FC` (1172) carrier periods after the end of the
request: the delay counter starts at the frame age that `picc_in` reports.
`card_bank` freezes the UID selection while the card is not listening or is
ACTIVE.

**`pcd_ctrl` (reader).** The reader loops through GAP → REQA → ANTICOLLISION
→ SELECT → report:

- It checks that the ATQA announces a single-size UID, that the UID's BCC
  matches, and that the SAK's CRC checks.
- It computes the SELECT CRC.
- It sends the next command 1172 periods after the end of each answer,
  counted from the frame age that `pcd_in` reports.
- A missing answer (`RESP_TIMEOUT_FC` = 9000 periods), a receive error or a
  failed check returns it to GAP.
- REQAs are at least `REQ_GAP_FC` (7000) periods apart.
- On success it pulses `uid_valid` and starts again.

A card that was just selected stays ACTIVE and ignores REQA. The reader
therefore times out on the next round until the card leaves the field or is
reset.

UID byte order: UID0, the first byte on air, is bit 31:24 of the 32-bit UID.
So `32'h12345678` goes out as `12 34 56 78`, with BCC `08`.

## Top-level ports (`rfid_emulator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 135.6 MHz main clock |
| `rst` | in | 1 | synchronous reset, active high |
| `mode` | in | 1 | 0 = card (PICC), 1 = reader (PCD) |
| `card_sel` | in | 1 (log2 N_CARDS) | card to emulate |
| `gain_sel` | in | 2 | requested gain of the front-end amplifier |
| `adc_data` | in | 10 | ADC output, one word per carrier period |
| `adc_clk` | out | 1 | 13.56 MHz ADC clock (the carrier) |
| `signal_in` | out | 1 | carrier to the front-end's filter/buffer (reader modes) |
| `load_mod` | out | 1 | load-modulation switch (card transmit) |
| `mux_sel` | out | 2 | antenna multiplexer: 0 card rx, 1 card tx, 2 reader rx, 3 reader tx |
| `gain` | out | 2 | gain pins |
| `pcd_uid`, `pcd_uid_valid` | out | 32, 1 | UID read by the reader side, with a one-cycle strobe |
| `picc_selected` | out | 1 | card side is ACTIVE |

Parameters: `CLK_PER_FC` (10), `FDT_FC` (1172), `REQ_GAP_FC` (7000),
`N_CARDS` (2) and `UIDS` (`{32'h00BC614E, 32'h12345678}`, where entry 0 is
0x12345678).

## What follows the source description, and what is this design's own

The following come from the design as published:

- block structure and data-path widths;
- clocking;
- both line codes and frame formats;
- in-flight parity;
- the correlator (32 samples, ±1 against the mean, square-wave reference,
  output ≥ 10) and the thresholder (128-sample average, 20 LSB);
- the 20-of-32 rule;
- decoding by onset spacing;
- the handshake with BCC and CRC;
- 4-byte UIDs only;
- the 1172 and 7000 carrier-period delays;
- the four front-end modes.

The following are this design's own choices:

- CRC variant: CRC_A of ISO 14443-3, which is x¹⁶+x¹²+x⁵+1, reflected,
  preset 0x6363, no final inversion. The source only says "a variant of
  CRC-16 built as an LFSR".
- Command codes, ATQA 0x0004, SAK 0x08 and the UID byte order, all from
  ISO 14443-3.
- The glitch filters.
- `DOUBLE_MIN_FC` = 60, half-bit rounding, and `END_FC` = 320.
- The reader's response timeout and its error handling.
- Detection split: both detectors sit in `adc_decoder` and the bit parsing
  sits in the receivers.
- Multiplexer codes and a 2-bit gain field.
- A separate `load_mod` pin for load modulation. The board was first laid out
  to share `signal_in` for both the carrier and load modulation. It was then
  rewired, because the load-modulation input loaded down the carrier. This
  design follows the rewired board.
- `card_bank`: two cards, the two UIDs shown in the published tests, and the
  hold rule.
- Restart on mode change.
- The frame age that the receivers report, so that frame delays are counted
  from the end of a frame.

Limits worth knowing:

- **Frame delays run long by the detection delay.** In the end-to-end
  simulation the card answers 1206 carrier periods after the reader's
  command ends, 34 more than 1172. The extra time is the ADC latency plus
  the pause detector and glitch filter delay. ISO 14443-3 asks a card for
  exactly 1172 periods (1236 after a final 1 bit). Readers that enforce a
  tight window may therefore reject the answer. The delay can be trimmed by
  reporting a larger frame age. The reader side sends its next command 1241
  to 1249 periods after the answer ends. There the extra time only
  lengthens the handshake.
- **False detections.** With ±3 LSB of noise on an unmodulated envelope, the
  reader's majority filter now and then collects 20 correlator hits out of
  32, so the reader side sees a false run. The glitch filter removes most
  such runs. When one gets through, it produces `rx_error`, and the
  handshake is retried.
- **One handshake takes about 326,000 main-clock cycles (2.4 ms)** from REQA
  to `uid_valid` in simulation. The 70,000-cycle gap before the next REQA
  comes on top. The original design quotes "about 300,000 cycles".
- The analog front-end (filter, envelope detector, amplifier, ADC, load
  switch, matching network, multiplexer, antenna) and the PLL that makes
  135.6 MHz are not part of this RTL. Their digital pins are the top-level
  ports.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | checks |
|---|---|
| `tb_clock_gen` | carrier period and duty cycle, edge strobes, subcarrier period |
| `tb_crc_a` | known CRC_A of `50 00` = CD57, zero residue, 200 random frames against a byte-wise reference, latency 8n+1 |
| `tb_pcd_out`, `tb_picc_out` | the output in every carrier period against an independently built waveform; frame duration |
| `tb_subcarrier_correlator`, `tb_envelope_thresholder`, `tb_mod_detector` | every output against a reference model, with constant, subcarrier, pause, noisy and random input |
| `tb_adc_decoder` | detection latency and absence of false detection for subcarrier bursts and carrier pauses |
| `tb_pcd_in`, `tb_picc_in` | random frames through a model of the detector's view (delays, dropouts); parity errors, missing bits, `rx_en` low; reported frame age against the true one |
| `tb_pcd_ctrl`, `tb_picc_ctrl` | the handshake at frame level, CRC/BCC, 1172-period frame delay counted from the frame end, 7000-period REQA spacing; timeout, bad BCC, bad CRC, foreign UID, HLTA/HALT/WUPA, receive errors |
| `tb_card_bank`, `tb_afe_ctrl` | card selection and hold; pin settings in all mode combinations |
| `tb_rfid_emulator` | end to end, all parameters at their defaults |

`tb_rfid_emulator` is the end-to-end test. It runs two emulators, one as
reader and one as card. The reader's `signal_in` becomes the card's envelope,
and the card's `load_mod` dips the reader's envelope. `adc_model` (testbench
only) models the ADC with 3 samples of latency and a little noise. The test
takes these steps:

1. The reader reads 0x12345678 and the card becomes ACTIVE.
2. The reader times out on the ACTIVE card.
3. The card side switches mode and returns with card 1, and the reader reads
   0x00BC614E.
4. A false pause is forced into a command. The card reports a receive error,
   and a later round succeeds.

The test also checks the REQA spacing and every frame delay against its
window: 1172 to 1232 periods for the card and 1172 to 1272 for the reader.
It prints the duration of each handshake. It counts that
each mechanism happened: selections, timeouts, receive errors, mode switches,
merged 0→1 runs, and pause spacings of 2, 3 and 4 half bits. It simulates
about 1.6 million main-clock cycles, which takes a few seconds.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv rtl/rfid_pkg.sv \
          tb/tb_rfid_emulator.sv --top-module tb_rfid_emulator -o sim
./obj_dir/sim
```

Replace `tb_rfid_emulator` with any other testbench name. To lint a module:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/rfid_pkg.sv rtl/<module>.sv`.
