# Pixel detector DAQ and control chain in SystemVerilog

This is a synthesizable model of the back end and the digital front end of a
hybrid pixel tracker. It follows the CMS Phase-1 pixel upgrade. Three data
paths are involved:

- **Triggers and commands go down.** Triggers and commands from the central
  timing system (TTC) reach a **Pixel FEC**. The FEC encodes them into the
  40 MHz *module clock* of the sensor modules.
- **Data comes up.** On each module a **token-bit manager (TBM)** collects
  the hits of its readout chips (ROCs). It sends them as a 4b/5b/NRZI
  400 Mb/s stream to a **Pixel FED**. The FED decodes 24 such fibers (48 TBM
  core streams) and builds one event per trigger. It sends the event as
  64-bit words towards central DAQ. It also tells the trigger system through
  a 4-bit **TTS** status whether it can take more triggers.
- **Slow control.** The **Tracker FEC** drives CCU token rings, which carry
  configuration traffic.

The top level, `pixel_daq_top`, connects one TBM08 sensor module to FED
fiber 0 and to the Pixel FEC. The other 23 fibers, the other FEC channels
and the four control rings are ports.

```
TTC (A/B bits) ──┬─> pixel_fec ── module clock ──> tbm ── 400 Mb/s ──┐
                 │     └─ 8 programming channels (8b/10b)             │
                 └───────────────────────────────> pixel_fed <─ fiber 0
                                                   │  <─ fibers 1..23
                                                   └─> S-Link words, TTS
tracker_fec: 4 x ctrl_ring  <-> CCU rings
```

## Clocking

Everything runs on one clock, `clk` = 160 MHz. The LHC bunch crossing (BX,
25 ns) is a clock enable, `ce40`, on every fourth clock. The top generates
`ce40`. Three kinds of logic use it:

- TBM logic and the link decoders advance once per BX.
- The FED event builder and the S-Link packer run at full clock rate, one
  32-bit word per drainer per clock.
- The control rings use one clock per ring bit.

The real hardware has several clock domains: 40, 80, 160 and 400 MHz, plus
a ring clock that is not tied to the LHC clock. They are folded into this
single clock. A 400 Mb/s line is therefore 10 bits per BX, and an
oversampled line is 40 samples per BX.

## The TBM and its link

`tbm` (TBM08 configuration) has two cores, `tbm_core`. Each core serves one
group of ROCs.

**Command input.** `tbm_cmd_decoder` watches the module clock. A BX whose
high phase is missing starts a command. The next three BX carry a 3-bit
code, where a missing high phase means '1':

| Code | Command |
|---|---|
| 100 | L1A |
| 110 | ROC reset |
| 101 | TBM reset |

`pfec_trigger_fsm` in the FEC produces exactly this pattern. A command
therefore occupies the module clock for 4 BX. The FEC queues up to 15 L1As
that arrive in that time.

**L1A stack.** Each L1A is given the next 8-bit event number. It is kept in
a 32-deep first-in-first-out stack (`tbm_l1a_stack`) until its readout. A
33rd pending L1A is lost, and the next trailer reports the overflow.

**One core's packet.** One nibble is sent per BX, which is 160 Mb/s. The
marker prefix 0x7F can never start a hit.

```
0x7FC  event[7:0]  stack_count[7:0]              TBM header   (7 nibbles)
  token -> ROCs; each ROC sends 0x7F8..0x7FB (ROC header) and 24-bit hits
      hit = {dcol[5:0], pixel[8:0], adc[7:4], 0, adc[3:0]}
0x7FE  {stack_ovf, token_timeout, 8'b0, pending[5:0]} TBM trailer (7 nibbles)
```

If the token has not come back after `TOKEN_TO` BX, the core closes the
packet and sets the timeout bit.

**DataKeeper.** `tbm_datakeeper` encodes each core's nibble with the
standard FDDI 4b/5b table. It sends the core-A symbol and then the core-B
symbol in the same BX, MSB first, and NRZI-encodes the 10 bits. A core with
nothing to send emits its own idle symbol:

- core A idle: `11111`
- core B idle: `11000`

Neither idle is a data code. The receiver uses the idle pair both to find
the symbol boundary and to tell core A from core B.

## FED DECODE: from light to TBM FIFO words

One `fed_decode_channel` per fiber has four stages.

1. **`phase_finder`** sees the fiber four times oversampled. For every
   sample phase it counts how often neighbouring samples differ over a
   window of `WIN` BX. The busiest pair marks the bit edge. The finder
   samples two phases (half a bit) away from that edge. It moves only when
   a new phase wins two windows in a row. A slowly drifting input is
   followed continuously, and noise does not make the phase jump.
2. **`fed_link_decoder`** undoes NRZI. It then tries all ten bit offsets
   until the idle pair (A then B) appears at the same offset `LOCK_N` times.
   It decodes both symbols of every BX into the two core streams. Invalid
   symbols feed a leaky error counter. The decoder unlocks, and searches
   again, only when errors come faster than clean BX.
3. **`tbm_stream_decoder`** (one per core) is the packet parser, and it has
   the most rules:
   - A header counts only if the next item again begins with the marker
     prefix (a ROC header or the trailer).
   - ROC headers must arrive within `ROC_WINDOW` BX of the header.
   - Hits must follow a ROC header.
   - A new TBM header before the trailer is a sequence error.
   - At the trailer, the number of ROC headers is compared with the
     expected number for the TBM type (`n_rocs`).
   - A packet with no trailer after `TRL_WINDOW` BX is closed by the parser.
   - Hits are dropped once the TBM FIFO holds `trunc_level` words or
     `max_hits` hits have been taken. This truncation keeps the time per
     event bounded.

   Every accepted header produces exactly one trailer word. The trailer
   word's top byte carries the error flags:

   | Flag | Meaning |
   |---|---|
   | 0x80 | overflow or truncation |
   | 0x40 | ROC count wrong |
   | 0x20 | sequence error |
   | 0x10 | no trailer |

   The TBM FIFOs therefore always hold whole packets, and the event builder
   never has to resynchronise inside one.
4. Each item becomes one 36-bit word `{qualifier[3:0], payload[31:0]}` in a
   TBM FIFO (`sync_fifo`). The qualifiers are: TBM header 1, ROC header 2,
   hit 3, trailer 4. Per-core error counters (sequence, ROC count, overflow,
   missing trailer) and a symbol-error counter are 16-bit saturating.

With `emu_en` set, the parsers are fed by two `tbm_stream_emulator`s
instead of the fiber. On each L1A they produce a fixed-size packet, with
`emu_hits` hits per ROC and predictable contents. EC0 restarts their event
numbers. With this the FED runs without a detector.

## FED BUILD: event building and the TTS

**`ttc_decoder`** receives the TTC A/B bits:

- The A channel gives L1A.
- Short broadcast frames on the B channel are `0 0 d[7:0] h[4:0] 1`. Single
  bit errors are corrected with the Hamming code and double errors are
  dropped.
- Long frames are skipped.

The 8-bit commands used are:

| Command | Code |
|---|---|
| BC0 | 01 |
| EC0 | 02 |
| resync | 04 (with EC0) |
| private resync | 05 |
| TBM reset | 14 |
| ROC reset | 1C |
| Send Data | 24 |

**`fed_readout`** keeps each L1A, as `{event[23:0], bx[11:0]}`, in an L1A
FIFO of its own. It builds events strictly in L1A order:

1. It sends the header `{0x5, 0x1, event[23:0], bx[11:0], source_id[11:0], 0x00}`.
2. Two *drainers* work in parallel, one per half of the channels. Each
   takes its channels in turn and copies one packet per channel at one word
   per clock:
   - A hit becomes `{link[5:0]=channel+1, roc[4:0], dcol[4:0], pixel[7:0], adc[7:0]}`.
   - A TBM header whose event number differs from the L1A's low 8 bits gives
     an error word with code 31.
   - A channel with no data for `timeout_cyc` clocks gives code 29 and is
     skipped.
   - A trailer with error flags gives code 30 and carries the flags.
3. The 32-bit words of both drainers are paired into 64-bit S-Link words.
   An odd last word gets an all-zero partner.
4. It sends the trailer `{0xA, 0x0, length[23:0], 32'h0}`. The length counts
   64-bit words, header and trailer included.

`slink_ctrl` flags the header and trailer. A hit word from links 40–43 also
starts with 0xA, so a receiver must use the flag, not the bit pattern.
`slink_ready` applies back-pressure.

**`fed_tts_fsm`** drives the TTS output:

| State | TTS code | Entered when | Left when |
|---|---|---|---|
| RDY | 1000 | — | — |
| BSY1 | 0100 | the L1A FIFO is almost full | it is not |
| BSY2 | 0100 | a TBM FIFO is almost full | none is |
| BSY3 | 0100 | a resync arrives (in any state); all FIFOs are flushed | they are empty |
| OOS | 0010 | `oos_n` consecutive events with a timeout, or `oos_n` consecutive events with a mismatch | only a resync |

The almost-full thresholds are inputs. Set them below the FIFO depth by the
number of triggers that can still arrive before the trigger system reacts.

## Pixel FEC

`pixel_fec` contains:

- a TTC decoder and 32-bit counters of ROC reset, TBM reset, EC0 and
  resync;
- a TTC event FIFO, with words `{bx[11:0], L1A, command valid, 00, command[7:0]}`;
- the trigger FSM that builds the module clock;
- eight `pfec_channel`s.

A channel has a 16 kB transmit FIFO. On Send Data, from a register or the
TTC command, it sends a sequence of 8b/10b characters (`enc8b10b`, with
running disparity), one per BX:

```
K28.0, {hub[4:0], port[2:0]}, {00, nbytes[13:8]}, nbytes[7:0], data bytes, K28.4
```

Between commands the channel sends K28.5. The receive side then waits for
a start condition on the returned line: eight 1s followed by the echoed
`{hub, port}` byte. It gives up after 100 BX. The result is `done`,
`timeout` or `rx_err`, and only then can the next command start.

## Tracker FEC and control rings

`tracker_fec` holds four independent `ctrl_ring` masters. Each ring master
works as follows:

- It sends an idle pattern (alternating 0 and 1) on the selected ring side,
  A or B (`sel_b`).
- At start-up, and again before every command, it injects a token frame.
  The ring is good only if the same frame comes back within `TIMEOUT`
  clocks.
- Commands are register writes and reads addressed to a CCU. A command is
  sent only after a good token. A reply must come back within `TIMEOUT`.
- Counters of good and bad token checks, and a `ring_ok` flag, report the
  ring's health.

Frames are 40 bits: flag 0x7E, type, address, register, data. The token
type is 01, a write is 02 and a read is 03. A reply has the type with bit 7
set. **This frame format is not the CCU link protocol.** These masters talk
only to the behavioural ring in `tb/ccu_ring_model.sv`, not to real CCUs.

## What follows the original system and what does not

These follow the published system:

- the chain and its partitioning;
- the TBM two-core structure with a 32-deep L1A stack;
- the header carrying the event number and stack count, and the trailer
  with 16 status bits;
- 4b/5b plus NRZI at 400 Mb/s with two cores per link;
- continuous phase finding on a copy of the input;
- FED header validation by the next marker, ROC arrival window, ROC count,
  truncation on FIFO level or payload length, and the 4-bit qualifiers on
  36-bit words;
- separate L1A and pixel FIFOs with parallel draining, event-number and
  timeout checks, and error marking;
- RDY/BSY/OOS with three BSY nodes and OOS after consecutive timeouts or
  mismatches;
- Pixel FEC with eight channels, a 16 kB FIFO, Send Data from register or
  TTC, and a 100 BX receive timeout;
- L1A, ROC reset and TBM reset encoded in the module clock;
- a TTC event FIFO and fast-command counters;
- a Tracker FEC with four rings, idle pattern and token-frame verification.

These are this design's own choices, because the published description does
not give them:

- all marker values;
- the hit and trailer bit layouts;
- the module-clock command code;
- the idle symbols;
- FIFO depths (TBM FIFO 512, L1A FIFO 256, TTC event FIFO 1024);
- window and timeout lengths;
- the S-Link word formats and error codes;
- the TTC command codes;
- the Pixel FEC character framing and the echo used as start condition;
- the phase-finding algorithm;
- the control-ring frame format.

Known differences and missing parts:

- Only the TBM08 variant is built. TBM09/TBM10 (four ROC groups, two links)
  are not.
- The ROCs, optical parts, CCUs, PLLs and DDR3 are not part of the RTL.
  `tb/roc_group_model.sv` and `tb/ccu_ring_model.sv` stand in for the ROCs
  and CCUs in simulation.
- The FED has no spy FIFOs.
- The TBM FIFO interface runs at 160 MHz only; there is no 40/80 MHz option.
- No CRC is computed and there is no S-Link Express protocol layer.
- Only the fixed-size data emulation exists. The table-driven (SRAM)
  emulator and the external FED tester are not built.
- The readout compares only 8 event-number bits, because that is all the
  TBM sends.
- Pixel FEC configuration storage in DDR3 and all Ethernet/IPBus register
  access are represented by plain ports.
- The Tracker FEC here shares the LHC-derived clock. The real one runs
  independently of it.

## Throughput

All figures below are at default sizes.

**Input links.** A 48-hit core packet is 326 nibbles, which is 326 BX or
8.15 µs. That is below the 10 µs between triggers at 100 kHz.

**Event builder.** Each drainer needs about 24 × (hits + 10) clocks per
event. For 48 hits this is 1392 clocks, or 8.7 µs. The output is then
about 7.4 Gb/s, which is below the 64 bit × 160 MHz = 10.24 Gb/s of the
packer.

**Limit.** At about 56 hits per core stream the drainers need the whole
10 µs. The L1A FIFO then fills and the TTS starts throttling. This agrees
with the measured limit of the original system.

**Typical load.** A typical FED at pileup 46 (about 20 hits per fiber)
needs under 2 Gb/s.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. With plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/pix_pkg.sv tb/tb_ref_pkg.sv tb/tb_pixel_daq_top.sv \
    --top-module tb_pixel_daq_top -o sim && obj_dir/sim
```

`tb_ref_pkg` holds reference models that the testbenches use to predict
outputs: 4b/5b/NRZI line coding, packet building, the TTC frame builder and
8b/10b. They are written independently of the RTL.

`tb_pixel_daq_top` runs the top at its default size, with no parameter
overrides: 24 fibers, 512-word FIFOs, 8 FEC channels, 16 kB FIFOs and four
rings. Fibers 1–23 carry skewed copies of the module's link. It counts each
mechanism and fails if any never occurred. In order, it goes through:

1. FED emulation mode;
2. a switch to real data with a resync and a TBM reset;
3. real events through the TBM and ROC models;
4. truncation;
5. BSY back-pressure, with `slink_ready` held low;
6. OOS from repeated timeouts, and recovery by resync;
7. FEC Send Data, both answered and timing out;
8. a ROC reset through the module clock;
9. TTC event FIFO contents;
10. token checks and register commands on healthy and broken control rings.
