# Untriggered personality card for the calorimeter read-out module

The electromagnetic calorimeter front ends do not wait for a trigger. Each of
up to three optical links (FLINKs) delivers a packet of 24 crystal
digitisations every sample period, 16 cycles of the 59.5 MHz system clock
(3.7 MHz). This card sits in the read-out module and does five jobs for each
FLINK:

* It turns every raw digitisation into a linear energy through a look-up
  table (LUT).
* It adds the energies of the crystals in a trigger tower. It sends that sum,
  bit-serially, to the level-one trigger every sample period.
* It computes occupancy ("FEX") bits along the tower edges and exchanges them
  with the neighbouring FLINKs.
* It delays the whole untriggered sample stream. When an L1Accept turns up in
  the stream, it copies a window of samples around the interaction into a
  circular intermediate store (IS).
* It tells the controller card (CC) where that window starts, plus three
  summary flags that let the CPU decide whether to fetch the data.

The CPU (an i960) reads the store and the control registers over a local bus.

All of this is synthesizable SystemVerilog in `rtl/`. The top module is
`upc_top`. Self-checking testbenches are in `tb/`.

## One FLINK, sample by sample

```
  link clock ──────────┤ system clock from here on
 FLINK words ─► flink_resync ─► flink_deformatter ─► lut_correction ──┬─► trigger_summer ─► tower sum ─► trigger_interface
                                 (16 x 20 bit)       (3 banks of 8    │   (ADD-gated, saturating)
                                                      crystals)       └─► edge_fex ─► 10 edge bits to neighbours
                                                          │
                                                          ▼
                                              pack_sample (512-bit record)
                                                          ▼
                                              presample_buffer (DEPTH samples)
                                                          ▼
                                              gate_controller ─► circular_buffer (8k x 64) ─► i960
                                                          └────► OUT_FIFO (sync_fifo) ──────► cc_interface
```

`flink_channel` holds everything after `flink_resync` for one FLINK.
`upc_top` instantiates three resynchronisers and three channels.

**Clock crossing.** Each G-LINK receiver hands over its words on a clock
recovered from the fibre. That clock has the system clock's frequency but an
arbitrary phase, which differs from FLINK to FLINK. `flink_resync` moves each
word onto the system clock, together with its control flag, link error and
link ready:

* The words pass through an 8-word asynchronous FIFO. Gray-coded pointers
  cross each way through two flip-flops.
* On the system clock side, a word appears about four clocks after it was
  written.
* Link ready and error are also synchronised as levels, for the status
  register, the CC pins and the LEDs.
* A word that finds the FIFO full is lost and flagged on `fl_ovf`. This can
  only happen if the link clock runs fast.

**Packet.** A packet has 16 words of 20 bits, and word 0 is a control word
that the deformatter uses to synchronise. Bits 17:0 of each word form six
3-bit columns:

* Crystal *n* sits in column *n*/4.
* It takes four consecutive words starting at 4·(*n* mod 4). Each word gives
  three bits, least significant first.
* The twelve bits are {range R1 R0, ADC 9..0}.

Bits 19 and 18 carry front-end status, one bit per word:

* Bit 19 carries the wall clock W9..0 (words 1–10), the L1Accept phase T3..0
  (words 11–14) and Tr (word 15). Tr means "an L1Accept arrived in this sample
  period".
* Bit 18 carries the CLINK header H9..0 (or fibre/serial number) in words 1–10,
  the calibration-strobe phase C3..0 in words 11–14 and Cs in word 15.

A control word in the middle of a packet throws the partial packet away and
pulses `sync_err`. A sample is marked with a link error if any of its words
had the error flag set or link-ready low.

**Correction.** Each FLINK has three LUT banks. Each bank serves eight crystals
and holds 8 × 4096 entries of 18 bits:

* bit 17: ADD
* bit 16: FEX
* bits 15:0: energy, in offset binary

Offset binary means true energy plus a constant, so that the pre-amplifier
undershoot stays representable. Each bank does one lookup per clock, so a
sample takes 8 of its 16 clocks. Latency from a raw sample to the corrected
sample is 9 clocks. While CTRL.LUTEN = 1 the tables belong to the i960 and no
samples are produced.

**Tower sum.** The sum adds (energy − offset) over the crystals whose ADD bit
is set. The offset is a 16-bit register, loaded serially (LSB first) from CTRL
bits. As soon as a partial sum passes 0xFFFF the result saturates at 0xFFFF. A
negative total is clamped to 0.

**Edge FEX.** The 24 crystals form a barrel block of 8 columns × 3 rows:

* Crystal *n* is at column *n*/3, counting from the west.
* It is at row *n* mod 3, counting from the north.

The ten outgoing bits, in order, are north1, north2, north-east, east,
south-east, south1, south2, south-west, west and north-west:

* north1 is the OR of the FEX bits of columns 0–4 of the top row, and north2
  of columns 3–7. The two halves overlap by one column, so a crystal in the
  tower above any column finds all three of its neighbours in one bit.
* south1 and south2 are the same for the bottom row.
* east and west are the ORs of the edge columns.
* The corner bits are the corner crystals.

**Sample record.** Every sample becomes one 512-bit record, written to the
store as eight 64-bit words:

| word | contents |
|---|---|
| 0–5 | corrected energies, four 16-bit values per word (crystal 4w+i in bits 16i+15:16i) |
| 6 | ADD[23:0] in 23:0, FEX[23:0] in 47:24, tower sum in 63:48 |
| 7 | incoming edge FEX 9:0, W 19:10, H 29:20, T 33:30, Tr 34, C 38:35, Cs 39, link error 40 |

## From the untriggered stream to the intermediate store

This is the least obvious part of the card.

**Why the window starts in the past.** Tr arrives a fixed time after the
interaction. The samples worth keeping start before Tr, so every record first
goes through the presample buffer. That buffer is a 128-entry delay line set
by CTRL.DEPTH (0 to 127 samples; 0 means no delay). The gate controller
watches Tr on the *undelayed* stream. When Tr is set, it opens the gate for
the next SAMPLES records leaving the buffer. So DEPTH sets how many samples
before the L1Accept are kept, and SAMPLES − DEPTH sets how many after it.

**Writing.** Each gated sample is written as eight consecutive 64-bit words,
at the write pointer of the circular store (8192 words per FLINK). The
pointer then advances by 8 and wraps to 0 after 8191. Writing takes 8 of the
16 clocks of a sample period, so the store always keeps up.

**Overlapping L1Accepts.** L1Accepts can come closer together than SAMPLES.
In that case the gate simply stays open longer, like a retriggerable
monostable, so shared samples are stored only once. To track this, the
controller has four accumulators, which act as the IN_FIFO. An accumulator
holds:

* the store offset at which its L1Accept started;
* the number of samples still owed to it;
* a READY flag: any link error in its samples;
* LOCAL_FEX: any crystal FEX bit in its samples;
* NEIGHBOUR_FEX: any incoming edge FEX bit in its samples.

All open accumulators collect each stored sample. When the oldest one's count
reaches zero, the controller pushes its result word into the OUT_FIFO, a
16-deep sync_fifo. The push happens once the last word of that sample is in
the store. The result word is:

```
bit 15 LOCAL_FEX | bit 14 NEIGHBOUR_FEX | bit 13 READY | bits 12:0 start offset (64-bit words)
```

A fifth overlapping L1Accept finds no free accumulator. It is dropped and
pulses `l1a_drop`. A result pushed into a full OUT_FIFO is refused and pulses
`of_ovf`.

**Software trigger.** An access to SWTRIG (with CTRL.SWTRIGEN = 1) acts like
Tr on the next sample.

**Clearing.** CTRL.ISEN = 0 holds the gate controllers and the OUT_FIFOs
empty. It also resets the write pointers to 0.

**Capacity.** At 64 samples per L1Accept a window is 512 words, so the store
holds 16 L1Accepts. At 512 samples (source calibration) it holds 2. The CC
must not let more than 16 L1Accepts wait unread: 4 overlapping plus 12
queued.

**Wrap-around reads.** A window can run past the end of the store. The i960
sees each store twice, back to back (address bit 16 is not decoded), so it
can read a wrapped window with linearly increasing addresses.

## Controller-card handshake (`cc_interface`)

* **RX_DATA.** The card waits until the OUT_FIFO of every enabled FLINK holds
  a result, then pulses DONE. The wait is bounded by
  595 + 16·SAMPLES clocks: 10 µs plus the duration of one window, 27.2 µs at
  64 samples.
* **On a timeout** DONE still comes. In that case:
  * status bit *f* is set for each enabled FLINK that had no result;
  * that FLINK's result word is 0.
* **PC_RD#.** The CC then gives three falling edges of PC_RD#. They return the
  FLINK A, B and C result words in turn, and each enabled FLINK's OUT_FIFO
  pops. PC_END comes with the third word.
* **RX_READ** (a front-end register read, which this card does not support)
  is answered at once with DONE and PC_END. It also pulses `rx_read_err`.
* **Link-status pins.** They are driven as follows; ready is active low,
  errors active high, and all are gated inactive when the FLINK's EN bit is 0.

  | Pin | Driven by |
  |---|---|
  | nCLRDYA/B | tied to 0 |
  | nDLRDYA/B | FLINK A and B ready |
  | DLERRA/B | FLINK A and B error |
  | nCLLCKA | FLINK C ready |
  | nCLLCKB | FLINK C error |

* **CLINK commands.** The card decodes two: Sync (opcode 2) and Spy Start
  (opcode 6). Each arrives as a valid strobe plus opcode.

## Trigger cable (`trigger_interface`)

* **Common clock.** The three tower sums change only once per sample period.
  All three 16-bit shift registers load together on FRAME and shift out LSB
  first on the system clock. FRAME is high during bit 0.
* **Frame position.** FRAME comes from a 4-bit counter reset by CLINK Sync.
  It is asserted when the counter equals TRIGCTRL.FROFFSET, which places the
  word boundary relative to the sums.
* **Test mode** (TRIGCTRL.TRIGTEST = 1). The lines carry zeros, except that
  one Spy Start plays a two-word test sequence once:
  * A walking pattern: FLINK A has bits 1, 4, 7, … set, B has 2, 5, 8, …,
    and C has 0, 3, 6, ….
  * {FLINK number in bits 9:8, board serial number in bits 7:0}.

## Register map (`register_file`)

The i960 bus carries one access per clock, with byte enables. Read data comes
one clock after the read strobe, with `bus_rvalid`. Bursts are back-to-back
accesses. Address bits 31:24 select a window by DIP-switch value: `reg_base`
for registers and tables, `is_base` for the store.

| offset | name | contents |
|---|---|---|
| 0x00 | SERNO | serial 31:24, PC_TYPE = 1 at bit 16, location 15:0 (read only) |
| 0x04 | CTRL | per FLINK C/B/A at 31–28 / 27–24 / 23–20: EN, offset DIN, offset CLK, offset DOUT (ro); LUTEN 19, ISEN 18, SWTRIGEN 17, SAMPLES 16:7, DEPTH 6:0 |
| 0x08 | LINK_STAT | ADC pins ADIN 21, ACLK 20, ACS* 19 (rw), ADOUT 18, ASSTRB 17 (ro); per FLINK at 4f+3..4f: RXDET, LRDY, start-up state[1:0] |
| 0x0C | TRIGCTRL | TRIGTEST 4, FROFFSET 3:0 |
| 0x10 | SWTRIG | any access triggers the gate controllers (if SWTRIGEN) |
| 0x200000–0x3FFFFF | LUT | only when LUTEN = 1. Address: FLINK 20:19, crystal 18:14, range 13:12, ADC 11:2. Data: ADD 17, FEX 16, energy 15:0 |

IS window: FLINK 18:17, bit 16 ignored (alias), 64-bit word offset 15:3, and
bit 2 selecting the upper (1) or lower (0) half of the word. The window is
read only.

To load an offset, do this for each of the 16 bits, LSB first:

1. Write the bit to DIN with CLK = 0.
2. Write the same value with CLK = 1.

The register shifts on the rising edge of CLK. DOUT shows the far end of the
register.

## Where this design makes its own choices

The design follows the original card's description for these: the packet
layout, the LUT address and data format, the result word, the status and
link-status tables, the CLINK opcodes, the register map, the sizes (three
FLINKs, three LUT banks, 128-sample presample buffer, four accumulators, 8k
store) and the timeout formula. Everything below is this design's own choice.

* **Where the clock crossing sits.** In the original scheme each FLINK's
  processing runs on the clock recovered from its own link. The tower sums
  are re-synchronised to the system clock only at the trigger serialisers.
  Here each FLINK crosses at its input, in `flink_resync`. Everything after
  that runs on the system clock. The resynchroniser assumes the recovered
  clock has the system clock's frequency; only the phase may differ.
* **FRAME counter width.** The counter is 4 bits, which matches the width of
  FROFFSET and of a 16-bit word. The source calls it a sixteen-bit counter.
* **LUT window end.** It is 0x3FFFFF, which matches the address fields.
* **Sample record layout** (above), the bank split of crystals, and all
  latencies.
* **Crystal geometry** behind the edge FEX bits. Only the barrel block is
  built; the end-cap arrangement was never specified.
* **Dropping** a fifth overlapping L1Accept, a 16-entry OUT_FIFO, and
  SAMPLES = 0 treated as 1.
* **Bus and CC timing.** Single-cycle i960 bus accesses. The CC handshake
  signals are one-clock strobes.
* **LED stretch** of 2^21 clocks (about 35 ms). A new pulse restarts it.
* **Not built, only ports:** the G-LINK receivers and their start-up state
  machines, the optical receivers, the housekeeping ADC (its pins are
  bit-banged through LINK_STAT), the CPU, the CC and the LVDS drivers.

## Files

| file | role |
|---|---|
| `rtl/upc_pkg.sv` | constants, packet/sample/result types, `pack_sample` |
| `rtl/upc_top.sv` | the card |
| `rtl/flink_channel.sv` | everything for one FLINK |
| `rtl/flink_resync.sv` | link clock to system clock, per FLINK |
| `rtl/flink_deformatter.sv`, `lut_correction.sv`, `offset_sreg.sv`, `trigger_summer.sv`, `edge_fex.sv` | correction and trigger path |
| `rtl/presample_buffer.sv`, `gate_controller.sv`, `sync_fifo.sv`, `circular_buffer.sv` | store path |
| `rtl/cc_interface.sv`, `trigger_interface.sv`, `register_file.sv`, `led_stretcher.sv` | card-level interfaces |
| `tb/upc_tb_pkg.sv` | reference models shared by the testbenches (packet encoder, LUT contents, sums, edge bits, records) |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

Each file opens with a comment on what the block does, its ports and timing,
and which of its details are the design's own.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/*.sv tb/upc_tb_pkg.sv tb/tb_upc_top.sv --top-module tb_upc_top -Mdir obj_top
obj_top/Vtb_upc_top
```

For a single block, swap in its testbench, for example
`tb/tb_gate_controller.sv --top-module tb_gate_controller`. Verilator only
compiles the modules it needs. `tb_upc_top` runs the card at its default
sizes, in a few seconds. It does the following:

* Loads the tables and offsets over the bus.
* Streams 1150 packets on three skewed FLINKs.
* Triggers 22 L1Accepts. These include overlaps, a dropped fifth L1Accept, a
  software trigger and a window that wraps the store.
* Reads every result through the CC handshake and the stored samples through
  the IS window (using the alias for the wrapped window).
* Checks every serial trigger word against the tower-sum reference.
* Covers the timeout, RX_READ, link-status gating, the LEDs and the test
  pattern.

It counts each of these events and fails if one never happened.

`tb_upc_workloads` runs the two sizing cases at default parameters:

* Sixteen 64-sample L1Accepts are taken before the CC reads any. This fills
  the store and the OUT_FIFOs exactly. All sixteen windows are then checked.
* Two 512-sample L1Accepts run at the largest presample depth. Both windows
  are read back completely.
* Each case ends with an RX_DATA timeout, checked to the clock.

The block testbenches override parameters only where a default would make
them slow (the LED stretch length).
