# ROD FPGA event builder for the upgraded ATLAS RPC Read Out Driver

The Read Out Driver (ROD) of the ATLAS barrel RPC muon spectrometer collects
the readout data of one spectrometer sector. Two RX/SL boards, left and right,
send their data to it over the RODbus backplane. For every Level-1 Accept (L1A)
the ROD builds one *ROD Muon Frame* and ships it over S-Link to the Read Out
System (ROS). In the ROD FPGA, the *Event Builder Engine* does the work. It is
triggered by event identifiers: it starts a frame only when the TTC
receiver has supplied an {EVID, BCID} pair. It then appends the two RX/SL
frames that carry the same identifiers.

This RTL is the FPGA logic of the upgraded board:
- `rod_fpga_top` is the ROD FPGA, with the event builder;
- `vme_fpga_link` is the VME FPGA's end of the link between the two FPGAs;
- `rod_board` joins the two.

The upgraded design replaces every serial channel with a multi-gigabit
transceiver (GTP) using 8b/10b coding:

| channel | here | line rate | payload |
|---|---|---|---|
| RODbus, per RX/SL board | 8 bonded lanes (`LANES`) | 8 x 3 Gbit/s | 19.2 Gbit/s |
| S-Link to the ROS | 1 lane, 16-bit words | 3 Gbit/s | 2.4 Gbit/s |
| VME FPGA <-> ROD FPGA | 1 lane each way, 16-bit words | 200 Mbit/s | 160 Mbit/s |
| event builder | one 32-bit word per clock | 240 MHz target | 7.68 Gbit/s |

All of it is plain synthesizable SystemVerilog. The transceivers are modelled
only in their digital part: the serializers, comma alignment and 8b/10b
coding. The analog PLL, clock recovery and line drivers are left out.

## Block diagram

```
 TTCrq: ttc_clk, L1A, BCR, ECR
   -> ttc_rx ------------------> EVID FIFO (32) -----------+
 left_rxd[7:0]  -> rodbus_link (8 x gtp_rx -> rodbus_rx ->  |
                    lane FIFO 128) ---------------------+   |
 right_rxd[7:0] -> rodbus_link (same) --------------+   |   |
                                                    v   v   v
                                                 frame_maker (clk)
                                                    |        |
                          S-Link FIFO (1024) <------+        +--> VME FIFO (1024)
                            -> slink_tx -> gtp_tx -> slink_txd     |
 vme_rxd -> gtp_rx -> cmd FIFO -> vme2eb_rx (registers) <----------+
 vme_txd <- gtp_tx <- reply FIFO <-+
   ^ |
   | +--> vme_fpga_link: gtp_rx -> reply FIFO -> vme2eb_tx <- VME access port
   +------------------  gtp_tx <- cmd FIFO   <-+           -> ack, rdata
```

Everything above the `vme_fpga_link` lines is `rod_fpga_top`. `rod_board` adds the
VME FPGA end and connects `vme_txd`/`vme_rxd` inside.

There are eight clock domains:
- `ttc_clk`: the 40 MHz LHC clock.
- `clk`: the event builder clock.
- `vme_clk`: the VME FPGA clock.
- one bit clock per serial link: left RODbus, right RODbus, S-Link and VME
  link. Both ends of the VME link share the VME link bit clock.

The phases of these clocks are unrelated. Every crossing goes through
`async_fifo`, a dual-clock FIFO with Gray-coded pointers, two-flop
synchronizers and a first-word-fall-through read port. Each domain leaves
reset through its own `rst_sync`.

## The Frame Maker

`frame_maker` is the central state machine. It has five states plus two read
states:

- **S0 Prepare for a new frame.** Clears the counters. If the EVID FIFO is
  empty it goes to S1, otherwise straight to S2.
- **S1 EVID FIFO empty.** Waits until an EVID is available.
- **S2 Read EVID FIFO.** Pops the {EVID, BCID} pair and starts the build-time counter.
- **S3 Write ROD Frame Header.** Writes 9 words.
- **Read Left SerDes FIFO**, then **Read Right SerDes FIFO.** Each reads one
  RX/SL frame.
- **S4 Write ROD Frame Footer.** Writes 4 words, then returns to S0.

When the `enable` register bit is low, the machine stays in S0/S1 and takes
no new EVID. Every write waits while the S-Link FIFO is full, so the S-Link
side back-pressures the whole engine.

### RX/SL frame, as expected on each side

| word | contents |
|---|---|
| header | `{4'hA, EVID[11:0], BCID[11:0], 4'h0}` |
| payload | any number of words; the top nibble must not be `4'hF` |
| trailer | `{4'hF, 12'h0, payload_count[15:0]}` |

On each side the Frame Maker first looks for a header:
- A non-header word is dropped and sets the `HDR` flag.
- A header whose EVID/BCID differs from the trigger's sets the `ID` flag, and
  the whole RX frame is read and dropped.
- A matching frame is copied word by word into the ROD frame, header and
  trailer included. The payload is not inspected; only its length is compared
  with the trailer's count, and a mismatch sets the `LEN` flag. The frame
  stays in the output, since it has already been written.
- If a side delivers nothing for `RX_TIMEOUT` clocks, it is closed with the
  `TIMEOUT` flag. Setting `RX_TIMEOUT` to 0 waits forever.

A side that is missed this way leaves its words in the FIFO. They are dropped
later as non-matching frames.

### ROD frame on the S-Link

| word | contents |
|---|---|
| 0 | start of frame `0xEE1234EE` |
| 1 | header size, 9 |
| 2 | format version `0x03010000` |
| 3 | board ID (register `BOARD_ID`) |
| 4 | run number (register `RUN_NUMBER`) |
| 5 | EVID (24 bits) |
| 6 | BCID (12 bits) |
| 7, 8 | trigger type, event type: 0 |
| ... | left RX/SL frame, then right RX/SL frame |
| F0 | error flags: bits 3:0 left, bits 7:4 right (bit 0 HDR, 1 ID, 2 LEN, 3 TIMEOUT) |
| F1 | build time in `clk` cycles, from S2 to the end of the right side |
| F2 | number of data words (RX words copied) |
| F3 | total frame length, F2 + 13 |

Timing: one word per clock. With no stalls, a frame with `n` RX words takes
1 + 9 + n + 4 cycles from S2 to the last footer word. In that case the build
time word holds 9 + n. The testbench checks both numbers.

Every frame word is also offered to the VME FIFO. The VME bus reads this copy
through a register. A word that finds the FIFO full is dropped and counted,
and never stalls the engine.

## Serial links

**8b/10b and the transceiver model.**
- `enc8b10b` and `dec8b10b` implement the standard code with running
  disparity.
- The decoder flags any character whose re-encoding, at the current
  disparity, differs from what was received.
- `gtp_tx` takes a 16-bit word every 20 bit times, byte 0 first. It encodes
  both bytes and shifts them out MSB (`a`) first. The transmit FIFO is
  bypassed.
- `gtp_rx` is a shift register with a K28.5 comma aligner. It always places
  the comma in byte 0 of the 16-bit output word, decodes, and flags code and
  disparity errors.
- Both run in the bit clock. A receiver is clocked by its transmitter's bit
  clock, which stands in for clock recovery.

**RODbus (`rodbus_link`).**
- Each RX/SL board stripes its 32-bit words over the lanes in turn: word `i`
  goes on lane `i mod LANES`.
- On each lane, a word goes out as two 16-bit halves, upper half first, with
  `{D16.2, K28.5}` idles in between.
- `rodbus_rx` rebuilds the words. Each lane has its own FIFO.
- The reader takes the lanes in the same turn, so the FIFOs also absorb the
  skew between lanes. The lane FIFOs play the role of the transceivers'
  receive FIFOs.
- Per-lane overflow and code-error counters are brought out on `mon_*` ports.

**S-Link emulator (`slink_tx`).**
- Idle words `{D16.2, K28.5}` are sent between fragments.
- A fragment is framed by the control words BOF `0xB0F00000` and EOF
  `0xE0F00000`. Each control word is preceded by a marker word
  `{0x00, K28.0}`.
- Data words are sent upper half first, one 32-bit word every 40 bit times.
- There is no flow control from the ROS.

**VME link (`vme2eb_rx`).** The VME FPGA is the master and sends 16-bit words:
- A write is `{0, 7'b0, addr}`, then data bits 31:16, then bits 15:0.
- A read is `{1, 7'b0, addr}`. It is answered with two words, upper half first.

| addr | register | |
|---|---|---|
| 0x00 | CTRL, bit 0 = builder enable (reset 1) | RW |
| 0x01 | BOARD_ID | RW |
| 0x02 | RUN_NUMBER | RW |
| 0x03 | RX_TIMEOUT (reset 4096) | RW |
| 0x08 | FRAMES built | RO |
| 0x09 | ERR_FRAMES, frames with any flag | RO |
| 0x0A | LAST_FLAGS | RO |
| 0x0B | LAST_TIME | RO |
| 0x0C | MAX_TIME | RO |
| 0x0D | VME_DROPS | RO |
| 0x10 | VME_DATA, head of the VME FIFO; reading pops it | RO |
| 0x11 | VME_STAT, bit 0 empty, bit 1 head word is last of a frame | RO |

**VME FPGA end (`vme2eb_tx`, `vme_fpga_link`).** The VMEbus interface of the
VME FPGA is not part of this logic. Its register accesses arrive on the
`vme_*` port of `rod_board`:
- A request (`vme_req`, `vme_we`, `vme_addr`, `vme_wdata`) is taken while
  `vme_ready` is high.
- `vme_ack` pulses when the access is done.
- Writes are posted: they are acknowledged once their three words are
  queued. Reading the register back guarantees that the ROD FPGA has
  applied the write.
- A read is acknowledged when both reply words have arrived, with the
  value on `vme_rdata`.
- A read with no reply within `REPLY_TMO` clocks ends with `vme_err` set.
  Its late reply words are discarded before the next read.

**TTC (`ttc_rx`).**
- Runs on the 40 MHz LHC clock.
- The BCID counts bunch crossings, and BCR rewinds it to 0. It also wraps
  after 3564 crossings.
- L1A increments the EVID, and ECR clears it.
- Every L1A writes {EVID, BCID} into the EVID FIFO. An L1A that finds the
  FIFO full is lost and counted on `mon_lost_l1a`.

## Sizing against the ROD's data rates

- **Per event.** The present maximum input is about 560 Mbit/s per RX/SL
  channel at a 75 kHz L1A rate. That is about 233 words per side per event.
  The frame is then 9 + 466 + 4 = 479 words.
- **Event builder.** At 240 MHz the frame takes 2.0 us of the 13.3 us between
  triggers.
- **S-Link.** The frame needs 1.15 Gbit/s of the 2.4 Gbit/s payload.
- **RX FIFOs.** Each side has 1024 words in all (8 x 128), enough for four such
  frames.
- **Bandwidth limit.** The RODbus carries 19.2 Gbit/s per side. The engine
  reads one word per clock, 7.68 Gbit/s, and reads left and right one after
  the other. So the engine, not the RODbus, bounds the sustained rate. The
  lane FIFOs take the bursts.
- **Clock rate.** Whether the logic reaches 240 MHz depends on the FPGA
  implementation and has not been checked here.

## Parameters of `rod_board` and `rod_fpga_top`

| parameter | default | meaning |
|---|---|---|
| `LANES` | 8 | RODbus lanes per RX/SL board; 1 gives the single-link variant |
| `EVID_AW` | 5 | EVID FIFO depth 2^5 |
| `RX_AW` | 7 | lane FIFO depth 2^7 |
| `SL_AW` | 10 | S-Link FIFO depth |
| `VF_AW` | 10 | VME FIFO depth |
| `CMD_AW` | 4 | VME command and reply FIFO depth |
| `BOARD_ID_RST`, `RX_TIMEOUT_RST` | `0x00650000`, 4096 | register reset values |
| `REPLY_TMO` (`rod_board` only) | 4096 | VME-side clocks to wait for a read reply |

Shared types and constants (header words, tags, K characters, error bit
positions) are in `rod_pkg`.

## Where this departs from the upgrade design or fills gaps

Taken from the upgrade design:
- the blocks and their order;
- the EVID-triggered state machine and its states;
- the 9-word header holding start of frame, board ID, EVID, BCID and run number;
- the footer contents: flags, word count and build time;
- the header, EVID/BCID and length checks without payload checks;
- all links on 8b/10b transceivers at the rates above;
- the S-Link emulator in fabric logic;
- the VME FPGA as master of the link.

Choices made here, where the design gives no detail:
- the RX/SL frame format;
- the order of the header and footer words (header words follow the usual
  ATLAS ROD fragment layout);
- the drop and timeout rules;
- lane striping;
- the S-Link word coding and BOF/EOF words;
- the VME word protocol and the register map;
- FIFO depths;
- reset values;
- the VME FIFO copy and its drop rule.

One point is ambiguous: the upgrade text also considers replacing the 8
RODbus lanes with a single 3 Gbit/s link. The default follows the 8-lane,
19.2 Gbit/s configuration; `LANES = 1` gives the other.

Not built:
- **TTC forwarding.** The present board forwards the TTC signals to the RX/SL
  boards over the RODbus. Nothing here does that; the trigger lines only feed
  the EVID FIFO.
- **Monitoring processor.** The Builder Monitoring System is an embedded
  processor with software. The signals it would watch are the `mon_*` ports
  and the monitoring registers.
- **Parts outside this logic:** the VMEbus interface of the VME FPGA, the
  TTCrq mezzanine, the RX/SL boards, the ROS, and the analog parts of the
  transceivers.

## Testbenches

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

- **8b/10b.** The encoder is checked against published code values and
  against the properties of the code over all 268 characters: balance, run
  length, and commas only where allowed. The decoder must map every encoded
  character back. It must flag every 10-bit value that is not a code at the
  current disparity.
- **FIFO.** The FIFO is driven from two unrelated clocks with random enables,
  against a queue model.
- **Transceiver and link.** The receiver must find the character boundary
  after a random bit delay. The RODbus link is tested with four lanes, each
  with its own skew. The S-Link and word-rebuilder tests parse the word
  stream, including gaps and stray halves.

`tb_rod_board` runs the whole board logic at its default parameters. It makes
every register access through the VME FPGA's access port.

`tb_rod_fpga_top` runs the ROD FPGA alone at its default parameters. It uses
these models:
- `rxsl_model`: the two RX/SL transmitters, 8 lanes each;
- `ros_model`: an S-Link receiver that parses fragments;
- `vme_master_model`: the VME FPGA end of the link.

The clocks are 240 MHz for the event builder, 40 MHz TTC, about 3 GHz bit
clocks with slightly different periods, and a 200 MHz VME bit clock. The run
goes through these steps:
1. configuration over the VME link;
2. good events;
3. an EVID mismatch, a wrong trailer count, a missing frame (timeout) and a
   stray word;
4. BCR and ECR;
5. a burst of large events held back with `enable` low and then released,
   which stalls the engine on a full S-Link FIFO and overflows the VME FIFO;
6. register and VME FIFO readback;
7. L1As against a full EVID FIFO.

Every fragment the ROS model receives is compared word by word with a
prediction. Each of these mechanisms is counted, and one that never happens
counts as a failure.

`tb_rod_workload` runs the same default-size design under readout load. The
L1A rate is 75 kHz, one trigger every 533 LHC clocks. Two payload sizes are
used:
- about 200 Mbit/s per RX/SL channel, 83 words per side per event;
- the maximum of about 560 Mbit/s, 233 words per side.

It checks every fragment. It also checks that each frame is built within one
trigger period and reaches the ROS before the next L1A, and that nothing
overflows or stalls. The measured shares of time are:

| load | busy | header and footer | longest build |
|---|---|---|---|
| 200 Mbit/s | 4.8% | 0.35% | |
| 560 Mbit/s | 15% | 0.41% | 480 clocks (2.0 us at 240 MHz) |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rod_pkg.sv \
          tb/tb_rod_board.sv --top-module tb_rod_board -o sim
./obj_dir/sim
```

The full-size board run simulates about 112 us in roughly 1.5 s of wall time. Some block
testbenches override parameters to get short runs: a 100-crossing orbit in
`tb_ttc_rx`, 4 lanes in `tb_rodbus_link`, and small FIFOs.

Known lint warnings:
- unused package constants;
- the synchronous/asynchronous use of reset nets that Verilator reports
  because of the assertions' `disable iff`.
