# STS-XYTER control and readout through GBTx e-links

This is the FPGA-side logic that talks to STS-XYTER front-end ASICs over the
electrical e-links of GBTx chips. The ASICs sit behind AC-coupled lines, so
every link carries DC-balanced 8b/10b symbols. A small protocol runs on top
of them. Downlink command frames carry a sequence number and a CRC, and
every command is acknowledged. Uplink frames are typed by a prefix code that
keeps readout data cheap. Two special 20-bit patterns bring a link into
and out of a synchronisation mode. The GBTx chips only move bits: they put
e-link bits into 40 MHz GBT frames. Everything the protocol needs is in
this RTL.

The design follows the protocol as it was presented for the CBM Silicon
Tracking System readout (frame layouts, uplink frame types, CRC-4
polynomial, SOS/EOS patterns, link counts and rates). The presentation
leaves many details open. These include the downlink CRC polynomial, the
encoding of the request types, what is sent when the link is idle, and how
acknowledgements are tracked. This design makes its own choices for them,
and each choice is listed in "Own choices" below.

## The system around it

One readout board (ROB) serves the front-end boards (FEBs). Each FEB holds
eight STS-XYTER ASICs. The ROB carries three GBTx chips:

* a **master GBTx** (duplex). Its downlink sends one 160 Mb/s command e-link
  and one clock per FEB; all eight ASICs of a FEB share that e-link
  (multidrop). Its uplink also carries readout e-links.
* two **slave GBTx** (transmit only) that carry readout e-links. The
  master controls them through a GBT-SCA chip.

Each GBTx can take 14 e-links at 320 Mb/s in wide-frame mode, 42 in all.
A FEB connects at most 40 of them, so this design uses 40: 12 on the
master and 14 on each slave (the 12/14/14 split is this design's choice).
The 40 links can be shared out as 1 FEB × 5 links per ASIC, 2 FEBs × 2
links per ASIC, or 5 FEBs × 1 link per ASIC.

At the FPGA the GBT link delivers one frame per 40 MHz clock:

| direction | GBT mode | user bits | e-link rate | bits per e-link per frame |
|-----------|----------|-----------|-------------|---------------------------|
| downlink  | GBT frame (FEC) | 80 | 160 Mb/s | 4 |
| uplink    | wide frame | 112 | 320 Mb/s | 8 |

All logic here runs on that 40 MHz frame clock. It handles 4 downlink bits
and 8 bits of each uplink e-link per clock.

## The link protocol

### Symbols and bit order

All traffic is standard 8b/10b. A 10-bit symbol is held as `abcdei_fghj`
with `a` in bit 9, and bit 9 goes on the wire first. Bytes go most
significant first. The comma is **K28.5**. **K28.1** is used only during
synchronisation.

### Downlink command frame (6 symbols = 60 bits)

| symbol | content |
|--------|---------|
| 0 | K28.5 comma |
| 1 | chip address (7:4), 0..7 or 15 = broadcast; sequence number (3:0) |
| 2 | request type (7:6); payload bits 13:8 (5:0) |
| 3 | payload bits 7:0 |
| 4, 5 | CRC-16 over symbols 1..3, high byte first |

Request types (`sts_pkg::req_t`): 1 sets the register address for the
writes that follow, 2 writes the payload there, and 3 reads the register
whose address is the payload. 0 is a no-op.

A frame is a multiple of 20 bits, so the transmitter works in 20-bit words
(two symbols). Each frame is three words. A 20-bit synchronisation pattern
fits in one word slot, so patterns can be sent without breaking the word
structure.

At 160 Mb/s one word takes 5 clocks and one frame takes 15 clocks. That is
at most 2.67 M commands/s per FEB.

### Uplink frames (3 symbols = 24 bits)

| prefix | type | fields (bit 23 first) |
|--------|------|------------------------|
| `0`   | hit | channel 22:16, ADC 15:11, TS<9:8> 10:9, TS<7:0> 8:1, EM 0. ADC = 0 is a dummy hit |
| `11`  | TS_MSB | Timestamp<13:8> three times (21:16, 15:10, 9:4), CRC-4 3:0 |
| `101` | RDdata_ack | register content 20:7, sequence number bits 2:0 at 6:4, CRC-4 |
| `100` | Ack | ACK code 20:19, sequence number 18:15, CP 14, status 13:10, Timestamp<7:2> or 0 at 9:4, CRC-4 |

The CRC-4 is x⁴+x+1 over bits 23:4. Hits have no CRC: they are the
bulk of the traffic and have the shortest prefix. From time to time the
ASIC sends a **sync frame** of three K28.5. After a reset it sends a single
K28.5. The receiver uses these commas to find both the symbol boundary and
the frame boundary.

A hit carries only timestamp bits 9:0. Bits 13:8 come in the separate
TS_MSB frames, so bits 9:8 are in both. The receiver rebuilds a 14-bit
timestamp from the last valid TS_MSB. It adds the signed difference
(−2..+1) between the hit's TS<9:8> and the low two bits of that TS_MSB
value. This keeps hits correct when they were stamped shortly before or
after the MSBs changed.

## Link synchronisation

At power-up the skew between the clock line and the data lines is unknown.
The GBTx can shift its clock-output phase and delay each data input. The
FPGA finds the right settings through a four-step exchange with the ASIC.
**Software runs the exchange.** The hardware only sends the patterns
(`tx_mode`) and reports what each uplink line receives:

1. **SOS** (`00000_00000_11111_11111`) is sent until every uplink returns
   SOS. The pattern is made of two ten-bit runs, and 8b/10b never has a run
   longer than five. A run may gain or lose one bit through skew, so a
   0-run of 9..11 bits followed by a 1-run of 9..11 bits is accepted
   (`sos_det` inside `sync_detector`). `sos_ok` stays high while SOS keeps arriving.
2. **K28.1** is sent while software scans the clock phase. An ASIC that
   decodes K28.1 correctly answers with K28.1; otherwise it keeps sending
   SOS. The input delays are still wrong at this point, so the FPGA cannot
   rely on receiving K28.1. It checks only "SOS or something else"
   (`sos_ok`, `other_seen`). Software keeps the centre of the widest phase
   range that works.
3. The ASIC now sends K28.1, so software scans each input delay. At each
   setting it clears the flags and reads `k281_seen` for every line. It
   again picks the centre of the widest good range.
4. **EOS** (`1100_1111_1100_0000_1100`) is sent until every uplink echoes
   it (`eos_seen`, exact match at any offset). Then `tx_mode` returns to
   `TX_FRAMES`.

The sticky flags (`*_seen`) are cleared with `sync_clear`.

## Command tracking

Every command must be acknowledged, and several may be in flight at once.
`cmd_controller` gives each command the next 4-bit sequence number.
RDdata_ack returns only three sequence bits, so at most **8 commands** can
be told apart. Each command takes the table slot given by the low three
bits of its sequence number. When that slot is still busy, the command
port stalls (`cmd_ready` low).

A response closes a slot when all of these match:

* the chip address (taken from the e-link the response arrived on);
* the kind of response: RDdata_ack for reads, Ack for everything else;
* the sequence number: four bits for an Ack, three for read data.

Each completion appears once on `done`, with result `RES_ACK`, `RES_RDDATA`
(with the data), `RES_TIMEOUT` (no answer within `TIMEOUT_CLKS`) or
`RES_NOACK`. `RES_NOACK` is for broadcasts: every chip answers a
broadcast, so it is not tracked, and those answers appear as `unexpected`
pulses. A response that matches nothing also pulses `unexpected`.
Nothing is retransmitted; that is left to software.

Responses from all e-links of a FEB reach the controller through
`resp_arbiter`. It has one holding register per link and serves them
round-robin. A second response on a link whose register is still full is
dropped and pulses `resp_overflow`. In normal operation this does not
happen. A chip answers each command once, commands leave at most one per
15 clocks, and the arbiter serves one register per clock.

## Receive path per uplink e-link

```
8 bits/clk ──┬─> sync_detector   SOS / K28.1 / EOS flags (raw bits)
             └─> ul_aligner      K28.5 search at all 10 offsets, symbol cut,
                    │            8b/10b decode (dec_8b10b), lock
                    └─> ul_frame_decoder   byte count from last comma, type,
                                           fields, CRC-4, timestamp extension
```

* **ul_aligner** checks every 10-bit window that ends in the new bits for a
  K28.5 of either disparity. A comma sets the symbol boundary, and a symbol
  is cut every 10 bits after it. At most one symbol completes per clock
  (8 < 10). A comma off the current boundary moves the boundary. Each
  comma also reloads the running disparity. `locked` drops after 4 code
  errors with no comma in between.
* **ul_frame_decoder** ignores bytes until it has seen a comma. It drops a
  frame that contains a bad symbol, and then waits for the next comma.
  During synchronisation the patterns are not 8b/10b, so frames are
  dropped there. Readout data should be used only after the links are
  synchronised.

## Hierarchy

```
sts_gbtx_ctrl_top
├── per FEB:   cmd_controller ── dl_frame_builder ── crc_comb (CRC-16)
│              dl_tx ── 2 × enc_8b10b
│              resp_arbiter
└── per link:  sync_detector
               ul_aligner ── dec_8b10b
               ul_frame_decoder ── crc_comb (CRC-4)
sts_pkg        constants, types, 8b/10b tables and encoder function
```

## Top-level interface (`sts_gbtx_ctrl_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N_FEB` | 1 | front-end boards, one downlink e-link each |
| `ASICS_PER_FEB` | 8 | chips on one downlink (addresses 0..7) |
| `LINKS_PER_ASIC` | 5 | uplink e-links per chip |
| `MAX_IN_FLIGHT` | 8 | outstanding commands per FEB (2..8) |
| `TIMEOUT_CLKS` | 4096 | clocks before an unanswered command times out |

`N_UL = N_FEB × ASICS_PER_FEB × LINKS_PER_ASIC` may be at most 40. The
defaults give the 1 FEB × 5 links sharing; the other sharings need
`N_FEB = 2, LINKS_PER_ASIC = 2` or `N_FEB = 5, LINKS_PER_ASIC = 1`.

* `dl_gbt_data[79:0]`: the FEB f e-link is in bits `4f+3:4f`; the upper bit
  of each group is sent first. Unused bits are 0.
* `ul_gbt_data[3]` (master, slave 1, slave 2, 112 bits each), qualified by
  `ul_gbt_valid`. The uplink e-link order is master e-links 0..11, then
  slave 1 e-links 0..13, then slave 2. E-link n is in bits `8n+7:8n`, and
  links `c·LINKS_PER_ASIC … c·LINKS_PER_ASIC+LINKS_PER_ASIC−1` of a FEB
  belong to chip c.
* Per FEB: `cmd_valid/cmd_ready/cmd` (`cmd_t`: chip, request type,
  payload), `done_valid/done` (`done_t`), `unexpected`, `resp_overflow`,
  `tx_mode`.
* Per uplink e-link: `link_locked`, `sos_ok`, `sos_seen`, `other_seen`,
  `k281_seen`, `eos_seen`, and every decoded frame on `ul_valid/ul_frame`
  (`uframe_t`, with `kind`, `crc_ok`, the raw 24 bits and all fields). It
  also gives `ul_sync` and `ul_frame_err` pulses.

Timing: a command handed in while the transmitter is between frames goes
out at the next 20-bit word boundary (at most 5 clocks). An uplink frame
appears on `ul_valid` three clocks after its last bit arrives. A matching
response reaches `done` two clocks after that at the earliest: the
arbiter and the controller each add one.

## Own choices (not given by the protocol description)

* CRC-16 is CCITT (x¹⁶+x¹²+x⁵+1), start value 0xFFFF, over downlink
  symbols 1..3. CRC-4 starts at 0.
* Request-type codes 0..3 as above; chip address 15 means broadcast.
* Idle downlink words are K28.5 K28.5. A mode change waits for the frame
  in progress to finish.
* The same bit order (first bit = MSB) is used on the downlink as on the
  uplink.
* The hit timestamp rule, the TS_MSB validity rule (CRC good and all three
  copies equal), and dropping framing after a bad symbol.
* The in-flight table, the timeout, the broadcast rule and the mapping of
  requests to responses. There is one sequence counter per downlink.
* The ACK field of the Ack frame is 2 bits wide. That is what is left of the
  24 bits; its codes are passed through unchanged.
* The placement of e-links in the GBT frames, the link-to-chip mapping and
  the response arbiter.
* The comma is the standard K28.5 (`001111 1010` / `110000 0101`). A
  printed frame table showed the bit pattern of K28.1 next to the name
  K28.5. The name, used consistently elsewhere, was followed.
* The uplink has 40 e-links (12 + 14 + 14). Three wide frames could carry
  42, but a FEB connects at most 40 data pairs.

## Not included

The GBTx chips and their clock-phase and input-delay adjustment, the
GBT-SCA, the optical transceivers and the GBT link core in the FPGA are
existing components. The HDLC controller that configures the GBTx chips
through their IC/EC bits was still an open item, with no design to follow.
The STS-XYTER itself is only modelled, for simulation.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The packages must come first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_sts_gbtx_ctrl_top \
    rtl/sts_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v sts_pkg) \
    tb/stsxyter_model.sv tb/tb_sts_gbtx_ctrl_top.sv
./obj_dir/Vtb_sts_gbtx_ctrl_top
```

For a block testbench, change the top module and the last file, for example
`--top-module tb_dl_tx … tb/tb_dl_tx.sv`. `-Wno-fatal` keeps width
warnings in the reference functions from stopping the build.

What is checked:

* `tb_enc_8b10b`: all 268 codes from both disparities against the rules of
  the code (weight, disparity, run length ≤ 5, no stray comma,
  uniqueness), plus published code words.
* `tb_dec_8b10b`: round trip of all codes, and all 1024 patterns for code
  and disparity errors.
* `tb_crc_comb`: against polynomial long division and the CRC-16/CCITT-FALSE
  check value 0x29B1.
* `tb_dl_frame_builder`, `tb_dl_tx`: field placement; the 15-clock frame
  period; the SOS, K28.1 and EOS words; a mode change in the middle of a
  frame.
* `tb_ul_aligner`: lock at a random bit offset, a 3-bit slip followed by
  realignment, and loss of lock.
* `tb_sync_detector`: SOS with ±1-bit runs, rejection of runs of 8 and 12
  bits, K28.1 and EOS, and no false detection in 8b/10b data.
* `tb_ul_frame_decoder`: all frame types, timestamp extension, CRC errors
  and dropped frames.
* `tb_cmd_controller`, `tb_resp_arbiter`: out-of-order answers, stalls,
  timeouts, broadcasts, unexpected answers, round-robin order and overflow.
* `tb_sts_gbtx_ctrl_top`: the whole board at default size against eight
  `stsxyter_model` ASIC models. It runs the full synchronisation sequence,
  writes and reads back a register on every chip, and exercises a timeout
  on a muted chip, a corrupted answer CRC and a broadcast. It checks the
  timestamps of the hits received meanwhile. It needs well under a second
  of simulation after about 40 s of compilation.
* `tb_sts_workloads`: the two other link sharings, 2 FEBs × 2 links per
  ASIC and 5 FEBs × 1 link per ASIC. Each is built by its own
  `sts_board_harness` (the top with those parameters and one model per
  ASIC). Every FEB goes through synchronisation and a 24-command
  write/read-back burst, and the hit timestamps are checked. It compiles
  in about 3 minutes.
