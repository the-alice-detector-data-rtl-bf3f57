# A detector data link and read-out receiver card in SystemVerilog

A particle detector's front-end electronics (FEE) sit in the experimental
area. The data-acquisition computers sit far away, in a counting room. This
design is the read-out chain that connects the two:

```
 FEE ==bus== SIU ====fibre, 1 Gbaud each way==== DIU ==buses== RORC ==host bus== computer
 (front end)  (source interface unit)   (destination interface unit)   (read-out receiver card)
```

The link between SIU and DIU is the *detector data link* (DDL). It is a
full-duplex serial link, with one line in each direction. It does three jobs
at once:

- It carries event data from the FEE to the RORC at about 100 MB/s.
- It carries data blocks the other way, for example tables that must be
  downloaded into the front end.
- It lets the computer control and test the FEE remotely. That covers
  commands, status words, and a JTAG port on the SIU. No other cables reach
  the front end.

The RORC (read-out receiver card) stores incoming event fragments in a large
input buffer until the host reads them. It holds two DDL channels.

Everything here is synthesizable RTL except the FEE, the fibre and the
serialisers. The testbenches model those.

## How the link works: layers

The link has three layers on top of the serial line. Each is one part of the
RTL.

1. **Coding** (`enc8b10b`, `dec8b10b`, tables in `code8b10b_pkg`).
   - This is the 8B/10B code of Fibre Channel. Each byte becomes a 10-bit
     character, and a running disparity keeps the line DC-balanced.
   - Twelve *K characters* are not data, so they can serve as markers.
   - The decoder flags two kinds of error: a code violation (the 10 bits are
     not a valid character) and a disparity error (the character does not
     fit the running disparity). Any single bit flip on the line is caught
     by one of the two, though not always in the character it hit.
2. **Framing** (`ddl_endec`). This layer turns 32-bit words into characters
   and back. It sends one character per clock, so one word takes 4 clocks.
   At a 106.25 MHz character clock (1.0625 Gbaud) that is 106 MB/s.

   | character | meaning |
   |---|---|
   | K28.5 | idle, sent whenever there is nothing else |
   | K28.1 | start of a command frame (one word) |
   | K28.2 | start of a status frame (one word) |
   | K28.3 | start of a data frame (1 to `MAX_FRAME_WORDS` = 512 words) |
   | K29.7 | end of frame |
   | K28.4 / K28.6 | XOFF / XON: stop / resume sending data frames |

   - Words are sent least significant byte first.
   - A longer data block becomes a train of frames. A command or status
     frame can slip in between two data frames, which is what makes the link
     full duplex at the transaction level.
   - XOFF/XON may be inserted between any two characters, even inside a
     frame. They go out as soon as the local receive buffer crosses its
     threshold.
   - After reset the receiver waits for 7 clean characters before it trusts
     the line ("link up").
   - A receiver reports an error if a command or status frame has the wrong
     length, or a K character appears where it does not belong.
3. **Transactions** (`siu`, `diu`). These are commands and status words with
   a fixed layout (`ddl_pkg::ddl_word_t`):

   ```
    31   30 .......... 8   7 .. 4   3 .. 0
   err   parameter (23)   trid     code
   ```

   `trid` is a transaction id chosen by the host. Every reply echoes it.

## Transactions

Every transaction starts with a command from the host. Every transaction ends
with a **CTSTW** (command transmission status word), which says whether
anything went wrong.

| command | code | what happens |
|---|---|---|
| FECTRL | 1 | The command is passed to the FEE. The SIU answers at once with a CTSTW. |
| FESTRD | 2 | The command is passed to the FEE. The FEE answers with a status word (FESTW), and the SIU forwards it, then sends a CTSTW. If the FEE is silent for `FEE_TIMEOUT` clocks, the CTSTW carries the time-out error instead. |
| RDYRX | 3 | Opens event read-out. The CTSTW carries the SOTR ("start of transaction") flag. From then on the FEE pushes event data whenever it has an event. |
| EOBTR | 4 | Closes any block transfer and gets a CTSTW. |
| STBWR | 5 | Opens a download. The CTSTW(SOTR) comes back, and the data words the host writes then go to the FEE until EOBTR. |
| STBRD | 6 | Opens a read-back. Like RDYRX, but the FEE sends a stored block. |
| IUCTRL | 7 | Interface-unit control. Bit 0 clears the error counter. On the SIU, bit 1 holds the JTAG TRST line. |
| IUSTRD | 8 | Interface-unit status. The unit answers with an IUSTW (error counter in bits 15:0, flow-control state above it), then a CTSTW. |
| JTAG | 9 | SIU only. The parameter holds the bit count (bits 3:0), 8 TMS bits (11:4) and 8 TDI bits (19:12). The SIU shifts them into the FEE's TAP at TCK = clock/4 and returns the TDO bits in an IUSTW. |
| SELFT | 10 | The SIU sends a generated block of `param[15:0]` words, word *i* = `{~i[15:0], i[15:0]}`, then a DTSTW. |

Parameter bit 22 addresses IUCTRL and IUSTRD to the DIU instead of the SIU.
The DIU answers those itself, and they never cross the fibre.

The event read-out:

```
host: RDYRX ─────────────►  SIU ──► FEE
host ◄── CTSTW(SOTR) ◄────  SIU
            FEE ──► data, data, ... ──► SIU ──► data frames ──► DIU ──► input buffer
            FEE ──► end-of-block word (FEEOB) ──► SIU sends it as DTSTW
host ◄── DTSTW ◄──── DIU (sets the parameter to the number of words it received)
host: EOBTR ─────────────►  SIU ──► FEE  (repeatable events, then EOBTR to close)
host ◄── CTSTW ◄─────────   SIU
```

### Status words and errors

Status codes:

| status word | code |
|---|---|
| FESTW | 1 |
| FEEOB | 2, sent by the FEE; the SIU turns it into a DTSTW |
| CTSTW | 3 |
| DTSTW | 4 |
| IUSTW | 5 |

Error bits in the parameter of a CTSTW or DTSTW. The `err` bit is set whenever
any of them is set.

| bit | set by | meaning |
|---|---|---|
| 0, 1, 2 | SIU | code violation, disparity error, framing error on the line towards the SIU |
| 3 | SIU | unknown command |
| 4 | SIU | the FEE did not answer in time |
| 5 | SIU | a command arrived before the previous transaction had closed; it was dropped |
| 8, 9, 10 | DIU | code, disparity or framing error seen on the line towards the DIU since the last report |
| 12 | SIU | SOTR: a block transfer has started (not an error) |

A command that arrives with a line error is **not executed**. The SIU
answers with an error CTSTW, and it is up to the host to retry. Errors in the
other direction are collected by the DIU and added to the next CTSTW or DTSTW
that passes through it. Each unit also counts errors, and the count can be
read with IUSTRD.

The error detection relies on the 8B/10B code alone. There is no CRC.

## The SIU and its front-end bus

The SIU (`siu`) shares one 32-bit bidirectional bus with the FEE:

| signal | direction | meaning |
|---|---|---|
| `fbd_i` / `fbten_i` / `fbctrl_i` | FEE to SIU | word, word valid, and "this is a status word, not data" |
| `fbd_o` / `fbten_o` / `fbctrl_o` / `fbd_oe` | SIU to FEE | word, word valid, "this is a command", and output enable |
| `fidir` | from SIU | 0: the FEE owns the bus (the default). 1: the SIU drives it. |
| `filf` | from SIU | "link full". The FEE must stop sending from the next clock; one word already on the bus is still accepted. |

How the bus changes hands:

- To send a command or download data to the FEE, the SIU raises `filf`. Two
  clocks later it sets `fidir`, and it gives the bus back when its queue is
  empty.
- So an FESTRD can be served in the middle of an event. The end-to-end test
  does exactly that.

The SIU's transmit queue holds 32 words (`TXQ_DEPTH`). The fibre drains it at
one word per 4 clocks, or not at all while the RORC has sent XOFF. `filf`
goes up 6 words before the queue is full. The effect is that back-pressure
travels from the RORC's input buffer, through XOFF, to the SIU queue and on
to the FEE.

## The DIU

The DIU (`diu`) faces the RORC with two one-way buses:

- **Output bus**, from the RORC: `ob_valid`, `ob_ready`, `ob_d`, and
  `ob_ctrl` (1 for a command, 0 for download data).
- **Input bus**, to the RORC: `ib_valid`, `ib_d`, and `ib_ctrl` (1 for a
  status word). The RORC must take each word. When it can no longer keep up,
  it raises `ib_xoff`, and the DIU sends XOFF to the SIU.

The DIU adds two things to the stream:

- It replaces the parameter of each DTSTW with its own count of data words
  received. The host gets the event length as measured at the receiving end.
- It merges its collected line errors into the next status word, as described
  above.

## The read-out receiver card (RORC)

`rorc` holds two `rorc_channel`s and a host port. Each channel contains:

| part | default size | role |
|---|---|---|
| input buffer | 3M x 32 (12 MB) | event data from the link, read by the host |
| output buffer | 512k x 32 (2 MB) | data written by the host for downloads |
| status FIFO | 64 x 32 | status words from the link; interrupt while not empty |
| output multiplexer | | sends the host's command after the download data written before it, so "STBWR, data..., EOBTR" leaves in the order it was written |
| loop-back multiplexer | | RORC self-test: the outgoing stream goes straight back into the channel |
| DDL test multiplexer | | DDL self-test: data received from the link is copied into the output buffer and sent back |
| control logic | | mode, XOFF when the input buffer is 256 words from full, interrupt |

A status word that arrives at a full status FIFO is lost, and a sticky
overflow flag is set.

### Modes

The mode is set in the control register, per channel.

- **Normal (0).** As described above.
- **RORC self-test (1).** Nothing is sent to the DIU. The host's commands appear in
  its status FIFO and its download words in its input buffer. This tests the
  card without a link.
- **DDL self-test (2).** Every data word received from the link is sent back
  over the link. For example, with STBWR open at the SIU and SELFT started,
  the SIU's test block travels to the RORC and back, and lands in the FEE's
  download memory. This tests both fibres and both units end to end.

### Host port and registers

The host port is a simple synchronous slave:

- A request is `hb_valid` with `hb_write`, `hb_addr` and `hb_wdata`.
- `hb_ack` (and `hb_rdata` for a read) follows one clock later.
- A new request may be made every clock.
- The card responds only when `hb_addr[31:24]` equals `base_addr`.
- Address bit 8 selects channel A (0) or B (1).

| offset | write | read |
|---|---|---|
| 0x00 | command to send (one may be pending) | status: bit 0 command pending, 1 output buffer full, 2 input buffer empty, 3 status FIFO empty, 4 status FIFO overflow, 5 XOFF active |
| 0x04 | word into the output buffer | pop a word from the input buffer |
| 0x08 | — | pop a word from the status FIFO |
| 0x0C | bits 1:0 mode, bit 2 interrupt enable, bit 31 clears the channel | mode and enable |
| 0x10 | — | input buffer fill level |

Reading an empty buffer returns 0 and pops nothing. `irq` is high while a
channel with its interrupt enabled has a non-empty status FIFO.

## The top: `ddl_readout_chain`

`ddl_readout_chain` contains the RORC and, for each of its two channels, one
DIU and one SIU. The fibres are not inside. Each unit's 10-bit character ports
are brought out, indexed `[channel]`:

- `diu_tx_char[c]` must reach `siu_rx_char[c]`.
- `siu_tx_char[c]` must reach `diu_rx_char[c]`.

Connect them directly, or through a model of the line as the testbenches do.
The FEE bus and JTAG ports of both SIUs are also brought out as `[1:0]` arrays.

| parameter | default | |
|---|---|---|
| `IN_DEPTH` | 3,145,728 | input buffer words per channel |
| `OUT_DEPTH` | 524,288 | output buffer words per channel |
| `ST_DEPTH` | 64 | status FIFO words per channel |
| `MAX_FRAME_WORDS` | 512 | longest data frame |
| `FEE_TIMEOUT` | 4096 | clocks the SIU waits for the FEE |

At the defaults the two channels hold about 235 Mbit of buffer memory. This is
written as plain arrays. Synthesis keeps them as memories, but a real device
needs external memory behind them, as the original card had.

## Departures from the original system, and what is not built

- **One clock.** The whole chain runs on the character clock, one character
  per cycle. In the real system the two ends are far apart and have separate
  clocks; the transceivers' elastic buffers and clock recovery absorb the
  difference. None of that is modelled, so the two ends of a link must share
  the clock.
- **Own formats.** The original link is specified in separate documents that
  are not reproduced here. That covers the frame format, the K characters,
  the word layout and codes, the error bits, the FEE bus handshake, JTAG over
  the link, the flow-control scheme and the register map. All of these are
  this design's own choices. The names of the transactions and status words,
  the order of words in a transaction, and the buffer sizes follow the
  original.
- **Host bus.** The card's real host bus is VME64x, with A32, D8 to D32,
  D32/D64 block transfers and an interrupter. Here it is the simple port
  above. The VME protocol, its block transfers and the interrupt acknowledge
  are not built.
- **Not built at all:**
  - the indirect configurations, with a medium-speed link into the FEE or
    the link tunnelled between two VME crates;
  - the test boards (extenders, SIU simulator, FEE emulator);
  - configuration memories.

## Performance, compared with the original goals

- **Link rate.** At 106.25 MHz a full 512-word frame costs 2050 characters
  for 2048 bytes, which is 106 MB/s. The goal was 100 MB/s per link, and
  10 MB/s for downloads in the other direction.
- **Full event.** Reading a 40 MB event in 2 ms needs about 190 such links in
  parallel. The link count is a system choice, not something this design
  fixes.
- **Host rate.** The host port moves one word per clock, far above the
  50 MB/s of the original VME card.
- **Block sizes.** The host-side block sizes the original system was measured
  with, 400 bytes to 1 MB, all fit the 12 MB input buffer. The speeds
  measured then were limited by the host CPU's DMA, which is not part of this
  design. Simulated at the default sizes, with the host reading as data
  arrives, the clocks from trigger to DTSTW were:

  | block | clocks | clocks per word | MB/s at 106.25 MHz |
  |---|---|---|---|
  | 400 B | 435 | 4.35 | 98 |
  | 4 KB | 4,133 | 4.04 | 105 |
  | 40 KB | 41,033 | 4.007 | 106 |
  | 400 KB | 410,033 | 4.004 | 106 |
  | 1 MB | 1,049,633 | 4.004 | 106 |

  A 16 KB download ran at 4.01 clocks per word.
- **Round trip.** A status read-out, from FESTRD to CTSTW, took 56 clocks
  (about 0.5 µs at 106 MHz). That was measured at a framing unit standing in
  for the DIU, with 12 clocks of line in each direction. The DIU and the RORC
  add a few clocks, and the fibre adds about 5 ns per metre each way.

## Testbenches

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_enc8b10b` | published code groups, then all characters in random order against line properties: 4 to 6 ones, run length at most 5, disparity bounds, uniqueness |
| `tb_dec8b10b` | published code groups of both disparities, code and disparity violations, and random traffic with single bit flips, every one of which must be reported |
| `tb_ddl_endec` | two framing units back to back: random mixed traffic, frame splitting, XOFF/XON, error injection, word rate |
| `tb_ddl_fifo` | against a queue model, including almost-full and non-power-of-two depth |
| `tb_siu_jtag` | shifts into an 8-bit TAP shift register and reads it back |
| `tb_siu` | the SIU with an FEE model and a framing unit on the line side: every command, time-out, error CTSTW, event, download, back-pressure |
| `tb_diu` | the DIU: event length, local IU commands, error merging |
| `tb_rorc_channel` | buffers, ordering, the three modes, XOFF, overflow |
| `tb_rorc` | address decoding, both channels, registers, interrupt |
| `tb_ddl_readout_chain` | the whole chain, both channels, small buffers. Counts each mechanism and fails any that never happened: status read-out, status read-out during an event, command hit by a line error, DIU error report, time-out, events on both channels with frame splitting, XOFF, download, read-back, IU status of SIU and DIU, JTAG, self-test block, both self-test modes of the card, interrupt |
| `tb_ddl_readout_chain_full` | the top at its default sizes: status read-out and a 3000-word event on both channels (a few seconds) |
| `tb_ddl_readout_workloads` | the top at its default sizes: event blocks of 400 B to 1 MB and a 16 KB download, each word checked and the rate held to at least 100 MB/s (about 1.5 million clocks, a few seconds) |

Two behavioural models support them:

- `fee_model`, a front end with a status register, a download memory, an event
  generator and a TAP.
- `ddl_fibre_model`, a character delay line with a bit-flip input for error
  injection.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/ddl_pkg.sv rtl/code8b10b_pkg.sv rtl/*.sv tb/fee_model.sv tb/ddl_fibre_model.sv \
  tb/tb_ddl_readout_chain.sv --top-module tb_ddl_readout_chain -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Verilator may warn that the two packages are read twice, because the
`rtl/*.sv` wildcard lists them again. That is harmless.

The RTL uses assertions for the FIFO rules (no write when full, no read when
empty) and for ownership of the FEE bus. `--assert` turns them on.
