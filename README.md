# Fast-control interface and DAQ readout for an upgraded trigger board

On the original trigger boards, an event was read out in two slow steps. An
L1A (level-1 accept) started a copy that reformatted the raw front-end buffer
into a DAQ buffer. The fast-control (FC) core then held every ReadEvent for
about 80 µs, long enough for the slowest board in a crate to finish that copy.
The hold-off alone is about half of the 160 µs needed to read a 583-byte
event, and it adds deadtime once trigger rates reach a few kHz.

This RTL implements the replacement scheme, for the boards of the upgrade:

* The DAQ data are formatted **continuously** into the DAQ buffers, so each
  buffer always holds the most recent window of formatted words. An L1A only
  **freezes** one buffer. No copy runs after the trigger.
* A ReadEvent starts the readout **at once**. The board-side sequencer
  (called OP-control) reads the frozen buffer through the FC core's own
  variable-length **block-read** command, as it would read any memory. When
  the last word has been read, it **frees** the buffer, which starts
  refilling.

The FC core also carries the command changes of the upgrade. Opcodes 0x12
and 0x13 are block read and block write with a word count. The old
fixed-length block opcodes 0x15 and 0x16 are refused. CSR1 holds a 3-bit
board ID. There is also a diagnostic memory that FC commands can read and
write.

## Data flow

```
 FC commands ──► op_control ──► fc_cmd_engine ──► request bus ──┬─► daq_buffer_mem  (block 0, read only)
 (opcode,         │  takes the       │  block/address           ├─► diag_mem         (block 1)
  operand)        │  command port    │  registers               └─► fc_csr           (block 2)
                  │  during a        ▼
 ReadEvent ──────►│  readout     read replies ──► op_control ──► DAQ link (dl_valid/dl_data/dl_last)
                  ▼                               (+ dummy words)
 L1A ───────► daq_buffer_mgr ◄── formatted words (fmt_valid/fmt_data)
              (freeze / free, ring pointer,
               read-address translation)
```

`fc_daq_top` connects these parts. The FC link deframer, the board-specific
data formatter and the DLINK transmitter with its header are not included.
The top's ports take deframed commands, L1A and ReadEvent strobes, and
formatted words. It gives out the word stream that goes to the link.

## The buffer ring and the frozen window

This is the least obvious part of the design (`daq_buffer_mgr`).

* There are four buffers (`NUM_BUF = 4`), each of `2**BUF_AW = 1024` words.
  A word from the formatter is written into **every buffer that is not
  frozen**. All of them use one shared ring pointer, which wraps at the
  event length `evt_len` (CSR5, 292 words by default).
* So every unfrozen buffer that has taken at least `evt_len` words holds the
  same thing: the last `evt_len` formatted words, in ring order.
* An L1A freezes one unfrozen buffer. It picks the one with the highest fill
  count (ties go to the lowest index). The window it keeps is the `evt_len`
  words up to and including the word written in the L1A cycle. Any latency
  between the data and the trigger must be matched upstream, in the
  formatter.
* At the freeze, the manager records where the window starts: the ring
  position that would have been written next, which holds the oldest word.
  It also pushes the buffer onto a FIFO, so events are read in trigger order.
* The readout reads a frozen buffer from offset 0 to `evt_len-1`. The manager
  translates offset *k* to ring position `(start + k) mod evt_len`. That way
  the readout is a plain linear block read, and the memory itself has no
  DAQ logic: it is two-port RAM.
* Four frozen buffers means **full**. An L1A while full is dropped and sets
  the sticky *overflow* flag.
* Freeing a buffer clears its fill count, and the buffer rejoins the write
  set at the current ring position.

### The refill hazard

A freed buffer holds old data until it has taken `evt_len` new words.
Normally at least one other buffer is already current, and the next L1A
takes that one. The exception is the full state. Freeing the first buffer
there leaves that buffer as the only candidate. If an L1A arrives before it
has refilled, the event is frozen with partly stale data.

The design handles this in three ways:

* **Detection.** An L1A that freezes a buffer whose fill count is below
  `evt_len` sets the sticky *stale* flag (CSR2 bit 2). The event is still
  taken.
* **Guard time.** After every event, OP-control sends `dum_words` dummy
  words (`0xD0D0`, count in CSR6, default 16). The buffer is freed before the
  dummy words go out, so it refills while they are sent. The readout side
  holds off the next trigger until it has seen the last word. Setting CSR6 to
  at least `evt_len` covers a full refill when the formatter writes one word
  per link word. The end-to-end test checks this: with 16 dummy words the
  hazard shows up, and with `evt_len + 8` it does not.

* **Refill behind the readout** (CSR0 bit 2, off after reset). The buffer
  being read out does not have to wait for its release before it refills.
  The manager watches the reads of the oldest frozen buffer. It lets the
  formatter overwrite any ring position the readout has already passed, and
  those words count toward the buffer's fill. How much is gained depends on
  where the write pointer sits relative to the window when the readout
  starts:
  * If the writer is `d` words past the window start, the buffer ends the
    readout with about `d` current words.
  * It is then current after `evt_len - d` more words.

  A write that has to be skipped restarts the count, because the refilled
  words must be one unbroken run that ends at the write pointer. The
  end-to-end test starts a readout with the writer `evt_len - 12` words into
  the window. It checks that an L1A right after the 16 dummy words is
  clean and holds the current window. The buffer-manager test checks that
  the same case is stale without this mode.

Both guard methods come from the upgrade proposal, as alternatives. The
board can run either, or both together. The proposal has the readout module
request the dummy words. Here the board appends them itself, and their
number is a register. This is a choice made for this RTL.

## Readout through ordinary FC commands

`op_control` counts ReadEvents. When one is pending and a buffer is frozen,
it waits until the FC core is between commands, then takes the core's
command port. It issues three commands:

1. `SET_BLOCK 0` (the DAQ block)
2. `SET_ADDR {buffer, 0}`
3. `BLOCK_READ evt_len` (opcode 0x12)

While this runs, external FC commands are held off (`fc_ready` low). When a
readout is ready to start in the same cycle as an external command, the
readout goes first. When the last event word comes back, `free_o` pulses and
the dummy words follow. `dl_last` marks the final word sent. Replies to
external FC reads use the same link port, marked as single transfers with
`dl_last`.

**Side effect (intended, and documented for the boards).** The readout uses
the normal commands, so it leaves the FC core's block and memory address
registers pointing at the DAQ buffer it just read. A diagnostic command
sequence that relies on an address set before a readout will go to the
wrong place. The current-address registers CSR3 and CSR4 show where the
readout left the address. Always set the block and address before an FC
access.

A ReadEvent that finds no frozen buffer is dropped and sets the sticky
*ReadEvent lost* flag (CSR2 bit 4).

## FC command set

Each command is an 8-bit opcode plus a 16-bit operand, handed over with a
valid/ready handshake.

| opcode | command | operand | effect |
|---|---|---|---|
| 0x00 | NOP | – | none |
| 0x01 | SET_BLOCK | block | block-address register |
| 0x02 | SET_ADDR | address | memory-address register |
| 0x03 | WRITE | data | writes at the address, address + 1 |
| 0x04 | READ | – | one reply word from the address, address + 1 |
| 0x12 | BLOCK_READ | count N | N reply words, one per cycle, last one flagged |
| 0x13 | BLOCK_WRITE | count N | the next N transfers' operands are written at consecutive addresses |
| 0x15, 0x16 | old fixed-length block R/W | – | refused: `illegal` pulse, CSR2 bit 3 |

Only 0x12, 0x13, 0x15 and 0x16 come from the FC update. The other opcode
values, the operand width and the handshake belong to this RTL, because the
FC link protocol itself is specified elsewhere. Any other opcode is refused
like 0x15 and 0x16.

Blocks: 0 = DAQ buffers (address = `{buffer, offset}`, read only), 1 =
diagnostic memory (256 words), 2 = CSRs.

## Register map (block 2)

| CSR | bits | meaning |
|---|---|---|
| 0 | [0] DAQ enable (R/W, reset 1); [1] write 1 to clear the sticky flags; [2] refill behind the readout (R/W, reset 0) | control |
| 1 | [2:0] board ID (read only, parameter `BOARD_ID`); [7:3] run-mode control (R/W) | board ID and run mode |
| 2 | [0] full, [1] overflow, [2] stale, [3] illegal command, [4] ReadEvent lost, [7:5] frozen buffers | status (read only) |
| 3 | current block address | read only |
| 4 | current memory address | read only |
| 5 | event length in words, clamped to 1..1024, reset 292 | R/W |
| 6 | dummy words per event, reset 16 | R/W |
| 7 | accepted L1A count (16 bits, wraps) | read only |

The 3-bit board ID, taken from what had been a spare run-mode bit, and the
meaning of CSR3 and CSR4 follow the FC update. Everything else in the map is
this design's choice.

## Timing

All logic runs on one clock, with an asynchronous active-low reset.

* A memory read request returns its data on the next cycle.
* `BLOCK_READ`: the first word comes 2 cycles after the command is accepted,
  then one word per cycle.
* ReadEvent to first event word on the link: **6 cycles**. The strobe
  registers in cycle 1, the three commands go out in cycles 2–4, and the
  reads start in cycle 5. An event of `evt_len` words plus `dum_words` dummy
  words then takes `evt_len + dum_words` consecutive cycles.
* An L1A and a free take effect at the next clock edge. The formatted word
  presented in the L1A cycle belongs to the frozen window.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_BUF` | 4 | four DAQ buffers, as on the boards |
| `BUF_AW` | 10 (1024 words) | chosen to hold the 292-word event with margin |
| `EVT_LEN_RST` | 292 | 583-byte fixed GLT event in 16-bit words |
| `DUMMY_RST` | 16 | "a few µs" of guard time; the link rate is unknown, so the count is a guess |
| `DIAG_DEPTH` | 256 | chosen |
| `BOARD_ID` | 3'd5 | placeholder |

The data word is 16 bits, set in `fc_pkg::DATA_W`.

## Files

* `rtl/fc_pkg.sv`: opcodes, command and request-bus structs, block and CSR
  numbers
* `rtl/fc_cmd_engine.sv`: address registers and command execution
* `rtl/op_control.sv`: readout sequencer and link output
* `rtl/daq_buffer_mgr.sv`: freeze/free bookkeeping, ring pointer, address
  translation
* `rtl/daq_buffer_mem.sv`: one RAM bank per buffer
* `rtl/fc_csr.sv`, `rtl/diag_mem.sv`: registers and diagnostic RAM
* `rtl/fc_daq_top.sv`: the assembled interface
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb_fc_daq_top` runs the whole design at its default parameters. It covers:

* CSR access
* diagnostic-memory block write and block read
* refusal of 0x15
* a single event
* four events to full, plus a fifth L1A that overflows
* queued ReadEvents, with external commands held off
* the stale case and the dummy-word guard
* the refill behind the readout
* the address side effect

It counts each of these mechanisms and fails if one never happens. It also
checks every word of every event that is not stale against the formatter's
running count.

## Simulating

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb rtl/fc_pkg.sv tb/tb_fc_daq_top.sv --top-module tb_fc_daq_top
./obj_dir/Vtb_fc_daq_top
```

Replace `tb_fc_daq_top` with any other `tb_*` to run that module's test.
Each test finishes in well under a second.

## Limits and departures

* **Not built:**
  * the FC serial link and its deframing
  * the DLINK header and framing
  * the board-specific formatter
  * the readout module at the other end of the link
  * the CSR bits that would control the diagnostic memories: what those
    memories capture is board specific
* **Dummy words** are added by the board, with a count set in a register,
  instead of being requested by the readout module.
* **Both hazard remedies are built, plus a stale flag.** Refilling behind
  the readout pointer needs the writer and the readout to share the clock.
  Under the proposal it may not be practical on every board.
* **The old ReadEvent hold-off is not built.** This design removes it.
* **The link has no backpressure.** The readout sends one word per cycle.
* **The event length applies to all buffers at once.** For boards with
  variable-size events, the window length is whatever CSR5 holds when the
  event is read out. Change it only while no buffer is frozen.
