# RAPPID instruction length decoder and steering unit in SystemVerilog

IA32 instructions are 1 to 15 bytes long, and the length of one has to be
known before the next can be found. That serial chain makes length decoding
a bottleneck for a wide front end. RAPPID ("Revolving Asynchronous Pentium
Processor Instruction Decoder") breaks the chain in two ways:

* **Decode everywhere, speculatively.** A 16-byte cache line lands in 16
  byte columns. Every column decodes a length as if an instruction began at
  its byte, without waiting for anyone.
* **Pass a token to pick the real starts.** A single *tag* moves through a
  torus of 4 rows x 16 columns of tag units. The unit holding the tag is at
  the first byte of the next instruction. Once that column's length is
  known, it sends the whole instruction to its row's output buffer and hands
  the tag L columns on, one row down. Consecutive instructions therefore
  land in output buffers 0, 1, 2, 3, 0, ... in program order.

The published design is self-timed: it has no clock, and its three loops
(length decoding, tag passing, steering) each run at their own rate. This
RTL keeps the same structure and the same handshakes, but it is
synchronous: each handshake step takes one clock. It decodes the
32-bit-mode one-byte and 0F opcode maps. It handles operand- and
address-size prefixes, instructions of 8 to 11 bytes, and predicted taken
branches. It also includes the built-in self-test the published design
specified, and a version of its debug freeze chain.

## Structure

```
rappid_top
 ├── input_fifo          32 lines x 16 bytes x 11 bits, serial load, cyclic replay
 ├── decode_steer_unit
 │    ├── byte_unit x16  byte latch, byte control, instruction-ready, ack generation
 │    │    └── length_decoder
 │    ├── tag_unit x64   4 rows x 16 columns
 │    ├── crossbar x4    one per row
 │    └── output_buffer x4
 ├── bist                cellular-automaton patterns + 64-bit signature
 └── debug_freeze        8 freeze bits + 200-bit state capture on a debug scan chain
```

Shared types and sizes are in `rappid_pkg`: `NCOL=16`, `NROW=4`,
`MAXLEN=7`, the 11-bit input byte `if_byte_t` and the 62-bit output word
`xb_entry_t`.

## The tag and the three events

A tag unit at (row r, column c) fires in the first clock in which all three
of these hold, whatever order they arrived in:

| event     | meaning                                                        |
|-----------|----------------------------------------------------------------|
| TagArrived | the unit holds the tag                                        |
| InstRdy   | column c knows its length L and columns c+1 .. c+L-1 hold bytes |
| XBRdy     | the output buffer of row r is not full                         |

When it fires, three things happen in the same clock:

1. **Tag passed on.** A one-clock pulse goes out on `TagOut[L]`. It sets
   TagArrived in the unit at row r+1 (mod 4), column c+L (mod 16).
2. **Instruction transferred.** The row's crossbar copies bytes c .. c+L-1
   from the byte latches into the row's output buffer.
3. **Bytes released.** Column c releases its byte. It also sends `Preempt`
   to the L-1 columns after it, which release theirs.

Each unit has seven TagIn and seven TagOut lines, because one piece spans at
most seven bytes. The pulses carry no acknowledge. Assertions in `tag_unit`
check the conditions this relies on: a tag never reaches a unit that already
holds one, and only one line pulses at a time.

For a run of 3-byte instructions the tag visits (row, column) (0,0), (1,3),
(2,6), (3,9), (0,12), (1,15), (2,2), and so on. A column holding
a tag does nothing special until its instruction is ready. Columns that do
not get the tag decode for nothing. Their bytes are released by a
`Preempt` when the instruction covering them goes out.

Throughput in this model is one transfer per clock. The tag moves one hop
per clock, and a released column reloads from the FIFO at the same clock
edge, so the bytes are always there when the tag comes round. Latency is
two clocks from a byte being offered by the FIFO to the transfer being
visible in an output buffer.

## Byte columns

Each `byte_unit` works as follows:

* **Loading.** It pops its own input FIFO column whenever its latch is empty
  or is being released. Popping is the acknowledge to the FIFO. The sixteen
  columns load independently.
* **Unused bytes.** A byte whose used bit U is clear is dropped on arrival,
  and the column moves straight on to its byte of the next line. This is how
  the bytes between a taken branch and its target disappear.
* **Length decoding.** `length_decoder` takes the column's byte and the next
  three bytes and returns a length from 1 to 11 and a prefix flag.
* **Instruction ready.** `InstRdy` needs the effective length L (see below)
  and `ByteRdy` from the next L-1 columns.

The decoder reads a later byte only once the earlier bytes have shown that
the instruction reaches that far. So if some byte of the instruction is
still missing, the length computed from stale data always covers a byte
that is not ready. `InstRdy` cannot be raised on a wrong length, and no
separate "length valid" signal is needed.

Each column also counts the lines it has popped (`seq`, 6 bits). The branch
logic uses this count (see below).

## Prefixes and long instructions: splitting across rows

One transfer carries at most seven bytes. Longer pieces of work are split
into several transfers with a request/acknowledge exchange between columns.
Both splits follow the same pattern. The column holding the tag hands some
state to a column further on, waits for that column to show it has the
state, and then goes out as a short piece. The tag then moves on to the
column that received the state.

**Prefix byte.** Suppose the column holding the tag has a prefix byte
(26 2E 36 3E 64 65 66 67 F0 F2 F3).

1. The column raises `pfx_req_out` to column c+1. The request carries:
   * `op16`: set by 66 or by an earlier prefix;
   * `ad16`: set by 67 or by an earlier prefix;
   * `branch`: set if the B mark sits on this first byte.
2. Column c+1 stores this *mode*. Its `mode_valid` is the acknowledge.
3. Column c then goes out as a one-byte piece with `is_prefix` set.
4. Column c+1 decodes its opcode with 16-bit operand or address size as the
   mode says.

Several prefixes in a row pass the mode along.

**8 to 11 bytes.** Suppose the column holding the tag decodes a length L
above 7. Its decision rests on bytes c..c+3, and all of them must be
present.

1. The column sends `long_req_out` to column c+4. The request carries
   `tail_len = L-4` (three bits) and the branch flag.
2. Column c+4 stores this and acknowledges.
3. Column c goes out as a 4-byte piece with `long_head` set, and passes the
   tag to column c+4 in the next row.
4. Column c+4 ignores its own decoder. It goes out as an (L-4)-byte piece
   with `long_tail` set.

A column's mode is cleared when its byte is released. Each split costs one
extra clock.

## Predicted taken branches

The fetch side marks the bytes before they reach this unit:

* **B** on the first byte of a predicted taken branch.
* **T** on the first byte of the target.
* **U cleared** on every byte from the end of the branch to the end of its
  line, and on every byte from the start of the next line up to the target.

Branches are handled like this:

1. A tagged column whose piece ends a branch sends its instruction out as
   usual. It does not pass the tag by length. Instead it sets the `INJECT`
   flag of the next row.
2. While `INJECT` is set, the tag unit in that row whose column holds a used
   byte marked T takes the tag and clears `INJECT`.
3. For a prefixed or long branch, the B flag travels with the mode, so the
   piece that ends the instruction raises `INJECT`.

A column can run several lines ahead of the tag by dropping unused bytes.
It may then already hold the target mark of a *later* branch. To rule this
out, `INJECT` also stores the line number the target must have: the line
after the one holding the branch's last byte. A column takes the tag only
if its `seq` matches. The published description does not cover this case.
The line check is this design's addition.

## Input FIFO

`input_fifo` holds up to 32 lines. Each byte position has its own read
pointer and count, so it behaves as sixteen 11-bit FIFOs. The ports work as
follows:

* **Serial loading.** A line is shifted in one bit per clock through a
  176-bit scan register (`scan_en`, `scan_in`), bit 0 of byte 0 first.
  `load_line` then writes it.
* **Parallel loading.** `par_load` writes `par_line` in one clock. Only the
  self-test uses it.
* **Reading.** With `run` low, no column is offered a byte.
* **Cyclic replay.** With `recirc` high, each column's read pointer cycles
  through the lines loaded since reset and nothing is removed. This replays
  a short program for as long as needed, which is how throughput is
  measured. Load after a reset before using this mode.

Byte layout: `{U, B, T, data[7:0]}`.

## Output words

Each output buffer holds `xb_entry_t` words of 62 bits:

| field       | bits | meaning                                           |
|-------------|------|---------------------------------------------------|
| `bytes`     | 56   | `bytes[0]` is the first byte; unused bytes are 0  |
| `len`       | 3    | 1..7                                              |
| `is_prefix` | 1    | a lone prefix byte; the instruction follows       |
| `long_head` | 1    | first four bytes of an 8..11-byte instruction     |
| `long_tail` | 1    | the rest of it                                    |

To get the instruction stream back:

1. Read the buffers round-robin, starting at row 0 after reset.
2. Join each prefix piece to the next word.
3. Join each head to the tail that follows it.

Writing the bytes of all words one after another in that order gives back
the used bytes of the input.

## Self-test

With `bist_en` high in `rappid_top`:

* A 176-cell hybrid rule 90/150 cellular automaton feeds pseudo-random lines
  into the input FIFO through `par_load`. All bytes are marked used, with no
  branch or target marks. The automaton steps once per line taken.
* `bist_two_op` replaces about one byte in eight with 0F, so that two-byte
  opcodes show up.
* Every output word is read as soon as it appears. It is folded, with its
  row number, into a 64-bit MISR (polynomial x^64+x^4+x^3+x+1). The result
  is on `bist_sig`.

The published design specified a self-test of this kind but did not build
it into the chip. The automaton rules, the seed, the polynomial and the way
0F bytes are injected are this design's choices.

## Debug freeze chain

A self-timed circuit cannot be stopped on a clock edge and scanned. By the
time it stops, its pulses have already ended. The original chip therefore
had eight scan bits, and each one blocked the reset of one internal state
signal. After a failing run, the frozen signals were scanned out, showing
what had happened.

`debug_freeze` does the same job for eight groups of signals in
`du_state_t`, 200 bits in all:

| bit | group       | instances |
|-----|-------------|-----------|
| 0   | TagArrived  | 64        |
| 1   | tag unit fires (TagOut pulse) | 64 |
| 2   | InstRdy     | 16        |
| 3   | ByteRdy     | 16        |
| 4   | Preempt received | 16   |
| 5   | prefix or long-tail mode held | 16 |
| 6   | INJECT      | 4         |
| 7   | crossbar transfer | 4   |

The chain works like this:

* **Capture.** While `dbg_shift` is low, the capture register copies the
  live state every clock. For a group whose freeze bit is set, new values
  are ORed in instead, so every instance that was ever high keeps a 1.
* **Scan.** While `dbg_shift` is high, the 208-bit chain {freeze bits,
  capture} shifts one bit per clock. The capture comes out on `dbg_out`
  first, starting with `xb_push[0]` (the least significant bit of the
  packed struct). The freeze bits come out last.
* **Setting the freeze bits.** The last eight bits shifted in become the
  new freeze bits. The very last one is bit 7.

For example, with bit 0 set while the unit runs 1-byte instructions, the
capture shows the sixteen tag units the tag visited: column mod 4 equals
row.

The state reaches the capture through a register, so the capture lags the
live signals by one clock. The frozen copy is a shadow, so freezing never
changes the unit's behaviour. In the original, freezing stalled the live
signal. The eight groups, the separate debug port and the chain order are
this design's choices; which signals the original froze is not known.

## Where this departs from the published design

* **Clocked, not self-timed.** Handshakes take one clock per step. Pulses
  are one clock wide. The byte latch is a flip-flop, not a transparent
  latch. The published throughput figures (about 2.5 to 4.5 instructions
  per ns on silicon) are timings of the self-timed circuit and have no
  counterpart here.
* **One decoder for all opcodes.** The published decoder is fast for common
  opcodes and slow for rare ones. Here all opcodes are decoded by one
  combinational block in one clock. The opcode tables are the standard IA32
  32-bit maps of that era, written for this design. 0F opcodes the
  table does not list are taken to have a ModR/M byte.
* **Wider decoder inputs.** The decoder reads all 24 bits of the three
  following bytes. The original took fewer.
* **All prefixes are split.** All eleven prefixes are split off as one-byte
  pieces. Only 66 and 67 change lengths. The original is described as
  handling the length-changing prefixes.
* **Unused bytes.** In the original, an unused byte raises a short ByteRdy
  pulse. Here it is dropped in the clock it arrives, and the column moves on.
  Neighbours never see it as ready, which is safe: no transfer covers an
  unused byte.
* **Signature inputs.** The original signature analyser also watched some
  input signals. Here only the output words, with their row numbers, are
  folded in.
* **Added branch logic.** The line sequence check for branch targets was
  added, as was carrying the B mark of a prefixed or long branch to the
  piece that ends it.
* **Sizes chosen here.** The field layout of the 62-bit word, the output
  buffer depth (`OB_DEPTH = 4`), the FIFO scan order and its control pins
  are this design's.
* **Debug freeze.** The debug chain keeps shadow copies of its signals,
  rather than blocking the live ones, and the set of signals is chosen
  here. See the section above.

## Parameters

| module              | parameter  | default | meaning                                   |
|---------------------|------------|---------|-------------------------------------------|
| `rappid_top`        | `IF_DEPTH` | 32      | input FIFO lines                          |
| `rappid_top`        | `OB_DEPTH` | 4       | output buffer words per row               |
| `decode_steer_unit` | `SEQ_W`    | 6       | line counter width; at least log2(IF_DEPTH)+1 |
| `tag_unit`          | `INIT_TAG` | 0       | holds the tag after reset (row 0, column 0 only) |
| `bist`              | `SEED`     | {11{16'hACE1}} | automaton start state              |

The array size (16 x 4) and the 7-byte piece limit are package constants.
The length decoder, the one-hot length lines and the seven tag lines all
depend on them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_length_decoder`    | 68 hand-worked encodings: ModR/M, SIB, displacements, immediates, 0F map, 16-bit operand and address forms, prefixes |
| `tb_tag_unit`          | the three events in different orders, every TagIn line and INJECT, the one-clock TagOut pulse, branch output, XBRdy holding the tag |
| `tb_byte_unit`         | loading, dropping unused bytes, InstRdy waiting on neighbours, preempt in and out, both split exchanges from both sides, branch flag |
| `tb_crossbar`          | alignment with wrap-around, zeroing past the length, flags |
| `tb_output_buffer`     | random traffic against a queue model, full and valid flags |
| `tb_input_fifo`        | serial and parallel loading, sixteen independent read streams, full at 32 lines, cyclic replay |
| `tb_bist`              | automaton, 0F injection and signature against a model |
| `tb_debug_freeze`      | freeze bits, sticky and live capture, scan order, random shift/capture traffic against a model |
| `tb_decode_steer_unit` | latency of 2 clocks and rate of 1 per clock, then twelve random programs with prefixes, long instructions and branches, columns fed out of step, consumer stalling |
| `tb_rappid_top`        | full-size design, end to end |

`tb_rappid_top` runs the full-size design in four steps:

* **A.** A 60-line random program is loaded serially while the unit runs,
  with the output buffers stalling. Every transfer is compared with a
  reference model.
* **B.** The single-line and multi-line throughput programs of the
  published evaluation are replayed in cyclic mode. These are X0..X8 (mixes
  of 1- and 2-byte instructions), I0 (2-byte with ModR/M), C34, C223, a
  14-line length 1..5 mix, an 18-line length 1..7 mix, and one instruction
  padded with 1-byte instructions. Each must reach one transfer per clock.
  The 1..7 mix is the exception: it must reach at least 0.9.
* **Debug.** X0 is replayed with TagArrived frozen. The scanned-out
  capture must name exactly the sixteen tag units the tag visits.
* **C.** The self-test runs, and the automaton's bytes must come back out
  intact.

It also counts each mechanism and fails if one never happened. The
mechanisms are output buffer stalls, INJECT, prefix splits, long splits,
unused bytes, preempts, row 3 to row 0 wraps, columns waiting for bytes,
FIFO replay, self-test words and frozen debug captures.

The reference model in `rappid_tb_pkg` builds programs from instruction
templates whose lengths are written out by hand. It does not reuse the RTL
decoder.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rappid_pkg.sv tb/rappid_tb_pkg.sv tb/tb_rappid_top.sv \
    --top-module tb_rappid_top -Mdir build
./build/Vtb_rappid_top
```

Testbenches that do not use the reference model need only
`rtl/rappid_pkg.sv` and their own file. Add `+verilator+seed+N` to vary the
random programs. Building takes about half a minute; the top-level test
itself runs in well under a second.

At the default sizes the design synthesises to about 10,000 generic cells
and 1,331 flip-flop bits. It also has 6,624 bits of memory arrays: the input
FIFO store and the four output buffers.
