# RAPPID-style instruction length decoder

IA-32 instructions are 1 to 15 bytes long. You only know an instruction's
length after you have looked at its opcode, its ModR/M and SIB bytes and any
prefixes. A front end that receives 16-byte cache lines therefore has to find
where each instruction starts before it can hand instructions on. A plain
approach decodes one instruction after the other, so each instruction waits
for the length of the one before it.

This design splits the work in two:

- **Speculative decode.** Every byte of the line is decoded at the same time,
  as if an instruction started there. Each byte column therefore always knows
  "if an instruction starts here, it is L bytes long".
- **Tag passing.** A single token, the *tag*, marks the column that really
  holds the start of the next instruction. When that column's length is
  known, and its following bytes have arrived, the column copies the
  instruction out and passes the tag straight to column `c+L`. Passing the tag
  is the only serial step, and it costs one clock per instruction whatever
  the instruction's length.

The columns are arranged in a torus of 16 byte columns by 4 rows. Each row has
its own steering switch and output buffer, so four instructions can be moving
out at once. The instructions still come out in program order.

The design follows RAPPID, a published asynchronous instruction length
decoder. RAPPID was a self-timed prototype chip, fabricated in a 0.25 µm
process, for the 32-bit Pentium II instruction set. This code is a
synthesizable, single-clock SystemVerilog model of that design. It
implements:

- the length decode;
- the torus;
- prefixes and long instructions;
- predicted branches;
- the input FIFO with its test modes;
- the debug bits with their scan chain;
- a built-in self-test.

## Array layout

```
              column 0   column 1  ...  column 15
 input FIFO   lane 0     lane 1         lane 15        32 lines x 11-bit bytes
 byte units   BU 0       BU 1           BU 15          latch + length decode
 row 0        TU 0,0     TU 0,1         TU 0,15  ----> steering switch 0 -> output buffer 0
 row 1        TU 1,0     ...                     ----> steering switch 1 -> output buffer 1
 row 2        ...                                ----> steering switch 2 -> output buffer 2
 row 3        ...                                ----> steering switch 3 -> output buffer 3
```

- A **byte unit (BU)** (`byte_unit`) holds one byte and decodes its length.
  There is one per column.
- A **tag unit (TU)** (`tag_unit`) sits at each row/column crossing, 64 in
  all.
- `decode_steer_unit` builds the array. `rappid_top` adds the input FIFO and
  the self-test.

### Tag wiring

When a TU at (row `r`, column `c`) sends the tag for an instruction of length
`L` (1..7), the tag goes to the TU at (row `r+1 mod 4`, column `c+L mod 16`).
Each length has its own wire: a TU has seven `TagOut` outputs and seven
`TagIn` inputs. Going down one row at every instruction means that
consecutive instructions use rows 0, 1, 2, 3, 0, ... So output buffer `r`
receives instructions `r`, `r+4`, `r+8`, ... A consumer that reads the buffers
in that same rotation gets program order back.

The horizontal wrap lets an instruction start near the end of one line and
finish in the next. As soon as a column's byte has been used, its FIFO lane
refills it with the byte from the next line.

Only one tag exists, so at most one TU in the whole array fires in a clock.
`decode_steer_unit` asserts this.

## Byte unit: byte control, length decoder, instruction ready

Each BU contains the parts below.

- **Byte control** (`byte_control`) takes bytes from the column's FIFO lane
  with a four-phase req/ack handshake.
  - A byte whose **U** ("used") bit is clear belongs to no instruction, for
    example bytes skipped by a taken branch. The byte control drops it and
    gives a one-clock `unused_pulse`.
  - A used byte is latched and `byte_rdy` rises. It stays high until the byte
    is consumed (`tag_ack`). Only then is the next byte fetched.
  - The byte control also counts lines modulo 4 (`seq`). The branch logic uses
    this count.
- **Length decoder** (`length_decoder`) is purely combinational. It looks at
  its own byte and the next three bytes, plus two flags saying whether an
  operand-size or address-size prefix applies. It gives:
  - the length as a number and as a one-hot code for 1..7;
  - `is_long` for lengths 8..11;
  - `is_prefix` if the byte is itself a prefix;
  - `rare` for opcodes of the slow class. The byte unit uses the length of
    such an opcode one clock after latching it, instead of at once.

  It covers the one-byte and two-byte (`0F xx`) opcode maps of 32-bit mode,
  including the 16-bit and 32-bit ModR/M forms, SIB, displacements and the
  immediates of groups such as `F6/F7`. Segment, lock and repeat prefixes
  count as prefixes; they do not change the length.
- **Instruction ready** (`instr_ready`) raises `inst_rdy` when two things
  are true: the length is known, and the `L-1` columns downstream have their
  bytes latched. When the column's TU fires, it sends a `preempt` to those
  columns. This tells them that their bytes were used as part of this
  instruction.
- **Ack generator** (`ack_gen`) raises `tag_ack`, which releases the byte
  latch, in two cases: when a TU of this column fires, or when any of the six
  upstream columns preempts this column.

A BU may decode speculatively before the tag arrives, and almost all of its
decodes are thrown away. The top-level test counts these early decodes.

## Tag unit

A TU fires in the clock in which all three of the following are true:

- it holds the tag (`tag_arrived`);
- its column's `inst_rdy` is high;
- its row's steering switch has room (`ss_rdy`).

The three may become true in any order. When the TU fires:

- its instruction is written into the row's output buffer;
- `TagOut_L` pulses for one clock and sets `tag_arrived` in the receiving TU
  on the next edge;
- its own `tag_arrived` clears.

The tag lines are pulses without an acknowledge. Nothing else can drive a TU
at that moment, because only one tag exists.

For a predicted-taken branch, the TU does not use `TagOut_L`. It pulses
`br_tag_out` into the next row's branch logic instead (see below).

## Prefixes and long instructions

The fast path handles one instruction of up to 7 bytes per tag step. Two
slower protocols handle the rest. Both use request/acknowledge wires between
byte units.

- **Prefix.** A prefix byte (`66`, `67`, segment, `F0`, `F2`, `F3`) that
  holds the tag sends a request to column `c+1`. The request carries
  "operand size is 16", "address size is 16" and "branch". The receiving BU
  keeps these flags and decodes its own byte with them. Once the receiver
  acknowledges, the prefix leaves as a one-byte output word marked `prefix`,
  and the tag moves on by one column. Several prefixes in a row chain
  naturally.
- **Long instruction (8..11 bytes).** The column holding the first byte waits
  until it has the tag and bytes `c+1..c+3` are latched. Then it sends
  column `c+4` a request carrying the length of the tail (`L-4`, which is 4..7).
  Column `c+4` takes that as its own length and acknowledges. The head then
  fires as a 4-byte word marked `head`, and the tag goes to column `c+4` in the
  next row. That column fires the rest as a word marked `tail`. So a long
  instruction costs two output words, in two consecutive rows.

A request is held until the receiving byte is consumed. A B (branch) mark on
a prefix or on a long head travels with the request, so the final part of
the instruction is the part that acts as the branch.

## Branches: the U, B and T bits

Each FIFO byte carries three bits that the instruction fetch sets from its
branch prediction:

| Bit | Meaning |
|-----|---------|
| U | the byte is used |
| B | first byte of a predicted-taken branch |
| T | first byte of a branch target |

When a branch instruction fires, its TU sends the tag to the branch logic of
the next row (`branch_ctrl`) instead of to `c+L`. That logic sets the row's
*inject* flag. It also records which line the target must be in: the line
after the branch, counted with the 2-bit line numbers of the byte controls.
Once a latched byte with T set appears in that line, the logic gives that
column's TU the tag and clears the flag. Bytes between the branch and the
target must have U clear. They are dropped as they arrive.

After reset, row 0's inject flag is set. The first line must therefore
mark its first instruction with T.

## Steering switches and output words

Each row's steering switch (`steering_switch`) is a crossbar. It takes the
bytes of the firing column and the columns after it, wrapping around, and
packs them into one 62-bit word (`rappid_pkg::chan_t`):

| bits | field |
|------|-------|
| 61:6 | seven byte lanes; byte 0 of the instruction is in bits 7:0 of the lane field |
| 5:3  | number of valid bytes (1..7) |
| 2    | head of a long instruction |
| 1    | tail of a long instruction |
| 0    | prefix |

Each output buffer (`output_buffer`) is a 4-deep FIFO with a `valid`/`pop`
read side. Its free space is the row's `ss_rdy`. A full buffer stops the tag
when the tag reaches that row, and the stall spreads backwards through the
array.

## Input FIFO

The input FIFO (`input_fifo`) holds 32 lines. It is built as 16 independent
byte lanes (`byte_fifo`), each 32 entries of 11 bits `{U,B,T,data}`. A
column therefore refills as soon as its own byte is used, without waiting
for the rest of its line.

- **Loading.**
  - Shift 176 bits into `scan_in` with `scan_en` high, most significant bit
    first. Byte `k` of the line is bits `11k+10 : 11k`.
  - Then pulse `load_line` while `load_ready` is high.
  - The self-test loads whole lines through a parallel port instead.
- **Modes** (`fifo_mode`):

  | Mode | Behaviour |
  |------|-----------|
  | `FIFO_NORMAL` | bytes are consumed |
  | `FIFO_RECIRC` | every consumed byte is written back at the tail, so the loaded lines repeat forever |
  | `FIFO_FREEZE` | the head line is offered again and again |

  The last two are test modes. They keep the decoder fed at full rate
  without an external memory.
- `run` gates the lanes' requests, so the FIFO can be filled before decoding
  starts.

## Debug bits and the debug scan chain

Eight debug bits live in a serial scan chain (`debug_scan`). Each bit, when
low, stops some state from being cleared, so the array runs until it cannot
go on and then halts with its state held:

- Bits 0..3 freeze TU rows 0..3. Each TU in a frozen row may still fire
  once. It then keeps its state and remembers a tag that arrives meanwhile.
- Bits 4..7 freeze the byte latches of columns 0-3, 4-7, 8-11 and 12-15.
  A byte consumed while its bit is low drops `byte_rdy`, but its latch is
  not released. No new byte is fetched until the bit is high again.

When a bit is raised again, operation continues where it stopped. No
instruction is lost or repeated.

Using the chain from the top (`dbg_shift`, `dbg_si`, `dbg_so`,
`dbg_capture`, `dbg_update`):

- **Setting the bits.** Shift in 154 bits with `dbg_shift` high, the eight
  debug bits first (bit 7 first), then pulse `dbg_update`. Shifting alone
  does not change the bits in use.
- **Reading the state.** Pulse `dbg_capture`, then shift 154 bits out of
  `dbg_so`. The chain holds, from the first bit out:
  - the eight debug bits;
  - the 62-bit self-test signature;
  - the four inject flags;
  - the 16 `byte_rdy` flags;
  - for each of the 64 TUs (row 3 column 15 first), whether it holds the
    tag.

After reset all debug bits are high.

## Built-in self-test

`bist` attaches to the outside of the core and changes none of its logic.

- **Pattern generator.** A 128-cell hybrid rule-90/150 cellular automaton
  produces one line of 16 random bytes per step. All bytes are marked used,
  and the very first byte has T set. Any byte string is a valid instruction
  stream, so random data exercises prefixes, long forms and every length.
  Two-byte opcodes would be rare in random data. So any byte whose top four
  generator cells are zero is replaced by the `0F` escape, and the byte
  after it becomes a second opcode byte.
- **Signature analyzer.** A 62-cell automaton of the same kind XORs in every
  output word.

With `bist_en` high, the top does three things:

- it writes a generated line into the FIFO whenever there is room (`run`
  high, mode `FIFO_NORMAL`);
- it reads the four output buffers itself, in rotation, and ignores
  `out_pop`;
- it feeds each word it reads to the signature analyzer.

After a fixed number of clocks, read `bist_signature`, either from its port
or through the debug chain. Compare it with the value from a known-good
simulation.

## How the self-timed original maps onto one clock

The original has no clock. Each block runs its own handshake cycle, and pulses
are a few gate delays long. This model uses these rules:

- every handshake phase and every pulse takes one clock;
- a TU fires in the same clock in which its last condition becomes true;
- the tag reaches the next TU on the next edge;
- a FIFO lane moves one four-phase byte in about four clocks. Bytes for later
  columns are fetched while earlier instructions are still being decoded,
  so this cost is usually hidden.

The result is at most one output word per clock. The decoder reaches that
rate on all the single-line benchmarks below.

Rates are in clocks. The self-timed chip's measured speed (instructions per
nanosecond) and power are analog properties that this model does not
capture.

## Departures from the original design

- **Timing.** Single clock instead of self-timed circuits. The original
  decodes common opcodes in fast domino logic and rare ones in a slower PLA.
  Here one flat decoder serves all opcodes. A short list of rare opcodes
  (the `0F` map, far call/jump, `ENTER`, `RET imm16`, `AAM`/`AAD`,
  `BOUND`) has its length used one clock later, to model the slow path.
  Which opcodes are slow in the original is not known.
- **Circuit level.** The FIFO stages are ring buffers, not micropipeline
  cells. The C-element is a flip-flop model. Pulses are one clock wide.
- **Encodings of this design's own.** The original leaves these open, so
  this design chose them:
  - the prefix and long-instruction request fields;
  - the output word layout;
  - the 2-bit line counter that checks a branch target lies in the next
    line;
  - the choice of row 0 for the first inject;
  - the output buffer depth of 4.
- **Debug bits.** The original has eight debug bits but does not say which
  state each one blocks. The assignment to TU rows and column groups is
  this design's own. The scanned-out state is a chosen subset of flags.
- **Self-test.**
  - Not done: the original tuned the pattern generator to the terms of its
    decode PLA. The two-byte-opcode modification is done here with a simple
    rule of this design's own.
  - The signature sees only the output words. Internal states are read
    through the debug chain instead.
  - The signature is read through the debug chain, which captures it. The
    original shared the same flops between the two chains; here the
    signature is copied into the chain instead.
- **Opcode tables.** They cover the 32-bit IA-32 one-byte and `0F` maps as
  commonly documented. Lengths of some rarely used encodings may differ from
  a particular processor's behaviour. A string of prefixes is handled one
  byte at a time, each prefix being its own output word. The operand- and
  address-size flags are passed along the chain, so they still reach the
  instruction after several prefixes.

## Files

| file | contents |
|---|---|
| `rtl/rappid_pkg.sv` | sizes, byte and word types, FIFO modes |
| `rtl/rappid_top.sv` | input FIFO + decoder + self-test |
| `rtl/decode_steer_unit.sv` | the 16 x 4 torus |
| `rtl/byte_unit.sv` | one column: latch, byte control, length decoder, instruction ready, ack generator, prefix/long protocol |
| `rtl/byte_control.sv`, `rtl/length_decoder.sv`, `rtl/instr_ready.sv`, `rtl/ack_gen.sv` | parts of a byte unit |
| `rtl/tag_unit.sv` | one TU |
| `rtl/branch_ctrl.sv` | per-row inject flag for branch targets |
| `rtl/steering_switch.sv`, `rtl/output_buffer.sv` | per-row output path |
| `rtl/input_fifo.sv`, `rtl/byte_fifo.sv` | input FIFO and one byte lane |
| `rtl/c_element.sv` | Muller C-element |
| `rtl/bist.sv` | self-test pattern generator and signature analyzer |
| `rtl/debug_scan.sv` | debug scan chain: debug bits in, captured state out |
| `tb/tb_<module>.sv` | self-checking unit test of each module |
| `tb/rappid_stream.svh` | random IA-32 instruction-stream generator with expected output words |
| `tb/tb_rappid_top.sv` | end-to-end test at full size |
| `tb/tb_workloads.sv` | benchmark lines (see below) |

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
    rtl/rappid_pkg.sv tb/tb_rappid_top.sv --top-module tb_rappid_top
./obj_dir/Vtb_rappid_top
```

To run another test, replace `tb_rappid_top` with any `tb/tb_*.sv`.

### What the end-to-end test covers

`tb_rappid_top` runs the top at its default sizes in four parts:

1. **Normal mode.** A random program of about 400 instructions, with
   branches, prefixes, long instructions and unused bytes. A slow consumer
   makes the output buffers fill. Debug bits are loaded through the scan
   chain:
   - Row 1 is frozen for a while. The captured state is shifted out and
     compared with the core's flags, and it must show exactly one tag.
   - The byte latches of columns 8..11 are frozen for a while.
2. **Recirculate mode.** Two lines are repeated four times.
3. **Freeze mode.** One line is repeated.
4. **Self-test.** 600 words are read. The test checks that their bytes, in
   order, are exactly the generated stream.

Every output word is compared with the expected word. The test also counts
how often each mechanism happened, and fails if any never did. The
mechanisms are:

- unused-byte drop, branch, branch target, prefix, long head and tail;
- torus wrap, output stall, preempt, speculative decode, slow decode;
- row freeze, column freeze, recirculation, FIFO freeze, self-test.

The unit testbenches each test one module against a model. Every one of them
has been shown to fail when its module is broken in a way that matters.

### Benchmark lines

`tb_workloads` runs the standard benchmark lines of the original chip. The
opcodes are chosen by the testbench.

| test | content | mode | result |
|---|---|---|---|
| X0..X8 | `i` two-byte and `16-2i` one-byte instructions in one line | frozen FIFO | 1.00 word/clock |
| I0 | eight two-byte ModR/M instructions | frozen FIFO | 1.00 |
| C34 | four 3-byte and one 4-byte instruction | frozen FIFO | 1.00 |
| C223 | two 2-byte and four 3-byte instructions | frozen FIFO | 1.00 |
| Mix0 | 14 lines of random lengths 1..5 | recirculated | 1.00 |
| Mix1 | 18 lines of random lengths 1..7 | recirculated | 0.96 |

The original power tests are integer and floating-point loop bodies of 20
to 26 lines. They would fit in the 32-line FIFO, but their programs are not
published, so they are not included.
