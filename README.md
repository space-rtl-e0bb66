# SPACE associative processor array in SystemVerilog

SPACE is a content-addressable parallel processor (CAPP). Memory words are
never addressed by number. Every word is compared with a search key at once,
and each word holds one flag bit that records the result. Later instructions
act on the flagged words, on the words just before them, or on the words just
after them. Writes change only chosen bit columns of the selected words, all
in one step. From these two primitives, parallel search and parallel masked
write, a controller builds bit-serial arithmetic and logic that runs in every
word at once. That makes the array a very wide SIMD machine for searching and
updating large symbolic data structures.

This RTL models the whole hierarchy of the PADMAVATI machine's associative
array:

| level | module | contents | words |
|---|---|---|---|
| chip | `space_chip` | 148 words x 36 bits, flag chain, mask and write-enable registers, priority tree | 148 |
| module | `space_module` | 12 chips and one external priority stage; behaves as one chip | 1776 |
| board | `space_board` | 6 modules, any subset selected per instruction, bus interface | 10656 |
| system | `padmavati_space` (top) | 16 boards, one per processor node, each with its own bus | 170496 |

## Programming model

Each word is 36 bits:

| bits | field |
|---|---|
| 31:0 | four data bytes D0-D31 |
| 34:32 | three tag bits |
| 35 | EM, Exact (1) or Masked (0) |

There is one flag `f[w]` per word. Two 36-bit control registers are loaded by
instructions and shape later searches and writes:

- The **Mask Register `mr`**: a search compares only bit columns where `mr` is 1.
  The other columns are don't cares.
- The **Write-Enable Register `wr`**: a write changes only bit columns where `wr`
  is 1.

Keeping the mask and write-enable in registers means each instruction carries
only one 36-bit operand.

### Instruction word

An instruction is 7 bits: `{CD, RW, TS, SA, AOF, PNF, NF}`, MSB first.

| mnemonic | CD RW TS SA | operation |
|---|---|---|
| `wwr` | 1 0 0 0 | load `wr` |
| `wmr` | 1 0 0 1 | load `mr` |
| `wbr` | 1 0 1 x | load both with the same value |
| `rwr` | 1 1 x 0 | read `wr` |
| `rmr` | 1 1 x 1 | read `mr` |
| `wal` | 0 0 1 0 | write all selected words |
| `wfi` | 0 0 1 1 | write the first selected word |
| `rfi` | 0 1 1 x | read the first selected word |
| `rst` | 0 1 0 x | status: is any word selected? |
| `smo` | 0 0 0 0 | search, matches only |
| `smf` | 0 0 0 1 | search, first match and every word after it |

The select mode `{AOF, PNF}` picks which flag selects word `w`:

| AOF PNF | syntax | word w is selected when |
|---|---|---|
| 0 0 | `*` | always |
| 0 1 | `@` | `f[w]` is set (the word itself is flagged) |
| 1 0 | `-` | `f[w+1]` is set (the word before a flagged word) |
| 1 1 | `+` | `f[w-1]` is set (the word after a flagged word) |

`f[-1]` and `f[N]` at the ends of the array read as 0.

### What each instruction does to the flags

Searches and the other instructions update flags differently, and this
difference is the heart of the model.

- **`wal`, `wfi`, `rfi`**: every active word, meaning the selected words (or the
  first selected word), gets its flag set to NF. With `wal @ NF=0`, flags act
  as a work list that the write consumes.
- **`smo`, `smf` with NF=1**: the hits get their flags set and every other flag is
  cleared.
- **`smo`, `smf` with NF=0**: the hits get their flags cleared and every other
  flag is left alone.

So two searches in a row AND their conditions together. For `smf`, a hit is
the first selected match and every word after it, whether or not that word
was selected. `smf` is used to flag a run of words, from a header word up to a
trailer word.

`rfi` returns all ones when no word is selected. `rst` changes no flag. The
control-register instructions also leave the flags alone.

### Matching and stored don't cares

Only the columns where `mr` is 1 are compared. How the word answers depends on
its EM bit:

- **Exact word (EM=1)**: every masked bit must match.
- **Masked word (EM=0)**: the top bit of each data byte (bits 7, 15, 23, 31)
  marks that byte as a stored don't care. A byte is a don't care when its top
  bit is 1. Don't-care bytes always match. The other bytes, the tag bits and EM
  must match as usual.

With stored don't cares, a table entry can hold a wildcard byte, such as an
unbound variable in a stored clause head. `capp_array` does this compare for
every word in parallel.

## Cascading: one logical array from many chips

A large array must behave exactly like one long chip. Three mechanisms make
this work, and each sits at the chip pins.

**Priority resolution (REQ/PRQ).** Each chip has a priority tree over its 148
words. `priority_tree` is a two-level tree with a radix of 12. The tree gives
the one-hot first request and, for every word, whether any earlier word
requests.

- The chip raises **REQ** when it holds a candidate. For `smf`, a candidate is a
  selected match. For `rwr` and `rmr`, the chip always raises REQ. For every
  other instruction, a candidate is a selected word.
- An external tree of the same kind turns the REQs of all chips into each
  chip's **PRQ**: "some earlier chip requests".
- A chip with PRQ high does not answer an `rfi`, `rwr` or `rmr`, and does not
  take a `wfi`.
- For `smf`, PRQ makes every word of the chip a hit, because the first match was
  in an earlier chip.

`space_module` adds one 12-input stage and `space_board` one 6-input stage. So
"first" and "following" span the whole board.

**Flag chain (PRF/NXF).** Select modes `+` and `-` need the flag of the word
just outside the chip. PRF and NXF are tri-state pins in real hardware. Here
each pin is split into `*_in`, `*_out` and `*_oe`, and the select mode sets
the direction:

- In `+` mode, a chip drives its last flag on NXF and reads the previous chip's
  last flag on PRF.
- In `-` mode, a chip drives its first flag on PRF and reads the next chip's
  first flag on NXF.

A pin that no one drives reads 0.

**Chip select and the read bus.** A chip with `cs` low does nothing and drives
nothing: no data, no REQ and no flag. This splits a large array into
independent banks. Because a deselected chip breaks the flag chain, the
selected chips (and, on a board, the selected modules) should be adjacent. The
36-bit read bus is modelled as a pulled-up wired bus:

- A chip that does not drive the bus outputs all ones.
- The module and the board AND their chips' outputs together.
- When no word is selected, the bus therefore reads all ones, which is the
  specified "nothing selected" value of `rfi`.

For `rst`, each chip has a `stat` output. Modules and the board OR these
together, and the board returns the result in bit 0 of the read data.

## Timing

Everything runs on one clock. The chip executes one instruction per rising
edge while `cs` is high; this edge stands in for the chip's CE strobe. Flags,
words and registers update at that edge, and a read result is registered at
the same edge. The result is on `dout`/`doe`/`stat` for exactly the next cycle.

`board_bus_if` is the node processor's memory-mapped view of a board. The
instruction and a 6-bit module subset travel as the "address"; the operand
travels as the data. The bus uses a valid/ready handshake:

- **Accepted request**: a request accepted at cycle *t* executes in the array
  at the end of cycle *t+1*.
- **Writes, searches and register loads**: these are pipelined, and one is
  accepted every cycle.
- **Reads** (`rfi`, `rst`, `rwr`, `rmr`, the instructions with the RW bit set):
  `bus_ready` is low in cycle *t+1*. The data comes back with `bus_rvalid` in
  cycle *t+2*, when the next request can already be accepted.

A read therefore costs two bus cycles and anything else one. The original
board had a similar ratio of 480 ns per read to 320 ns per other instruction.
An assertion checks that a stalled request is held stable.

## Programs: bit-serial arithmetic

The routines in `tb/tb_space_workloads.sv` show how arithmetic is built from
searches and writes. They use fields A = bits 15:0, B = 31:16, carry C = bit
34 and tag = 33:32 in Exact words. They touch only words whose tag is 01.

One trick makes the routines short. A single `wbr` loads the same value into
both `mr` and `wr`: the tag columns plus every column the step reads or
writes. Each write then also rewrites the tag and input columns, but only
with the values that the search just matched, so nothing changes.

Take the 1-bit full add of B = A + B + C. It needs four search/write pairs,
one per input pattern that changes B or C:

| search (A B C) | write (B C) |
|---|---|
| 0 0 1 | 1 0 |
| 0 1 1 | 0 1 |
| 1 1 0 | 0 1 |
| 1 0 0 | 1 0 |

The pairs run in that order, so that a word changed by one pair never matches
a later pair. The routine is one `wbr` plus 4 x (`smo * s`; `wal @ c`), which
is 9 instructions.

The table compares the instruction counts that the testbench checks with the
published cycle counts of the original machine:

| routine | instructions here | published |
|---|---|---|
| 36-bit search | 1 | 1 |
| 1b AND, vector-vector | 3 | 3 |
| 1b OR, vector-vector | 3 | 3 |
| 1b XOR, vector-vector | 8 (uses the carry column as a temporary marker) | 8 |
| 1b half add, vector-vector | 8 (3 to clear C + 5) | 8 |
| 1b full add, scalar-vector | 5 | 5 |
| 1b full add, vector-vector | 9 | 9 |
| 16b add, scalar-vector | 83 (3 to clear C + 16 x 5) | 83 |
| 16b add, vector-vector | 144 (16 x 9) with the carry already clear; 147 with a 3-instruction carry clear | 144 |
| 16b max / min | 48 (16 x `wmr`, `smo`, `rst`) | 48 |
| 16b <, scalar-vector | 52 (4 to set up + 16 x 3) | 68 |
| 16b < and =, vector-vector | 79 for 15-bit operands (4 + 15 x 5); 84 for 16 bits | 84 |
| 8b x 8b multiply, vector-vector | 604 (4 to clear + 8 x (8 x 9 + 3)) | 539 |

The max and min routine finds the answer one bit at a time, from the top bit
down. For each bit it searches for words that match the prefix found so far
with the next bit set, then asks `rst` whether any such word exists. The
16-bit vector-vector add matches the published count when the carry column
starts at zero. The full-size test runs it that way, in all 170496 words at
once.

The compare routines keep two state bits per word: "equal so far" and
"less". They start at 1 and 0 and walk from the top bit down. In the
scalar-vector form the scalar bit picks the search key, so each bit costs one
`wbr` and one search/write pair. That is 52 instructions, fewer than the
published 68. The vector-vector form needs two pairs per bit, which gives the
published 84 for 16 bits. The test runs it on 15-bit operands because its
word layout has no room for two 16-bit operands and both state bits.

The multiply clears a 16-bit product and then, for each multiplier bit, adds
the multiplicand into the product with a full add that also matches the
multiplier bit. The final carry moves into the next product bit, which is
still zero. This takes 604 instructions, 65 more than the published 539. The
32-bit scalar-vector equality with its result stored in a column was not
written; the equality search on its own is the one-instruction search.

A machine-wide rate is the word count times the instruction rate, divided by
the instructions per routine. At the 1250 ns average instruction time of the
original node processor, 170496 words give 1.36 x 10^11 36-bit searches per
second.

## Modules

All files are in `rtl/`, one module or package per file.

| file | what it is |
|---|---|
| `space_pkg.sv` | word type, opcode values, decoded-instruction struct, select-mode enum |
| `space_decoder.sv` | 7-bit instruction to operation, select mode and NF |
| `ctrl_regs.sv` | `mr` and `wr` |
| `capp_array.sv` | word storage, parallel masked compare with stored don't cares, column-masked write |
| `flag_chain.sv` | flags, select-mode multiplexer, flag load |
| `priority_tree.sv` | two-level high-radix priority resolution (also used as the module and board stages) |
| `space_chip.sv` | the chip: all of the above plus the flag-update rules, read mux and cascade pins |
| `space_module.sv` | 12 chips, external priority stage, flag-chain links, wired read bus |
| `board_bus_if.sv` | the board's bus handshake and issue register |
| `space_board.sv` | 6 modules behind `board_bus_if`, module-level priority stage |
| `padmavati_space.sv` | 16 boards side by side (top) |

All sizes are parameters whose defaults are the machine's real numbers:

| parameter | default |
|---|---|
| `WORDS` | 148 |
| `CHIPS` | 12 |
| `MODS` | 6 |
| `NODES` | 16 |
| `RADIX` | 12 |

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Testbenches that use the reference model need
`tb/space_ref_pkg.sv`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  tb/space_ref_pkg.sv rtl/space_pkg.sv rtl/*.sv tb/tb_padmavati_space.sv \
  --top-module tb_padmavati_space -o sim && ./obj_dir/sim
```

If your shell expands `rtl/*.sv` so that `space_pkg.sv` comes after its users,
list the package first, as above. Duplicate listings are only warned about.

| testbench | what it checks |
|---|---|
| `tb_space_decoder` | all 128 instruction words against the opcode and select-mode tables |
| `tb_ctrl_regs`, `tb_flag_chain`, `tb_priority_tree`, `tb_capp_array` | each unit against a direct model |
| `tb_space_chip` | random programs against the reference model; directed PRQ, PRF, NXF, REQ and CS checks |
| `tb_space_module` | a 3-chip module as one array; crossings of chip boundaries are counted |
| `tb_board_bus_if`, `tb_space_board` | handshake timing; random programs with random module subsets |
| `tb_padmavati_space` | end to end, two scaled nodes running at once (see below) |
| `tb_padmavati_full` | the full 170496-word array at default parameters: a search-and-read operation and a 16-bit add in every word, on all 16 nodes |
| `tb_space_workloads` | the arithmetic routines above, with results and instruction counts |

`tb_padmavati_space` counts how often each mechanism occurs and fails if any
never occurs:

- every opcode and every select mode
- searches with NF=0 that clear flags
- stored don't-care hits
- flag-chain transfers and `smf` runs across chips
- priority going to a later chip
- empty reads
- module subsets
- read stalls
- pipelined writes

The reference model, `space_ref_pkg`, works at the instruction level. It was
written from the instruction rules, not from the RTL.

The full-size build takes a few minutes and about 2.5 GB of memory in
Verilator. The random tests use scaled parameters so that they run in
seconds.

## Where this model departs from the original, or fills gaps

These points are this design's own choices where the original description is
silent:

- **Instruction word**: the order of the fields inside the 7-bit word.
- **Stored don't cares**: a byte's top bit set to 1 means "don't care" (the
  polarity).
- **Tag bits**: "the tag bits" that must match are taken to be D32-D34 plus EM.
- **Clocking**: a synchronous clock with a registered read output, one cycle
  after execution, in place of the CE/PCH strobes of the full-custom chip. There
  is no precharge logic.
- **Reset**: `rst_n` clears the flags and sets `mr` and `wr` to all ones. The
  word storage has no reset, so clear it with `wal *` after power-up.
- **Priority tree**: a two-level tree of radix 12. The original says only that
  the tree is high-radix.
- **Status bit**: `rst` returns its bit on a separate chip output, and in bit 0
  of the board read data.
- **Bus interface**: a synchronous valid/ready bus that carries all 36 data bits
  in one transfer. The original node bus was a 32-bit asynchronous bus, and
  how 36-bit values crossed it is not recorded. The address layout is also
  this design's own.
- **Chip pins**: the tri-state data, PRF and NXF pins are split into
  input/output/enable signals. An undriven line reads as all ones on the data
  bus and as 0 on a flag line.
- **Chain ends**: the board's flag chain reads 0 at both ends.
- **Module subsets**: a deselected module breaks the flag chain like a
  deselected chip, but priority passes across it.

These parts are outside the RTL:

- the node processors that sequence the instructions
- the switch that connects the nodes
- the host computer
- the packaging: tape-automated bonding, module PCBs and bus buffers

Each board's bus is a port of the top, where a node processor would connect.
