# A coarse-grained reconfigurable array with a compressible configuration cache

A coarse-grained reconfigurable array (CGRA) reconfigures every processing
element (PE) on every clock. Each PE reads a new context word from its
configuration cache on every clock, and those SRAM reads are a large part of the
array's power. Most context words use only a few of their fields: an addition
with no shift, no saturation and no register-file write leaves a good part of
the 32-bit word unused.

This design stores each PE's context memory as two banks. **CE1** holds the
upper 18 bits of a word and **CE2** the lower 14 bits. When a word was loaded,
it was checked for whether its fields fit into 18 bits. If they fit, the word
is stored in *compressed* form in CE1 alone, and its **CMP** bit is set. At run
time CE1 is always read. CE2 is read only for words with CMP=0, so it stays
idle (no read, no output toggling) for every compressed word. A small set of
multiplexers behind the banks moves the fields back to where the PE expects
them. The array itself behaves exactly as it would with plain 32-bit contexts,
and it takes exactly the same number of cycles.

The RTL is SystemVerilog (IEEE 1800-2017). It lints cleanly enough to pass
Verilator `-Wall`, with warnings only (see below), and it elaborates in
yosys/slang.

## Block structure

```
                  host load ports                    host start / status
                        |                                   |
        +---------------v-----------------------------------v--------+
        | config_cache                                               |
        |   context_evaluator (load path: compress if it fits)       |
        |   cache_control_unit (address sequencing, CMP table)       |
        |   per PE:  cache_element CE1 (18b) --+                     |
        |            cache_element CE2 (14b) --+-> context_decoder --+--> pe_ctrl[40]
        +------------------------------------------------------------+
                                                        |
        frame_buffer --bus_a/bus_b per row--> pe_array (8 x 5 pe) --east column--> frame_buffer
```

| File | What it is |
|---|---|
| `rtl/dcca_pkg.sv` | field widths and positions, opcodes, operand sources, the decoded-context struct `pe_ctrl_t` |
| `rtl/ctrl_block.sv` | derives the MUX_B and PRED enables from ALU_OP |
| `rtl/context_evaluator.sv` | decides compressibility and builds the CE1/CE2 contents |
| `rtl/context_decoder.sv` | field-position multiplexers from CE1/CE2 to the PE |
| `rtl/cache_element.sv` | one context-memory bank with chip select |
| `rtl/cache_control_unit.sv` | address sequencer and CMP table |
| `rtl/config_cache.sv` | the whole configuration cache |
| `rtl/pe.sv` | processing element |
| `rtl/pe_array.sv` | 8x5 mesh of PEs |
| `rtl/frame_buffer.sv` | operand/result buffer |
| `rtl/dcca_cgra_top.sv` | top level |

## The context word

The fields fall into three groups:

* **Necessary fields** are present in every word: ALU_OP and MUX_A.
* **Supplementary fields** are used by some operations only. MUX_B and PRED are
  *ALU-dependent*: ALU_OP alone tells whether they are used. SAT, SHIFT and
  REG_FILE are *ALU-independent*: each has a 1-bit enable flag. The three flags
  (SAT_EN, SHIFT_EN, WDB_EN) are stored next to ALU_OP, so the enables of every
  supplementary field are always in CE1.
* **Unnecessary fields** are unrelated to PE operation. Here this is a 5-bit
  reserved field that compression drops.

Uncompressed layout (word bit numbers):

| Bits | Field | Width | Group |
|---|---|---|---|
| 31:27 | ALU_OP | 5 | necessary |
| 26 | SAT_EN | 1 | flag, merged with ALU_OP |
| 25 | SHIFT_EN | 1 | flag, merged with ALU_OP |
| 24 | WDB_EN (register-file write) | 1 | flag, merged with ALU_OP |
| 23:20 | MUX_A | 4 | necessary |
| 19:16 | MUX_B | 4 | supplementary, used when ALU_OP[4]=1 |
| 15:14 | PRED | 2 | supplementary, used when ALU_OP[3:2]=11 |
| 13:12 | SAT | 2 | supplementary (default position, CE2) |
| 11:7 | SHIFT | 5 | supplementary (default position, CE2) |
| 6:5 | REG_FILE | 2 | supplementary (default position, CE2) |
| 4:0 | reserved | 5 | unnecessary |

The compressed width is 18 bits. The longest combination it has to hold is
ALU_OP+flags (8), MUX_A (4), MUX_B (4) and PRED (2). Bits 31:20 of the word
become bits 17:6 of the compressed word. The 6-bit *supplementary zone* [5:0]
holds the enabled supplementary fields:

| Field | Position in compressed word | Note |
|---|---|---|
| MUX_B | [5:2] | same place as uncompressed |
| PRED | [1:0] | same place as uncompressed |
| SAT | [1:0] | second position, shared with PRED |
| SHIFT | [5:1] | second position, one-operand operations only |
| REG_FILE | [3:2] | second position, needs MUX_B and SHIFT unused |

SAT, SHIFT and REG_FILE therefore have two positions each. Which one is valid
is selected by CMP.

**Compression rule.** A word is compressible when no two of its enabled
supplementary fields overlap in the zone. These pairs cannot be compressed
together:

* MUX_B with SHIFT, or MUX_B with REG_FILE
* PRED with SAT, or PRED with SHIFT
* SAT with SHIFT
* SHIFT with REG_FILE

Every other combination fits. Examples that fit:

* a two-operand operation with saturation
* a two-operand predicated operation
* a one-operand operation with a shift
* a one-operand operation with saturation and a register-file write

A two-operand operation with a shift does not fit, and neither does a
predicated operation with saturation.

Disabled fields are forced to zero at the decoder output, so whatever a
compressed word holds in a position that is shared never reaches the PE.

## The configuration cache and its timing

* **Loading.** The host writes uncompressed 32-bit words, one per clock
  (`cfg_we`, PE number, address). `context_evaluator` sits on this path, so
  the host needs no knowledge of the format. Each load writes:
  * CE1: the compressed word, or for an uncompressed word its upper 18 bits
  * CE2: the lower 14 bits, written only for uncompressed words
  * the CMP table in `cache_control_unit`: one bit per PE and address
* **Running.** On `start`, the cache control unit issues addresses
  `0..ctx_len-1`, one per clock and with no gaps, and repeats them
  `iter_count` times. All 40 PEs share the address.
  * In the fetch cycle *t*, the CMP bits of that address are read
    combinationally from the table.
  * CE1 of every PE is selected, and CE2 only where CMP=0.
  * Banks have a one-clock synchronous read, so in cycle *t+1* the decoders
    present `pe_ctrl`, and the PEs execute and register their results at the
    end of *t+1*.
  * After the last context of an iteration, in cycle *t+2*, the outputs of the
    east column are written to the result bank of the frame buffer.
  * `done` pulses with that last write. A run of L contexts and I iterations
    takes L·I+2 clocks from `start` to `done`.
* **Rules.** Assertions in `cache_control_unit` flag a kernel longer than the
  context depth and a context load while a kernel runs.
* **Power hook.** `ce1_cs`/`ce2_cs` are brought out at the top so that bank
  activity can be counted. A deselected bank keeps its previous output.

## The processing element

The PE has a 16-bit datapath.

**Operands.** MUX_A and MUX_B select from these sources (4-bit codes):

| Code | Source |
|---|---|
| 0–3 | register-file entries 0–3 |
| 4, 5, 6, 7 | north, south, east and west neighbour (zero off the array edge) |
| 8 | the PE's own output register |
| 9, 10 | row bus A, row bus B |
| 11 | constant 0 |
| 12 | constant 1 |
| 13–15 | read as zero |

**Datapath.** The result goes through three stages:

1. The ALU/multiplier produces a 32-bit signed result.
2. SHIFT (`shift[4]`=1 right arithmetic, `shift[3:0]` = amount) shifts it.
3. SAT clamps it to one of four ranges: 0 = s8, 1 = u8, 2 = s16, 3 = u16.
   Without SAT the low 16 bits are kept.

The result goes to the output register and, when WDB_EN is set, to register
file entry REG_FILE as well.

**Operations.** ALU_OP[4] marks two-operand operations. ALU_OP[3:2]=11 marks
predicated ones.

| Code | Op | Code | Op |
|---|---|---|---|
| 00000 | PASS A | 10000 | ADD |
| 00001 | NOT | 10001 | SUB |
| 00010 | NEG | 10010 | MUL |
| 00011 | ABS | 10011 | AND |
| 00100 | NOP (hold) | 10100 | OR |
| 01100 | PMOV: p ? A : hold | 10101 | XOR |
| 01101 | PNEG: p ? −A : hold | 10110 | SLT (sets flag) |
| | | 10111 | SEQ (sets flag) |
| | | 11000 / 11001 | MIN / MAX |
| | | 11010 | ABSDIF \|A−B\| |
| | | 11011 | MAC: out + A·B |
| | | 11100 | SEL: p ? A : B |
| | | 11101–11111 | PADD / PSUB / PMUL (hold if !p) |

Undefined codes hold, like NOP.

**Predicates.** The predicate p comes from the PRED field:

| PRED | Predicate |
|---|---|
| 0 | own flag |
| 1 | inverted own flag |
| 2 | west neighbour's flag |
| 3 | north neighbour's flag |

The flag is written only by SLT and SEQ.

## Array, frame buffer and host interface

The 8×5 array is a nearest-neighbour mesh. Each row has two 16-bit buses fed
by the frame buffer.

The frame buffer has two banks:

* **Operand bank:** 128 entries (`FB_DEPTH`), each holding operand A and operand B for each
  row. The host writes it one value per clock. Entry *i* drives the buses
  during iteration *i*.
* **Result bank:** 128 entries of one value per row. The host reads it with one
  clock of latency.

The host processor is not part of the design. Its interface is a set of plain
ports on `dcca_cgra_top`.

## What follows the architecture and what is this design's own

These parts follow the architecture:

* the 32-bit context word and the 18-bit compressed width made of ALU_OP with
  merged flags, MUX_A, MUX_B and PRED
* the grouping of fields
* enables of ALU-dependent fields decoded from ALU_OP, with the MSB marking
  two-operand operations
* the merged enable flags of the ALU-independent fields
* the double positions of SAT, SHIFT and REG_FILE
* CE1 always selected, with CE2 deselected when CMP=1 and CMP supplied by the
  cache control unit
* the 8×5 array
* the PE's set of functions: two-operand ALU, predication, saturation, shift
  and register file

These are choices made here and can be changed:

* the width of each individual field and the exact positions
* the opcode values, including the A3..A2=11 predicate class
* the operand sources and the predicate sources
* the 16-bit datapath, the 4-entry register file, and the ALU→SHIFT→SAT order
* the context depth (32 per PE) and the frame-buffer size (128 entries, enough for
  100-iteration kernels) and organisation
* the mesh interconnect with row buses
* the loop sequencing
* building the compressibility check as hardware on the load path

The architecture, as described, derives the compressed layout with an offline
tool flow. Here the layout is fixed in `dcca_pkg`, and the evaluator applies
the concurrency rule above.

Memories are plain arrays rather than SRAM macros. CE1/CE2 are meant to become
separate macros, so that the chip select really gates the CE2 array.

Not built:

* the host processor
* the offline flow that produces the layout: field grouping, field sequence
  graph, field concurrency graph, port mapping graph

The benchmark kernels used to evaluate the architecture come without their
context counts, so whether each of them fits in 32 contexts per PE cannot be
said.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

* **`ctrl_block_tb`:** exhaustive over all 32 opcodes.
* **`context_evaluator_tb`:** random and directed words. It checks the
  compression decision against the concurrency rule written out by hand, and
  the position of every field.
* **`context_decoder_tb`:** CE1/CE2 images built by hand in both formats, with
  garbage in CE2 for compressed words.
* **`cache_element_tb`, `cache_control_unit_tb`, `frame_buffer_tb`:** read
  latency, hold when deselected, sequencing, CMP and cycle count.
* **`config_cache_tb`:** random words. It checks every PE's decoded context
  against the loaded word, and CE2 selects against compressibility.
* **`pe_tb`:** 20,000 random contexts against an integer model, plus directed
  saturation, shift, MAC and predicate cases.
* **`pe_array_tb`:** mesh wiring and neighbour predicates against a 2-D model.
* **`dcca_kernels_tb`:** benchmark-style kernels at the default size, 100
  iterations each, every result checked against an integer model (see below).
* **`dcca_cgra_top_tb`:** end to end at the default size. It runs a 5-context
  kernel for 64 iterations and checks:
  * every result
  * the clock count (5·64+2)
  * the CE1/CE2 read counts: 92% of the context reads skip CE2
  * that compressed and uncompressed words, saturation, predicated hold and
    predicated write all occur

## Kernels

`dcca_kernels_tb` maps several classic loop kernels onto this PE instruction
set. Each row of the array processes its own data stream, except in Complex
Mult, which uses a pair of rows. The table gives the share of context reads
that skipped CE2:

| Kernel | Contexts | Compressed reads | Notes |
|---|---|---|---|
| First_Diff | 1 | 100% | SUB of two bus operands |
| Inner Product | 1 | 100% | MAC running sum |
| MVM | 1 | 100% | MAC, vector element broadcast on every row |
| Tri-Diagonal | 2 | 100% | recurrence through the east neighbour, s16 saturation |
| SAD | 2 | 100% | ABSDIF, then accumulate with u16 saturation |
| Quant | 2 | 90% | MUL with a right shift cannot be compressed |
| Dequant | 1 | 80% | MUL, shift and saturation in one uncompressed word |
| Complex Mult | 6 | 100% | partial products exchanged over the N/S links |

The NOP words of idle PEs are counted too, and they always compress.

Each run takes exactly L·I+2 clocks, the same as with uncompressed contexts.
Compression removes CE2 reads but never a cycle.

Kernels with many live operands were not mapped: Hydro, State and ICCG from
the Livermore loops, and the DCT/IDCT and ITRANS transforms. They need more
operands per iteration than two row buses supply, or a set-up phase for
constants, which the loop sequencer does not have.

## Simulation

Simulate a testbench with Verilator (package first):

```
verilator --binary --timing --assert rtl/dcca_pkg.sv \
    $(ls rtl/*.sv | grep -v dcca_pkg) tb/dcca_cgra_top_tb.sv \
    --top-module dcca_cgra_top_tb -o sim
./obj_dir/sim
```

Lint: `verilator --lint-only -Wall rtl/dcca_pkg.sv rtl/<file>.sv ...`. The
warnings that remain are these:

* package constants that a given module does not use
* the reserved bits of CE2, which the decoder ignores by design
* ALU_OP bits that `ctrl_block` does not need
* the PE predicate flags of the last row and column, which no neighbour reads
