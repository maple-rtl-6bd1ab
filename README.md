# MAPLE — a multiprocessor APL machine, memory side

APL programs spend much of their time rearranging arrays: transposing, rotating,
taking and dropping rows, reshaping. On a conventional machine each of these
copies the array. MAPLE avoids the copies. It gives APL a "smart memory", the
**Data Manipulation Unit (DMU)**. The DMU holds every array together with a small
*descriptor*: a base address, plus a length (RHO) and an address step (jump) for
each axis. A selection primitive rewrites only the descriptor, in time linear in
the rank. Data moves only when a unit actually needs the components, and then
they stream over a shared bus.

The machine has four units on three buses:

* **EXU**: interprets APL and sends instructions. Not built here.
* **ALU**: scalar arithmetic on streams. Built, integers only.
* **IOU**: input/output. Not built here.
* **DMU**: all memory, memory management and selection. This is the main part of
  this RTL.

This repository is synthesizable SystemVerilog for the DMU and a streaming ALU,
joined into one top level, `maple_top`. The EXU and IOU connections are brought
out as ports. Self-checking testbenches come with every block.

## The buses

| Bus | Width | Driven by | Lines |
|---|---|---|---|
| Instruction | 16 | EXU | `uid` names the target unit; `is` strobes each word. A unit answers by interrupt over a daisy-chained request/acknowledge pair: it drives `uid` and the bus with its result. |
| Status | — | DMU | `tdl`: direction, 1 = DMU writes. `lua`: logical unit address. `csl`: first word of a component. `eos`: end of stream for the unit on `lua`. Each other unit returns one Ready line. |
| Data | 16 | DMU or the unit on `lua` | One component per bus cycle, least significant word first. |

Logical unit addresses used here: 0 EXU, 1 ALU X (right argument), 2 ALU Y (left
argument), 3 ALU Z (result), 4 IOU in, 5 IOU out.

The bidirectional buses are split into one-way ports at the top. The DMU's
`dbus` output is paired with `exu_dbus` and `iou_dbus` inputs, and the word the
DMU receives is selected by `lua`. The interrupt chain runs EXU → DMU → IOU.

## Descriptors and the address generator

This is the heart of the design.

An array in storage state zero is stored row-major from a base **bit** address.
Addresses are 32 bits:

* `[31:16]`: virtual page.
* `[15:4]`: word in the 4096-word page.
* `[3:0]`: bit in the 16-bit word.

The descriptor in each of the 16 register files (`omu_desc`) holds the base, a
rank/type word and, per axis *k*, `RHO[k]` and `J[k]`. `J[k]` is the distance in
bits between neighbours along axis *k*. Component *i₀,i₁,…* is then at
`base + Σ iₖ·J[k]`. Every selection below is a rewrite of those numbers:

| Instruction | Rewrite |
|---|---|
| `MTRANS` (monadic transpose) | reverse the order of RHO and J |
| `MROTATE` on axis *a* (reverse) | `base += J[a]·(RHO[a]−1)`, `J[a] = −J[a]` |
| `TAKE x` | for `x[k] < 0`: `base += J[k]·(RHO[k]−|x[k]|)`; then `RHO[k] = |x[k]|` |
| `DROP x` | for `x[k] > 0`: `base += J[k]·x[k]`; then `RHO[k] −= |x[k]|` |
| `DTRANS x` (dyadic transpose) | new axis *i* gets `RHO = min RHO[k]` and `J = Σ J[k]` over all *k* with `x[k] = i`; repeated axes give diagonals |
| `RESHAPE x` of a vector | row-major jumps built from the vector's own jump |
| `RAVEL` | only for a contiguous array, else an error |

For the dyadic forms, the left argument *x* is itself an array in memory. The
engine reads it one component at a time.

`ALLOCATE` asks the hole table for `ceil(count·bits/16)` words. It makes the
register describe the new row-major array and returns its base address to the
EXU.

`SETUP Rs, dir, lua` turns a register into a **stream**. The address generator
(`omu_agen`) follows the document's AC3 algorithm:

* An inner loop steps one address per cycle along the current row by adding
  the last axis' jump.
* An outer loop runs when a row ends. It restarts the row one axis further up
  and spends one cycle per axis that carries.

The generator keeps per-set state for all 16 registers: current address, row
start and per-axis counters. Any number of streams can therefore be interleaved
component by component. The stream controller (`dmu_stream_ctrl`) does this
round-robin:

1. Probe the stream's unit. If it is not Ready, skip it until the next round.
2. Move one component through the component port and the bus.
3. Advance the generator.
4. When a stream ends, send an EOS cycle naming its unit.

## Memory management

* **Main memory** (`main_memory`): 16-bit words, 2²⁰ by default. The document
  allows 1 to 256 million words. All addresses are bit addresses.
* **Paging** (`mmu_pager`): pages are 4096 words.
  * The Relocation Vector (RV) maps every virtual page to a real page. Real
    page 0 means "black hole": virtual space with no storage behind it.
  * The Free List (FL) is a stack of free real pages. Filling a black hole pops
    a page; releasing a page pushes it back.
  * A single associative cell caches the last translation. A hit costs nothing
    extra; a miss costs two cycles.
  * After reset the RV is cleared one entry per cycle. The DMU then maps the
    user workspace: by default virtual pages 0..251, leaving four real pages
    free.
* **Hole table** (`hole_table`): 64 entries by default, ordered by address,
  first fit.
  * An allocation shrinks the first hole that is large enough, or removes it if
    it fits exactly.
  * A release merges with the neighbouring holes where they touch.
  * `gc_needed` rises when no hole fits but there is more than one hole, or when
    the table overflows.
  * The closest pair of holes (the cheapest pair to compact) is always
    available on `gc_pair_*`.
* **Component port** (`mmu_comp_port`): turns one component access into word
  accesses.
  * Components of 16 bits or more are whole words. Each word is translated on
    its own, so a component may cross a page.
  * Components of 1, 2 or 8 bits are extracted from their word, or merged into
    it by read-modify-write.
* **Temporary stack** (`dmu_tstack`): a LIFO of scalar components for other
  units, kept in its own virtual region (the first page of the upper half of
  the virtual space).
  * STALLOC sets the component size (1 to 32 bits) and the maximum depth.
    TPUSH carries the value in two data words, high word first. TPOP returns
    the top component by interrupt.
  * Real memory follows the depth: the first push into a page fills that
    black hole from the Free List, and the pop that empties a page releases it.
    Nothing is ever moved.
  * Overflow past the maximum depth, popping an empty stack, pushing before
    STALLOC, and running out of free pages all raise `err`.
* **Size codes** (`comp_size_rom`): the 5-bit code in the rank/type word gives
  the component size.
  * Codes 1..6 → 1, 8, 16, 32, 48, 64 bits.
  * Codes 9..14 → 2, 16, 32, 64, 96, 128 bits (complex pairs).

## Instruction formats

**DMU instruction** (`dmu_instr_if`): a first word `{CODE[5:0], Rd[3:0], Rs[3:0], m[1:0]}`
followed by 0 to 3 data words, depending on the opcode. Opcodes are numbered 1..32
in this order:

COPY, SETUP, ACCESS, SCONFORM, NAME, ALLOCATE, READ, WRITE, REDUCTION, MTRANS,
MROTATE, RAVEL, RHO, EXPOSE, IMBED, PUSH, POP, OUTER, IREF, DREF, DTRANS,
DROTATE, TAKE, DROP, CATENATE, COMPRESS, EXPAND, INDEX, RESHAPE, STALLOC, TPUSH,
TPOP.

The operands of the instructions that run:

* `SETUP`: `m[0]` = 1 sends data to the unit; data word 0 = LUA.
* `READ` / `WRITE`: data word 0 = `{field[7:6], axis[5:0]}`, where field
  0 = base, 1 = RHO, 2 = jump, 3 = rank/type. `WRITE` carries the value in two
  more words, high half first.
* `MROTATE`: data word 0 = the axis.
* `TAKE`, `DROP`, `DTRANS`, `RESHAPE`: Rs holds the left-argument vector and Rd
  is rewritten.

Instructions are queued: four entries, and `iq_full` warns one entry early. A
READ or ALLOCATE result goes back by interrupt: high half, then low half, with
`uid` = DMU.

**ALU instruction** (`alu_stream`, `uid` = ALU):

| Word | Meaning |
|---|---|
| `{op[5:0], xw[1:0], zw[1:0], 6'b0}` | Select a function. Input components are `xw+1` words long; results are `zw+1` words. |
| `{62, 0}`, then N | Set the ratio N. Every N X components reduce to one Z. `+` and `-` fold as APL's right-to-left `+/` and `-/`. |
| `{63, 0}` | Clear the counters and buffers. |

Function codes: 1 `+`, 2 `−`, 3 `×`, 4 max, 5 min, 6 residue, 7–12 the
comparisons `= ≠ < ≤ > ≥`, 13–16 and/or/nand/nor, 32 negate, 33 not, 34 abs,
35 signum, 36 identity. The ALU keeps three 32-bit transfer counters, one per
stream, and a sticky overflow flag.

## What follows the document and what does not

Follows the document:

* The unit split and the bus signals.
* Descriptors with per-axis jumps, the selection algorithms and AC3.
* 16 register files, rank 0..31.
* Bit addressing with 16-bit words and 4096-word pages.
* RV with a single associative cell, FL and black holes.
* The first-fit, address-ordered hole table with its garbage-collection
  conditions.
* The ALU ratio and its three counters.
* Stacks as paged system objects that grow and shrink a page at a time.
* Instructions of 1 to 4 words and results returned by interrupt.

This design's own choices (the document does not fix them):

* All opcode numbers, field layouts, the READ/WRITE index word and the ALU
  instruction word.
* The logical-unit numbering.
* All cycle timing: the probe-before-transfer sequence, the round-robin order,
  the queue depth.
* The start-up mapping of the workspace.
* Where the temporary stack lives in the virtual space, its 32-bit component
  limit, and its error cases.

**Differences from the document** (found by reading it again against the RTL):

* Descriptors live only in the 16 register files. The document also stores
  them in memory as headers with a reference count and the array's own
  reference number. ALLOCATE here reserves data words only; no header is
  written.
* Selections always produce a storage-state-one descriptor. The document's
  "generate mode", which copies the selected array into new storage, is not
  built; neither is overtake for TAKE or cycling for RESHAPE.
* The RHO size field of the rank-type word (8, 16 or 32-bit RHO entries in a
  stored descriptor) is carried but unused, since no descriptor is stored.
* The temporary stack takes components of at most 32 bits; the document puts
  no limit on the size code.
* Real memory defaults to 2²⁰ words, the smallest figure the document's
  RAM estimate allows. Up to 2²⁸ words is a parameter setting.
* Only the temporary stack uses paging after start-up. The document also pages
  the name table and the execution stack, which are not built.
* The ALU is integer only, where the document expects the full set of APL
  scalar functions, including 64-bit floating point.

**Speed.** The document aims to stream components at memory speed: about 6
memory cycles per element of an integer `+`. Here each component goes through a
probe, a translation, a memory read and a bus transfer in sequence. A three-stream
`Z ← Y + X` takes about 15 clock cycles per component, about 44 per result
element. The structure would allow pipelining; this RTL does not do it.

**Not built:**

* The EXU and the IOU. The document gives only their role, and one of them is a
  stock microprocessor.
* The array name table (NAME, ACCESS).
* The execution stack (PUSH, POP). Its entries are array names, so it needs
  the name table.
* Garbage collection and array release. The hole table supports release; the
  DMU does not drive it.
* Reference counting (IREF, DREF).
* Instructions that depend on data or mix storage states: REDUCTION, RHO,
  EXPOSE, IMBED, OUTER, DROTATE, CATENATE, COMPRESS, EXPAND, INDEX, SCONFORM.

These raise the DMU's sticky `err` flag. TAKE cannot overtake and RESHAPE cannot
cycle its data; both flag an error in those cases. The ALU has no floating-point,
complex, interval or transcendental functions.

## Files

| File | Block |
|---|---|
| `rtl/maple_pkg.sv` | shared types: address, rank/type word, instruction word, opcodes, LUA/UID codes |
| `rtl/maple_top.sv` | DMU + ALU, buses, EXU/IOU ports |
| `rtl/dmu.sv` | the DMU, wiring all blocks below |
| `rtl/dmu_instr_if.sv`, `rtl/intr_chain_node.sv` | instruction receiver, queue, interrupt return |
| `rtl/omu_desc.sv` | descriptor registers and selection engine |
| `rtl/omu_agen.sv` | AC3 address generator over 16 sets |
| `rtl/dmu_stream_ctrl.sv` | stream interleaving, EOS |
| `rtl/dmu_tstack.sv` | temporary stack (STALLOC, TPUSH, TPOP) |
| `rtl/bus_controller.sv` | status/data bus sequencer |
| `rtl/mmu_comp_port.sv`, `rtl/mmu_pager.sv`, `rtl/hole_table.sv`, `rtl/main_memory.sv`, `rtl/comp_size_rom.sv` | memory side |
| `rtl/alu_stream.sv` | streaming integer ALU |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_maple_top_full.sv` | end-to-end test at the default sizes |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal rtl/maple_pkg.sv \
    $(ls rtl/*.sv | grep -v maple_pkg) tb/tb_maple_top.sv \
    --top-module tb_maple_top -o sim && ./obj_dir/sim
```

For another testbench, replace the testbench file and top module.
`tb_maple_top_full` needs `tb/tb_maple_top.sv` as well.

The end-to-end testbench (`tb_maple_top`) plays the EXU and runs this program:

1. Allocate five arrays, including a one-page spacer so that two operands sit on
   different pages.
2. Load two 4×4 matrices from the EXU while the EXU's Ready line toggles.
3. Transpose one matrix, then compute `Z ← Y + ⍉X` with three streams
   interleaved through the ALU.
4. Read Z back.
5. Reduce Z with `+/` using ratio 4.
6. Rotate Z and read it back.
7. Read a descriptor field by interrupt.
8. Allocate the temporary stack, push three values and pop them back. This
   fills a page from the Free List and releases it again.
9. Pass an interrupt to the IOU, check the error flag on an unbuilt instruction,
   and pop the empty stack (refused, nothing returned).

It checks the data. It also counts that each mechanism occurred: allocation,
interrupt return, skips of units that were not Ready, EOS, stream switches,
associative-cell misses, a full instruction queue, chain pass-through and the
stack's push/pop.

By default `tb_maple_top` runs a small machine: 2¹⁶ words of memory and 8-bit
virtual page numbers. `tb_maple_top_full` runs the same program on the default
machine: 1M words, 16-bit virtual page numbers, a 64K-entry RV and a 64-entry
hole table. It finishes in well under a second of simulation time.

## How far to trust it

Each block's testbench compares against a model written independently of the
block:

* Address lists from the APL definition for every selection.
* A bit-level memory model for the component port.
* A reference allocator for the hole table.
* Reference arithmetic for the ALU.
* A LIFO model, with a pager that tracks attached pages, for the temporary
  stack.

Each testbench was also shown to fail on a deliberately broken copy of its block.

The checks cover the paths listed above. Corner cases of the unbuilt
instructions, arrays with an axis of length zero (the generator assumes
non-empty arrays), and memories near the document's 256M-word upper size were
not simulated.
