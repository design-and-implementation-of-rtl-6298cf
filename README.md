# DATA LARs processor

A conventional register holds a value and nothing else: the compiler has to
remember where it came from, what type it has, and whether memory still agrees
with it. A **DATA LAR** (line associative register) carries all of that with the
value. Each of the eight LARs holds one 64-bit memory line together with the
address it came from, the type of the packed elements in it, and a dirty bit.
Because of this, the LARs behave like a tiny fully associative cache under
program control:

- A LOAD first searches the LARs for its line. On a hit, the data memory is
  not accessed.
- An arithmetic result is copied into every LAR that holds the same line, so
  two names for the same memory location can never disagree. Alias analysis
  is done by the hardware.
- A STORE only renames a LAR (it changes its address and type). The data goes
  to memory later, when a dirty LAR is overwritten, through a small write
  buffer.
- Operands of different element sizes are converted in the pipeline, so
  `ADD` of a byte vector and a word vector needs no separate conversion
  instructions.

This repository is synthesizable SystemVerilog for a six-stage pipelined
processor built around these registers. It follows the processor described
in the thesis *Design and Implementation of the Instruction Set Architecture
for DATA LARs*, with the departures listed under
[Where this RTL departs from the description](#where-this-rtl-departs-from-the-description).

## The LAR record

Each LAR is a 132-bit record (`lar_t` in `rtl/lars_pkg.sv`):

| field | bits | meaning |
|-------|------|---------|
| `data`  | 64 | one memory line of packed elements |
| `tag`   | 61 | line address (address bits 63:3) |
| `woff`  | 3  | byte offset inside the line (address bits 2:0) |
| `wdsz`  | 2  | element size: 0 byte, 1 half word (16 b), 2 word (32 b), 3 double word (64 b) |
| `typ`   | 1  | 0 unsigned, 1 signed |
| `dirty` | 1  | the data differs from memory |

`{tag, woff}` is the full 64-bit address. The tag alone identifies the line.
It is used for the associative search, for alias updates and for indexing
memory: the 16-line data memory uses `tag[3:0]`, that is, address bits 6:3.

Alongside each record the LAR file keeps a *valid* bit. It is cleared by reset
and set by the first write. Without it, every LAR would come out of reset
claiming address 0 and would answer searches for line 0.

## Instruction set

Instructions are 32 bits: `op[31:27] dst[26:22] src1[21:17] src2[16:12]`,
followed by one of two layouts:

- **arithmetic:** `sv[11] off1[10:8] off2[7:5] doff[4:2]`. `sv` = 1 means scalar.
- **load/store:** `imm[11:0]`, sign-extended.

The LAR fields are 5 bits wide but only the low 3 bits are used (8 LARs).

| opcode (hex) | instruction | effect on `dst` |
|---|---|---|
| 00 | NOP | none |
| 01–08 | LOADUB, LOADUHW, LOADUW, LOADUDW, LOADSB, LOADSHW, LOADSW, LOADSDW | line at EA → data; EA → address; opcode → type; dirty = 0 |
| 09–10 | STOREUB … STORESDW (same order) | EA → address; opcode → type; data kept; dirty = 0 |
| 12 | ADD | element-wise, wraps around |
| 13 | SUB | element-wise, wraps around |
| 14 | MUL | reserved, executes as NOP |
| 15, 16, 17 | AND, OR, EXOR | bitwise |
| 1F | LOADDUMMY | like STORE, but takes its type from the `src1` LAR |

For LOAD, STORE and LOADDUMMY the effective address is
`EA = src1.address + src2.data + sext(imm)`.

Arithmetic instructions work on the element size of the **destination** LAR.
The result goes to `dst` with dirty = 1, and to every other LAR that holds the
same line.

## Pipeline

```
 IF        ID              CONV                        EX           MEM                     WB
 PC  -->  decode      --> forwarding             --> packed ALU --> scalar merge        --> LAR write
 instr    LAR read         scalar mask/shift           final EA     LOAD search /            alias update
 file     hazard check     sign-extend / truncate      add          data memory /            eviction into
                           EA = addr + imm                          write buffer lookup      write buffer
     IF/ID        ID/CONV                      CONV/EX         EX/MEM                 MEM/WB
```

The stage that is not found in a classic RISC pipeline is **CONV**. It prepares
operands before the ALU:

- **Forwarding.** Three forwarding units (SRC1, SRC2, DST) choose between the
  LAR file, EX/MEM and MEM/WB.
- **Scalar mode.** The mask/shift unit takes the element the LAR's word offset
  points at (element `woff >> wdsz`) and moves it to bit 0.
- **Conversion.** The sign-extend/truncate unit converts each operand to the
  destination's element size.
- **Address.** The address unit adds the `src1` address and the immediate. The
  ALU then adds `src2.data` in EX as a plain 64-bit add.

Because the ALU's inputs come from CONV and not from its own output, no
result is ever forwarded straight into the ALU.

### Conversion between element sizes

Let N be the number of destination elements in a line (8, 4, 2 or 1).

- **Widening** (source elements smaller than the destination's): source elements
  `off·N … off·N+N−1` are zero- or sign-extended into destination elements
  `0 … N−1`. The sign follows the source LAR's `typ`. For example, bytes to
  half words with `off` = 1 takes source bytes 2 and 3.
- **Narrowing** (source elements larger): every source element is saturated to
  the destination size and placed in the slots starting at `off·M`, where M
  is the number of source elements. The other bits are zero.
  - Unsigned values above the largest destination value become all ones.
  - Signed values are clamped to [−2ⁿ⁻¹, 2ⁿ⁻¹−1].
- **Scalar operations** use offset 0, since the element is already at bit 0.
  The scalar output unit in MEM writes the result element back at the
  destination's word offset and leaves the rest of the line unchanged.

`off1` and `off2` apply to the two sources. `doff` is decoded but has no effect.

### The packed ALU

The ALU is a 64-bit carry-select adder made of eight 8-bit lanes. Each lane
computes two sums, one assuming carry-in 0 and one assuming carry-in 1. The
**anding unit** then decides the real carry into each lane:

- Inside an element, the carry is the previous lane's carry out.
- A lane that starts an element gets the operation's own carry-in: 0 for ADD,
  1 for SUB (computed as `a + ~b + 1`).

Element boundaries come from the destination's WDSZ. The same adder does the
final 64-bit effective-address add.

## LOAD: the associative search

This is the least conventional part of the pipeline. A LOAD reaches MEM with its
effective address, and then:

1. **Search cycle.** The controller for loads freezes all pipeline registers
   for one cycle (`ld_stall`). During that cycle, the LAR file compares the
   EA's tag with the tag of every valid LAR. The result (hit, the matching
   LAR's index and its line) is registered at the end of the cycle. The
   lowest-numbered matching LAR wins.
2. **Next cycle.** The LOAD leaves MEM, and its line comes from the first of
   these sources that holds it:
   1. the instruction held in WB during the search, if it writes the same line
      (its record is newer than what the search saw). An arithmetic result
      always wins here. A new LOAD/STORE/LOADDUMMY record wins unless the
      search hit a lower-numbered LAR, which keeps the lowest-index rule;
   2. the matching LAR (a hit; the memory fetch is cancelled);
   3. the line that WB is evicting into the write buffer this cycle;
   4. the write buffer;
   5. the data memory.

Only LOADxx opcodes search. STORE and LOADDUMMY never touch memory, so they
do not freeze the pipeline.

Because of the freeze, the instruction ahead of the LOAD is held in WB for the
search cycle and writes its LAR one cycle later. Sources 1 and 3 cover that
instruction. If that instruction is a LOAD, STORE or LOADDUMMY, it is
replacing its destination LAR's whole record, so the search leaves that LAR
out: the old line it held may not be returned.

Two LARs can hold the same line with different data. A STORE or LOADDUMMY
re-addresses a LAR without reading memory, so its old data stays under the
new address. A LOAD then sees the lowest-numbered of them.

## Aliases: the associative update

An arithmetic result written to `dst` is also copied into the data field of
every other valid LAR whose tag matches `dst`'s tag. The address, type and
dirty bit of those other LARs are not changed. The LAR read ports bypass a
same-cycle write, and this includes the alias copies, so a reader in ID sees
the update immediately.

The hazard unit treats such a reader as dependent on the arithmetic
instruction even when the LAR indices differ. Only valid LARs take the
update, so the check is made only for a valid LAR. The tag and valid bit it
compares are those the LAR will have once the instructions now in EX and MEM
have written back, not the stale values in the LAR file. The forwarding units likewise
forward *data only* from an arithmetic producer whose tag matches the
operand's, and again only into a valid LAR.

## Lazy store: dirty lines and the write buffer

A STORE writes nothing to memory. Memory is updated only when a LOAD, STORE
or LOADDUMMY overwrites a LAR whose dirty bit is set:

- At write-back, the old line and its tag are pushed into a 2-entry FIFO write
  buffer. Each entry is 61 + 64 = 125 bits.
- The buffer is drained only when it is full and another eviction arrives.
  The whole pipeline then freezes for one cycle (`wb_stall`) while the oldest
  entry is written to the data memory. The eviction is accepted in the next
  cycle.
- A LOAD that misses in the LARs looks in the buffer before the data memory,
  taking the newest matching entry. A lazily stored line is never read stale.

Lines still in the buffer or in dirty LARs when a program ends have not
reached memory. A testbench that wants to see them must read them through the
LAR debug port.

## Hazards and stalls

| producer, distance ahead of the reader | result available from | bubbles |
|---|---|---|
| arithmetic, 1 | EX/MEM | 1 |
| arithmetic, 2 or more | EX/MEM, MEM/WB or the LAR file | 0 |
| LOAD/STORE/LOADDUMMY, 1 | MEM/WB | 2 |
| LOAD/STORE/LOADDUMMY, 2 | MEM/WB | 1 |
| LOAD/STORE/LOADDUMMY, 3 or more | MEM/WB or the LAR file | 0 |

An arithmetic instruction reads three LARs: both sources, and its destination
(for the destination's type, offset and old data). A STORE or LOADDUMMY also
reads its destination, because it keeps that LAR's data under the new
address; it must wait for a pending result to that LAR like any reader. A
LOAD overwrites its destination entirely and does not read it.

The master controller combines the three stall sources:

- **Hazard bubble.** PC and IF/ID hold, and ID/CONV loads a NOP.
- **LOAD search cycle.** Everything freezes.
- **Full write buffer.** Everything freezes.

A NOP is an all-zero pipeline word.

## Where this RTL departs from the description

- **Signed saturation.** The description's narrowing rule maps *every*
  negative signed value to the most negative destination value. That also
  destroys small negative numbers that fit, so this RTL clamps to the
  destination's signed range instead.
- **Write-buffer drain.** The description mentions both draining in a free
  bus cycle and draining only when the buffer is full. The RTL does the
  latter, which is the behaviour given for the built design.
- **LOADDUMMY type.** The RTL takes LOADDUMMY's type from the `src1` LAR, as
  the lazy-store example states. The alias example's printed result instead
  implies a fixed type.
- **Additions not in the description:**
  - the LAR valid bit;
  - write-buffer lookup by LOADs;
  - the LOAD line sources 1 and 3 above, and the search leaving out a LAR
    being replaced;
  - tag-based hazards and forwarding for aliases;
  - the program and memory load ports;
  - the `dbg_*` and `ev_*` observation ports.
- **Not built:**
  - MUL (its opcode is reserved);
  - the destination offset `doff`;
  - an interrupt from the data memory (the memory here always answers in one
    cycle);
  - instruction LARs (the instruction side is a plain 32-entry register file).
- **Memory size.** The data memory has 16 lines, so address bits above bit 6
  are ignored. Addresses alias modulo 128 bytes.

## Files

`rtl/`, one module or package per file:

| file | block |
|---|---|
| `lars_pkg.sv` | record, opcode, instruction and control-word types |
| `lars_core.sv` | top level: the pipeline and its observation ports |
| `pc_unit.sv`, `inst_reg_file.sv` | fetch |
| `datapath_controller.sv` | opcode decode |
| `data_lars.sv` | the 8 LARs: 3 read ports, write port with alias update, search port |
| `hazard_detection_unit.sv`, `forwarding_unit.sv`, `master_controller.sv` | hazards and stalls |
| `mask_shift_scalar_unit.sv`, `sign_extend_truncate_unit.sv`, `ea_calc_unit.sv` | CONV stage |
| `alu.sv`, `anding_unit.sv` | packed carry-select ALU |
| `scalar_output_unit.sv`, `controller_for_loads.sv`, `data_memory.sv`, `write_buffer.sv` | MEM and WB |
| `pipe_reg.sv` | pipeline register with hold and bubble |

Top-level parameters, all at the described sizes by default:

| parameter | default |
|---|---|
| `NLARS` | 8 |
| `IMEM_DEPTH` | 32 |
| `DMEM_DEPTH` | 16 |
| `WBUF_DEPTH` | 2 |

`NLARS` is fixed by the 3-bit LAR fields in practice.

`tb/`:
- One self-checking testbench per module, `tb_<module>.sv`. Each compares
  against values computed independently and prints
  `TB_RESULT checks=N failures=M`.
- `lars_ref_pkg.sv`: reference functions for element access, conversion and
  the ALU.
- `tb_lars_core.sv`: the end-to-end test, at the default sizes. It contains an
  instruction-level model of the processor, including the write buffer. It
  runs eight programs:
  - the alias example with two different indices, which needs 5 memory fetches;
  - the same example with equal indices, which needs 4 fetches and 1 LAR hit;
  - the example again, after five loads that make its lines live: its five
    loads all hit and it needs no memory access;
  - a lazy-store program that fills the write buffer and forces a drain;
  - the scalar ADD example (expected result `0005_0004_0003_0004`);
  - a program of scalar operations and mixed-size conversions;
  - a program that exercises every hazard distance;
  - 40 random programs of 24 instructions each: loads, stores, LOADDUMMY
    and arithmetic at random sizes, offsets and scalar modes, over a few
    lines so that hits, aliases and evictions are frequent.

  The test checks every LAR and memory line against the model, checks the
  stall and fetch counts, and fails if any mechanism was never exercised.
  The mechanisms are bubbles, searches, hits, fetches, buffer hits,
  evictions, full-buffer stalls, both forwarding paths, alias updates,
  widening, narrowing and scalar mode.

### Simulating

Each testbench needs the package files on the command line. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/lars_pkg.sv tb/lars_ref_pkg.sv tb/tb_lars_core.sv --top-module tb_lars_core
./obj_dir/Vtb_lars_core
```

Replace `tb_lars_core` with any other `tb_<module>` to run that unit test.

### Writing programs

To run a program on `lars_core`:

1. Hold `rst_n` low.
2. Write instructions with `prog_we`/`prog_addr`/`prog_data` and memory lines
   with `dm_init_*`.
3. Release `rst_n`.

`tb_lars_core.sv` has small encoder functions (`ldst`, `arith`) that show the
field layout. The program counter wraps after 32 instructions, so end a
program with NOPs.
