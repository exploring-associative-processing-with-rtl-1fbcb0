# Associative processor with a RoCC front end

An associative processor computes on whole vectors inside the memory that
holds them. Each vector element sits in its own row of a content-addressable
memory (CAM). An operation is broken into bit-serial *passes*. In each pass
every row compares a few selected bits against a key, all rows at once, and
every row that matches has a few bits rewritten in the next cycle. A lookup
table says which bits to compare and what to write. An 8-bit addition is 32
such passes whether the vector has 3 elements or 512. The run time depends on
the word size, not on the vector length.

This RTL builds such a processor as a 16 KB scratch-pad beside a RISC-V core:

- a RoCC front end that decodes custom instructions;
- a controller that sequences the passes;
- the lookup tables;
- the CAM with its Mask, Key and Tag registers;
- a DMA engine to main memory.

The host core, its caches and main memory are not part of the design. Their
signals are ports of the top module `rva_top`.

## Rows, byte columns and flags

`ap_cam` has `ROWS` = 512 rows of `ROW_BYTES` = 32 data bytes, which is 16 KB.
Each row also has two flag bits:

- **C** (bit 256) holds the carry or borrow.
- **M** (bit 257) marks the rows where the current multiplier bit is 1.

A vector of `len` elements of `ws` bytes occupies `ws` adjacent byte columns
in `len` consecutive rows. Scratch-pad byte address `a` is row `a % 512`, byte
column `a / 512`. So a contiguous block of up to 512 bytes fills one byte
column, which is how the DMA loads a byte vector. The operands of one
operation must start on the same row, because the passes work row by row.
Only COPY may move data between rows.

The CAM has three ports:

- **Compare** (`cmp_en`, `cmp_mask`, `cmp_key`, and a row window `row_lo`/`row_cnt`). In one clock edge it loads Mask and Key and sets each row's tag when the masked bits equal the key. Rows outside the window clear their tag.
- **Parallel write** (`wr_en`, `wr_mask`, `wr_data`). In one edge it rewrites the masked bits of every tagged row. `any_match` is the OR of the tags.
- **Row port**. The read is combinational; the write takes a bit mask. The core's byte loads and stores, the DMA and COPY use it.

Every row is a register row with its own comparator. The data bytes are not
reset. The tags, Mask, Key and both flag columns are.

## Passes: compare, tag, write

The controller (`ap_controller`) turns each operation into a list of steps.
A step is a lookup table applied to one bit position of each operand. Each
table entry is one pass with two parts:

- **compare**: which of the logical columns A, B, R (result), C and M are looked at, and their values;
- **write**: which of them are written, and with what.

The controller maps the logical columns to physical bit positions. It does
this from the operand addresses and the current bit index. It then issues the
compare. In the following cycle it issues the write, but only if some row
matched. Therefore:

    cycles of an operation = passes + (passes that matched at least one row)

The counters `ap_cnt_pass` and `ap_cnt_write` report both numbers for the
last operation. Seen from the core, the response of an associative operation
comes `passes + writes + 4` cycles after the second instruction is taken.
For COPY it is `elements + 3`.

## Lookup tables

`ap_lut` holds every table. Entries are written as compare → write.

| table | passes | entries |
|---|---|---|
| ADD, R += B with carry C | 4 | C0 B1 R1 → C1 R0; C0 B1 R0 → R1; C1 B0 R0 → C0 R1; C1 B0 R1 → C1 R0 |
| SUB, R −= B with borrow C | 4 | the same idea with borrow |
| XOR into a cleared R | 2 | A1 B0 → R1; A0 B1 → R1 |
| AND into a cleared R | 1 | A1 B1 → R1 |
| OR into R set to ones | 1 | A0 B0 → R0 |
| NOT into a cleared R | 1 | A0 → R1 |
| in-place XOR and NOT | 3 | use C as a "done" flag, then clear it |
| ReLU | 1 | A's sign bit 1 and R's bit 0 = 1 → R's bit 0 = 0 |
| multiply-add | 4 | like ADD, but only in rows with M = 1 |
| other tables | – | copy a bit, clear R, load M, clear C, clear M |

The passes of one table are ordered so that a row written by one pass cannot
match a later pass of the same step.

## Operations and their cost

Here *n* is the word size in bits (8 × bytes). The rightmost column gives the lower pass
counts listed by the source model.

| operation | separate result | in place | source model |
|---|---|---|---|
| ADD | 6n+1 | 4n+1 | 4n |
| SUB | 6n+1 | 4n+1 | 4n |
| MULT (n-bit truncated product) | 2n²+5n+2 | 2n²+5n+1 | 4n² |
| XOR | 2n+1 | 3n | 2n |
| AND, OR | n+1 | n | n |
| NOT | n+1 | 3n | n |
| SHL, SHR (by one bit, logical) | n | 2n−1 | n |
| ReLU | 1 | – | 1 |
| SET (write a constant) | 1 | – | 1 |
| COPY of k elements | k cycles | – | k |

How the separate-result and in-place columns come about:

- **Separate result.** The result field is first cleared, or set to ones for OR, with one pass. ADD and SUB copy A into the result first, at 2 passes per bit.
- **In place.** The result overwrites one source, `A = A op B`. The controller swaps A and B when the result sits on B.
- **ADD and SUB** end with one pass that clears the carry column, so the next operation starts clean.
- **MULT** works from the most significant multiplier bit down. For each bit it takes 2 passes to load M, then 4 passes per remaining product bit to add B into R where M = 1, then 1 pass to clear C.

Refused commands are answered with an error at once:

- zero length or zero word size;
- a field that leaves the row, or a vector that leaves the rows;
- operands that start on different rows;
- partially overlapping fields;
- SUB into its second operand;
- ADD, SUB or MULT with all three fields the same.

## Issuing operations from the core

`rocc_ctrl` decodes pairs of R-type custom instructions:

1. **Pointer load** (`funct = 0`): `rs1` gives input A and `rs2` gives input B, both as scratch-pad byte addresses.
2. **Operation** (`funct != 0`): `rs1` gives the length in elements and `rs2` gives the result address. `funct[2:0]` is the operation and `funct[6:3]` the word size in bytes (1 to 15).

The operation code is `{custom number, funct[2:0]}`:

| | funct 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|
| custom-2 (0x5B) | ADD | SUB | MULT | XOR | AND | OR | NOT |
| custom-3 (0x7B) | SHL | SHR | ReLU | SET | COPY | DMA load | DMA store |

For the operations in this table:

- SET takes its constant from `rs1` of the pointer load.
- ReLU reads A and clears bit 0 of R where A is negative. Therefore R must first be SET to 1.
- For a DMA load, `rs1` of the pointer load is the memory address and `rs2` of the second instruction is the scratch-pad address.
- For a DMA store, the first is the scratch-pad address and the second the memory address.

Custom-0 and custom-1 are free for more operations, up to 28 in all.

After the second instruction the front end holds `cmd_ready` low and `busy`
high until the operation ends. If `xd` is set, it then responds: bit 63 is
the error flag and bits 31:0 are the cycles from start to done.

## Scratch-pad and DMA

While nothing runs, the core reaches the scratch-pad byte by byte on
`spm_*`. A request is taken when `spm_req && spm_gnt`. Read data appear one
cycle later. While an operation or transfer runs, `spm_gnt` is low and the
core's access is not taken. The core and the associative operations never
overlap.

`ap_dma` moves bytes between main memory (`mem_*`, request/grant, in-order
read data) and the scratch-pad. It spends 11 cycles of setup, counting the
start cycle, then moves one byte per cycle. With a memory that grants every
cycle and answers in the next one:

- a store's `done` comes `11 + len + 1` edges after start, and a load's one edge later;
- the core sees `11 + len + 2` (store) and `11 + len + 3` (load) cycles in the response.

## Where this design departs from the source model

- The layout choices are this design's own: the 512 × 32-byte geometry, the column-major byte addresses, the C and M flag columns, and the row window.
- The SUB, shift, in-place, copy and multiply tables are this design's own. So are the extra carry-clearing pass and the pass counts above, which differ from the source's for MULT, in-place XOR/NOT and the separate-result variants.
- The fourth ADD entry is (carry 1, A 0, B 1) → (carry 1, sum 0). The version drawn in the source lists (carry 1, A 1, B 0) → (carry 1, 0), which writes the values a row already holds, so it never changes a row.
- A write cycle is spent only when a pass matched some row.
- All operation codes except ADD (custom-2, funct 1), the DMA commands, the response format and the error checks are this design's own.
- One DMA datum is one byte.
- The operands of one operation must start on the same CAM row. In the source model's matrix product, the rows of a matrix follow one another in memory. Here each row vector goes into a byte column of its own, starting on row 0.

## Verification

Each testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=… failures=…` line:

- `tb_ap_lut`: plays every table from every starting state and compares with arithmetic.
- `tb_ap_cam`: 16 × 2-byte CAM; random compares and writes against a model.
- `tb_ap_controller`: 32 × 8-byte CAM and controller. Every operation at 1 and 2 bytes, both with a separate result and in place. Checks the pass counts, the `passes + writes + 3` timing, and refused commands.
- `tb_ap_dma`: data in both directions with ideal and stalling memories, plus the cycle counts.
- `tb_rocc_ctrl`: decoding, register contents, cycle counts, refused commands, and response hand-shake.
- `tb_rva_top`: the whole design at its default 16 KB size. It covers:
  - DMA loads;
  - all nine arithmetic and logic operations on 512-element vectors, checked after DMA stores;
  - COPY, in-place ADD, SET and ReLU;
  - a window of rows;
  - a 32-bit ADD;
  - a 3 × 3 matrix product in the source algorithm's order: SET a buffer to A[i][j], MULT it in place by row j of B, ADD it in place into row i of C;
  - error responses and core accesses refused during an operation.

  It counts each mechanism and fails if any never happened.

To run one, for example:

    verilator --binary --timing --assert -Irtl rtl/ap_pkg.sv rtl/ap_lut.sv rtl/ap_cam.sv \
      rtl/ap_controller.sv rtl/ap_dma.sv rtl/rocc_ctrl.sv rtl/rva_top.sv tb/tb_rva_top.sv \
      --top-module tb_rva_top -o sim && ./obj_dir/sim +verilator+rand+reset+2

Coarse synthesis of the CAM slows down sharply with its row count. With yosys
it took 14 s at 32 rows and 92 s at 64 rows, and more than 10 minutes at 512.
`ROWS` can be lowered for quick synthesis experiments.

## Not included

- **Host core.** The RISC-V core is represented by the RoCC command/response and scratch-pad ports.
- **Caches and main memory.** Main memory is represented by the DMA memory port, with behavioural models in the testbenches.
- **Vectors longer than the row count.** A vector longer than 512 elements is worked in chunks by software.
