# Selective row partitioning: one spare column that repairs several columns

A memory with a spare column normally swaps that spare in for one defective
column across every row. If a chip has two defective cells in two different
columns, one spare is not enough, even though the spare column is almost entirely
unused. This design splits the spare column by rows. A few row address bits
(`N_DEC`, 2 by default) are *decoded*: their value is a partition index, and for
each of the `2**N_DEC` partitions the spare replaces a different column. With 2
decoded bits one spare column can repair up to four defective cells in four
different columns, as long as each falls in its own partition.

The key idea is that **which** row bits are decoded is chosen per chip, from
its defect map, and stored in fuses with the per-partition column numbers. The
hardware is the same for every chip. Only the fuse contents differ.

The RTL is a complete repairable memory: the cell array with its spare column,
the repair path on every access, the fuse box, and a built-in repair analyzer
that works out the fuse contents from a list of defective cells.

## Default configuration

| parameter     | default | meaning                                               |
|---------------|---------|-------------------------------------------------------|
| `ROW_BITS`    | 9       | row address bits (512 rows)                           |
| `COLS`        | 32      | data columns = word width                             |
| `N_DEC`       | 2       | decoded row bits; 4 partitions                        |
| `MAX_DEFECTS` | 4       | entries in the defect map and in the defect emulation |

There is one spare column. The defaults are the block size used to evaluate the
scheme (512 x 32, one spare, 2 decoded bits). The 8 x 8 block of the worked
example below needs `ROW_BITS=3, COLS=8`. The 64-column wide block needs
`COLS=64`.

## Access path

```
mem_addr ──> row_bit_select ──part_idx──> fuse_box table ──col──> bypass_decoder ──sel──> column_mux <──> sram_array
             (fused bit_sel)                                   (thermometer code)      (shift toward spare)
```

Every access goes through this path:

1. **`row_bit_select`** takes the `N_DEC` row address bits named by the fuses.
   `bit_sel[k]` is the index of the row bit that becomes bit `k` of the
   partition index. The higher-numbered selected bit is the MSB.
2. **`fuse_box`** looks up the column to bypass for that partition. Its table
   has `2**N_DEC` entries of `log2(COLS)` bits.
3. **`bypass_decoder`** turns that column number `k` into `COLS` MUX select
   lines. Line `i` is set for every `i <= k`, so it is a thermometer code, not a
   one-hot code. If the spare is disabled (`fuse_en` low), every line is clear.
4. **`column_mux`** has one 2:1 MUX per column. The spare sits next to
   column 0. When a select line is set, that data bit moves one column toward
   the spare:
   * write: column `j` stores data bit `j+1` for `j < k`, and the spare stores
     bit 0;
   * read: data bit `i <= k` comes from column `i-1`, and bit 0 comes from the
     spare.

   Bits above `k` stay in place. Column `k` still gets written, but nothing
   reads it. For example, bypassing column 2 sets the select lines of columns
   0, 1 and 2.

Because the decoded bits vary from row to row, the same word position can be
shifted in one row and not in another. Each partition has its own bypassed
column.

The array (`sram_array`) is synchronous and single-ported. A read returns data
one cycle later. The select lines chosen for a read are registered with it, so
the read-side MUXes use the lines of that read's own row.

## Choosing the row bits: the repair analyzer

Two defects in **different** columns must not share a partition. So their row
addresses must differ in at least one decoded bit. Two defects in the **same**
column can share a partition, because one replacement serves both.

`repair_analyzer` does this as a covering problem:

1. **Matrix.** For every pair of defects it forms the XOR of their row
   addresses. A pair *needs separating* if both entries are valid and their
   columns differ.
2. **Search.** A row-bit mask is a solution if every pair that needs separating
   has a 1 in at least one masked bit of its XOR, i.e. the mask is a column
   cover of the matrix. The analyzer tries masks 0, 1, 2, … in turn, one per
   clock, and takes the first mask that covers and has exactly `N_DEC` bits. A
   cover with fewer bits is found through its `N_DEC`-bit supersets. If no mask
   covers, the memory cannot be repaired. This always happens when two defects
   in different columns share a row.
3. **Fill.** The set bits of the mask become `bit_sel`, lowest first. Each
   defect's column is written to the table entry of its partition. Partitions
   with no defect get column 0; any working column would do.

Worked example (8 rows, 8 columns, `N_DEC=2`). There are four defects, in rows
`000`, `010`, `100` and `111` of columns 6, 4, 2 and 1. These are their six
pairwise XORs:

| pair        | bit 2 | bit 1 | bit 0 |
|-------------|-------|-------|-------|
| 000 ^ 010   | 0     | 1     | 0     |
| 000 ^ 100   | 1     | 0     | 0     |
| 000 ^ 111   | 1     | 1     | 1     |
| 010 ^ 100   | 1     | 1     | 0     |
| 010 ^ 111   | 1     | 0     | 1     |
| 100 ^ 111   | 0     | 1     | 1     |

Bits {1,0} leave `000^100` uncovered, and bits {2,0} leave `000^010`
uncovered. Bits {2,1} cover every pair. So the analyzer decodes bits 2 and 1,
and the table for partitions 00, 01, 10 and 11 is {6, 4, 2, 1}.

**Timing.** A one-cycle `start` pulse latches the defect map. If mask `m` is
the solution, `done` is high `m + 4` clock edges after the edge that sampled
`start`. If no mask covers, `done` comes after `2**ROW_BITS + 3` edges (515 at
the defaults). `busy` is high in between. The result holds until the next start.

## Top level: `srp_memory`

| port group | signals | behaviour |
|---|---|---|
| access | `mem_en, mem_we, mem_addr, mem_wdata` → `mem_rdata, mem_rvalid` | write or read one word per cycle; read data and `mem_rvalid` come in the next cycle |
| built-in repair | `bisr_start, def_valid/def_row/def_col` → `bisr_busy, bisr_done, bisr_repairable` | runs the analyzer; if it finds a repair, the fuse box is loaded on the `bisr_done` edge; if it does not, the fuse box is left unchanged |
| external programming | `ext_prog, ext_en, ext_bit_sel, ext_col` | loads the fuse box directly (manufacture-time repair from a tester); has priority over the analyzer |
| configuration | `fuse_en, fuse_bit_sel` | the configuration in force |
| defect emulation | `flt_valid/flt_row/flt_col/flt_val` | stuck-at cells in the array, for simulation; `flt_col == COLS` is the spare; tie low in silicon |

The defect map is a list of up to `MAX_DEFECTS` cells (row and column). The
memory test that produces it is not part of this RTL. An access made while the
fuse box is being loaded uses the configuration in force at its clock edge.

## How far to trust it, and where it departs from the scheme

These parts follow the scheme as described:
* the partitioning of the spare by decoded row bits;
* the per-chip choice of those bits;
* the `2**n x log2(C)` fuse table;
* the log2(C)-to-C decoder driving shifting column MUXes;
* the XOR matrix and column-cover formulation.

These are this design's own choices:
* **Fuses** are loadable flip-flops cleared by reset, plus an enable bit. This
  suits built-in repair, which reruns after every reset. True one-time fuse
  cells are process-specific.
* **Covering algorithm**: an exhaustive mask search. It is exact, and
  2**ROW_BITS cycles is short at 9 row bits. For a large `ROW_BITS` a smarter
  search would be needed.
* **Defects in one column** do not count as a conflict. This is the looser of
  two possible readings, "one defective column per partition" rather than "one
  defect per partition". It repairs strictly more maps.
* **Write-side MUXes**, the synchronous single-port timing, the start/done
  handshake and the defect emulation ports.
* **The spare column is assumed defect-free.** The defect map cannot name it.

Not built:
* Several spare columns sharing one row-bit decoder. The MUX arrangement and
  table layout for more than one spare are not defined.
* The conventional-repair baselines used for comparison.
* The memory test.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each one also has a watchdog. Concurrent
assertions in the RTL check three rules: the analyzer's `start` only while idle
and `done` as a single-cycle pulse; the column MUX select lines always a
thermometer code; and `mem_rvalid` exactly one cycle after a read. They are
active when simulating with `--assert`.

| testbench | what it checks |
|---|---|
| `row_bit_select_tb` | random addresses and fuse codes against shift-and-mask; the worked example's partitions |
| `bypass_decoder_tb` | all 32 columns, enabled and disabled, against `2**(k+1)-1` |
| `column_mux_tb` | write then read round trip with the bypassed column corrupted; physical placement of every bit |
| `fuse_box_tb` | reset, load, hold, table lookup |
| `sram_array_tb` | full fill and read back, stuck-at cells, `en` gating |
| `repair_analyzer_tb` | the worked example (8 x 8: bits 2,1, table {6,4,2,1}, `6+4` cycles); 300 random maps at 512 x 32 against an independent reference search (it sorts defects into partitions instead of using XORs), including the cycle count |
| `srp_memory_tb` | the whole memory at its default parameters: 12 trials with 1-4 stuck cells, one of them the worked example (it must decode bits 2 and 1). Each trial shows the errors with repair off, runs built-in repair, checks its verdict and timing, and does full write/read sweeps after repair and after external programming. It counts each mechanism (defects visible, repair done, repair refused, external programming, defective rows read via the spare, defects sharing a column) and fails if any never occurs. |
| `srp_yield_tb` | 300 random maps each of 2, 3 and 4 defects, at 512 x 32 and 512 x 64. Expected: about 99% repairable for 2-3 defects, 80-83% for 4, against 0-2% for a plain spare column. |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl rtl/srp_pkg.sv tb/srp_memory_tb.sv --top-module srp_memory_tb
./obj_dir/Vsrp_memory_tb
```

All of them finish in seconds. To change the size, override the parameters of
`srp_memory` (or of one block). The package `srp_pkg` holds the defaults.
