// Shared constants of the selective-row-partitioning repairable memory.
//
// The defaults describe the memory block the design is evaluated with: 9 row
// address bits (512 rows), 32 data columns, one spare column, and 2 row address
// bits decoded to split the spare column into 4 row partitions. MAX_DEFECTS is
// the size of the defect map the built-in repair analyzer accepts; 4 is the
// largest number of defects one spare with 2 decoded bits can repair in
// different columns. These numbers follow the evaluated configuration; the
// package itself holds no logic.
package srp_pkg;

  // Row address bits of the memory block (rows = 2**ROW_BITS).
  localparam int unsigned DEF_ROW_BITS    = 9;
  // Data columns, i.e. bits per word.
  localparam int unsigned DEF_COLS        = 32;
  // Row address bits decoded to partition the spare column (n).
  localparam int unsigned DEF_N_DEC       = 2;
  // Entries of the defect map handed to the repair analyzer, and of the
  // defective-cell emulation in the cell array.
  localparam int unsigned DEF_MAX_DEFECTS = 4;

endpackage
