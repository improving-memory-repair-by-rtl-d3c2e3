// Fuse box: the per-chip repair configuration and its lookup table.
//
// Holds
//   - en          : the spare column is in use,
//   - bit_sel[k]  : which row address bit forms bit k of the partition index,
//   - col[p]      : the column the spare replaces in partition p, for each of
//                   the 2**N_DEC partitions (a 2**n by log2(C) table).
// The table is read combinationally by partition index (rd_part -> rd_col),
// like a small ROM, and drives the bypass decoder.
//
// Programming: while prog is high at a rising clock edge the whole
// configuration is loaded from the prog_* inputs in one cycle. Reset clears
// it (repair off). The table size and its use follow the described scheme.
// Modelling the fuses as loadable flip-flops is this design's choice: it serves
// both a built-in self-repair flow, which reloads the configuration after every
// reset, and manufacture-time repair, where the values come from the tester.
module fuse_box #(
  parameter int unsigned ROW_BITS = srp_pkg::DEF_ROW_BITS,
  parameter int unsigned COLS     = srp_pkg::DEF_COLS,
  parameter int unsigned N_DEC    = srp_pkg::DEF_N_DEC,
  localparam int unsigned RSW     = (ROW_BITS > 1) ? $clog2(ROW_BITS) : 1,
  localparam int unsigned CW      = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned NPART   = 1 << N_DEC
) (
  input  logic             clk,
  input  logic             rst_n,
  // programming
  input  logic             prog,
  input  logic             prog_en,
  input  logic [RSW-1:0]   prog_bit_sel [N_DEC],
  input  logic [CW-1:0]    prog_col     [NPART],
  // configuration
  output logic             en,
  output logic [RSW-1:0]   bit_sel [N_DEC],
  // table lookup
  input  logic [N_DEC-1:0] rd_part,
  output logic [CW-1:0]    rd_col
);

  logic [CW-1:0] col [NPART];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= 1'b0;
      for (int k = 0; k < N_DEC; k++) bit_sel[k] <= '0;
      for (int p = 0; p < NPART; p++) col[p]     <= '0;
    end else if (prog) begin
      en      <= prog_en;
      bit_sel <= prog_bit_sel;
      col     <= prog_col;
    end
  end

  assign rd_col = col[rd_part];

endmodule
