// Memory cell array with the spare column, and defective-cell emulation.
//
// ROWS words of WIDTH bits (the data columns plus the spare column, which is
// the top bit). Synchronous single port: with en high at a rising edge, we high
// writes wdata to row addr, we low reads row addr into rdata, which is valid
// from the next edge on (one cycle of read latency). The cells are not reset.
//
// Defective cells are emulated as stuck-at cells: while flt_valid[f] is set,
// a read of row flt_row[f] returns flt_val[f] in column flt_col[f] whatever was
// written. This gives the repair logic real defects to work around in
// simulation; in silicon the same ports would be tied low. The array itself is
// the plain memory block of the described scheme; the port timing and the
// stuck-at emulation are this design's choices.
module sram_array #(
  parameter int unsigned ROW_BITS = srp_pkg::DEF_ROW_BITS,
  parameter int unsigned WIDTH    = srp_pkg::DEF_COLS + 1,
  parameter int unsigned N_FLT    = srp_pkg::DEF_MAX_DEFECTS,
  localparam int unsigned ROWS    = 1 << ROW_BITS,
  localparam int unsigned FCW     = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic                clk,
  input  logic                en,
  input  logic                we,
  input  logic [ROW_BITS-1:0] addr,
  input  logic [WIDTH-1:0]    wdata,
  output logic [WIDTH-1:0]    rdata,
  // defective-cell emulation
  input  logic                flt_valid [N_FLT],
  input  logic [ROW_BITS-1:0] flt_row   [N_FLT],
  input  logic [FCW-1:0]      flt_col   [N_FLT],
  input  logic                flt_val   [N_FLT]
);

  logic [WIDTH-1:0] mem [ROWS];
  logic [WIDTH-1:0] rd_word;

  // stored word with the stuck-at cells of the addressed row applied
  always_comb begin
    rd_word = mem[addr];
    for (int f = 0; f < N_FLT; f++)
      if (flt_valid[f] && flt_row[f] == addr && 32'(flt_col[f]) < WIDTH)
        rd_word[flt_col[f]] = flt_val[f];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= rd_word;
    end
  end

endmodule
