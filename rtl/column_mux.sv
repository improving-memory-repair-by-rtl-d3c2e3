// Column MUXes that steer a word around one bypassed column onto the spare.
//
// The physical row holds COLS regular columns, bits [COLS-1:0], and the spare
// column, bit COLS, which sits next to column 0. A set select line i
// shifts data bit i one place toward the spare:
//   read : rd_data[i] = rd_sel[i] ? (i == 0 ? spare : column i-1) : column i
//   write: column j   = wr_sel[j+1] ? wr_data[j+1] : wr_data[j];  spare = wr_data[0]
// The two sides have their own select lines because a read returns its data a
// cycle after the access that chose them.
// With the thermometer code of bypass_decoder the bypassed column is never
// read, and every bit at or below it lives one column lower (bit 0 in the
// spare). The bypassed column is still written; its content is ignored.
//
// Purely combinational, one 2:1 MUX per column on each side. The read-side
// shifting MUXes follow the described circuit; the matching write-side
// MUXes are this design's completion of it.
module column_mux #(
  parameter int unsigned COLS = srp_pkg::DEF_COLS
) (
  // write side
  input  logic [COLS-1:0] wr_sel,
  input  logic [COLS-1:0] wr_data,
  output logic [COLS:0]   wr_phys,
  // read side
  input  logic [COLS-1:0] rd_sel,
  input  logic [COLS:0]   rd_phys,
  output logic [COLS-1:0] rd_data
);

  always_comb begin
    // read: shift the bits at or below the bypassed column back up
    rd_data[0] = rd_sel[0] ? rd_phys[COLS] : rd_phys[0];
    for (int i = 1; i < COLS; i++)
      rd_data[i] = rd_sel[i] ? rd_phys[i-1] : rd_phys[i];
    // write: shift them down, bit 0 into the spare
    for (int j = 0; j < COLS - 1; j++)
      wr_phys[j] = wr_sel[j+1] ? wr_data[j+1] : wr_data[j];
    wr_phys[COLS-1] = wr_data[COLS-1];
    wr_phys[COLS]   = wr_data[0];
  end

endmodule
