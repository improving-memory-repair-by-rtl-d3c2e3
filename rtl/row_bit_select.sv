// Row address bit selector.
//
// Picks N_DEC bits out of the ROW_BITS-bit row address. Which bits are taken is
// set per chip by the fuse box: bit_sel[k] is the index of the row address bit
// that becomes bit k of the partition index, so bit_sel[N_DEC-1] gives the most
// significant bit. The partition index addresses the fuse box table that names
// the column the spare replaces in that part of the row address space.
//
// Purely combinational: N_DEC multiplexers of ROW_BITS inputs each. An index at
// or above ROW_BITS selects 0. The selection through fuses follows the
// described scheme; the multiplexer form and the bit order are this design's
// choice.
module row_bit_select #(
  parameter int unsigned ROW_BITS = srp_pkg::DEF_ROW_BITS,
  parameter int unsigned N_DEC    = srp_pkg::DEF_N_DEC,
  localparam int unsigned RSW     = (ROW_BITS > 1) ? $clog2(ROW_BITS) : 1
) (
  input  logic [ROW_BITS-1:0] row_addr,
  input  logic [RSW-1:0]      bit_sel [N_DEC],
  output logic [N_DEC-1:0]    part_idx
);

  always_comb begin
    for (int k = 0; k < N_DEC; k++) begin
      part_idx[k] = 1'b0;
      for (int b = 0; b < ROW_BITS; b++)
        if (bit_sel[k] == RSW'(b)) part_idx[k] = row_addr[b];
    end
  end

endmodule
