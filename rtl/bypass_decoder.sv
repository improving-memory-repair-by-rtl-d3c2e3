// Bypass decoder: column number to column MUX select lines.
//
// Decodes the log2(COLS)-bit number of the column to bypass into COLS select
// lines, one per column MUX. Select line i is set for every column at or below
// the bypassed one, so the MUXes of those columns take the neighbour on their
// spare-side, and the word shifts past the bypassed column onto the spare
// (bypassing column 2 sets the three select lines of columns 0, 1 and 2). With
// en low every line is clear and the spare is unused.
//
// Purely combinational. The log2(C)-to-C decoder and the shift pattern follow
// the described repair circuit; the enable input is this design's addition.
module bypass_decoder #(
  parameter int unsigned COLS = srp_pkg::DEF_COLS,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            en,
  input  logic [CW-1:0]   col,
  output logic [COLS-1:0] sel
);

  always_comb begin
    for (int i = 0; i < COLS; i++)
      sel[i] = en && (CW'(i) <= col);
  end

endmodule
