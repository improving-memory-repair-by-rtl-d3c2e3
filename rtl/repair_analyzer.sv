// Built-in repair analyzer: chooses the row address bits to decode and fills
// the fuse box table from a defect map.
//
// Method. Every pair of defects that lie in different columns must end up in
// different partitions, so the row addresses of such a pair must differ in at
// least one of the N_DEC decoded bits. The analyzer first forms, for every pair
// of defects, the XOR of their row addresses (one row of the pairwise XOR
// matrix) and marks whether the pair needs separating (both valid, columns
// differ). A set of row bits is a solution when it is a column cover of the
// marked matrix rows: each has a 1 in at least one chosen bit. The analyzer
// tries every ROW_BITS-bit mask in ascending order, one mask per clock, and
// takes the first with exactly N_DEC bits set that covers. A cover with fewer
// bits is found as one of its N_DEC-bit supersets. If no mask covers, the
// memory cannot be repaired. Defects that share a column need no separating:
// one spare replacement serves them all.
//
// Result. bit_sel[k] is the k-th lowest chosen bit (bit_sel[N_DEC-1] is the
// most significant bit of the partition index); col[p] is the column of the
// defect that falls in partition p, 0 where no defect falls. fuse_en is set
// when the spare is needed, i.e. at least one defect is valid.
//
// Timing. A one-cycle start pulse latches the defect map. One cycle builds the
// XOR matrix, the search then takes one cycle per mask tried (masks 0, 1, 2, ...
// in turn), one cycle fills the table, and done pulses with repairable and the
// result held until the next start. If mask m is the solution, done is high
// m + 4 clock edges after the edge that sampled start; if there is none,
// 2**ROW_BITS + 3 edges after it (512 + 3 at the default size).
//
// The XOR matrix and the column-cover formulation follow the described repair
// algorithm. Doing it on chip, the exhaustive mask search (the text leaves the
// covering algorithm open) and the choice of the lowest covering mask are this
// design's choices. Defects in the spare column cannot be named in the map: the
// spare is taken to be fault-free.
module repair_analyzer #(
  parameter int unsigned ROW_BITS    = srp_pkg::DEF_ROW_BITS,
  parameter int unsigned COLS        = srp_pkg::DEF_COLS,
  parameter int unsigned N_DEC       = srp_pkg::DEF_N_DEC,
  parameter int unsigned MAX_DEFECTS = srp_pkg::DEF_MAX_DEFECTS,
  localparam int unsigned RSW        = (ROW_BITS > 1) ? $clog2(ROW_BITS) : 1,
  localparam int unsigned CW         = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned NPART      = 1 << N_DEC,
  localparam int unsigned NPAIR      = (MAX_DEFECTS * (MAX_DEFECTS - 1)) / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  // defect map
  input  logic                def_valid [MAX_DEFECTS],
  input  logic [ROW_BITS-1:0] def_row   [MAX_DEFECTS],
  input  logic [CW-1:0]       def_col   [MAX_DEFECTS],
  // status
  output logic                busy,
  output logic                done,
  output logic                repairable,
  // fuse box contents
  output logic                fuse_en,
  output logic [RSW-1:0]      bit_sel [N_DEC],
  output logic [CW-1:0]       col     [NPART]
);

  typedef enum logic [2:0] {IDLE, MATRIX, SEARCH, FILL, FINISH} state_t;
  state_t state;

  // latched defect map
  logic                v_q   [MAX_DEFECTS];
  logic [ROW_BITS-1:0] row_q [MAX_DEFECTS];
  logic [CW-1:0]       col_q [MAX_DEFECTS];

  // pairwise XOR matrix and "must be separated" marks
  logic [ROW_BITS-1:0] xr   [NPAIR];
  logic                need [NPAIR];

  logic [ROW_BITS:0]   mask;     // one extra bit flags the end of the search
  logic                covers;
  logic [RSW-1:0]      sel_of_mask [N_DEC];

  // does the current mask cover every marked matrix row, with N_DEC bits?
  always_comb begin
    covers = ($countones(mask[ROW_BITS-1:0]) == N_DEC) && !mask[ROW_BITS];
    for (int p = 0; p < NPAIR; p++)
      if (need[p] && (xr[p] & mask[ROW_BITS-1:0]) == '0) covers = 1'b0;
  end

  // indices of the set bits of the mask, lowest first
  always_comb begin
    int k;
    k = 0;
    for (int k2 = 0; k2 < N_DEC; k2++) sel_of_mask[k2] = '0;
    for (int b = 0; b < ROW_BITS; b++)
      if (mask[b]) begin
        if (k < N_DEC) sel_of_mask[k] = RSW'(b);
        k++;
      end
  end

  // partition of each latched defect under the chosen bits
  function automatic logic [N_DEC-1:0] part_of(input logic [ROW_BITS-1:0] r,
                                               input logic [RSW-1:0] s [N_DEC]);
    logic [N_DEC-1:0] pi;
    for (int k = 0; k < N_DEC; k++) pi[k] = r[s[k]];
    return pi;
  endfunction

  // pairwise XOR matrix of the latched defect map
  logic [ROW_BITS-1:0] xr_c   [NPAIR];
  logic                need_c [NPAIR];

  always_comb begin
    int p;
    p = 0;
    for (int i = 0; i < MAX_DEFECTS; i++)
      for (int j = i + 1; j < MAX_DEFECTS; j++) begin
        xr_c[p]   = row_q[i] ^ row_q[j];
        need_c[p] = v_q[i] && v_q[j] && (col_q[i] != col_q[j]);
        p++;
      end
  end

  // fuse table under the chosen bits: each defect's column in its partition
  logic [CW-1:0] fill_col [NPART];
  logic          any_def;

  always_comb begin
    any_def = 1'b0;
    for (int p = 0; p < NPART; p++) fill_col[p] = '0;
    for (int d = 0; d < MAX_DEFECTS; d++)
      if (v_q[d]) begin
        fill_col[part_of(row_q[d], bit_sel)] = col_q[d];
        any_def = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      done       <= 1'b0;
      repairable <= 1'b0;
      fuse_en    <= 1'b0;
      mask       <= '0;
      for (int d = 0; d < MAX_DEFECTS; d++) begin
        v_q[d] <= 1'b0; row_q[d] <= '0; col_q[d] <= '0;
      end
      for (int p = 0; p < NPAIR; p++) begin
        xr[p] <= '0; need[p] <= 1'b0;
      end
      for (int k = 0; k < N_DEC; k++) bit_sel[k] <= '0;
      for (int p = 0; p < NPART; p++) col[p] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          v_q   <= def_valid;
          row_q <= def_row;
          col_q <= def_col;
          state <= MATRIX;
        end
        MATRIX: begin
          xr    <= xr_c;
          need  <= need_c;
          mask  <= '0;
          state <= SEARCH;
        end
        SEARCH: begin
          if (covers) begin
            bit_sel <= sel_of_mask;
            state   <= FILL;
          end else if (mask[ROW_BITS]) begin
            repairable <= 1'b0;
            fuse_en    <= 1'b0;
            state      <= FINISH;
          end else begin
            mask <= mask + 1'b1;
          end
        end
        FILL: begin
          col        <= fill_col;
          fuse_en    <= any_def;
          repairable <= 1'b1;
          state      <= FINISH;
        end
        FINISH: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // handshake rules: start only while idle; done is a one-cycle pulse
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("repair_analyzer: start while busy is ignored");
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done)
    else $error("repair_analyzer: done longer than one cycle");

endmodule
