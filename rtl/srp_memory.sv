// Repairable memory with selective row partitioning of a spare column.
//
// A memory of 2**ROW_BITS words of COLS bits with one spare column. A classic
// spare column replaces one column for all rows. Here N_DEC row address bits,
// chosen per chip, split the rows into 2**N_DEC partitions, and the spare
// replaces a different column in each partition, so one spare repairs up to
// 2**N_DEC defective cells in different columns.
//
// Access path, per access: the row address goes through row_bit_select (the
// fused row bits form the partition index), the fuse box table gives the column
// to bypass in that partition, bypass_decoder turns it into the column MUX
// select lines, and column_mux shifts the word past that column onto the spare,
// on the way into the cell array and out of it.
//
// Interface and timing.
//   - Access port: with mem_en high at a rising edge, mem_we high writes
//     mem_wdata to row mem_addr; mem_we low reads it, and mem_rdata is valid in
//     the cycle after the edge, flagged by mem_rvalid.
//   - Built-in repair: a one-cycle bisr_start pulse hands the defect map
//     (def_*) to repair_analyzer. When it is done (bisr_done pulses, result in
//     bisr_repairable) the fuse box is loaded with its result in the same cycle
//     if the memory is repairable. See repair_analyzer for the latency.
//   - External programming (manufacture-time repair): ext_prog high at an edge
//     loads ext_* into the fuse box. It has priority over the analyzer.
//   - Defective cells of the array are emulated through flt_* (stuck-at
//     cells, column COLS is the spare); in silicon these inputs are tied low.
// Accesses made while the fuse box changes see the configuration in force at
// the access edge; the read data path uses the select lines captured at the
// read edge.
//
// The structure follows the described block diagram; the port timing, the
// fuse box loading and the defect emulation are this design's choices.
module srp_memory #(
  parameter int unsigned ROW_BITS    = srp_pkg::DEF_ROW_BITS,
  parameter int unsigned COLS        = srp_pkg::DEF_COLS,
  parameter int unsigned N_DEC       = srp_pkg::DEF_N_DEC,
  parameter int unsigned MAX_DEFECTS = srp_pkg::DEF_MAX_DEFECTS,
  localparam int unsigned RSW        = (ROW_BITS > 1) ? $clog2(ROW_BITS) : 1,
  localparam int unsigned CW         = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned FCW        = $clog2(COLS + 1),
  localparam int unsigned NPART      = 1 << N_DEC
) (
  input  logic                clk,
  input  logic                rst_n,
  // access port
  input  logic                mem_en,
  input  logic                mem_we,
  input  logic [ROW_BITS-1:0] mem_addr,
  input  logic [COLS-1:0]     mem_wdata,
  output logic [COLS-1:0]     mem_rdata,
  output logic                mem_rvalid,
  // built-in repair
  input  logic                bisr_start,
  input  logic                def_valid [MAX_DEFECTS],
  input  logic [ROW_BITS-1:0] def_row   [MAX_DEFECTS],
  input  logic [CW-1:0]       def_col   [MAX_DEFECTS],
  output logic                bisr_busy,
  output logic                bisr_done,
  output logic                bisr_repairable,
  // external fuse programming
  input  logic                ext_prog,
  input  logic                ext_en,
  input  logic [RSW-1:0]      ext_bit_sel [N_DEC],
  input  logic [CW-1:0]       ext_col     [NPART],
  // configuration in force
  output logic                fuse_en,
  output logic [RSW-1:0]      fuse_bit_sel [N_DEC],
  // defective-cell emulation
  input  logic                flt_valid [MAX_DEFECTS],
  input  logic [ROW_BITS-1:0] flt_row   [MAX_DEFECTS],
  input  logic [FCW-1:0]      flt_col   [MAX_DEFECTS],
  input  logic                flt_val   [MAX_DEFECTS]
);

  // ---------------- repair analyzer and fuse box ----------------
  logic             ra_en;
  logic [RSW-1:0]   ra_bit_sel [N_DEC];
  logic [CW-1:0]    ra_col     [NPART];

  repair_analyzer #(
    .ROW_BITS(ROW_BITS), .COLS(COLS), .N_DEC(N_DEC), .MAX_DEFECTS(MAX_DEFECTS)
  ) u_analyzer (
    .clk, .rst_n,
    .start      (bisr_start),
    .def_valid, .def_row, .def_col,
    .busy       (bisr_busy),
    .done       (bisr_done),
    .repairable (bisr_repairable),
    .fuse_en    (ra_en),
    .bit_sel    (ra_bit_sel),
    .col        (ra_col)
  );

  logic             fb_prog;
  logic             fb_prog_en;
  logic [RSW-1:0]   fb_prog_bit_sel [N_DEC];
  logic [CW-1:0]    fb_prog_col     [NPART];
  logic [N_DEC-1:0] part_idx;
  logic [CW-1:0]    bypass_col;

  always_comb begin
    fb_prog         = ext_prog || (bisr_done && bisr_repairable);
    fb_prog_en      = ext_prog ? ext_en      : ra_en;
    fb_prog_bit_sel = ext_prog ? ext_bit_sel : ra_bit_sel;
    fb_prog_col     = ext_prog ? ext_col     : ra_col;
  end

  fuse_box #(
    .ROW_BITS(ROW_BITS), .COLS(COLS), .N_DEC(N_DEC)
  ) u_fuses (
    .clk, .rst_n,
    .prog         (fb_prog),
    .prog_en      (fb_prog_en),
    .prog_bit_sel (fb_prog_bit_sel),
    .prog_col     (fb_prog_col),
    .en           (fuse_en),
    .bit_sel      (fuse_bit_sel),
    .rd_part      (part_idx),
    .rd_col       (bypass_col)
  );

  // ---------------- access path ----------------
  row_bit_select #(.ROW_BITS(ROW_BITS), .N_DEC(N_DEC)) u_rowsel (
    .row_addr (mem_addr),
    .bit_sel  (fuse_bit_sel),
    .part_idx (part_idx)
  );

  logic [COLS-1:0] sel, sel_q;

  bypass_decoder #(.COLS(COLS)) u_dec (
    .en  (fuse_en),
    .col (bypass_col),
    .sel (sel)
  );

  logic [COLS:0] wr_phys, rd_phys;

  // the write side uses the select lines of the current access, the read side
  // those captured with the read
  column_mux #(.COLS(COLS)) u_colmux (
    .wr_sel  (sel),
    .wr_data (mem_wdata),
    .wr_phys (wr_phys),
    .rd_sel  (sel_q),
    .rd_phys (rd_phys),
    .rd_data (mem_rdata)
  );

  sram_array #(
    .ROW_BITS(ROW_BITS), .WIDTH(COLS + 1), .N_FLT(MAX_DEFECTS)
  ) u_array (
    .clk,
    .en    (mem_en),
    .we    (mem_we),
    .addr  (mem_addr),
    .wdata (wr_phys),
    .rdata (rd_phys),
    .flt_valid, .flt_row, .flt_col, .flt_val
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q      <= '0;
      mem_rvalid <= 1'b0;
    end else begin
      mem_rvalid <= mem_en && !mem_we;
      if (mem_en && !mem_we) sel_q <= sel;
    end
  end

  // the column MUX select lines always form a thermometer code from column 0,
  // so exactly one column (or none) is skipped
  a_sel_thermometer: assert property (@(posedge clk) disable iff (!rst_n)
                                      ((sel + 1'b1) & sel) == '0)
    else $error("srp_memory: column MUX select lines are not a thermometer code");
  // read data comes exactly one cycle after a read
  a_rvalid: assert property (@(posedge clk) disable iff (!rst_n)
                             mem_rvalid == $past(mem_en && !mem_we))
    else $error("srp_memory: mem_rvalid out of step with reads");

endmodule
