// Testbench for fuse_box at its default size (9 row bits, 32 columns, 2
// decoded bits, so a 4-entry table). Checks the cleared state after reset,
// loading a random configuration, holding it while prog is low, the table
// lookup for every partition, and that reset clears it again.
module fuse_box_tb;
  localparam int unsigned ROW_BITS = 9;
  localparam int unsigned COLS     = 32;
  localparam int unsigned N_DEC    = 2;
  localparam int unsigned RSW      = $clog2(ROW_BITS);
  localparam int unsigned CW       = $clog2(COLS);
  localparam int unsigned NPART    = 1 << N_DEC;

  logic clk = 0, rst_n = 0;
  logic prog = 0, prog_en = 0;
  logic [RSW-1:0]   prog_bit_sel [N_DEC];
  logic [CW-1:0]    prog_col     [NPART];
  logic             en;
  logic [RSW-1:0]   bit_sel [N_DEC];
  logic [N_DEC-1:0] rd_part = '0;
  logic [CW-1:0]    rd_col;

  logic             m_en;
  logic [RSW-1:0]   m_sel [N_DEC];
  logic [CW-1:0]    m_col [NPART];
  int checks = 0, failures = 0;

  fuse_box dut (.clk, .rst_n, .prog, .prog_en, .prog_bit_sel, .prog_col,
                .en, .bit_sel, .rd_part, .rd_col);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic compare_all(input string what);
    check(en == m_en, {what, " en"});
    for (int k = 0; k < N_DEC; k++) check(bit_sel[k] == m_sel[k], {what, " bit_sel"});
    for (int p = 0; p < NPART; p++) begin
      rd_part = N_DEC'(p);
      #1;
      check(rd_col == m_col[p], {what, " table"});
    end
  endtask

  task automatic randomize_prog();
    prog_en = 1'($urandom);
    for (int k = 0; k < N_DEC; k++) prog_bit_sel[k] = RSW'($urandom_range(0, ROW_BITS - 1));
    for (int p = 0; p < NPART; p++) prog_col[p] = CW'($urandom);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    randomize_prog();
    m_en = 0;
    for (int k = 0; k < N_DEC; k++) m_sel[k] = '0;
    for (int p = 0; p < NPART; p++) m_col[p] = '0;
    #12 rst_n = 1;
    compare_all("after reset");
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      randomize_prog();
      prog = 1'($urandom);
      if (prog) begin
        m_en = prog_en; m_sel = prog_bit_sel; m_col = prog_col;
      end
      @(negedge clk);
      prog = 0;
      randomize_prog();      // must be ignored while prog is low
      @(negedge clk);
      compare_all("loaded");
    end
    rst_n = 0; #1;
    m_en = 0;
    for (int k = 0; k < N_DEC; k++) m_sel[k] = '0;
    for (int p = 0; p < NPART; p++) m_col[p] = '0;
    compare_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
