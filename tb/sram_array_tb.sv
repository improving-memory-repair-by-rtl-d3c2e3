// Testbench for sram_array at its default size (512 rows of 33 bits, 4
// emulated defects). Fills every row with random data and reads it back with
// one cycle of latency, then turns on stuck-at cells and checks that exactly
// those bits read as their stuck value, that a write does not clear them, and
// that the array holds still while en is low.
module sram_array_tb;
  localparam int unsigned ROW_BITS = 9;
  localparam int unsigned WIDTH    = 33;
  localparam int unsigned N_FLT    = 4;
  localparam int unsigned ROWS     = 1 << ROW_BITS;
  localparam int unsigned FCW      = $clog2(WIDTH);

  logic clk = 0;
  logic en = 0, we = 0;
  logic [ROW_BITS-1:0] addr = '0;
  logic [WIDTH-1:0]    wdata = '0, rdata;
  logic                flt_valid [N_FLT];
  logic [ROW_BITS-1:0] flt_row   [N_FLT];
  logic [FCW-1:0]      flt_col   [N_FLT];
  logic                flt_val   [N_FLT];

  logic [WIDTH-1:0] model [ROWS];
  int checks = 0, failures = 0;

  sram_array dut (.clk, .en, .we, .addr, .wdata, .rdata,
                  .flt_valid, .flt_row, .flt_col, .flt_val);

  always #5 clk = ~clk;

  task automatic write_row(input int r, input logic [WIDTH-1:0] d);
    @(negedge clk);
    en = 1; we = 1; addr = ROW_BITS'(r); wdata = d;
    @(negedge clk);
    en = 0; we = 0;
  endtask

  task automatic read_check(input int r);
    logic [WIDTH-1:0] e;
    @(negedge clk);
    en = 1; we = 0; addr = ROW_BITS'(r);
    @(negedge clk);
    en = 0;
    e = model[r];
    for (int f = 0; f < N_FLT; f++)
      if (flt_valid[f] && flt_row[f] == ROW_BITS'(r)) e[flt_col[f]] = flt_val[f];
    checks++;
    if (rdata !== e) begin
      failures++;
      if (failures < 10) $display("row %0d read %h exp %h", r, rdata, e);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < N_FLT; f++) begin
      flt_valid[f] = 0; flt_row[f] = '0; flt_col[f] = '0; flt_val[f] = 0;
    end
    for (int r = 0; r < ROWS; r++) begin
      model[r] = {$urandom, $urandom} & {WIDTH{1'b1}};
      write_row(r, model[r]);
    end
    for (int r = 0; r < ROWS; r++) read_check(r);
    // stuck-at cells, one of them in the spare column, each opposite to the data
    for (int f = 0; f < N_FLT; f++) begin
      flt_valid[f] = 1;
      flt_row[f]   = ROW_BITS'($urandom);
      flt_col[f]   = (f == 0) ? FCW'(WIDTH - 1) : FCW'($urandom_range(0, WIDTH - 2));
      flt_val[f]   = ~model[flt_row[f]][flt_col[f]];
    end
    for (int f = 0; f < N_FLT; f++) begin
      read_check(flt_row[f]);
      checks++;
      if (rdata[flt_col[f]] != flt_val[f]) failures++;
      write_row(flt_row[f], model[flt_row[f]]);
      read_check(flt_row[f]);
    end
    // en low: no write happens
    @(negedge clk);
    en = 0; we = 1; addr = 5; wdata = ~model[5];
    @(negedge clk);
    we = 0;
    for (int f = 0; f < N_FLT; f++) flt_valid[f] = 0;
    read_check(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
