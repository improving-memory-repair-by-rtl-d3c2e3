// Repair-probability workload for the built-in repair analyzer.
//
// Random defect maps of 2, 3 and 4 defective cells, uniformly placed, are
// handed to two analyzers with 9 row address bits, one spare column and 2
// decoded row bits: one with 32 columns (the default block) and one with 64
// columns (the wider block that replaces four 16-column blocks). Every verdict
// is compared with a reference search. The fraction of repairable maps is then
// checked against what selective row partitioning is expected to reach: close
// to 100% for 2 and 3 defects (only two defects in one row defeat it), and
// roughly 80% for 4 defects, where each of the 4 partitions must hold exactly
// one defect. For comparison the testbench also counts how often a plain spare
// column would do, which needs all defects in one column.
module srp_yield_tb;
  localparam int unsigned RB = 9, ND = 2, MD = 4, NP = 1 << ND;
  localparam int unsigned MAPS = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0;
  logic          dv   [MD];
  logic [RB-1:0] drow [MD];
  logic [5:0]    dcol64 [MD];
  logic [4:0]    dcol32 [MD];
  logic          busy32, done32, rep32, en32, busy64, done64, rep64, en64;
  logic [3:0]    sel32 [ND], sel64 [ND];
  logic [4:0]    tab32 [NP];
  logic [5:0]    tab64 [NP];

  always_comb for (int d = 0; d < MD; d++) dcol32[d] = dcol64[d][4:0];

  repair_analyzer u_a32 (
    .clk, .rst_n, .start, .def_valid(dv), .def_row(drow), .def_col(dcol32),
    .busy(busy32), .done(done32), .repairable(rep32), .fuse_en(en32),
    .bit_sel(sel32), .col(tab32));

  repair_analyzer #(.COLS(64)) u_a64 (
    .clk, .rst_n, .start, .def_valid(dv), .def_row(drow), .def_col(dcol64),
    .busy(busy64), .done(done64), .repairable(rep64), .fuse_en(en64),
    .bit_sel(sel64), .col(tab64));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: can some pair of row bits put every pair of defects in
  // different columns into different partitions?
  function automatic bit ref_rep(input int colbits);
    for (int b0 = 0; b0 < RB; b0++)
      for (int b1 = b0 + 1; b1 < RB; b1++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < MD; i++)
          for (int j = i + 1; j < MD; j++)
            if (dv[i] && dv[j] &&
                (dcol64[i] & 6'((1 << colbits) - 1)) != (dcol64[j] & 6'((1 << colbits) - 1)) &&
                drow[i][b0] == drow[j][b0] && drow[i][b1] == drow[j][b1])
              ok = 0;
        if (ok) return 1;
      end
    return 0;
  endfunction

  initial begin
    int ok32, ok64, trad32, trad64;
    real f32, f64;
    for (int d = 0; d < MD; d++) begin dv[d] = 0; drow[d] = '0; dcol64[d] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 2; n <= MD; n++) begin
      ok32 = 0; ok64 = 0; trad32 = 0; trad64 = 0;
      for (int t = 0; t < MAPS; t++) begin
        bit e32, e64, same32, same64;
        for (int d = 0; d < MD; d++) begin
          dv[d]     = (d < n);
          drow[d]   = RB'($urandom);
          dcol64[d] = 6'($urandom);
        end
        e32 = ref_rep(5);
        e64 = ref_rep(6);
        same32 = 1; same64 = 1;
        for (int d = 1; d < n; d++) begin
          if (dcol64[d][4:0] != dcol64[0][4:0]) same32 = 0;
          if (dcol64[d] != dcol64[0]) same64 = 0;
        end
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        // wait for the slower of the two analyzers
        while (busy32 || busy64) @(negedge clk);
        check(rep32 == e32, $sformatf("32-column verdict, %0d defects", n));
        check(rep64 == e64, $sformatf("64-column verdict, %0d defects", n));
        ok32 += int'(rep32); ok64 += int'(rep64);
        trad32 += int'(same32); trad64 += int'(same64);
      end
      f32 = 100.0 * ok32 / MAPS;
      f64 = 100.0 * ok64 / MAPS;
      $display("%0d defects: repairable 32 columns %5.1f%%, 64 columns %5.1f%%; plain spare %5.1f%% / %5.1f%%",
               n, f32, f64, 100.0 * trad32 / MAPS, 100.0 * trad64 / MAPS);
      if (n < 4) begin
        check(f32 >= 95.0 && f64 >= 95.0, "2 or 3 defects nearly always repairable");
      end else begin
        check(f32 >= 70.0 && f32 <= 92.0 && f64 >= 70.0 && f64 <= 92.0,
              "4 defects repairable in roughly 80% of maps");
      end
      check(ok32 > trad32 && ok64 > trad64, "better than a plain spare column");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
