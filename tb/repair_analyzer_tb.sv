// Testbench for repair_analyzer.
//
// Part 1 runs the worked example on an 8-row, 8-column block with 2 decoded
// bits: defects in rows 000, 010, 100, 111 of columns 6, 4, 2, 1 must give
// row bits 2 and 1 and the table {6, 4, 2, 1}, after mask 6 (m + 4 cycles).
// Part 2 uses the default size (9 row bits, 32 columns, up to 4 defects) with
// random defect maps, some with a shared column and some with a shared row.
// The reference searches the masks in the same order but tests each one by
// sorting the defects into partitions and looking for two columns in one
// partition, not through the XOR matrix. Result, table and the start-to-done
// cycle count are all checked.
module repair_analyzer_tb;
  localparam int unsigned RB = 9, NC = 32, ND = 2, MD = 4;
  localparam int unsigned RSW = $clog2(RB), CW = $clog2(NC), NP = 1 << ND;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- small instance: the worked example ----------------
  logic          s_start = 0, s_busy, s_done, s_rep, s_en;
  logic          s_v   [4];
  logic [2:0]    s_row [4];
  logic [2:0]    s_col [4];
  logic [1:0]    s_sel [2];
  logic [2:0]    s_tab [4];

  repair_analyzer #(.ROW_BITS(3), .COLS(8), .N_DEC(2), .MAX_DEFECTS(4)) u_small (
    .clk, .rst_n, .start(s_start), .def_valid(s_v), .def_row(s_row), .def_col(s_col),
    .busy(s_busy), .done(s_done), .repairable(s_rep), .fuse_en(s_en),
    .bit_sel(s_sel), .col(s_tab));

  // ---------------- default-size instance ----------------
  logic            start = 0, busy, done, rep, fen;
  logic            dv   [MD];
  logic [RB-1:0]   drow [MD];
  logic [CW-1:0]   dcol [MD];
  logic [RSW-1:0]  bsel [ND];
  logic [CW-1:0]   tab  [NP];

  repair_analyzer u_dut (
    .clk, .rst_n, .start, .def_valid(dv), .def_row(drow), .def_col(dcol),
    .busy, .done, .repairable(rep), .fuse_en(fen), .bit_sel(bsel), .col(tab));

  // reference: first mask with ND bits under which no partition holds two
  // different defective columns
  function automatic bit ref_search(output int mask_found);
    for (int m = 0; m < (1 << RB); m++) begin
      bit ok;
      int pcol [NP];
      if ($countones(m) != ND) continue;
      ok = 1;
      for (int p = 0; p < NP; p++) pcol[p] = -1;
      for (int d = 0; d < MD; d++) begin
        int part, k;
        if (!dv[d]) continue;
        part = 0; k = 0;
        for (int b = 0; b < RB; b++)
          if (m[b]) begin
            part |= int'(drow[d][b]) << k;
            k++;
          end
        if (pcol[part] == -1) pcol[part] = dcol[d];
        else if (pcol[part] != dcol[d]) ok = 0;
      end
      if (ok) begin
        mask_found = m;
        return 1;
      end
    end
    mask_found = -1;
    return 0;
  endfunction

  int stat_rep = 0, stat_irrep = 0, stat_shared_col = 0;

  initial begin
    int cyc, m, n;
    bit exp_rep;
    for (int d = 0; d < 4; d++) begin
      s_v[d] = 1;
      dv[d] = 0; drow[d] = '0; dcol[d] = '0;
    end
    s_row = '{3'b000, 3'b010, 3'b100, 3'b111};
    s_col = '{3'd6, 3'd4, 3'd2, 3'd1};
    repeat (2) @(negedge clk);
    rst_n = 1;

    // part 1
    @(negedge clk) s_start = 1;
    @(negedge clk) s_start = 0;
    cyc = 0;
    while (!s_done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 6 + 4, $sformatf("example latency %0d", cyc));
    check(s_rep && s_en, "example repairable");
    check(s_sel[1] == 2 && s_sel[0] == 1, "example row bits 2,1");
    check(s_tab[0] == 6 && s_tab[1] == 4 && s_tab[2] == 2 && s_tab[3] == 1,
          $sformatf("example table %0d %0d %0d %0d", s_tab[0], s_tab[1], s_tab[2], s_tab[3]));

    // part 2
    for (int t = 0; t < 300; t++) begin
      n = $urandom_range(0, MD);
      for (int d = 0; d < MD; d++) begin
        dv[d]   = (d < n);
        drow[d] = RB'($urandom);
        dcol[d] = CW'($urandom);
      end
      if (n >= 2 && t % 5 == 1) begin dcol[1] = dcol[0]; stat_shared_col++; end
      if (n >= 2 && t % 7 == 3) drow[1] = drow[0];
      exp_rep = ref_search(m);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 0;
      while (!done && cyc < 2000) begin
        @(negedge clk);
        cyc++;
      end
      check(rep == exp_rep, $sformatf("t=%0d repairable %0d exp %0d", t, rep, exp_rep));
      if (exp_rep) begin
        int k;
        stat_rep++;
        check(cyc == m + 4, $sformatf("t=%0d latency %0d exp %0d", t, cyc, m + 4));
        check(fen == (n > 0), "fuse enable");
        k = 0;
        for (int b = 0; b < RB; b++)
          if (m[b]) begin
            check(bsel[k] == RSW'(b), "row bit selection");
            k++;
          end
        for (int d = 0; d < MD; d++)
          if (dv[d]) begin
            logic [ND-1:0] part;
            for (int q = 0; q < ND; q++) part[q] = drow[d][bsel[q]];
            check(tab[part] == dcol[d], $sformatf("t=%0d defect %0d not in table", t, d));
          end
      end else begin
        stat_irrep++;
        check(cyc == (1 << RB) + 3, $sformatf("t=%0d fail latency %0d", t, cyc));
      end
      @(negedge clk);
      check(!busy, "idle after done");
    end
    check(stat_rep > 0 && stat_irrep > 0, "both outcomes seen");
    $display("repairable=%0d irreparable=%0d shared_column=%0d", stat_rep, stat_irrep, stat_shared_col);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
