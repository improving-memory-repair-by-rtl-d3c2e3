// End-to-end testbench for srp_memory at its default size: 512 rows of 32 bits
// plus one spare column, 2 decoded row bits, defect maps of up to 4 cells.
//
// Each trial places 1 to 4 stuck-at cells in the array (some trials put two in
// one row, which no row partitioning can separate, or two in one column; one
// trial uses the 4-defect worked example, which must decode row bits 2 and 1)
// and
//   A. with repair off, fills and reads back the whole memory and expects
//      exactly the stuck bits to be wrong;
//   B. runs the built-in repair with the same defect map, compares the verdict
//      with a reference search, and if repaired fills and reads back the whole
//      memory and expects no error;
//   C. every other trial, programs the fuse box from outside with a
//      configuration the testbench works out itself (the reference search and
//      its own partition table) and checks the whole memory again.
// Read data must come one cycle after the read, flagged by mem_rvalid.
// Counted mechanisms, each of which must occur: defects visible without
// repair, built-in repair succeeding, built-in repair refusing an irreparable
// map, external programming, a defective row read correctly through the spare,
// and two defects in one column sharing one partition entry.
module srp_memory_tb;
  localparam int unsigned RB = 9, NC = 32, ND = 2, MD = 4;
  localparam int unsigned RSW = $clog2(RB), CW = $clog2(NC), FCW = $clog2(NC + 1);
  localparam int unsigned NP = 1 << ND, ROWS = 1 << RB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            mem_en = 0, mem_we = 0;
  logic [RB-1:0]   mem_addr = '0;
  logic [NC-1:0]   mem_wdata = '0, mem_rdata;
  logic            mem_rvalid;
  logic            bisr_start = 0, bisr_busy, bisr_done, bisr_repairable;
  logic            def_valid [MD];
  logic [RB-1:0]   def_row   [MD];
  logic [CW-1:0]   def_col   [MD];
  logic            ext_prog = 0, ext_en = 0;
  logic [RSW-1:0]  ext_bit_sel [ND];
  logic [CW-1:0]   ext_col     [NP];
  logic            fuse_en;
  logic [RSW-1:0]  fuse_bit_sel [ND];
  logic            flt_valid [MD];
  logic [RB-1:0]   flt_row   [MD];
  logic [FCW-1:0]  flt_col   [MD];
  logic            flt_val   [MD];

  srp_memory dut (.*);

  int checks = 0, failures = 0;
  int n_seen = 0, n_bisr_ok = 0, n_bisr_refused = 0, n_ext = 0, n_bypassed = 0, n_shared = 0;
  logic [NC-1:0] model [ROWS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference search: first mask of ND row bits under which no partition holds
  // two different defective columns; gives the bit list and partition table
  function automatic bit ref_repair(output int mask, output int sel [ND], output int tab [NP]);
    for (int m = 0; m < (1 << RB); m++) begin
      bit ok;
      int pcol [NP];
      int bl [ND];
      int k;
      if ($countones(m) != ND) continue;
      k = 0;
      for (int b = 0; b < RB; b++) if (m[b]) begin bl[k] = b; k++; end
      ok = 1;
      for (int p = 0; p < NP; p++) pcol[p] = -1;
      for (int d = 0; d < MD; d++) begin
        int part;
        if (!def_valid[d]) continue;
        part = 0;
        for (int q = 0; q < ND; q++) part |= int'(def_row[d][bl[q]]) << q;
        if (pcol[part] == -1) pcol[part] = int'(def_col[d]);
        else if (pcol[part] != int'(def_col[d])) ok = 0;
      end
      if (ok) begin
        mask = m;
        sel  = bl;
        for (int p = 0; p < NP; p++) tab[p] = (pcol[p] < 0) ? 0 : pcol[p];
        return 1;
      end
    end
    return 0;
  endfunction

  task automatic write_row(input int r, input logic [NC-1:0] d);
    @(negedge clk);
    mem_en = 1; mem_we = 1; mem_addr = RB'(r); mem_wdata = d;
    @(negedge clk);
    mem_en = 0; mem_we = 0;
  endtask

  task automatic read_row(input int r, output logic [NC-1:0] d);
    @(negedge clk);
    mem_en = 1; mem_we = 0; mem_addr = RB'(r);
    @(negedge clk);
    mem_en = 0;
    check(mem_rvalid, "rvalid one cycle after the read");
    d = mem_rdata;
    @(negedge clk);
    check(!mem_rvalid, "rvalid for one cycle");
  endtask

  function automatic bit is_defect_row(input int r);
    for (int d = 0; d < MD; d++) if (flt_valid[d] && flt_row[d] == RB'(r)) return 1;
    return 0;
  endfunction

  // fill every row, read every row back; with repaired=0 expect the raw
  // stuck-at bits, otherwise the written data
  task automatic fill_and_check(input bit repaired, input string what);
    logic [NC-1:0] got, e;
    int bad = 0;
    for (int r = 0; r < ROWS; r++) begin
      model[r] = $urandom;
      write_row(r, model[r]);
    end
    for (int r = 0; r < ROWS; r++) begin
      read_row(r, got);
      e = model[r];
      if (!repaired)
        for (int d = 0; d < MD; d++)
          if (flt_valid[d] && flt_row[d] == RB'(r)) e[CW'(flt_col[d])] = flt_val[d];
      if (got !== e) begin
        bad++;
        if (bad < 3) $display("%s: row %0d read %h exp %h", what, r, got, e);
      end
      if (!repaired && got != model[r]) n_seen++;
      if (repaired && is_defect_row(r) && got == model[r]) n_bypassed++;
    end
    check(bad == 0, what);
  endtask

  task automatic program_off();
    @(negedge clk);
    ext_prog = 1; ext_en = 0;
    @(negedge clk);
    ext_prog = 0;
    check(!fuse_en, "repair off");
  endtask

  initial begin
    int mask, sel [ND], tab [NP], n, cyc;
    bit exp_rep;
    for (int d = 0; d < MD; d++) begin
      def_valid[d] = 0; def_row[d] = '0; def_col[d] = '0;
      flt_valid[d] = 0; flt_row[d] = '0; flt_col[d] = '0; flt_val[d] = 0;
    end
    for (int k = 0; k < ND; k++) ext_bit_sel[k] = '0;
    for (int p = 0; p < NP; p++) ext_col[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < 12; t++) begin
      n = 1 + (t % MD);
      for (int d = 0; d < MD; d++) begin
        def_valid[d] = (d < n);
        def_row[d]   = RB'($urandom);
        def_col[d]   = CW'($urandom);
      end
      if (t == 3) begin
        // the worked example: rows 000 010 100 111, columns 6 4 2 1
        def_row = '{RB'(0), RB'(2), RB'(4), RB'(7)};
        def_col = '{CW'(6), CW'(4), CW'(2), CW'(1)};
      end
      if (t == 5 || t == 9) def_row[1] = def_row[0];     // same row: irreparable
      if (t == 1 || t == 7) begin def_col[1] = def_col[0]; n_shared++; end
      for (int d = 0; d < MD; d++) begin
        flt_valid[d] = def_valid[d];
        flt_row[d]   = def_row[d];
        flt_col[d]   = FCW'(def_col[d]);
        flt_val[d]   = 1'($urandom);
      end

      // A: repair off
      program_off();
      fill_and_check(0, $sformatf("trial %0d without repair", t));

      // B: built-in repair
      exp_rep = ref_repair(mask, sel, tab);
      @(negedge clk) bisr_start = 1;
      @(negedge clk) bisr_start = 0;
      check(bisr_busy, "busy after start");
      cyc = 0;
      while (!bisr_done && cyc < 2000) begin
        @(negedge clk);
        cyc++;
      end
      check(bisr_repairable == exp_rep, $sformatf("trial %0d verdict", t));
      check(cyc == (exp_rep ? mask + 4 : ROWS + 3), $sformatf("trial %0d repair time %0d", t, cyc));
      @(negedge clk);
      if (exp_rep) begin
        n_bisr_ok++;
        check(fuse_en, "fuses loaded");
        for (int k = 0; k < ND; k++) check(fuse_bit_sel[k] == RSW'(sel[k]), "fused row bits");
        if (t == 3) check(fuse_bit_sel[1] == 2 && fuse_bit_sel[0] == 1, "worked example decodes bits 2 and 1");
        fill_and_check(1, $sformatf("trial %0d after built-in repair", t));
      end else begin
        n_bisr_refused++;
        check(!fuse_en, "fuses untouched when irreparable");
        fill_and_check(0, $sformatf("trial %0d irreparable", t));
      end

      // C: manufacture-time style programming from outside
      if (exp_rep && t % 2 == 0) begin
        program_off();
        @(negedge clk);
        ext_prog = 1; ext_en = 1;
        for (int k = 0; k < ND; k++) ext_bit_sel[k] = RSW'(sel[k]);
        for (int p = 0; p < NP; p++) ext_col[p] = CW'(tab[p]);
        @(negedge clk);
        ext_prog = 0;
        n_ext++;
        fill_and_check(1, $sformatf("trial %0d after external programming", t));
      end
    end

    check(n_seen > 0,         "defects visible without repair");
    check(n_bisr_ok > 0,      "built-in repair succeeded");
    check(n_bisr_refused > 0, "built-in repair refused an irreparable map");
    check(n_ext > 0,          "external programming used");
    check(n_bypassed > 0,     "defective rows read through the spare");
    check(n_shared > 0,       "defects sharing a column");
    $display("mechanisms: seen=%0d bisr_ok=%0d bisr_refused=%0d ext=%0d bypassed=%0d shared_col=%0d",
             n_seen, n_bisr_ok, n_bisr_refused, n_ext, n_bypassed, n_shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
