// Testbench for column_mux at its default width (32 columns plus spare).
// For random words and random bypassed columns it writes the word through the
// write MUXes, corrupts the bypassed physical column, reads it back through the
// read MUXes and expects the original word. It also checks the physical
// placement: bits above the bypassed column stay in place, bit 0 goes to the
// spare, and with no bypass the word is stored unshifted.
module column_mux_tb;
  localparam int unsigned COLS = 32;

  logic [COLS-1:0] wr_sel, rd_sel, wr_data, rd_data;
  logic [COLS:0]   wr_phys, rd_phys;
  int checks = 0, failures = 0;

  column_mux dut (.wr_sel, .wr_data, .wr_phys, .rd_sel, .rd_phys, .rd_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int k;
      bit nobyp;
      nobyp   = ($urandom_range(0, 7) == 0);
      k       = $urandom_range(0, COLS - 1);
      wr_data = $urandom;
      for (int i = 0; i < COLS; i++) wr_sel[i] = !nobyp && (i <= k);
      rd_sel = wr_sel;
      #1;
      rd_phys = wr_phys;
      if (!nobyp) rd_phys[k] = ~rd_phys[k];     // the defective column
      #1;
      check(rd_data == wr_data, $sformatf("round trip k=%0d nobyp=%0d", k, nobyp));
      if (nobyp) begin
        check(wr_phys[COLS-1:0] == wr_data, "unshifted store");
      end else begin
        check(wr_phys[COLS] == wr_data[0], "bit 0 in spare");
        for (int j = k + 1; j < COLS; j++)
          check(wr_phys[j] == wr_data[j], "bit above bypass in place");
        for (int j = 0; j < k; j++)
          check(wr_phys[j] == wr_data[j+1], "bit below bypass shifted");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
