// Testbench for row_bit_select at its default size (9 row bits, 2 decoded).
// Drives random row addresses and random fuse codes, including codes beyond
// the last row bit, and compares the partition index with one built by
// shifting the address.
module row_bit_select_tb;
  localparam int unsigned ROW_BITS = 9;
  localparam int unsigned N_DEC    = 2;
  localparam int unsigned RSW      = $clog2(ROW_BITS);

  logic [ROW_BITS-1:0] row_addr;
  logic [RSW-1:0]      bit_sel [N_DEC];
  logic [N_DEC-1:0]    part_idx, exp_idx;
  int checks = 0, failures = 0;

  row_bit_select dut (.row_addr, .bit_sel, .part_idx);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      row_addr = ROW_BITS'($urandom);
      for (int k = 0; k < N_DEC; k++) bit_sel[k] = RSW'($urandom);
      #1;
      for (int k = 0; k < N_DEC; k++)
        exp_idx[k] = (bit_sel[k] < ROW_BITS) ? ((row_addr >> bit_sel[k]) & 1) : 1'b0;
      checks++;
      if (part_idx !== exp_idx) begin
        failures++;
        if (failures < 10)
          $display("mismatch addr=%b sel=%0d,%0d got %b exp %b",
                   row_addr, bit_sel[1], bit_sel[0], part_idx, exp_idx);
      end
    end
    // worked example: bits 2 and 1 decoded, rows 000 010 100 111 -> 0 1 2 3
    bit_sel[1] = 2; bit_sel[0] = 1;
    foreach (exp_idx_tab[i]) begin
      row_addr = ROW_BITS'(ex_rows[i]);
      #1;
      checks++;
      if (part_idx != exp_idx_tab[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ex_rows     [4] = '{0, 2, 4, 7};
  int exp_idx_tab [4] = '{0, 1, 2, 3};
endmodule
