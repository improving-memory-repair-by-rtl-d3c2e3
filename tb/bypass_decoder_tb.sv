// Testbench for bypass_decoder at its default width (32 columns). Every column
// number is tried with the enable high and low; the select lines must be the
// thermometer code 2**(col+1)-1, or all clear when disabled.
module bypass_decoder_tb;
  localparam int unsigned COLS = 32;
  localparam int unsigned CW   = $clog2(COLS);

  logic            en;
  logic [CW-1:0]   col;
  logic [COLS-1:0] sel;
  logic [63:0]     expv;
  int checks = 0, failures = 0;

  bypass_decoder dut (.en, .col, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < COLS; c++) begin
        en  = e[0];
        col = CW'(c);
        #1;
        expv = en ? ((64'd2 << c) - 64'd1) : 64'd0;
        checks++;
        if (sel !== expv[COLS-1:0]) begin
          failures++;
          $display("en=%0d col=%0d sel=%h exp=%h", en, c, sel, expv[COLS-1:0]);
        end
      end
    // the worked example: bypassing column 2 sets the three lowest lines
    en = 1; col = 2; #1;
    checks++;
    if ($countones(sel) != 3 || sel[2:0] != 3'b111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
