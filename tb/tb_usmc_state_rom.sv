// tb_usmc_state_rom: reads the whole 2 Kbyte next-state ROM.
// For every motor, mode and sequence row the word must be the row reached by
// moving one row (half step, or any step of a full-step-only motor) or two
// rows (full step of a motor with a half-step sequence) forwards for
// clockwise and backwards for counter-clockwise. The 5-phase region is also
// checked entry by entry against the fully expanded transition table, every
// pattern outside a sequence must lead to the sequence's first row, the
// spare select codes 5..7 must read zero, and D7..D6 must be zero everywhere.
module tb_usmc_state_rom;
  import smc_tb_pkg::*;
  int checks = 0, failures = 0;
  logic [10:0] addr;
  logic [7:0]  data;

  usmc_state_rom dut (.addr, .data);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input int a, input logic [7:0] exp, input string what);
    addr = 11'(a);
    #1;
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL %s: addr %h data %h expected %h", what, a, data, exp);
    end
  endtask

  initial begin
    logic [4:0] nxt;
    for (int m = 0; m < 5; m++) begin
      for (int mode = 0; mode < 4; mode++) begin
        int cw, full, delta, row_of [64];
        cw = mode >> 1; full = mode & 1;
        delta = (REF_HALF[m] && full) ? 2 : 1;
        if (!cw) delta = -delta;
        for (int p = 0; p < 64; p++) row_of[p] = -1;
        for (int r = 0; r < REF_LEN[m]; r++) row_of[REF_SEQ[m][r]] = r;
        for (int p = 0; p < 64; p++) begin
          int a;
          a = (m << 8) | (mode << 6) | p;
          if (row_of[p] >= 0)
            expect_word(a, {2'b00, REF_SEQ[m][wrap(row_of[p], delta, REF_LEN[m])]}, "sequence step");
          else
            expect_word(a, {2'b00, REF_SEQ[m][0]}, "recovery to first row");
        end
      end
    end
    for (int i = 0; i < 40; i++) begin
      void'(t7_lookup(T7_ADDR[i], nxt));
      expect_word((2 << 8) | (int'(T7_ADDR[i][6:5]) << 6) | int'(T7_ADDR[i][4:0]),
                  {3'b000, nxt}, "5-phase transition table");
    end
    for (int a = 5 * 256; a < 2048; a++) expect_word(a, 8'h00, "spare region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
