// tb_rom_counter_8ph: steps the 8-phase ROM/counter controller clockwise and
// counter-clockwise across the wrap in both directions and checks row and
// pattern against the 8-phase sequence after every step.
module tb_rom_counter_8ph;
  import smc_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, cw = 1;
  logic [2:0] row;
  logic [7:0] pattern;

  always #5 clk = ~clk;

  rom_counter_8ph dut (.clk, .rst_n, .step, .cw, .row, .pattern);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_row(input int r);
    checks++;
    if (row !== 3'(r) || pattern !== REF_8PH[r]) begin
      failures++;
      $display("FAIL row %0d/%0d pattern %b expected %b", row, r, pattern, REF_8PH[r]);
    end
  endtask

  initial begin
    int r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    r = 0;
    expect_row(0);
    for (int s = 0; s < 60; s++) begin
      cw = (s / 15) % 2 == 0;
      @(negedge clk) step = 1;
      @(negedge clk) step = 0;
      r = wrap(r, cw ? 1 : -1, 8);
      expect_row(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
