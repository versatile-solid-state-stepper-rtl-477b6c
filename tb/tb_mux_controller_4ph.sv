// tb_mux_controller_4ph: steps the multiplexer controller both ways across
// the wrap and checks the four column outputs against the full-step table.
module tb_mux_controller_4ph;
  import smc_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, cw = 1;
  logic [1:0] row;
  logic [3:0] pattern;

  always #5 clk = ~clk;

  mux_controller_4ph dut (.clk, .rst_n, .step, .cw, .row, .pattern);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_row(input int r);
    checks++;
    if (row !== 2'(r) || pattern !== REF_MUX[r]) begin
      failures++;
      $display("FAIL row %0d/%0d pattern %b expected %b", row, r, pattern, REF_MUX[r]);
    end
  endtask

  initial begin
    int r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    r = 0;
    expect_row(0);
    for (int s = 0; s < 40; s++) begin
      cw = (s / 10) % 2 == 0;
      @(negedge clk) step = 1;
      @(negedge clk) step = 0;
      r = wrap(r, cw ? 1 : -1, 4);
      expect_row(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
