// tb_mux_controller: the generic multiplexer controller in three sizes:
// the default 8-phase case (eight 1-of-8 multiplexers), the 6-phase sequence
// (six 1-of-8 multiplexers with two grounded inputs each) and the 3-phase
// sequence (three 1-of-4 multiplexers with one grounded input). Each is
// stepped both ways across the wrap; row and pattern are checked after every
// step against the sequence tables.
module tb_mux_controller;
  import smc_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, cw = 1;
  logic [2:0] row8, row6;
  logic [1:0] row3;
  logic [7:0] pat8;
  logic [5:0] pat6;
  logic [2:0] pat3;

  localparam logic [2:0] SEQ3 [3] = '{3'b100, 3'b001, 3'b010};

  always #5 clk = ~clk;

  mux_controller dut8 (.clk, .rst_n, .step, .cw, .row(row8), .pattern(pat8));
  mux_controller #(.COLS(6), .ROWS(6),
                   .TABLE({6'b100001, 6'b010001, 6'b010100, 6'b001100, 6'b001010, 6'b100010}))
    dut6 (.clk, .rst_n, .step, .cw, .row(row6), .pattern(pat6));
  mux_controller #(.COLS(3), .ROWS(3), .TABLE({3'b010, 3'b001, 3'b100}))
    dut3 (.clk, .rst_n, .step, .cw, .row(row3), .pattern(pat3));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rows(input int r8, input int r6, input int r3);
    checks++;
    if (row8 !== 3'(r8) || pat8 !== REF_8PH[r8]) begin
      failures++; $display("FAIL 8-phase row %0d pattern %b expected %b", row8, pat8, REF_8PH[r8]);
    end
    checks++;
    if (row6 !== 3'(r6) || pat6 !== REF_6PH[r6]) begin
      failures++; $display("FAIL 6-phase row %0d pattern %b expected %b", row6, pat6, REF_6PH[r6]);
    end
    checks++;
    if (row3 !== 2'(r3) || pat3 !== SEQ3[r3]) begin
      failures++; $display("FAIL 3-phase row %0d pattern %b expected %b", row3, pat3, SEQ3[r3]);
    end
  endtask

  initial begin
    int r8, r6, r3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    r8 = 0; r6 = 0; r3 = 0;
    expect_rows(0, 0, 0);
    for (int s = 0; s < 80; s++) begin
      cw = (s / 20) % 2 == 0;
      @(negedge clk) step = 1;
      @(negedge clk) step = 0;
      r8 = wrap(r8, cw ? 1 : -1, 8);
      r6 = wrap(r6, cw ? 1 : -1, 6);
      r3 = wrap(r3, cw ? 1 : -1, 3);
      expect_rows(r8, r6, r3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
