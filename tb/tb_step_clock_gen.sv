// tb_step_clock_gen: measures the spacing of step strobes for several
// periods, with and without half-step rate compensation, and checks that each
// strobe lasts one clock.
module tb_step_clock_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, comp = 0, half = 0;
  logic [15:0] period = 16'd5;
  logic step;

  always #5 clk = ~clk;

  step_clock_gen dut (.clk, .rst_n, .period, .half_rate_comp(comp), .half_mode(half), .step);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Spacing, in clocks, between consecutive strobes, averaged over n strobes.
  task automatic measure(input int expected, input string what);
    int gap;
    // settle: skip two strobes after a setting change
    repeat (2) begin
      @(posedge clk);
      while (!step) @(posedge clk);
    end
    for (int k = 0; k < 6; k++) begin
      gap = 0;
      do begin
        @(posedge clk);
        gap++;
      end while (!step);
      checks++;
      if (gap != expected) begin
        failures++;
        $display("FAIL %s: gap %0d expected %0d", what, gap, expected);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    measure(5, "period 5");
    period = 16'd12;
    measure(12, "period 12");
    half = 1;
    measure(12, "half mode, no compensation");
    comp = 1;
    measure(6, "half mode, compensated");
    half = 0;
    measure(12, "full mode, compensation on");
    period = 16'd1;
    measure(1, "period 1");
    period = 16'd0;
    measure(1, "period 0");
    period = 16'd200;
    measure(200, "period 200");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
