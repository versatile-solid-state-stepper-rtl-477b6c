// tb_powerup_oneshot: preset must be high during reset and for exactly
// two clocks after reset is released, then stay low.
module tb_powerup_oneshot;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, preset;
  int high_after = 0;

  always #5 clk = ~clk;

  powerup_oneshot dut (.clk, .rst_n, .preset);

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      rst_n = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (preset !== 1'b1) begin failures++; $display("FAIL preset low in reset"); end
      rst_n = 1;
      high_after = 0;
      repeat (20) begin
        @(posedge clk);
        #1;
        if (preset) high_after++;
      end
      checks++;
      if (high_after != 1 || preset !== 1'b0) begin
        // preset is high from release to the second edge: one sampled edge
        // after the first one
        failures++;
        $display("FAIL pulse: high on %0d sampled edges", high_after);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
