// tb_updown_counter: random up/down stepping of modulus-6 (default),
// modulus-8 and modulus-4 counters against a wrap-around model.
module tb_updown_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, up = 0;
  logic [2:0] c6, c8;
  logic [1:0] c4;
  int m6, m8, m4;
  int wraps_up = 0, wraps_down = 0;

  always #5 clk = ~clk;

  updown_counter dut6 (.clk, .rst_n, .step, .up, .count(c6));
  updown_counter #(.MODULUS(8)) dut8 (.clk, .rst_n, .step, .up, .count(c8));
  updown_counter #(.MODULUS(4)) dut4 (.clk, .rst_n, .step, .up, .count(c4));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m6 = 0; m8 = 0; m4 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      step = ($urandom % 2) == 0;
      // long runs in one direction so that both wraps happen
      if (i % 40 == 0) up = ~up;
      if (step) begin
        if (up && m6 == 5) wraps_up++;
        if (!up && m6 == 0) wraps_down++;
        m6 = ((m6 + (up ? 1 : -1)) % 6 + 6) % 6;
        m8 = ((m8 + (up ? 1 : -1)) % 8 + 8) % 8;
        m4 = ((m4 + (up ? 1 : -1)) % 4 + 4) % 4;
      end
      @(posedge clk);
      #1;
      checks++;
      if (c6 !== 3'(m6) || c8 !== 3'(m8) || c4 !== 2'(m4)) begin
        failures++;
        $display("FAIL %0d: c6=%0d/%0d c8=%0d/%0d c4=%0d/%0d", i, c6, m6, c8, m8, c4, m4);
      end
    end
    checks++;
    if (wraps_up == 0 || wraps_down == 0) begin
      failures++;
      $display("FAIL wraps not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
