// tb_stt5_controller: presets the 5-phase controller to 10101 and takes
// random steps with random mode inputs. Each expected next pattern is looked
// up in the fully expanded transition table; the test fails if any of its 40
// entries is never exercised.
module tb_stt5_controller;
  import smc_pkg::mode_t;
  import smc_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, preset = 0;
  mode_t mode = '0;
  logic [4:0] abcde;
  bit seen [40];

  always #5 clk = ~clk;

  stt5_controller dut (.clk, .rst_n, .step, .preset, .mode, .abcde);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] cur, nxt;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) preset = 1;
    @(negedge clk) preset = 0;
    checks++;
    if (abcde !== 5'b10101) begin failures++; $display("FAIL preset %b", abcde); end
    cur = 5'b10101;
    for (int s = 0; s < 1000; s++) begin
      mode = mode_t'($urandom % 4);
      checks++;
      if (!t7_lookup({mode, cur}, nxt)) begin
        failures++;
        $display("FAIL state %b not in table", cur);
      end
      for (int i = 0; i < 40; i++) if (T7_ADDR[i] == {mode, cur}) seen[i] = 1;
      @(negedge clk) step = 1;
      @(negedge clk) step = 0;
      checks++;
      if (abcde !== nxt) begin
        failures++;
        $display("FAIL step %0d from %b mode %b: got %b expected %b", s, cur, mode, abcde, nxt);
      end
      cur = nxt;
    end
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL entry %h never used", T7_ADDR[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
