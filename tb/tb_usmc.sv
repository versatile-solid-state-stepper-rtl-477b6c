// tb_usmc: universal controller, one step per clock pulse.
// For each motor type the testbench selects the motor (which presets the
// flip-flops to the first row), then takes random steps with random mode
// inputs, tracking the expected sequence row independently: one row per
// half step, two rows per full step of a motor with a half-step sequence,
// one row per step otherwise; forwards for clockwise. It checks q, q_n, that
// nothing moves without a step pulse, that an explicit preset returns to the
// first row, and that switching back and forth between motors
// (time-multiplexing) always restarts from a valid first pattern.
module tb_usmc;
  import smc_pkg::mode_t;
  import smc_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, preset = 0;
  logic [2:0] sel = 3'd0;
  mode_t mode = '0;
  logic [5:0] q, q_n;
  int n_mode [4];
  int n_switch = 0, n_preset = 0;

  always #5 clk = ~clk;

  usmc dut (.clk, .rst_n, .step, .preset, .motor_sel(sel), .mode, .q, .q_n);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [5:0] exp, input string what);
    checks++;
    if (q !== exp || q_n !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%b q_n=%b expected %b (sel %0d)", what, q, q_n, exp, sel);
    end
  endtask

  task automatic pulse_step();
    @(negedge clk) step = 1;
    @(negedge clk) step = 0;
  endtask

  initial begin
    int idx;
    int delta;
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    preset = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) preset = 0;
    expect_q(REF_PRESET[0], "power-up preset");
    for (int round = 0; round < 2; round++) begin
      for (int m = 0; m < 5; m++) begin
        int mm;
        mm = round == 0 ? m : 4 - m;
        @(negedge clk) sel = 3'(mm);
        @(negedge clk);
        if (round > 0 || mm != 0) n_switch++;
        expect_q(REF_SEQ[mm][0], "preset on motor switch");
        idx = 0;
        for (int s = 0; s < 40; s++) begin
          mode = mode_t'($urandom % 4);
          n_mode[mode]++;
          delta = (REF_HALF[mm] && mode.full) ? 2 : 1;
          if (!mode.cw) delta = -delta;
          pulse_step();
          idx = wrap(idx, delta, REF_LEN[mm]);
          expect_q(REF_SEQ[mm][idx], "step");
          if (s == 20) begin
            repeat (3) @(negedge clk);
            expect_q(REF_SEQ[mm][idx], "hold without step");
          end
        end
        @(negedge clk) preset = 1;
        @(negedge clk) preset = 0;
        n_preset++;
        expect_q(REF_SEQ[mm][0], "explicit preset");
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
