// tb_usmc_multi: four motor groups share one universal controller ROM.
// Every 7 clocks each group may get a step command with its own random mode;
// now and then a group is switched to another motor type or preset. Exactly
// CHANNELS clocks after the commands (modes change right after each command) every group's pattern must equal its
// independently tracked sequence row, and it must not move between steps.
module tb_usmc_multi;
  import smc_pkg::mode_t;
  import smc_pkg::row_t;
  import smc_tb_pkg::*;
  localparam int CH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic step [CH], preset [CH];
  logic [2:0] sel [CH];
  mode_t mode [CH];
  row_t q [CH], q_n [CH];
  int idx [CH];
  int n_steps = 0, n_switch = 0, n_preset = 0, n_together = 0;

  always #5 clk = ~clk;

  usmc_multi dut (.clk, .rst_n, .step, .preset, .motor_sel(sel), .mode, .q, .q_n);

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int k = 0; k < CH; k++) begin
      checks++;
      if (q[k] !== REF_SEQ[sel[k]][idx[k]] || q_n[k] !== ~q[k]) begin
        failures++;
        $display("FAIL %s channel %0d: q=%b expected %b (motor %0d)", what, k, q[k],
                 REF_SEQ[sel[k]][idx[k]], sel[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < CH; k++) begin
      step[k] = 0; preset[k] = 0; sel[k] = 3'(k); mode[k] = mode_t'(3); idx[k] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (CH + 1) @(negedge clk);
    check_all("power-up");
    for (int s = 0; s < 800; s++) begin
      int stepped;
      stepped = 0;
      @(negedge clk);
      for (int k = 0; k < CH; k++) begin
        int r;
        r = $urandom % 40;
        mode[k] = mode_t'($urandom % 4);
        if (r == 0) begin
          sel[k] = 3'((sel[k] + 1 + $urandom % 4) % 5);
          idx[k] = 0;
          n_switch++;
        end else if (r == 1) begin
          preset[k] = 1;
          idx[k] = 0;
          n_preset++;
        end else if (r < 30) begin
          int delta;
          step[k] = 1;
          stepped++;
          n_steps++;
          delta = (REF_HALF[sel[k]] && mode[k].full) ? 2 : 1;
          if (!mode[k].cw) delta = -delta;
          idx[k] = wrap(idx[k], delta, REF_LEN[sel[k]]);
        end
      end
      if (stepped == CH) n_together++;
      @(negedge clk);
      // modes may change as soon as the step command has been given
      for (int k = 0; k < CH; k++) begin
        step[k] = 0; preset[k] = 0; mode[k] = mode_t'($urandom % 4);
      end
      repeat (CH) @(negedge clk);
      check_all($sformatf("round %0d", s));
      @(negedge clk);
      check_all($sformatf("round %0d hold", s));
    end
    checks++;
    if (n_steps == 0 || n_switch == 0 || n_preset == 0 || n_together == 0) begin
      failures++;
      $display("FAIL coverage steps %0d switches %0d presets %0d", n_steps, n_switch, n_preset);
    end
    $display("steps %0d, motor switches %0d, presets %0d, all groups at once %0d",
             n_steps, n_switch, n_preset, n_together);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
