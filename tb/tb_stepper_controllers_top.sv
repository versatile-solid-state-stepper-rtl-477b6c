// tb_stepper_controllers_top: end-to-end test of all the controllers at the
// top's default parameters.
//
// A step pulse generator period of 10 clocks drives every controller. After
// the power-up preset the testbench runs 600 steps while it varies the
// inputs: the universal controller is switched through all five motor types
// (twice, so every switch presets it), with random direction/step-size modes
// and one explicit preset request per motor; half-step rate compensation is
// turned on for the second half; the 6-phase, 8-phase and both multiplexer
// controllers reverse every 13 steps; the 5-phase controller gets random
// modes; the sequence controller is started whenever it is idle and has
// held for a few steps; the four motor groups of the time-multiplexed
// controller get random modes, step enables, motor switches and presets.
// Every output is compared after every step with
// models that track sequence rows independently (group outputs one step
// later, since the scan serves them within four clocks), outputs are checked not to
// move between steps, and the gap between step strobes is checked against
// the period (halved in compensated half-step mode). Each mechanism is
// counted, and one that never happened counts as a failure.
module tb_stepper_controllers_top;
  import smc_pkg::mode_t;
  import smc_tb_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [15:0] step_period = 16'd10;
  logic        half_rate_comp = 0;
  logic        step_out;
  logic [2:0]  usmc_motor_sel = 3'd0;
  mode_t       usmc_mode = 2'b11;
  logic        usmc_preset_req = 0;
  logic [5:0]  usmc_q, usmc_q_n;
  logic        ph6_cw = 1, ph8_cw = 1, mux_cw = 1;
  logic [2:0]  ph6_row, ph8_row;
  logic [1:0]  mux_row;
  logic [5:0]  ph6_pattern;
  logic [7:0]  ph8_pattern;
  mode_t       stt5_mode = 2'b11;
  logic        stt5_preset_req = 0;
  logic [4:0]  stt5_abcde;
  logic [3:0]  mux_pattern;
  logic        mux8_cw = 0;
  logic [2:0]  mux8_row;
  logic [7:0]  mux8_pattern;
  int          r8m = 0;
  logic        seq_start = 0;
  logic [3:0]  seq_pattern;
  logic        seq_busy;
  logic        grp_step_en [4];
  logic [2:0]  grp_motor_sel [4];
  mode_t       grp_mode [4];
  logic        grp_preset_req [4];
  logic [5:0]  grp_q [4], grp_q_n [4];
  int          gidx [4];
  int n_grp_step = 0, n_grp_idle = 0, n_grp_switch = 0, n_grp_preset = 0;

  localparam logic [3:0] PROG [10] = '{4'b1001, 4'b1010, 4'b0110, 4'b0101, 4'b0100,
                                       4'b0110, 4'b0010, 4'b1010, 4'b1000, 4'b1001};

  always #5 clk = ~clk;

  stepper_controllers_top dut (.*);

  // expected state
  int u_idx = 0, r6 = 0, r8 = 0, r4 = 0, s_pos = 9;
  logic [4:0] cur5 = 5'b10101;

  // mechanism counters
  int n_motor [5];
  int n_umode [4];
  int n_smode [4];
  int n_switch = 0, n_ureq = 0, n_sreq = 0, n_comp_gap = 0, n_full_gap = 0;
  int n_wrap6 = 0, n_wrap8 = 0, n_wrap4 = 0, n_rev = 0;
  int n_seq_run = 0, n_seq_hold = 0, n_8ph_comp = 0, n_por = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  task automatic check_all(input string when);
    checks++;
    if (usmc_q !== REF_SEQ[usmc_motor_sel][u_idx] || usmc_q_n !== ~usmc_q)
      fail($sformatf("%s usmc q=%b expected %b (motor %0d)", when, usmc_q,
                     REF_SEQ[usmc_motor_sel][u_idx], usmc_motor_sel));
    checks++;
    if (ph6_row !== 3'(r6) || ph6_pattern !== REF_6PH[r6])
      fail($sformatf("%s 6-phase %b", when, ph6_pattern));
    checks++;
    if (ph8_row !== 3'(r8) || ph8_pattern !== REF_8PH[r8])
      fail($sformatf("%s 8-phase %b", when, ph8_pattern));
    checks++;
    if (mux_row !== 2'(r4) || mux_pattern !== REF_MUX[r4])
      fail($sformatf("%s mux %b", when, mux_pattern));
    checks++;
    if (mux8_row !== 3'(r8m) || mux8_pattern !== REF_8PH[r8m])
      fail($sformatf("%s 8-phase mux %b", when, mux8_pattern));
    checks++;
    if (stt5_abcde !== cur5) fail($sformatf("%s 5-phase %b expected %b", when, stt5_abcde, cur5));
    checks++;
    if (seq_pattern !== PROG[s_pos] || seq_busy !== (s_pos != 9))
      fail($sformatf("%s sequence %b busy %b pos %0d", when, seq_pattern, seq_busy, s_pos));
  endtask

  // Advance every model by one step with the inputs now applied.
  task automatic advance();
    int delta;
    logic [4:0] nxt;
    n_motor[usmc_motor_sel]++;
    n_umode[usmc_mode]++;
    if (usmc_motor_sel == 3'd4) n_8ph_comp++;
    delta = (REF_HALF[usmc_motor_sel] && usmc_mode.full) ? 2 : 1;
    if (!usmc_mode.cw) delta = -delta;
    u_idx = wrap(u_idx, delta, REF_LEN[usmc_motor_sel]);
    if ((ph6_cw && r6 == 5) || (!ph6_cw && r6 == 0)) n_wrap6++;
    if ((ph8_cw && r8 == 7) || (!ph8_cw && r8 == 0)) n_wrap8++;
    if ((mux_cw && r4 == 3) || (!mux_cw && r4 == 0)) n_wrap4++;
    r6 = wrap(r6, ph6_cw ? 1 : -1, 6);
    r8 = wrap(r8, ph8_cw ? 1 : -1, 8);
    r4 = wrap(r4, mux_cw ? 1 : -1, 4);
    r8m = wrap(r8m, mux8_cw ? 1 : -1, 8);
    n_smode[stt5_mode]++;
    checks++;
    if (!t7_lookup({stt5_mode, cur5}, nxt)) fail("5-phase model left the table");
    cur5 = nxt;
    if (s_pos == 9) begin
      if (seq_start) begin s_pos = 0; n_seq_run++; end
      else n_seq_hold++;
    end else s_pos++;
  endtask

  task automatic check_groups(input string when);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (grp_q[k] !== REF_SEQ[grp_motor_sel[k]][gidx[k]] || grp_q_n[k] !== ~grp_q[k])
        fail($sformatf("%s group %0d q=%b expected %b", when, k, grp_q[k],
                       REF_SEQ[grp_motor_sel[k]][gidx[k]]));
    end
  endtask

  task automatic advance_groups();
    for (int k = 0; k < 4; k++) begin
      int delta;
      if (grp_step_en[k]) begin
        n_grp_step++;
        delta = (REF_HALF[grp_motor_sel[k]] && grp_mode[k].full) ? 2 : 1;
        if (!grp_mode[k].cw) delta = -delta;
        gidx[k] = wrap(gidx[k], delta, REF_LEN[grp_motor_sel[k]]);
      end else n_grp_idle++;
    end
  endtask

  initial begin
    int gap;
    int hold_steps;
    for (int i = 0; i < 5; i++) n_motor[i] = 0;
    for (int k = 0; k < 4; k++) begin
      grp_step_en[k] = 1; grp_motor_sel[k] = 3'(k + 1); grp_mode[k] = mode_t'(k);
      grp_preset_req[k] = 0; gidx[k] = 0;
    end
    for (int i = 0; i < 4; i++) begin n_umode[i] = 0; n_smode[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check_all("power-up");
    repeat (4) @(negedge clk);
    check_groups("power-up");
    n_por++;
    gap = 0;
    hold_steps = 0;
    for (int s = 0; s < 600; s++) begin
      // wait for the strobe, checking that nothing moves meanwhile
      @(negedge clk);
      gap++;
      while (!step_out) begin
        check_all("between steps");
        @(negedge clk);
        gap++;
      end
      if (s > 0) begin
        int expected_gap;
        expected_gap = (half_rate_comp && !usmc_mode.full) ? 5 : 10;
        checks++;
        if (gap != expected_gap) fail($sformatf("step gap %0d expected %0d", gap, expected_gap));
        else if (expected_gap == 5) n_comp_gap++;
        else n_full_gap++;
      end
      gap = 0;
      @(posedge clk);
      #1;
      check_groups($sformatf("before step %0d", s));
      advance();
      advance_groups();
      check_all($sformatf("step %0d", s));
      // change inputs for the next step
      @(negedge clk);
      gap++;
      seq_start = 0;
      if (s % 60 == 59) begin
        usmc_motor_sel = 3'((usmc_motor_sel + 1) % 5);
        n_switch++;
        @(posedge clk);
        #1;
        u_idx = 0;
        check_all("motor switch preset");
        @(negedge clk);
        gap++;
      end else if (s % 60 == 30) begin
        usmc_preset_req = 1;
        stt5_preset_req = 1;
        @(posedge clk);
        #1;
        u_idx = 0;
        cur5 = 5'b10101;
        n_ureq++;
        n_sreq++;
        check_all("preset request");
        @(negedge clk);
        gap++;
        usmc_preset_req = 0;
        stt5_preset_req = 0;
      end
      usmc_mode = mode_t'($urandom % 4);
      stt5_mode = mode_t'($urandom % 4);
      if (s % 13 == 12) begin
        ph6_cw = ~ph6_cw;
        ph8_cw = ~ph8_cw;
        mux_cw = ~mux_cw;
        mux8_cw = ~mux8_cw;
        n_rev++;
      end
      half_rate_comp = s >= 300;
      for (int k = 0; k < 4; k++) begin
        int r;
        r = $urandom % 30;
        grp_mode[k] = mode_t'($urandom % 4);
        grp_step_en[k] = r != 2;
        if (r == 0) begin
          grp_motor_sel[k] = 3'((grp_motor_sel[k] + 1 + $urandom % 4) % 5);
          gidx[k] = 0;
          n_grp_switch++;
        end else if (r == 1) begin
          grp_preset_req[k] = 1;
          gidx[k] = 0;
          n_grp_preset++;
        end
      end
      @(negedge clk);
      gap++;
      for (int k = 0; k < 4; k++) grp_preset_req[k] = 0;
      if (s_pos == 9) begin
        hold_steps++;
        if (hold_steps >= 3) begin
          seq_start = 1;
          hold_steps = 0;
        end
      end
    end
    // mechanism coverage
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_motor[i] == 0) fail($sformatf("motor type %0d never stepped", i));
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_umode[i] == 0) fail($sformatf("usmc mode %0d never used", i));
      checks++;
      if (n_smode[i] == 0) fail($sformatf("5-phase mode %0d never used", i));
    end
    checks++; if (n_switch < 5) fail("motor switching");
    checks++; if (n_ureq == 0 || n_sreq == 0) fail("preset requests");
    checks++; if (n_comp_gap == 0) fail("half-step rate compensation never seen");
    checks++; if (n_full_gap == 0) fail("full period never seen");
    checks++; if (n_wrap6 == 0 || n_wrap8 == 0 || n_wrap4 == 0) fail("counter wrap");
    checks++; if (n_rev == 0) fail("direction reversal");
    checks++; if (n_seq_run < 2 || n_seq_hold == 0) fail("sequence start/hold");
    checks++; if (n_8ph_comp == 0) fail("8-phase complement outputs");
    checks++; if (n_por == 0) fail("power-up preset");
    checks++;
    if (n_grp_step == 0 || n_grp_idle == 0 || n_grp_switch == 0 || n_grp_preset == 0)
      fail("motor group time-multiplexing");
    $display("mechanisms: motors %0d %0d %0d %0d %0d, switches %0d, preset requests %0d, compensated gaps %0d, group switches %0d, wraps %0d/%0d/%0d, reversals %0d, sequence runs %0d",
             n_motor[0], n_motor[1], n_motor[2], n_motor[3], n_motor[4], n_switch, n_ureq,
             n_comp_gap, n_grp_switch, n_wrap6, n_wrap8, n_wrap4, n_rev, n_seq_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
