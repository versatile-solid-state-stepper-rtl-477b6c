// usmc: universal stepper motor controller.
//
// One 2 Kbyte ROM stores the fully expanded state transition tables of five
// kinds of stepper motor (2/4, 3, 5, 6 and 8 phase). The present outputs of
// six D flip-flops are fed back as the low address bits, so each ROM word is
// the next bit pattern; no modulus counter is needed and one controller can
// drive any of the motors, or be time-multiplexed among them.
//
//   ROM address = {motor_sel (A10..A8), mode.cw (A7), mode.full (A6), q (A5..A0)}
//   on each step pulse: q <= ROM[address][5:0]
//   on preset:          q <= preset ROM[motor_sel] (first row of the sequence)
//
// Interface: clk, asynchronous active-low rst_n, step (one-cycle step
// command), preset (load the first pattern; driven by the power-up one-shot
// and by the user), motor_sel, mode (M1 = CW/CCW, M2 = F/H); outputs q
// (Q5..Q0) and q_n (complements, used for the second coil group of an
// 8-phase motor). Outputs change on the rising clk edge of a step or preset
// cycle; the ROM path is combinational, so one step takes one clock.
//
// Design choices beyond the source circuit: the flip-flops use a synchronous
// preset and a step enable on the system clock, and a change of motor_sel
// also presets the register, so switching a time-multiplexed controller to
// another motor always starts that motor from a valid pattern.
module usmc
  import smc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       preset,
  input  logic [2:0] motor_sel,
  input  mode_t      mode,
  output row_t       q,
  output row_t       q_n
);

  logic [7:0] next_word;
  row_t       preset_val;
  logic [2:0] sel_q;
  logic       sel_changed;

  usmc_state_rom u_state_rom (
    .addr ({motor_sel, mode.cw, mode.full, q}),
    .data (next_word)
  );

  usmc_preset_rom u_preset_rom (
    .motor_sel  (motor_sel),
    .preset_val (preset_val)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= '0;
    else        sel_q <= motor_sel;
  end

  assign sel_changed = (motor_sel != sel_q);

  preset_dff_reg #(.WIDTH(6)) u_ff (
    .clk        (clk),
    .rst_n      (rst_n),
    .step       (step),
    .preset     (preset | sel_changed),
    .preset_val (preset_val),
    .d          (next_word[5:0]),
    .q          (q),
    .q_n        (q_n)
  );

endmodule
