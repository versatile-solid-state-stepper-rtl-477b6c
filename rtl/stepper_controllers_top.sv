// stepper_controllers_top: all the stepper motor controllers, side by side.
//
// The main design is the universal controller (usmc): one ROM of fully
// expanded state transition tables that can drive a 2/4-, 3-, 5-, 6- or
// 8-phase motor, in either direction, in full or half steps where the motor
// has a half-step sequence. Next to it stand the other controller structures:
// ROM plus up/down counter for 6-phase and 8-phase motors, the dedicated
// content-addressable 5-phase controller, the multiplexer-based 2/4-phase
// controller and its generic 8-phase form, and the predetermined-sequence
// controller. Every controller
// has its own direction/mode inputs and coil outputs.
//
// Shared parts: one step pulse generator (period step_period system clocks,
// halved while the universal controller is in half-step mode and
// half_rate_comp is set) clocks every controller, and one power-up one-shot
// presets the flip-flop based controllers after reset. usmc_preset_req and
// stt5_preset_req preset those controllers on demand, e.g. when a
// time-multiplexed universal controller is handed to another motor.
//
// usmc_multi serves GROUPS groups of motors from one shared ROM, scanning one
// group per clock: each group with grp_step_en set steps on the common step
// strobe, and its new pattern appears within GROUPS clocks. step_period must
// therefore be at least GROUPS (2*GROUPS when half_rate_comp is used); an
// assertion in usmc_multi reports steps that come too fast. A group presets
// itself after reset and whenever its motor select changes.
//
// Outputs are the logic-level control bit patterns for the motor drives;
// opto-couplers, power switches and motors are outside this design.
// All outputs change on the rising clk edge after a step strobe (step_out).
module stepper_controllers_top
  import smc_pkg::*;
#(
  parameter int unsigned STEP_W = 16,
  parameter int unsigned GROUPS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [STEP_W-1:0] step_period,
  input  logic              half_rate_comp,
  output logic              step_out,
  // universal controller
  input  logic [2:0]        usmc_motor_sel,
  input  mode_t             usmc_mode,
  input  logic              usmc_preset_req,
  output row_t              usmc_q,
  output row_t              usmc_q_n,
  // motor groups sharing one time-multiplexed universal controller ROM
  input  logic              grp_step_en    [GROUPS],
  input  logic [2:0]        grp_motor_sel  [GROUPS],
  input  mode_t             grp_mode       [GROUPS],
  input  logic              grp_preset_req [GROUPS],
  output row_t              grp_q          [GROUPS],
  output row_t              grp_q_n        [GROUPS],
  // ROM/counter 6-phase controller
  input  logic              ph6_cw,
  output logic [2:0]        ph6_row,
  output logic [5:0]        ph6_pattern,
  // ROM/counter 8-phase controller
  input  logic              ph8_cw,
  output logic [2:0]        ph8_row,
  output logic [7:0]        ph8_pattern,
  // content-addressable 5-phase controller
  input  mode_t             stt5_mode,
  input  logic              stt5_preset_req,
  output logic [4:0]        stt5_abcde,
  // multiplexer-based 2/4-phase controller
  input  logic              mux_cw,
  output logic [1:0]        mux_row,
  output logic [3:0]        mux_pattern,
  // generic multiplexer controller, 8-phase default
  input  logic              mux8_cw,
  output logic [2:0]        mux8_row,
  output logic [7:0]        mux8_pattern,
  // predetermined-sequence controller
  input  logic              seq_start,
  output logic [3:0]        seq_pattern,
  output logic              seq_busy
);

  logic       step;
  logic       por_preset;

  step_clock_gen #(.W(STEP_W)) u_step_gen (
    .clk            (clk),
    .rst_n          (rst_n),
    .period         (step_period),
    .half_rate_comp (half_rate_comp),
    .half_mode      (!usmc_mode.full),
    .step           (step)
  );

  assign step_out = step;

  powerup_oneshot u_por (
    .clk    (clk),
    .rst_n  (rst_n),
    .preset (por_preset)
  );

  usmc u_usmc (
    .clk       (clk),
    .rst_n     (rst_n),
    .step      (step),
    .preset    (por_preset | usmc_preset_req),
    .motor_sel (usmc_motor_sel),
    .mode      (usmc_mode),
    .q         (usmc_q),
    .q_n       (usmc_q_n)
  );

  logic grp_step [GROUPS];

  always_comb
    for (int k = 0; k < GROUPS; k++) grp_step[k] = step && grp_step_en[k];

  usmc_multi #(.CHANNELS(GROUPS)) u_groups (
    .clk       (clk),
    .rst_n     (rst_n),
    .step      (grp_step),
    .preset    (grp_preset_req),
    .motor_sel (grp_motor_sel),
    .mode      (grp_mode),
    .q         (grp_q),
    .q_n       (grp_q_n)
  );

  rom_counter_6ph u_ph6 (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (step),
    .cw      (ph6_cw),
    .row     (ph6_row),
    .pattern (ph6_pattern)
  );

  rom_counter_8ph u_ph8 (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (step),
    .cw      (ph8_cw),
    .row     (ph8_row),
    .pattern (ph8_pattern)
  );

  stt5_controller u_stt5 (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (step),
    .preset (por_preset | stt5_preset_req),
    .mode   (stt5_mode),
    .abcde  (stt5_abcde)
  );

  mux_controller_4ph u_mux (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (step),
    .cw      (mux_cw),
    .row     (mux_row),
    .pattern (mux_pattern)
  );

  mux_controller u_mux8 (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (step),
    .cw      (mux8_cw),
    .row     (mux8_row),
    .pattern (mux8_pattern)
  );

  sequence_controller u_seq (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (step),
    .preset  (por_preset),
    .start   (seq_start),
    .pattern (seq_pattern),
    .busy    (seq_busy)
  );

endmodule
