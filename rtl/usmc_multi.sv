// usmc_multi: one universal controller ROM time-multiplexed among several
// groups of stepper motors.
//
// Each group (channel) has its own motor select, mode inputs and six-bit
// state register, which holds the group's present pattern and drives its
// motors between services. A single next-state ROM and a single preset ROM
// are shared: a round-robin pointer visits one channel per clock, addresses
// the ROMs with that channel's {motor select, mode, present pattern} and, if
// the channel has a step or preset waiting, writes the ROM word back into the
// channel's register. Identical motors in one group simply share the group's
// outputs.
//
// Interface: clk, asynchronous active-low rst_n; per channel: step (one-cycle
// step command), preset (load the first pattern of the selected motor),
// motor_sel, mode (M1 = CW/CCW, M2 = F/H); outputs q and q_n per channel.
// Timing: a step or preset is latched at once and applied within CHANNELS
// clocks, when the pointer reaches the channel; the mode is captured with the
// step command, so it may change right after it. Each channel may therefore
// step at most once every CHANNELS clocks; an assertion flags a step that
// arrives while the previous one is still waiting. A change of a channel's
// motor select presets that channel, as in usmc.
// Sharing the ROM among groups in time follows the source; the round-robin
// scan, the per-channel registers and the channel count are this design's
// choices.
module usmc_multi
  import smc_pkg::*;
#(
  parameter int unsigned CHANNELS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step      [CHANNELS],
  input  logic       preset    [CHANNELS],
  input  logic [2:0] motor_sel [CHANNELS],
  input  mode_t      mode      [CHANNELS],
  output row_t       q         [CHANNELS],
  output row_t       q_n       [CHANNELS]
);

  localparam int unsigned PW = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;

  logic [PW-1:0] ptr;
  logic          step_pend   [CHANNELS];
  logic          preset_pend [CHANNELS];
  logic [2:0]    sel_q       [CHANNELS];
  mode_t         mode_lat    [CHANNELS];
  logic [7:0]    next_word;
  row_t          preset_val;

  usmc_state_rom u_state_rom (
    .addr ({motor_sel[ptr], mode_lat[ptr].cw, mode_lat[ptr].full, q[ptr]}),
    .data (next_word)
  );

  usmc_preset_rom u_preset_rom (
    .motor_sel  (motor_sel[ptr]),
    .preset_val (preset_val)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int k = 0; k < CHANNELS; k++) begin
        q[k]           <= '0;
        step_pend[k]   <= 1'b0;
        preset_pend[k] <= 1'b1;
        sel_q[k]       <= '0;
        mode_lat[k]    <= '0;
      end
    end else begin
      ptr <= (ptr == PW'(CHANNELS - 1)) ? '0 : ptr + 1'b1;
      for (int k = 0; k < CHANNELS; k++) begin
        sel_q[k] <= motor_sel[k];
        if (step[k]) mode_lat[k] <= mode[k];
        if (PW'(k) == ptr) begin
          // service this channel; requests arriving now are kept
          if (preset_pend[k]) q[k] <= preset_val;
          else if (step_pend[k]) q[k] <= next_word[5:0];
          step_pend[k]   <= step[k];
          preset_pend[k] <= preset[k] || (motor_sel[k] != sel_q[k]);
        end else begin
          if (step[k]) step_pend[k] <= 1'b1;
          if (preset[k] || (motor_sel[k] != sel_q[k])) preset_pend[k] <= 1'b1;
        end
      end
    end
  end

  always_comb
    for (int k = 0; k < CHANNELS; k++) q_n[k] = ~q[k];

  // A step command must not arrive while the previous one still waits.
  for (genvar k = 0; k < CHANNELS; k++) begin : g_check
    assert property (@(posedge clk) disable iff (!rst_n)
                     step[k] |-> !(step_pend[k] && PW'(k) != ptr))
      else $error("usmc_multi: channel %0d stepped faster than the scan", k);
  end

endmodule
