// stt5_controller: content-addressable 5-phase controller.
//
// The present pattern ABCDE, held in five presettable D flip-flops, is fed
// back with the mode inputs as the address {M1, M2, A, B, C, D, E} of a
// 128 x 5 ROM holding the fully expanded state transition table of the
// 5-phase half-step sequence; the addressed word is the next pattern, loaded
// on each step pulse. M1 = CW/CCW (1 = clockwise), M2 = F/H (1 = full step:
// two rows of the half-step sequence per step). Changing the mode between
// steps is safe because every pattern has a defined successor in every mode.
//
// Interface: clk, asynchronous active-low rst_n, step (one-cycle step
// command), preset (load PRESET, default ABCDE = 10101), mode; output abcde
// (bit 4 = A). The pattern changes on the rising clk edge of a step or
// preset cycle.
module stt5_controller
  import smc_pkg::*;
#(
  parameter logic [4:0] PRESET = 5'b10101
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       preset,
  input  mode_t      mode,
  output logic [4:0] abcde
);

  logic [4:0] next_abcde;
  logic [4:0] abcde_n;

  rom #(
    .ADDR_W  (7),
    .DATA_W  (5),
    .CONTENT (stt5_rom_image())
  ) u_rom (
    .addr ({mode.cw, mode.full, abcde}),
    .data (next_abcde)
  );

  preset_dff_reg #(.WIDTH(5)) u_ff (
    .clk        (clk),
    .rst_n      (rst_n),
    .step       (step),
    .preset     (preset),
    .preset_val (PRESET),
    .d          (next_abcde),
    .q          (abcde),
    .q_n        (abcde_n)
  );

endmodule
