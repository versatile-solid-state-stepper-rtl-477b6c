// usmc_preset_rom: the 1 Kbyte ROM holding the preset inputs of the
// universal controller.
//
// Addressed by the motor select code on A2..A0 (A9..A3 tied low), it gives
// P5..P0, the first bit pattern of the selected motor's sequence, which the
// flip-flops load on preset:
//   select 0 (2/4-phase) 001001, 1 (3-phase) 000100, 2 (5-phase) 010101,
//   3 (6-phase) 100010, 4 (8-phase) 001111; 5..7 unprogrammed (0).
// Data D7..D6 are programmed 0. Combinational.
module usmc_preset_rom
  import smc_pkg::*;
(
  input  logic [2:0] motor_sel,
  output logic [5:0] preset_val
);

  logic [7:0] data;

  rom #(
    .ADDR_W  (10),
    .DATA_W  (8),
    .CONTENT (preset_rom_image())
  ) u_rom (
    .addr ({7'b0, motor_sel}),
    .data (data)
  );

  assign preset_val = data[5:0];

endmodule
