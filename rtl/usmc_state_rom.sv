// usmc_state_rom: the 2 Kbyte next-state ROM of the universal controller.
//
// Address A10..A0 = {motor select A10..A8, M1 = CW/CCW on A7, M2 = F/H on
// A6, present pattern Q5..Q0 on A5..A0}; data D7..D0 is the next pattern,
// with D5..D0 used and D7..D6 programmed 0. Each motor select code owns a
// 256-byte region holding that motor's fully expanded state transition
// table (smc_pkg::stt_next): 2/4-phase and 5-phase motors step in half or
// full steps, 3-, 6- and 8-phase motors in full steps only. Codes 5..7 are
// free for three more motors and read as zero. Combinational.
module usmc_state_rom
  import smc_pkg::*;
(
  input  logic [10:0] addr,
  output logic [7:0]  data
);

  rom #(
    .ADDR_W  (11),
    .DATA_W  (8),
    .CONTENT (usmc_rom_image())
  ) u_rom (
    .addr (addr),
    .data (data)
  );

endmodule
