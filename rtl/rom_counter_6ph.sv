// rom_counter_6ph: ROM/counter controller for a 6-phase stepper motor.
//
// A modulus-6 up/down counter produces the row address C B A; a ROM holds
// the six patterns A1 B1 C1 A2 B2 C2 of the 6-phase full-step sequence in
// locations 0..5. cw = 1 counts up (rows top-down, clockwise), cw = 0 counts
// down (bottom-up, counter-clockwise), wrapping endlessly. System reset
// returns to location 0, pattern 100010.
//
// Interface: clk, asynchronous active-low rst_n, step (one-cycle step
// command), cw; outputs row (counter value) and pattern. pattern follows the
// row combinationally, so it changes one clock edge after a step cycle.
module rom_counter_6ph
  import smc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       cw,
  output logic [2:0] row,
  output logic [5:0] pattern
);

  updown_counter #(.MODULUS(6)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .up    (cw),
    .count (row)
  );

  rom #(
    .ADDR_W  (3),
    .DATA_W  (6),
    .CONTENT (rom6_image())
  ) u_rom (
    .addr (row),
    .data (pattern)
  );

endmodule
