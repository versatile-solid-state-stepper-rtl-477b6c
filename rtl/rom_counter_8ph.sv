// rom_counter_8ph: ROM/counter controller for an 8-phase stepper motor.
//
// A 3-bit binary up/down counter (modulus 8) addresses eight ROM locations
// of eight bits each, A1 B1 C1 D1 A2 B2 C2 D2. cw = 1 counts up (clockwise),
// cw = 0 counts down; the count wraps, so the patterns repeat endlessly.
// The eight stored patterns are smc_pkg::ROM8_ROWS; the counter starts at
// location 0 after reset.
//
// Interface: clk, asynchronous active-low rst_n, step (one-cycle step
// command), cw; outputs row and pattern (bit 7 = A1 ... bit 0 = D2).
// pattern follows row combinationally.
module rom_counter_8ph
  import smc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       cw,
  output logic [2:0] row,
  output logic [7:0] pattern
);

  updown_counter #(.MODULUS(8)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .up    (cw),
    .count (row)
  );

  rom #(
    .ADDR_W  (3),
    .DATA_W  (8),
    .CONTENT (rom8_image())
  ) u_rom (
    .addr (row),
    .data (pattern)
  );

endmodule
