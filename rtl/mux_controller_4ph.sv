// mux_controller_4ph: multiplexer-based bidirectional full-step controller
// for a 2-phase or 4-phase stepper motor.
//
// A 2-bit up/down counter (outputs B A) selects the same data input of four
// 1-of-4 multiplexers. Each multiplexer implements one column (A, B, C or D)
// of the full-step sequence: its data inputs D0..D3 are tied to the bits of
// that column for rows 1..4 (smc_pkg::MUX_COLUMNS). cw = 1 counts up
// (clockwise), cw = 0 counts down.
//
// Interface: clk, asynchronous active-low rst_n, step (one-cycle step
// command), cw; outputs row and pattern (bit 3 = A ... bit 0 = D). pattern
// follows row combinationally; reset selects row 1.
module mux_controller_4ph
  import smc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       cw,
  output logic [1:0] row,
  output logic [3:0] pattern
);

  updown_counter #(.MODULUS(4)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .up    (cw),
    .count (row)
  );

  for (genvar c = 0; c < 4; c++) begin : g_column
    mux4 u_mux (
      .d   (MUX_COLUMNS[c]),
      .sel (row),
      .y   (pattern[3-c])
    );
  end

endmodule
