// mux_controller: multiplexer-based bidirectional controller for any
// bit-pattern sequence of ROWS rows and COLS columns.
//
// One multiplexer per column. Each multiplexer is the smallest 1-of-2**k
// data selector with at least ROWS inputs; data input Dr is tied to the
// column's bit in row r+1, and the inputs beyond the last row are tied to
// ground. A modulus-ROWS up/down counter drives every select input, so all
// columns present the same row; cw = 1 counts up (rows top-down, clockwise),
// cw = 0 counts down. The default is the 8-phase case: eight 1-of-8
// multiplexers with 64 data inputs in all, programmed with the eight 8-bit
// patterns of the 8-phase ROM/counter controller (smc_pkg::ROM8_ROWS).
//
// Interface: clk, asynchronous active-low rst_n, step (one-cycle step
// command), cw; outputs row and pattern (bit COLS-1 = first column). The
// pattern follows the row combinationally; reset selects row 1.
// TABLE holds row r in bits [r*COLS +: COLS]. Using a modulus-ROWS counter
// rather than a plain binary one when ROWS is not a power of two is this
// design's choice, so that the grounded inputs are never selected.
module mux_controller
  import smc_pkg::*;
#(
  parameter int unsigned COLS  = 8,
  parameter int unsigned ROWS  = 8,
  parameter logic [ROWS*COLS-1:0] TABLE = rom8_image(),
  localparam int unsigned SEL_W = (ROWS > 2) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             cw,
  output logic [SEL_W-1:0] row,
  output logic [COLS-1:0]  pattern
);

  // Column c, data input r: the bit of row r, or ground past the last row.
  function automatic logic [2**SEL_W-1:0] column_inputs(input int unsigned c);
    logic [2**SEL_W-1:0] d;
    d = '0;
    for (int unsigned r = 0; r < ROWS; r++) d[r] = TABLE[r*COLS + (COLS - 1 - c)];
    return d;
  endfunction

  updown_counter #(.MODULUS(ROWS)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .up    (cw),
    .count (row)
  );

  for (genvar c = 0; c < COLS; c++) begin : g_column
    mux_n #(.SEL_W(SEL_W)) u_mux (
      .d   (column_inputs(c)),
      .sel (row),
      .y   (pattern[COLS-1-c])
    );
  end

endmodule
