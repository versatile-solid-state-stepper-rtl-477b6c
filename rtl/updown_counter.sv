// updown_counter: modulus-N up/down counter producing a ROM row address.
//
// On each step pulse the count moves up by one when up = 1 (CW/CCW = 1,
// clockwise) and down by one when up = 0, wrapping 0 <-> MODULUS-1 so the
// rows of a bit-pattern sequence are visited as an endless chain. System
// reset clears the count to row 0.
//
// Interface: clk, asynchronous active-low rst_n, step (one-cycle clock
// enable), up; output count. The count changes on the rising clk edge of a
// step cycle. The source circuit uses a ripple counter clocked by the step pulse;
// this one is synchronous with a step enable, which is this design's choice.
module updown_counter #(
  parameter int unsigned MODULUS = 6,
  localparam int unsigned W = (MODULUS > 2) ? $clog2(MODULUS) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         up,
  output logic [W-1:0] count
);

  localparam logic [W-1:0] LAST = W'(MODULUS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (step) begin
      if (up) count <= (count == LAST) ? '0 : count + 1'b1;
      else    count <= (count == '0) ? LAST : count - 1'b1;
    end
  end

endmodule
