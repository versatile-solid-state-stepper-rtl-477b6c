// preset_dff_reg: a bank of presettable D-type flip-flops with true and
// complement outputs.
//
// On each step pulse the register loads d, turning the ROM's next-state
// pattern into the present state that drives the motor and addresses the
// ROM. While preset is high it loads preset_val instead, which is how a
// controller is forced onto a valid first bit pattern. preset wins over
// step.
//
// Interface: clk, asynchronous active-low rst_n (clears the register),
// step (one-cycle clock enable = one step command), preset, preset_val, d;
// outputs q and q_n = ~q. Timing: q changes on the rising clk edge of a
// cycle in which step or preset is high.
// The source circuit's flip-flops are clocked directly by the step pulse and
// preset asynchronously; here they run on the system clock with step as an
// enable and a synchronous preset, which is this design's choice.
module preset_dff_reg #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             preset,
  input  logic [WIDTH-1:0] preset_val,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] q_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (preset) q <= preset_val;
    else if (step)   q <= d;
  end

  assign q_n = ~q;

endmodule
