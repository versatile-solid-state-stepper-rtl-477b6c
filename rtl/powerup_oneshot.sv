// powerup_oneshot: power-up preset pulse.
//
// Holds preset high while reset is asserted and for PULSE_CYCLES clocks
// after it is released, so the presettable flip-flops of a controller start
// from a valid first bit pattern. Afterwards preset stays low until the next
// reset.
//
// Interface: clk, asynchronous active-low rst_n; output preset.
// The source circuit names a power-up one-shot only; the pulse length is this
// design's choice.
module powerup_oneshot #(
  parameter int unsigned PULSE_CYCLES = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic preset
);

  localparam int unsigned CW = $clog2(PULSE_CYCLES + 1);

  logic [CW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              remaining <= CW'(PULSE_CYCLES);
    else if (remaining != 0) remaining <= remaining - 1'b1;
  end

  assign preset = (remaining != 0);

endmodule
