// step_clock_gen: step pulse generator (the controllers' clock or step
// time source).
//
// Counts system clocks and emits a one-cycle step strobe every period
// clocks, so the step rate is f_clk / period. Because a half step moves the
// motor half as far, the rate is doubled (period halved) while half_mode and
// half_rate_comp are both high, keeping the shaft speed the same in half-step
// mode. A period of 0 or 1 gives a step every clock.
//
// Interface: clk, asynchronous active-low rst_n, period, half_rate_comp,
// half_mode; output step (registered, high for one clock). The first strobe
// comes period clocks after reset. A new period takes effect at the next
// strobe at the latest.
// The source circuit uses an astable (square wave) generator; a programmable
// divider of the system clock is this design's choice.
module step_clock_gen #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] period,
  input  logic         half_rate_comp,
  input  logic         half_mode,
  output logic         step
);

  logic [W-1:0] eff_period;
  logic [W-1:0] count;
  logic         last;

  always_comb begin
    eff_period = (half_rate_comp && half_mode) ? (period >> 1) : period;
    if (eff_period == '0) eff_period = W'(1);
  end

  assign last = (count >= eff_period - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      step  <= 1'b0;
    end else begin
      step  <= last;
      count <= last ? '0 : count + 1'b1;
    end
  end

endmodule
