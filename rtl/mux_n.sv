// mux_n: 1-of-2**SEL_W multiplexer (data selector), the taller relative of
// mux4 (1-of-8 for SEL_W = 3, 1-of-16 for SEL_W = 4).
//
// Output y is d[sel]. Combinational. Interface: d (data inputs D0..Dn-1,
// D0 in bit 0), sel, y.
module mux_n #(
  parameter int unsigned SEL_W = 3
) (
  input  logic [2**SEL_W-1:0] d,
  input  logic [SEL_W-1:0]    sel,
  output logic                y
);

  always_comb y = d[sel];

endmodule
