// mux4: 1-of-4 multiplexer (data selector).
//
// Output y is data input d[sel]. In the multiplexer-based controller each
// mux4 produces one column of the bit-pattern sequence: its data inputs are
// tied to the bits of that column and the row counter drives sel.
// Combinational. Interface: d[3:0] = D3..D0, sel = {B, A}, y = O/P.
module mux4 (
  input  logic [3:0] d,
  input  logic [1:0] sel,
  output logic       y
);

  always_comb y = d[sel];

endmodule
