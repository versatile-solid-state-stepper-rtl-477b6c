// rom_decoder: exhaustive address decoder (the AND-tie section of a ROM).
//
// Every one of the 2**ADDR_W address codes has its own active-high word
// line; exactly one word line is high for any address. The ROM feeds these
// lines into its OR-tie section. Purely combinational, no clock.
//
// Interface: addr in, one-hot word_line out (bit i high when addr == i).
// The structure follows the ROM description of a decoder plus OR-tie; the
// address width is a parameter.
module rom_decoder #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic [ADDR_W-1:0]      addr,
  output logic [2**ADDR_W-1:0]   word_line
);

  always_comb begin
    for (int unsigned i = 0; i < 2**ADDR_W; i++)
      word_line[i] = (addr == ADDR_W'(i));
  end

endmodule
