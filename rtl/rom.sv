// rom: read-only memory made of an exhaustive address decoder and an OR-tie.
//
// The decoder raises one word line per address; the OR-tie ORs together,
// for every output bit, the word lines whose stored bit is 1 (the
// "programmed" connections). The programmed pattern is the CONTENT parameter,
// a flat vector in which word i occupies bits [i*DATA_W +: DATA_W].
//
// Interface: addr in, data out. Combinational: data follows addr with no
// clock, as in an asynchronous mask ROM, EPROM or EAROM. Any register around
// it belongs to the controller using it.
module rom #(
  parameter int unsigned                       ADDR_W  = 4,
  parameter int unsigned                       DATA_W  = 4,
  parameter logic [(2**ADDR_W)*DATA_W-1:0]     CONTENT = '0
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 2**ADDR_W;

  logic [DEPTH-1:0] word_line;

  rom_decoder #(.ADDR_W(ADDR_W)) u_decoder (
    .addr      (addr),
    .word_line (word_line)
  );

  // OR-tie section.
  always_comb begin
    data = '0;
    for (int unsigned i = 0; i < DEPTH; i++)
      data = data | ({DATA_W{word_line[i]}} & CONTENT[i*DATA_W +: DATA_W]);
  end

endmodule
