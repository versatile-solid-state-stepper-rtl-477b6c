// sequence_controller: ROM controller that plays a predetermined sequence of
// bit patterns once per start command.
//
// The bidirectional full/half-step patterns of a dedicated application are
// stored in the order required. Each stored code is the next address: the
// register's present code, together with the start input, addresses the
// ROM, and the addressed word is the code for the next step. A code is
// {pattern, tag}, where the tag is the position in the program, so a pattern
// may occur several times in one sequence. The location of the last code
// holds a copy of that code, so the motor stays where it is once the
// sequence ends. With start = 1 the last code instead addresses the first
// code, and the sequence plays again. Codes not in the program lead to the
// last code (idle), which is also the power-up preset.
//
// Interface: clk, asynchronous active-low rst_n, step (one-cycle step
// command), preset (go to the idle code), start (sampled on a step while
// idle); outputs pattern (bit PAT_W-1 = coil A) and busy (1 while the
// sequence runs). Timing: a step with start = 1 while idle moves to the first
// pattern; each further step moves one entry; LEN steps after the start the
// controller is idle again on the last pattern.
// The source gives the method, not a program: the default PROGRAM is an
// example of this design for a 4-phase motor: four clockwise full steps
// from the home pattern 1001, then six counter-clockwise half steps back to
// it.
module sequence_controller #(
  parameter int unsigned            PAT_W   = 4,
  parameter int unsigned            TAG_W   = 4,
  parameter int unsigned            LEN     = 10,
  parameter logic [PAT_W*(2**TAG_W)-1:0] PROGRAM = {
    4'h0, 4'h0, 4'h0, 4'h0, 4'h0, 4'h0,
    4'b1001, 4'b1000, 4'b1010, 4'b0010, 4'b0110, 4'b0100,
    4'b0101, 4'b0110, 4'b1010, 4'b1001}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             preset,
  input  logic             start,
  output logic [PAT_W-1:0] pattern,
  output logic             busy
);

  localparam int unsigned CODE_W = PAT_W + TAG_W;
  localparam int unsigned ADDR_W = CODE_W + 1;

  function automatic logic [CODE_W-1:0] code_of(input int unsigned i);
    return {PROGRAM[i*PAT_W +: PAT_W], TAG_W'(i)};
  endfunction

  function automatic logic [(2**ADDR_W)*CODE_W-1:0] image();
    logic [(2**ADDR_W)*CODE_W-1:0] img;
    logic [ADDR_W-1:0] a;
    int unsigned       tag;
    logic [CODE_W-1:0] nxt;
    for (int unsigned i = 0; i < 2**ADDR_W; i++) begin
      a   = ADDR_W'(i);
      tag = int'(a[TAG_W-1:0]);
      if (tag < LEN && a[CODE_W-1:0] == code_of(tag)) begin
        if (tag == LEN - 1) nxt = a[ADDR_W-1] ? code_of(0) : code_of(LEN - 1);
        else                nxt = code_of(tag + 1);
      end else begin
        nxt = code_of(LEN - 1);
      end
      img[i*CODE_W +: CODE_W] = nxt;
    end
    return img;
  endfunction

  localparam logic [CODE_W-1:0] IDLE_CODE = code_of(LEN - 1);

  logic [CODE_W-1:0] code, code_n, next_code;

  rom #(
    .ADDR_W  (ADDR_W),
    .DATA_W  (CODE_W),
    .CONTENT (image())
  ) u_rom (
    .addr ({start, code}),
    .data (next_code)
  );

  preset_dff_reg #(.WIDTH(CODE_W)) u_ff (
    .clk        (clk),
    .rst_n      (rst_n),
    .step       (step),
    .preset     (preset),
    .preset_val (IDLE_CODE),
    .d          (next_code),
    .q          (code),
    .q_n        (code_n)
  );

  assign pattern = code[CODE_W-1 -: PAT_W];
  assign busy    = (code != IDLE_CODE);

  initial assert (LEN >= 2 && LEN <= 2**TAG_W)
    else $error("sequence_controller: LEN must be 2..2**TAG_W");

endmodule
