// smc_pkg: shared types, bit-pattern sequences and ROM images for the
// stepper motor controllers.
//
// A stepper motor is driven by a cyclic sequence of coil bit patterns (one
// bit per drive input, 1 = coil switched on). Stepping clockwise walks the
// sequence top-down, counter-clockwise bottom-up, as an endless chain. This
// package holds every sequence the controllers use and the constant functions
// that expand them into ROM images:
//
//  * stt_next() is the fully expanded state transition table: given a motor,
//    the mode inputs (CW/CCW, F/H) and the present pattern it returns the next
//    pattern. Motors with a half-step sequence take full steps by moving two
//    rows of that sequence (so a motor sitting on a half-step row stays on
//    half-step rows), one row in half-step mode. Motors with only a full-step
//    sequence move one row in either mode.
//  * A present pattern that is not part of the selected sequence maps to the
//    sequence's first row, so a corrupted register recovers within one step.
//    This recovery rule is this design's choice; the ROM locations of invalid
//    patterns are otherwise unspecified.
//
// Bit order: a pattern is row_t = Q5..Q0 with the first coil column in the
// highest bit used by that motor (4-phase: A B C D = Q3..Q0; 3-phase:
// A B C = Q2..Q0; 5-phase: A..E = Q4..Q0; 6-phase: A1 B1 C1 A2 B2 C2 =
// Q5..Q0; 8-phase: A1 B1 C1 D1 = Q3..Q0 and A2 B2 C2 D2 = the complements
// Q3_n..Q0_n).
//
// The 4-phase half-step sequence is the odd rows of the quarter-step table;
// its first row 1001 agrees with the preset code 001001. The 8-phase
// universal-controller sequence is this design's choice: a 4-bit Johnson
// sequence starting from the preset code 1111, whose complement drives the
// second coil group.
package smc_pkg;

  typedef logic [5:0] row_t;

  // Motor select inputs A10..A8 of the universal controller.
  typedef enum logic [2:0] {
    MOTOR_2_4PH = 3'd0,
    MOTOR_3PH   = 3'd1,
    MOTOR_5PH   = 3'd2,
    MOTOR_6PH   = 3'd3,
    MOTOR_8PH   = 3'd4
  } motor_sel_e;

  // Mode inputs: M1 = CW/CCW (1 = clockwise), M2 = F/H (1 = full step).
  typedef struct packed {
    logic cw;
    logic full;
  } mode_t;

  localparam int unsigned NUM_MOTORS = 5;
  localparam int unsigned MAX_ROWS   = 10;

  // Bit-pattern sequences, first row first, unused rows zero.
  localparam row_t SEQ_TABLE [NUM_MOTORS][MAX_ROWS] = '{
    // 2/4-phase half step (full step = every other row)
    '{6'b001001, 6'b001000, 6'b001010, 6'b000010, 6'b000110,
      6'b000100, 6'b000101, 6'b000001, 6'b000000, 6'b000000},
    // 3-phase full step
    '{6'b000100, 6'b000001, 6'b000010, 6'b000000, 6'b000000,
      6'b000000, 6'b000000, 6'b000000, 6'b000000, 6'b000000},
    // 5-phase half step (full-step codes on rows 1, 3, 5, 7, 9)
    '{6'b010101, 6'b000101, 6'b001101, 6'b001001, 6'b001011,
      6'b001010, 6'b011010, 6'b010010, 6'b010110, 6'b010100},
    // 6-phase full step
    '{6'b100010, 6'b001010, 6'b001100, 6'b010100, 6'b010001,
      6'b100001, 6'b000000, 6'b000000, 6'b000000, 6'b000000},
    // 8-phase full step, first coil group (second group = complement)
    '{6'b001111, 6'b000111, 6'b000011, 6'b000001, 6'b000000,
      6'b001000, 6'b001100, 6'b001110, 6'b000000, 6'b000000}
  };
  localparam int unsigned SEQ_LEN [NUM_MOTORS] = '{8, 3, 10, 6, 8};
  localparam bit          SEQ_HAS_HALF [NUM_MOTORS] = '{1'b1, 1'b0, 1'b1, 1'b0, 1'b0};

  // Preset inputs P5..P0 per motor select code (first row of each sequence).
  localparam row_t PRESET_TABLE [NUM_MOTORS] = '{
    6'b001001, 6'b000100, 6'b010101, 6'b100010, 6'b001111
  };

  // Contents of the stand-alone ROM/counter controllers.
  // 6-phase, locations 0..5: columns A1 B1 C1 A2 B2 C2.
  localparam logic [5:0] ROM6_ROWS [6] = '{
    6'b100010, 6'b001010, 6'b001100, 6'b010100, 6'b010001, 6'b100001
  };
  // 8-phase, locations 1..8 stored at addresses 0..7: A1 B1 C1 D1 A2 B2 C2 D2.
  localparam logic [7:0] ROM8_ROWS [8] = '{
    8'b11101000, 8'b00101000, 8'b00110000, 8'b01010010,
    8'b01000111, 8'b10000111, 8'b00110011, 8'b01010001
  };
  // Data inputs D3..D0 of the four 1-of-4 multiplexers (columns A, B, C, D
  // of the 4-phase full-step table; row n sits on data input Dn-1).
  localparam logic [3:0] MUX_COLUMNS [4] = '{
    4'b0011,  // column A: rows 1..4 = 1 1 0 0
    4'b1100,  // column B: 0 0 1 1
    4'b0110,  // column C: 0 1 1 0
    4'b1000   // column D: 0 0 0 1
  };

  // Next pattern of the fully expanded state transition table.
  function automatic row_t stt_next(input int unsigned motor, input logic cw,
                                    input logic full, input row_t q);
    int idx;
    int n;
    int step;
    if (motor >= NUM_MOTORS) return '0;
    n   = int'(SEQ_LEN[motor]);
    idx = -1;
    for (int i = 0; i < int'(MAX_ROWS); i++)
      if (idx < 0 && i < n && SEQ_TABLE[motor][i] == q) idx = i;
    if (idx < 0) return SEQ_TABLE[motor][0];
    step = (SEQ_HAS_HALF[motor] && full) ? 2 : 1;
    if (cw) return SEQ_TABLE[motor][(idx + step) % n];
    return SEQ_TABLE[motor][(idx - step + n) % n];
  endfunction

  // 2 Kbyte universal next-state ROM: address A10..A0 =
  // {motor select, M1, M2, Q5..Q0}, data D7..D0 with D7..D6 unused (0).
  // Motor select codes 5..7 are left unprogrammed (all zero).
  function automatic logic [2048*8-1:0] usmc_rom_image();
    logic [2048*8-1:0] img;
    logic [10:0] a;
    for (int i = 0; i < 2048; i++) begin
      a = 11'(i);
      img[i*8 +: 8] = {2'b00, stt_next(int'(a[10:8]), a[7], a[6], a[5:0])};
    end
    return img;
  endfunction

  // 1 Kbyte preset ROM: address = motor select on A2..A0.
  function automatic logic [1024*8-1:0] preset_rom_image();
    logic [1024*8-1:0] img;
    img = '0;
    for (int i = 0; i < int'(NUM_MOTORS); i++)
      img[i*8 +: 8] = {2'b00, PRESET_TABLE[i]};
    return img;
  endfunction

  // 128 x 5 ROM of the dedicated 5-phase controller: address {M1, M2, A..E}.
  function automatic logic [128*5-1:0] stt5_rom_image();
    logic [128*5-1:0] img;
    logic [6:0] a;
    row_t nxt;
    for (int i = 0; i < 128; i++) begin
      a   = 7'(i);
      nxt = stt_next(int'(MOTOR_5PH), a[6], a[5], {1'b0, a[4:0]});
      img[i*5 +: 5] = nxt[4:0];
    end
    return img;
  endfunction

  function automatic logic [8*6-1:0] rom6_image();
    logic [8*6-1:0] img;
    img = '0;
    for (int i = 0; i < 6; i++) img[i*6 +: 6] = ROM6_ROWS[i];
    return img;
  endfunction

  function automatic logic [8*8-1:0] rom8_image();
    logic [8*8-1:0] img;
    for (int i = 0; i < 8; i++) img[i*8 +: 8] = ROM8_ROWS[i];
    return img;
  endfunction

endpackage
