// smc_tb_pkg: reference data for the stepper controller testbenches.
//
// The bit-pattern sequences and ROM tables are typed in here from the
// sequence tables independently of the RTL package, together with a common
// check counter. Sequences are stored first row first; a pattern's first
// coil column is its highest used bit.
package smc_tb_pkg;

  // 4-phase half-step sequence (full steps are every other row).
  localparam logic [5:0] REF_SEQ [5][10] = '{
    '{6'h09, 6'h08, 6'h0A, 6'h02, 6'h06, 6'h04, 6'h05, 6'h01, 6'h00, 6'h00},
    '{6'h04, 6'h01, 6'h02, 6'h00, 6'h00, 6'h00, 6'h00, 6'h00, 6'h00, 6'h00},
    '{6'h15, 6'h05, 6'h0D, 6'h09, 6'h0B, 6'h0A, 6'h1A, 6'h12, 6'h16, 6'h14},
    '{6'h22, 6'h0A, 6'h0C, 6'h14, 6'h11, 6'h21, 6'h00, 6'h00, 6'h00, 6'h00},
    '{6'h0F, 6'h07, 6'h03, 6'h01, 6'h00, 6'h08, 6'h0C, 6'h0E, 6'h00, 6'h00}
  };
  localparam int REF_LEN [5]  = '{8, 3, 10, 6, 8};
  localparam bit REF_HALF [5] = '{1, 0, 1, 0, 0};

  // Preset inputs P5..P0 for motor select codes 0..4.
  localparam logic [5:0] REF_PRESET [5] = '{6'b001001, 6'b000100, 6'b010101,
                                            6'b100010, 6'b001111};

  // Fully expanded 5-phase transition table: {M1 M2 ABCDE} -> A'B'C'D'E'.
  localparam logic [6:0] T7_ADDR [40] = '{
    7'h15, 7'h05, 7'h0D, 7'h09, 7'h0B, 7'h0A, 7'h1A, 7'h12, 7'h16, 7'h14,
    7'h35, 7'h25, 7'h2D, 7'h29, 7'h2B, 7'h2A, 7'h3A, 7'h32, 7'h36, 7'h34,
    7'h55, 7'h45, 7'h4D, 7'h49, 7'h4B, 7'h4A, 7'h5A, 7'h52, 7'h56, 7'h54,
    7'h75, 7'h65, 7'h6D, 7'h69, 7'h6B, 7'h6A, 7'h7A, 7'h72, 7'h76, 7'h74
  };
  localparam logic [4:0] T7_NEXT [40] = '{
    5'h14, 5'h15, 5'h05, 5'h0D, 5'h09, 5'h0B, 5'h0A, 5'h1A, 5'h12, 5'h16,
    5'h16, 5'h14, 5'h15, 5'h05, 5'h0D, 5'h09, 5'h0B, 5'h0A, 5'h1A, 5'h12,
    5'h05, 5'h0D, 5'h09, 5'h0B, 5'h0A, 5'h1A, 5'h12, 5'h16, 5'h14, 5'h15,
    5'h0D, 5'h09, 5'h0B, 5'h0A, 5'h1A, 5'h12, 5'h16, 5'h14, 5'h15, 5'h05
  };

  // 6-phase full-step sequence A1 B1 C1 A2 B2 C2.
  localparam logic [5:0] REF_6PH [6] = '{6'b100010, 6'b001010, 6'b001100,
                                         6'b010100, 6'b010001, 6'b100001};
  // 8-phase ROM/counter locations 1..8, A1 B1 C1 D1 A2 B2 C2 D2.
  localparam logic [7:0] REF_8PH [8] = '{8'b11101000, 8'b00101000, 8'b00110000,
                                         8'b01010010, 8'b01000111, 8'b10000111,
                                         8'b00110011, 8'b01010001};
  // 4-phase full-step rows for the multiplexer controller, A B C D.
  localparam logic [3:0] REF_MUX [4] = '{4'b1000, 4'b1010, 4'b0110, 4'b0101};

  // Table-7 lookup: returns 1 and the next pattern when the address is listed.
  function automatic bit t7_lookup(input logic [6:0] addr, output logic [4:0] nxt);
    nxt = '0;
    for (int i = 0; i < 40; i++)
      if (T7_ADDR[i] == addr) begin
        nxt = T7_NEXT[i];
        return 1'b1;
      end
    return 1'b0;
  endfunction

  // Index step of the sequence walk, wrapping both ways.
  function automatic int wrap(input int idx, input int delta, input int n);
    return ((idx + delta) % n + n) % n;
  endfunction

endpackage
