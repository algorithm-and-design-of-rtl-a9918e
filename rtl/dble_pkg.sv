// dble_pkg: shared sizes, types and ROM contents of the double-base log encoder.
//
// A 6-bit flash ADC delivers one of 64 input levels. Instead of a binary code,
// the encoder outputs a pair of signed exponents (b, t) with 2^b * 3^t (in
// volts) as close as possible to the level's input voltage. Both exponents are
// 9-bit two's complement numbers, so each lies in [-256, 256).
//
// Level k (k = 0..63) stands for the input voltage
//     V(k) = 550 mV + (k - 1) * LSB,   LSB = 500/62 mV (about 8.065 mV),
// the spacing of the input column of the design's published code table
// (550.00 mV at k = 1 up to 1033.87 mV at k = 61, four codes per 32.26 mV).
// Each ROM word holds the pair that minimises |2^b * 3^t - V(k)| over all
// b, t in [-256, 256). For the sixteen levels k = 1, 5, ..., 61 this rule gives
// exactly the published pairs; the other 48 words come from the same rule.
// The largest representation error over all 64 words is 0.138 LSB, inside the
// 0.15 LSB tolerance the design targets.
package dble_pkg;

  localparam int N_BITS  = 6;              // ADC resolution
  localparam int N_CODES = 1 << N_BITS;    // 64 levels, 64 ROM word lines
  localparam int N_COMP  = N_CODES - 1;    // 63 comparators
  localparam int EXP_W   = 9;              // sign + 8 bits per exponent

  typedef logic signed [EXP_W-1:0] exp_t;

  // One encoder output: binary exponent b and ternary exponent t.
  typedef struct packed {
    exp_t b;
    exp_t t;
  } dlns_t;

  typedef logic [N_CODES-1:0][EXP_W-1:0] rom_cells_t;

  // Binary exponent b of level k (index k).
  localparam int B_EXP [N_CODES] = '{
     -115,  -134,  -237,  -256,   210,   191,   172,   153,
      134,   115,    96,   161,   142,   207,   188,   253,
     -251,  -186,  -121,  -140,   -75,   -10,   139,   204,
     -216,  -151,   -86,   -21,   128,   193,  -227,   -78,
       71,   136,  -200,  -135,    14,   163,  -173,  -108,
       41,   190,  -146,     3,   152,  -184,   -35,   114,
     -222,    11,   160,  -176,   -27,   206,  -130,   103,
      252,   -84,   149,  -187,    46,   195,   -57,   176
  };

  // Ternary exponent t of level k (index k).
  localparam int T_EXP [N_CODES] = '{
       72,    84,   149,   161,  -133,  -121,  -109,   -97,
      -85,   -73,   -61,  -102,   -90,  -131,  -119,  -160,
      158,   117,    76,    88,    47,     6,   -88,  -129,
      136,    95,    54,    13,   -81,  -122,   143,    49,
      -45,   -86,   126,    85,    -9,  -103,   109,    68,
      -26,  -120,    92,    -2,   -96,   116,    22,   -72,
      140,    -7,  -101,   111,    17,  -130,    82,   -65,
     -159,    53,   -94,   118,   -29,  -123,    36,  -111
  };

  // Cell pattern of one ROM array: row k holds the exponent's 9-bit two's
  // complement code. A 1 marks a cell that has an NMOS pull-down transistor.
  function automatic rom_cells_t rom_cells(input bit ternary);
    rom_cells_t cells;
    for (int k = 0; k < N_CODES; k++)
      cells[k] = EXP_W'(ternary ? T_EXP[k] : B_EXP[k]);
    return cells;
  endfunction

  localparam rom_cells_t B_CELLS = rom_cells(1'b0);
  localparam rom_cells_t T_CELLS = rom_cells(1'b1);

endpackage
