// dbns_pkg: constants shared by the double-base integer encoder (DBIE) and its
// testbenches.
//
// A 6-bit flash ADC produces a level X in 0..63. The DBIE gives X as a set of
// "cells" of a double-base (2,3) map, each cell standing for the integer
// 2^i * 3^j, with X equal to the sum of the cells that are set. Two maps are
// defined:
//   * symmetric map : binary exponent i = 0..3, ternary exponent j = 0..3.
//     The 13 cells below 64 are the 13 encoder outputs.
//   * asymmetric map: i = 0..5, j = 0..3. The 16 cells below 64 are the 16
//     encoder outputs. No code uses two neighbouring cells (same row, adjacent
//     columns, or same column, adjacent rows), so every code is "addition
//     ready": no two of its terms can be merged into one cell by a shift.
// Output bit b of a map is the cell with the b-th smallest value (CELL_SYM /
// CELL_ASYM), so bit 0 is always 2^0*3^0 = 1.
//
// The code tables list, for X = 1..63, which cells are set. Each code uses the
// fewest cells possible (one, two or at most three cells: at most two
// additions). Where several such codes exist, the choice is fixed by the
// fan-in of each output, that is, by how many of the 63 levels use that cell:
//   symmetric : 54:10 36:11 27:12 24:10 18:7 12:8 9:8 8:10 6:7 4:10 3:8 2:12 1:12
//   asymmetric: 54:9 48:5 36:11 32:6 27:6 24:3 18:6 16:4 12:5 9:7 8:5 6:5 4:9
//               3:11 2:11 1:12
// These fan-ins, the cell sets, the two-addition limit and the counts of
// three-cell codes (12 symmetric, 5 asymmetric) come from the published
// design. Several tables meet all of them; the one below is the first when
// the levels are taken in increasing order and, for each level, the code with
// the larger leading cell is tried first. X = 0 sets no cell.
package dbns_pkg;

  localparam int unsigned ADC_BITS = 6;                 // flash ADC resolution n
  localparam int unsigned LEVELS   = (1 << ADC_BITS) - 1; // 63 non-zero levels

  typedef enum logic {
    MAP_SYMMETRIC  = 1'b0,
    MAP_ASYMMETRIC = 1'b1
  } dbns_map_e;

  localparam int unsigned SYM_CELLS  = 13;
  localparam int unsigned ASYM_CELLS = 16;
  localparam int unsigned MAX_CELLS  = ASYM_CELLS;

  // Number of output bits of a map.
  function automatic int unsigned cells_of(dbns_map_e m);
    return (m == MAP_SYMMETRIC) ? SYM_CELLS : ASYM_CELLS;
  endfunction

  // Value 2^i * 3^j of each output bit, bit 0 first.
  localparam int unsigned CELL_SYM  [SYM_CELLS]  = '{1, 2, 3, 4, 6, 8, 9, 12, 18, 24, 27, 36, 54};
  localparam int unsigned CELL_ASYM [ASYM_CELLS] = '{1, 2, 3, 4, 6, 8, 9, 12, 16, 18, 24, 27, 32, 36, 48, 54};
  // Binary exponent i and ternary exponent j of each output bit.
  localparam int unsigned EXP2_SYM  [SYM_CELLS]  = '{0, 1, 0, 2, 1, 3, 0, 2, 1, 3, 0, 2, 1};
  localparam int unsigned EXP3_SYM  [SYM_CELLS]  = '{0, 0, 1, 0, 1, 0, 2, 1, 2, 1, 3, 2, 3};
  localparam int unsigned EXP2_ASYM [ASYM_CELLS] = '{0, 1, 0, 2, 1, 3, 0, 2, 4, 1, 3, 0, 5, 2, 4, 1};
  localparam int unsigned EXP3_ASYM [ASYM_CELLS] = '{0, 0, 1, 0, 1, 0, 2, 1, 0, 2, 1, 3, 0, 2, 1, 3};

  // Code of level X is entry X-1.
  localparam logic [SYM_CELLS-1:0] CODE_SYM [LEVELS] = '{
    13'h0001, //  1 = 1
    13'h0002, //  2 = 2
    13'h0004, //  3 = 3
    13'h0008, //  4 = 4
    13'h0009, //  5 = 4 + 1
    13'h0010, //  6 = 6
    13'h0011, //  7 = 6 + 1
    13'h0020, //  8 = 8
    13'h0040, //  9 = 9
    13'h0041, // 10 = 9 + 1
    13'h0042, // 11 = 9 + 2
    13'h0080, // 12 = 12
    13'h0081, // 13 = 12 + 1
    13'h0082, // 14 = 12 + 2
    13'h0084, // 15 = 12 + 3
    13'h0088, // 16 = 12 + 4
    13'h0060, // 17 = 9 + 8
    13'h0100, // 18 = 18
    13'h0101, // 19 = 18 + 1
    13'h0102, // 20 = 18 + 2
    13'h0104, // 21 = 18 + 3
    13'h0108, // 22 = 18 + 4
    13'h0106, // 23 = 18 + 3 + 2
    13'h0200, // 24 = 24
    13'h0201, // 25 = 24 + 1
    13'h0202, // 26 = 24 + 2
    13'h0400, // 27 = 27
    13'h0401, // 28 = 27 + 1
    13'h0402, // 29 = 27 + 2
    13'h0404, // 30 = 27 + 3
    13'h0408, // 31 = 27 + 4
    13'h0220, // 32 = 24 + 8
    13'h0410, // 33 = 27 + 6
    13'h0222, // 34 = 24 + 8 + 2
    13'h0420, // 35 = 27 + 8
    13'h0800, // 36 = 36
    13'h0801, // 37 = 36 + 1
    13'h0802, // 38 = 36 + 2
    13'h0804, // 39 = 36 + 3
    13'h0808, // 40 = 36 + 4
    13'h0260, // 41 = 24 + 9 + 8
    13'h0810, // 42 = 36 + 6
    13'h0488, // 43 = 27 + 12 + 4
    13'h0820, // 44 = 36 + 8
    13'h0840, // 45 = 36 + 9
    13'h0818, // 46 = 36 + 6 + 4
    13'h04a0, // 47 = 27 + 12 + 8
    13'h0880, // 48 = 36 + 12
    13'h0848, // 49 = 36 + 9 + 4
    13'h0320, // 50 = 24 + 18 + 8
    13'h0600, // 51 = 27 + 24
    13'h0601, // 52 = 27 + 24 + 1
    13'h0602, // 53 = 27 + 24 + 2
    13'h1000, // 54 = 54
    13'h1001, // 55 = 54 + 1
    13'h1002, // 56 = 54 + 2
    13'h1004, // 57 = 54 + 3
    13'h1008, // 58 = 54 + 4
    13'h1006, // 59 = 54 + 3 + 2
    13'h1010, // 60 = 54 + 6
    13'h1011, // 61 = 54 + 6 + 1
    13'h1020, // 62 = 54 + 8
    13'h1040  // 63 = 54 + 9
  };

  localparam logic [ASYM_CELLS-1:0] CODE_ASYM [LEVELS] = '{
    16'h0001, //  1 = 1
    16'h0002, //  2 = 2
    16'h0004, //  3 = 3
    16'h0008, //  4 = 4
    16'h0009, //  5 = 4 + 1
    16'h0010, //  6 = 6
    16'h0011, //  7 = 6 + 1
    16'h0020, //  8 = 8
    16'h0040, //  9 = 9
    16'h0041, // 10 = 9 + 1
    16'h0042, // 11 = 9 + 2
    16'h0080, // 12 = 12
    16'h0081, // 13 = 12 + 1
    16'h0082, // 14 = 12 + 2
    16'h0084, // 15 = 12 + 3
    16'h0100, // 16 = 16
    16'h0101, // 17 = 16 + 1
    16'h0200, // 18 = 18
    16'h0201, // 19 = 18 + 1
    16'h0202, // 20 = 18 + 2
    16'h0204, // 21 = 18 + 3
    16'h0208, // 22 = 18 + 4
    16'h0206, // 23 = 18 + 3 + 2
    16'h0400, // 24 = 24
    16'h0401, // 25 = 24 + 1
    16'h0402, // 26 = 24 + 2
    16'h0800, // 27 = 27
    16'h0180, // 28 = 16 + 12
    16'h0802, // 29 = 27 + 2
    16'h0804, // 30 = 27 + 3
    16'h0808, // 31 = 27 + 4
    16'h1000, // 32 = 32
    16'h1001, // 33 = 32 + 1
    16'h1002, // 34 = 32 + 2
    16'h1004, // 35 = 32 + 3
    16'h2000, // 36 = 36
    16'h2001, // 37 = 36 + 1
    16'h2002, // 38 = 36 + 2
    16'h2004, // 39 = 36 + 3
    16'h2008, // 40 = 36 + 4
    16'h1040, // 41 = 32 + 9
    16'h2010, // 42 = 36 + 6
    16'h0900, // 43 = 27 + 16
    16'h2020, // 44 = 36 + 8
    16'h2040, // 45 = 36 + 9
    16'h2018, // 46 = 36 + 6 + 4
    16'h2024, // 47 = 36 + 8 + 3
    16'h4000, // 48 = 48
    16'h4001, // 49 = 48 + 1
    16'h4002, // 50 = 48 + 2
    16'h4004, // 51 = 48 + 3
    16'h4008, // 52 = 48 + 4
    16'h2060, // 53 = 36 + 9 + 8
    16'h8000, // 54 = 54
    16'h8001, // 55 = 54 + 1
    16'h8002, // 56 = 54 + 2
    16'h8004, // 57 = 54 + 3
    16'h8008, // 58 = 54 + 4
    16'h1800, // 59 = 32 + 27
    16'h8010, // 60 = 54 + 6
    16'h800c, // 61 = 54 + 4 + 3
    16'h8020, // 62 = 54 + 8
    16'h8040  // 63 = 54 + 9
  };

endpackage
