// dbie: Double-Base Integer Encoder, the last stage of a 6-bit flash ADC
// whose output is a double-base (2,3) number instead of a binary one.
//
// Its input is the one-hot level line of the 0-1 generator: bit X-1 is set
// for ADC level X, X = 1..63, and no bit for level 0. Its outputs are the
// cells of a DBNS map, each cell worth 2^i * 3^j; the cells that are set add
// up to X. Each output is therefore the OR of the level lines whose code uses
// that cell, and the number of such lines is the output's fan-in. Which code
// each level gets is fixed in dbns_pkg (CODE_SYM, CODE_ASYM): every level
// uses at most three cells (at most two additions downstream), and the
// per-output fan-ins are those of the published design, at most 12.
//
//   MAP_SYMMETRIC : 4 x 4 map, binary exponent 0..3, ternary exponent 0..3,
//                   13 outputs (the cells below 64).
//   MAP_ASYMMETRIC: 6 x 4 map, binary exponent 0..5, ternary exponent 0..3,
//                   16 outputs. No code uses two neighbouring cells, so the
//                   output is addition ready for DBNS arithmetic after it.
//
// Interface: cells[b] is the b-th smallest cell of the map (see CELL_SYM /
// CELL_ASYM); bit 0 is worth 1. The input must be one-hot or zero.
// Elaboration stops with an error if the table breaks a rule: a code that
// does not add up to its level, more than three cells, neighbouring cells in
// the asymmetric map, or an output fan-in above 12.
// Timing: purely combinational, one OR level per output.
//
// The two maps, the two-addition limit and the fan-ins follow the published
// design; where several codes meet them, the table choice is this design's
// own (see dbns_pkg).
module dbie
  import dbns_pkg::*;
#(
  parameter dbns_map_e MAP = MAP_ASYMMETRIC,
  localparam int unsigned W = cells_of(MAP)
) (
  input  logic [LEVELS-1:0] onehot,
  output logic [W-1:0]      cells
);

  // Code table of the selected map, zero-extended to the widest map.
  function automatic logic [MAX_CELLS-1:0] code_of(int unsigned level_idx);
    if (MAP == MAP_SYMMETRIC) return MAX_CELLS'(CODE_SYM[level_idx]);
    else                      return MAX_CELLS'(CODE_ASYM[level_idx]);
  endfunction

  function automatic int unsigned cell_val(int unsigned b);
    if (MAP == MAP_SYMMETRIC) return CELL_SYM[b];
    else                      return CELL_ASYM[b];
  endfunction

  function automatic int unsigned exp2_of(int unsigned b);
    if (MAP == MAP_SYMMETRIC) return EXP2_SYM[b];
    else                      return EXP2_ASYM[b];
  endfunction

  function automatic int unsigned exp3_of(int unsigned b);
    if (MAP == MAP_SYMMETRIC) return EXP3_SYM[b];
    else                      return EXP3_ASYM[b];
  endfunction

  // 1 when cells a and b are neighbours in the map (same row and adjacent
  // columns, or same column and adjacent rows).
  function automatic bit neighbours(int unsigned a, int unsigned b);
    return (exp3_of(a) == exp3_of(b) && (exp2_of(a) + 1 == exp2_of(b) || exp2_of(b) + 1 == exp2_of(a))) ||
           (exp2_of(a) == exp2_of(b) && (exp3_of(a) + 1 == exp3_of(b) || exp3_of(b) + 1 == exp3_of(a)));
  endfunction

  // Number of the table's defects: codes that do not add up to their level,
  // codes with more than three cells, cells whose value is not 2^i * 3^j, and
  // (asymmetric map) codes with neighbouring cells.
  function automatic int unsigned table_errors();
    int unsigned errors = 0;
    for (int unsigned b = 0; b < W; b++) begin
      if (cell_val(b) != (1 << exp2_of(b)) * (3 ** exp3_of(b))) errors++;
    end
    for (int unsigned x = 0; x < LEVELS; x++) begin
      int unsigned sum = 0;
      int unsigned n   = 0;
      for (int unsigned b = 0; b < W; b++) begin
        if (code_of(x)[b]) begin
          sum += cell_val(b);
          n++;
          for (int unsigned c = b + 1; c < W; c++) begin
            if (MAP == MAP_ASYMMETRIC && code_of(x)[c] && neighbours(b, c)) errors++;
          end
        end
      end
      if (sum != x + 1 || n > 3) errors++;
    end
    return errors;
  endfunction

  // Largest number of level lines feeding one output.
  function automatic int unsigned max_fanin();
    int unsigned worst = 0;
    for (int unsigned b = 0; b < W; b++) begin
      int unsigned f = 0;
      for (int unsigned x = 0; x < LEVELS; x++) f += int'(code_of(x)[b]);
      if (f > worst) worst = f;
    end
    return worst;
  endfunction

  localparam int unsigned TABLE_ERRORS = table_errors();
  localparam int unsigned MAX_FANIN    = max_fanin();

  // Elaboration-time checks of the code table.
  if (TABLE_ERRORS != 0) begin : g_bad_table
    $error("dbie: %0d defects in the DBNS code table", TABLE_ERRORS);
  end
  if (MAX_FANIN > 12) begin : g_bad_fanin
    $error("dbie: an output has fan-in %0d, above 12", MAX_FANIN);
  end

  // OR plane: output b collects every level line whose code sets cell b.
  always_comb begin
    cells = '0;
    for (int unsigned x = 0; x < LEVELS; x++) begin
      for (int unsigned b = 0; b < W; b++) begin
        if (code_of(x)[b]) cells[b] = cells[b] | onehot[x];
      end
    end
  end

endmodule
