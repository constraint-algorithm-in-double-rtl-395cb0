// tb_dbie: self-checking testbench of the double-base integer encoder.
//
// Both maps are instantiated. Every level X = 0..63 is applied as a one-hot
// line and the outputs are checked against rules worked out here, not
// against the encoder's table:
//   * the values of the set cells add up to X (cell values are rebuilt here
//     by listing every 2^i * 3^j below 64 and sorting them);
//   * a code uses the fewest cells possible, and never more than three
//     (at most two additions), found by brute force over all cell subsets;
//   * in the asymmetric map, no two set cells are neighbours in the map;
//   * after all levels, each output's fan-in (number of levels using it)
//     and the number of three-cell codes equal the published figures
//     (12 symmetric, 5 asymmetric);
//   * level 0 gives no cell.
// A watchdog ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module tb_dbie;
  import dbns_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [LEVELS-1:0]     onehot;
  logic [SYM_CELLS-1:0]  cells_sym;
  logic [ASYM_CELLS-1:0] cells_asym;

  dbie #(.MAP(MAP_SYMMETRIC))  u_sym  (.onehot(onehot), .cells(cells_sym));
  dbie #(.MAP(MAP_ASYMMETRIC)) u_asym (.onehot(onehot), .cells(cells_asym));

  // Cell values of a map with binary exponents 0..imax-1 and ternary
  // exponents 0..3, below 64, in increasing order.
  int val_s[$];
  int val_a[$];
  function automatic void build_cells(int imax, ref int v[$]);
    v.delete();
    for (int j = 0; j < 4; j++) begin
      int p3;
      p3 = 1;
      for (int t = 0; t < j; t++) p3 *= 3;
      for (int i = 0; i < imax; i++) begin
        if ((p3 << i) < 64) v.push_back(p3 << i);
      end
    end
    v.sort();
  endfunction

  function automatic int exp_of(int v, int base);
    int e;
    e = 0;
    while (v % base == 0) begin v /= base; e++; end
    return e;
  endfunction

  // Smallest number of distinct cells (at most 3) adding up to x; 99 if none.
  function automatic int min_terms(int x, ref int v[$]);
    int n = v.size();
    if (x == 0) return 0;
    for (int a = 0; a < n; a++) if (v[a] == x) return 1;
    for (int a = 0; a < n; a++) for (int b = a+1; b < n; b++)
      if (v[a] + v[b] == x) return 2;
    for (int a = 0; a < n; a++) for (int b = a+1; b < n; b++) for (int c = b+1; c < n; c++)
      if (v[a] + v[b] + v[c] == x) return 3;
    return 99;
  endfunction

  function automatic bit neighbours(int u, int w);
    int iu, ju, iw, jw;
    iu = exp_of(u, 2); ju = exp_of(u, 3); iw = exp_of(w, 2); jw = exp_of(w, 3);
    return (iu == iw && (ju - jw == 1 || jw - ju == 1)) ||
           (ju == jw && (iu - iw == 1 || iw - iu == 1));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Published fan-in of each cell, by cell value.
  int fan_sym_ref  [int] = '{54:10, 36:11, 27:12, 24:10, 18:7, 12:8, 9:8, 8:10,
                             6:7, 4:10, 3:8, 2:12, 1:12};
  int fan_asym_ref [int] = '{54:9, 48:5, 36:11, 32:6, 27:6, 24:3, 18:6, 16:4,
                             12:5, 9:7, 8:5, 6:5, 4:9, 3:11, 2:11, 1:12};

  initial begin
    int fan_s [int];
    int fan_a [int];
    int three_s, three_a;
    int sum_s, sum_a, n_s, n_a;
    bit adj;
    three_s = 0;
    three_a = 0;

    build_cells(4, val_s);
    build_cells(6, val_a);
    check(val_s.size() == SYM_CELLS,  "symmetric map has 13 cells");
    check(val_a.size() == ASYM_CELLS, "asymmetric map has 16 cells");
    foreach (val_s[b]) begin fan_s[val_s[b]] = 0; check(CELL_SYM[b]  == val_s[b], "CELL_SYM order"); end
    foreach (val_a[b]) begin fan_a[val_a[b]] = 0; check(CELL_ASYM[b] == val_a[b], "CELL_ASYM order"); end

    for (int x = 0; x < 64; x++) begin
      sum_s = 0; sum_a = 0; n_s = 0; n_a = 0;
      adj = 0;
      onehot = (x == 0) ? '0 : (LEVELS'(1) << (x - 1));
      #1;
      for (int b = 0; b < SYM_CELLS; b++) if (cells_sym[b]) begin
        sum_s += val_s[b]; n_s++; fan_s[val_s[b]]++;
      end
      for (int b = 0; b < ASYM_CELLS; b++) if (cells_asym[b]) begin
        sum_a += val_a[b]; n_a++; fan_a[val_a[b]]++;
        for (int c = b + 1; c < ASYM_CELLS; c++)
          if (cells_asym[c] && neighbours(val_a[b], val_a[c])) adj = 1;
      end
      if (n_s == 3) three_s++;
      if (n_a == 3) three_a++;
      check(sum_s == x, $sformatf("symmetric X=%0d sums to %0d", x, sum_s));
      check(sum_a == x, $sformatf("asymmetric X=%0d sums to %0d", x, sum_a));
      check(n_s == min_terms(x, val_s), $sformatf("symmetric X=%0d uses %0d cells", x, n_s));
      check(n_a == min_terms(x, val_a), $sformatf("asymmetric X=%0d uses %0d cells", x, n_a));
      check(n_s <= 3 && n_a <= 3, $sformatf("X=%0d needs more than two additions", x));
      check(!adj, $sformatf("asymmetric X=%0d uses neighbouring cells", x));
    end

    foreach (fan_sym_ref[v])
      check(fan_s[v] == fan_sym_ref[v],
            $sformatf("symmetric cell %0d fan-in %0d, expected %0d", v, fan_s[v], fan_sym_ref[v]));
    foreach (fan_asym_ref[v])
      check(fan_a[v] == fan_asym_ref[v],
            $sformatf("asymmetric cell %0d fan-in %0d, expected %0d", v, fan_a[v], fan_asym_ref[v]));
    check(three_s == 12, $sformatf("symmetric three-cell codes %0d, expected 12", three_s));
    check(three_a == 5,  $sformatf("asymmetric three-cell codes %0d, expected 5", three_a));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
