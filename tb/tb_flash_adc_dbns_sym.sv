// tb_flash_adc_dbns_sym: end-to-end testbench of the 6-bit flash ADC with
// double-base output, built with the symmetric 4 x 4 map (13 outputs).
//
// The input walks through every ADC level (at the bottom, middle and top of
// each step), then up and down full-scale ramps and random samples, one new
// sample per clock. The expected level of each sample is
// floor(vin * 64 / 4096); one clock after the comparators take the sample,
// the values of the set output cells must add up to it, with at most three
// cells set. Cell values are rebuilt here by listing 2^i * 3^j below 64. The
// latency is checked by comparing the output after each rising edge with the
// sample the comparators took at the edge before, and reset must clear the
// output. Every mechanism is counted: level 0 (no cell), one-cell, two-cell
// and three-cell codes, full scale and reset; one that never happens is a
// failure. A watchdog ends the run with a failure if it does not finish in
// time.
`timescale 1ns/1ps
module tb_flash_adc_dbns_sym;
  import dbns_pkg::*;

  localparam bit          ASYM = 1'b0;
  localparam int unsigned W    = SYM_CELLS;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [11:0] vin;
  logic [W-1:0] dbns;

  always #5 clk = ~clk;

  flash_adc_dbns #(.MAP(MAP_SYMMETRIC)) u_adc (
    .clk(clk), .rst_n(rst_n), .vin(vin), .dbns(dbns)
  );

  int val_s[$];
  int val_a[$];
  function automatic void build_cells(int imax, ref int v[$]);
    int p3;
    v.delete();
    for (int j = 0; j < 4; j++) begin
      p3 = 1;
      for (int t = 0; t < j; t++) p3 *= 3;
      for (int i = 0; i < imax; i++) if ((p3 << i) < 64) v.push_back(p3 << i);
    end
    v.sort();
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters, [0] symmetric, [1] asymmetric.
  int n_zero [2];
  int n_one  [2];
  int n_two  [2];
  int n_three[2];
  int n_full [2];
  int n_reset = 0;

  int pipe [$];   // expected level of each sample not yet checked

  task automatic check_out(int level, bit asym, logic [ASYM_CELLS-1:0] out);
    int sum, n;
    sum = 0;
    n = 0;
    for (int b = 0; b < (asym ? ASYM_CELLS : SYM_CELLS); b++)
      if (out[b]) begin
        sum += asym ? val_a[b] : val_s[b];
        n++;
      end
    check(sum == level, $sformatf("%s map: level %0d encoded as %h (sum %0d)",
                                  asym ? "asymmetric" : "symmetric", level, out, sum));
    check(n <= 3, $sformatf("level %0d uses %0d cells", level, n));
    case (n)
      0: n_zero[asym]++;
      1: n_one[asym]++;
      2: n_two[asym]++;
      3: n_three[asym]++;
      default: ;
    endcase
    if (level == 63) n_full[asym]++;
  endtask

  // Drive one sample for a clock; check the output of the sample the
  // comparators took one rising edge earlier.
  task automatic sample(logic [11:0] v);
    @(negedge clk);
    vin = v;
    pipe.push_back(int'(v) * 64 / 4096);
    @(posedge clk);
    #1;
    if (pipe.size() > 1) begin
      int level;
      level = pipe.pop_front();
      check_out(level, ASYM, ASYM_CELLS'(dbns));
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    @(posedge clk);
    #1;
    check(dbns == '0, "reset clears the outputs");
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    pipe.delete();
    // The comparators take vin at the first rising edge after reset.
    pipe.push_back(int'(vin) * 64 / 4096);
  endtask

  initial begin
    build_cells(4, val_s);
    build_cells(6, val_a);
    vin   = '0;
    rst_n = 1'b0;
    do_reset();

    for (int k = 0; k < 64; k++) begin
      sample(12'(k * 64));
      sample(12'(k * 64 + 32));
      sample(12'(k * 64 + 63));
    end
    for (int v = 0; v < 4096; v += 7)  sample(12'(v));
    for (int v = 4095; v >= 0; v -= 5) sample(12'(v));
    vin = 12'hfff;
    do_reset();
    repeat (2000) sample(12'($urandom));
    repeat (3) sample(12'h000);

    begin
      string name;
      int m;
      m = int'(ASYM);
      name = ASYM ? "asymmetric" : "symmetric";
      $display("%s map: zero %0d, one-cell %0d, two-cell %0d, three-cell %0d, full-scale %0d",
               name, n_zero[m], n_one[m], n_two[m], n_three[m], n_full[m]);
      check(n_zero[m]  > 0, {name, ": level 0 never seen"});
      check(n_one[m]   > 0, {name, ": one-cell code never seen"});
      check(n_two[m]   > 0, {name, ": two-cell code never seen"});
      check(n_three[m] > 0, {name, ": three-cell code never seen"});
      check(n_full[m]  > 0, {name, ": full scale never seen"});
    end
    $display("resets: %0d", n_reset);
    check(n_reset > 0, "reset never applied");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
