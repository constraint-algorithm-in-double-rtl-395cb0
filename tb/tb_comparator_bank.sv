// tb_comparator_bank: self-checking testbench of the comparator bank model.
//
// The input sweeps every 12-bit code around each reference tap and then
// takes random values. One clock after a sample, the output must be the
// thermometer code with floor(vin * 64 / 4096) ones at the bottom. Reset
// must clear the output. A watchdog ends the run with a failure if it does
// not finish in time.
`timescale 1ns/1ps
module tb_comparator_bank;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [11:0] vin;
  logic [62:0] therm;

  always #5 clk = ~clk;

  comparator_bank #(.N_BITS(6), .VIN_W(12)) u_dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .therm(therm)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply one sample and check it a clock later.
  task automatic sample(logic [11:0] v);
    int level;
    logic [62:0] expected;
    level = int'(v) * 64 / 4096;
    expected = '0;
    for (int k = 0; k < level; k++) expected[k] = 1'b1;
    vin = v;
    @(posedge clk);
    #1;
    check(therm == expected, $sformatf("vin=%0d level %0d: got %h", v, level, therm));
  endtask

  initial begin
    rst_n = 1'b0;
    vin   = 12'hfff;
    @(posedge clk);
    #1;
    check(therm == '0, "reset clears the comparators");
    rst_n = 1'b1;
    for (int k = 0; k < 64; k++) begin
      sample(12'(k * 64));
      sample(12'(k * 64 + 63));
      if (k > 0) sample(12'(k * 64 - 1));
    end
    repeat (500) sample(12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
