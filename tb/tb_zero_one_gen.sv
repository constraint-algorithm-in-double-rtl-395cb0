// tb_zero_one_gen: self-checking testbench of the 0-1 generator.
//
// Every thermometer code of a 6-bit flash ADC (levels 0..63) is applied; the
// output must be empty for level 0 and otherwise have exactly one bit set,
// at index level-1. A 4-bit instance is checked the same way. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module tb_zero_one_gen;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [62:0] therm6, onehot6;
  logic [14:0] therm4, onehot4;

  zero_one_gen #(.N_BITS(6)) u_dut6 (.therm(therm6), .onehot(onehot6));
  zero_one_gen #(.N_BITS(4)) u_dut4 (.therm(therm4), .onehot(onehot4));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int x = 0; x < 64; x++) begin
      logic [62:0] expect6;
      therm6 = '0;
      for (int k = 0; k < x; k++) therm6[k] = 1'b1;
      expect6 = '0;
      if (x > 0) expect6[x-1] = 1'b1;
      @(posedge clk);
      check(onehot6 == expect6, $sformatf("6-bit level %0d: got %h", x, onehot6));
    end
    for (int x = 0; x < 16; x++) begin
      logic [14:0] expect4;
      therm4 = '0;
      for (int k = 0; k < x; k++) therm4[k] = 1'b1;
      expect4 = '0;
      if (x > 0) expect4[x-1] = 1'b1;
      @(posedge clk);
      check(onehot4 == expect4, $sformatf("4-bit level %0d: got %h", x, onehot4));
    end
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
