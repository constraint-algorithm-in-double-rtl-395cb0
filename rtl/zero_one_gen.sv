// zero_one_gen: the "0-1 generator" of a flash ADC.
//
// The comparator bank delivers a thermometer code: comparator b_k is 1 when
// the input is at or above the k-th reference level, so for input level X the
// bits b_1..b_X are 1 and the rest 0. This stage marks the single 1-to-0
// transition of that code: line k is set when b_k = 1 and b_(k+1) = 0, with
// an implied b_(2^n) = 0 above the top comparator. The result is a one-hot
// line, one wire per non-zero level, that drives the encoder after it. Level
// 0 (no comparator set) gives no line at all.
//
// Interface: therm[k-1] is b_k, onehot[k-1] is level k, k = 1..2^N_BITS-1.
// Timing: purely combinational, one two-input gate level.
//
// The published design names this stage and takes it from the classic flash
// ADC; the two-input transition detector is the textbook form of it. No
// bubble (out-of-order comparator) correction is added, as none is described.
module zero_one_gen #(
  parameter int unsigned N_BITS = 6,
  localparam int unsigned L = (1 << N_BITS) - 1
) (
  input  logic [L-1:0] therm,
  output logic [L-1:0] onehot
);

  logic [L:0] therm_ext;   // thermometer code with b_(2^n) = 0 on top

  always_comb begin
    therm_ext = {1'b0, therm};
    for (int k = 0; k < L; k++) begin
      onehot[k] = therm_ext[k] & ~therm_ext[k+1];
    end
  end

endmodule
