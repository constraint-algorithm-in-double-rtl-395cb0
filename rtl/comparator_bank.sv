// comparator_bank: behavioural model of the flash ADC front end (voltage
// comparators with gain boosters). This is a model of an analog block, not
// logic meant for synthesis.
//
// 2^N_BITS-1 comparators each compare the input with one tap of a uniform
// reference ladder. Comparator b_k fires when the input is at or above k
// LSBs, where one LSB is full scale / 2^N_BITS. The analog input is given as
// an unsigned VIN_W-bit fraction of full scale (vin / 2^VIN_W), so the
// threshold of b_k is the code k * 2^(VIN_W-N_BITS). The comparators are
// modelled as latched (clocked) comparators: their decisions are taken on
// the rising edge of clk and held for one period, so therm follows vin with
// one clock of latency. rst_n (active low, synchronous) clears every latch.
//
// Interface: therm[k-1] is b_k, k = 1..2^N_BITS-1 (thermometer code).
//
// The published design only names this stage; the uniform ladder, the
// latched comparators, the reset and the fixed-point input are this model's
// own choices.
module comparator_bank #(
  parameter int unsigned N_BITS = 6,
  parameter int unsigned VIN_W  = 12,
  localparam int unsigned L = (1 << N_BITS) - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [VIN_W-1:0] vin,
  output logic [L-1:0]     therm
);

  // Reference ladder tap of comparator b_(k+1), in input codes.
  function automatic logic [VIN_W:0] tap(int unsigned k);
    return (VIN_W+1)'((k + 1) << (VIN_W - N_BITS));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      therm <= '0;
    end else begin
      for (int unsigned k = 0; k < L; k++) begin
        therm[k] <= ({1'b0, vin} >= tap(k));
      end
    end
  end

endmodule
