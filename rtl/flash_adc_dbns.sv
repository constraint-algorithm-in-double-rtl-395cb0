// flash_adc_dbns: 6-bit flash ADC whose output is a double-base (2,3)
// number, ready for DBNS arithmetic, instead of a binary word.
//
// The chain is that of a flash ADC with a new last stage:
//   comparator_bank  63 latched comparators -> thermometer code b1..b63
//   zero_one_gen     thermometer code -> one-hot level line (levels 1..63)
//   dbie             one-hot line -> DBNS map cells whose values add up to
//                    the level (13 cells symmetric, 16 cells asymmetric)
//   output register  holds the cells for the DSP that follows
// MAP selects the encoder map; the asymmetric map, whose codes are addition
// ready, is the default.
//
// Interface: vin is the analog input as an unsigned VIN_W-bit fraction of
// full scale; level X = floor(vin * 64 / 2^VIN_W). dbns[b] is the cell of
// value CELL_SYM[b] / CELL_ASYM[b] (see dbns_pkg); level 0 gives all zeros.
// Timing: the comparators take vin on a rising edge of clk and the encoded
// cells are registered on the next one, so after each rising edge dbns
// holds the sample taken at the edge before (two register stages); one new
// sample per clock. rst_n is synchronous and
// active low and clears both register stages.
//
// The three stages follow the published block diagram. The clocked
// comparators and the output register are this design's own choices: the
// published encoder is an unclocked gate network.
module flash_adc_dbns
  import dbns_pkg::*;
#(
  parameter dbns_map_e   MAP   = MAP_ASYMMETRIC,
  parameter int unsigned VIN_W = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [VIN_W-1:0]         vin,
  output logic [cells_of(MAP)-1:0] dbns
);

  localparam int unsigned W = cells_of(MAP);

  logic [LEVELS-1:0] therm;
  logic [LEVELS-1:0] onehot;
  logic [W-1:0]      cells;

  comparator_bank #(.N_BITS(ADC_BITS), .VIN_W(VIN_W)) u_comparators (
    .clk   (clk),
    .rst_n (rst_n),
    .vin   (vin),
    .therm (therm)
  );

  zero_one_gen #(.N_BITS(ADC_BITS)) u_zero_one (
    .therm  (therm),
    .onehot (onehot)
  );

  dbie #(.MAP(MAP)) u_dbie (
    .onehot (onehot),
    .cells  (cells)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) dbns <= '0;
    else        dbns <= cells;
  end

  // The encoder is only defined for a one-hot (or empty) level line.
  a_onehot_level : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(onehot))
    else $error("0-1 generator produced more than one level line: %h", onehot);

endmodule
