// data_gen: data generator of the memory BIST.
//
// Spreads the Zero/One signal of the algorithm decoder over the whole word:
// zero_one = 0 gives the all-zeros background, 1 the all-ones background.
// The same word is written to the RAM on a write and is the expected value
// for the comparator on a read. Combinational. A solid background is the
// simplest reading of the design's Zero/One signal.
module data_gen #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              zero_one,
  output logic [DATA_W-1:0] data
);

  assign data = {DATA_W{zero_one}};

endmodule
