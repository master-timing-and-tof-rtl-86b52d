// word_comparator: 24-bit word comparator of the Time Master.
//
// It compares the Gray-coded running clock with the Gray-coded pattern word in
// the latch and raises `match` when they are equal and the comparison is
// enabled. Both sides are in Gray code, as in the original design, so no conversion is
// needed on the pattern side.
//
// Timing: combinational; the sequencer registers the result.
module word_comparator #(
  parameter int unsigned WIDTH = 24
) (
  input  logic             en,
  input  logic [WIDTH-1:0] clock_gray,
  input  logic [WIDTH-1:0] pattern_gray,
  output logic             match
);

  always_comb match = en && (clock_gray == pattern_gray);

endmodule
