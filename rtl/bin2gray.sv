// bin2gray: combinational binary to Gray code converter for the clock counter.
//
// Successive Gray codes differ in a single bit, so a word latched from the
// running clock at any moment is off by at most one count. Bit i of the output
// is bit i XOR bit i+1 of the input; the top bit passes unchanged. The original design
// names the conversion; the XOR network is the standard way to do it.
//
// Timing: purely combinational, no latency.
module bin2gray #(
  parameter int unsigned WIDTH = 24
) (
  input  logic [WIDTH-1:0] bin,
  output logic [WIDTH-1:0] gray
);

  always_comb gray = bin ^ (bin >> 1);

endmodule
