// word_latch: the pattern latch between the memories and the word comparator
// (the original module's 24-bit TTL-ECL latch).
//
// It holds the word read from the pattern memory, together with the vernier and
// channel words read at the same address, steady while the comparator looks
// for a match, and takes the next word when `load` is high. The level
// translation of the original board has no counterpart in a single-voltage
// design; only the holding function is built. Reset clears it.
//
// Timing: `q` takes `d` on the clock edge where `load` is high.
module word_latch #(
  parameter int unsigned WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
