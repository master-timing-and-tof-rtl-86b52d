// clock_counter: the free-running 24-bit synchronous binary counter that is the
// time base of both the Time Master and the TOF section.
//
// The counter advances by one on every rising clock edge (20 ns at 50 MHz) and
// wraps after 2^24 counts (about 335 ms). A one-cycle `clear` pulse, given by
// the start command, sets it to zero on the next edge, so that pattern times and
// TOF stamps count from the start. Reset also clears it. The counter never stops:
// the original design describes it as free running; clearing it on start is this
// design's choice.
//
// Timing: `count` is a register; after the edge that sees `clear` it reads 0,
// then 1, 2, ... on the following edges.
module clock_counter #(
  parameter int unsigned WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else            count <= count + 1'b1;
  end

endmodule
