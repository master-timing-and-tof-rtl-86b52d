// dp_ram: simple dual-port synchronous memory, one write port and one read
// port, used for all six memories of the module (PAT, VER and CHID MEM of the
// Time Master; TOF TIME, TOF CHID and TOF VER MEM of the TOF section).
//
// In the Time Master the PC writes the memory and the pattern sequencer reads
// it; in the TOF section the recorder writes it and the PC reads it. Sizes
// follow the original design: WIDTH x 32K words. The one-cycle registered read is this
// design's choice.
//
// Timing: a write with `we` high stores `wdata` at `waddr` on the clock edge.
// `rdata` shows the word at the `raddr` sampled on the previous edge. A read of
// the word being written in the same cycle returns the old contents.
module dp_ram #(
  parameter int unsigned WIDTH  = 24,
  parameter int unsigned DEPTH  = 32768,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
