// mem_add_reg: the 15-bit memory address register (MEM ADD) of the Time Master.
//
// It addresses PAT, VER and CHID MEM together. The start command sets it to
// zero and every recognised pattern word (`inc`) advances it by one, so the
// pattern is played from consecutive locations. `last` tells the sequencer that
// the address has reached the final word of the pattern, `len - 1`; the
// pattern length register is this design's addition, since the original design does
// not say how a pattern ends.
//
// Timing: `addr` is a register; clear has priority over inc.
module mem_add_reg #(
  parameter int unsigned ADDR_W = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              inc,
  input  logic [ADDR_W:0]   len,
  output logic [ADDR_W-1:0] addr,
  output logic              last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     addr <= '0;
    else if (clear) addr <= '0;
    else if (inc)   addr <= addr + 1'b1;
  end

  always_comb last = ({1'b0, addr} + 1'b1) >= len;

endmodule
