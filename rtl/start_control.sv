// start_control: initialization and start of a run.
//
// A run starts either on the start command given from the PC keyboard
// (`cmd_start`, one clock wide, from the host interface) or on a rising edge of
// the external start input. The external pulse is asynchronous: it passes a
// two-flop synchronizer and an edge detector, so a long external level starts
// only one run. The resulting one-clock `start` clears the clock counter and
// MEM ADD and arms the Time Master and the TOF section. The original design names both
// start sources; the synchronizer is this design's choice.
//
// Timing: `start` follows `cmd_start` in the same cycle, and follows an
// external rising edge by two to three clocks.
module start_control (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd_start,
  input  logic ext_start,
  output logic start
);

  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {s1, s2, s3} <= '0;
    else        {s1, s2, s3} <= {ext_start, s1, s2};
  end

  always_comb start = cmd_start || (s2 && !s3);

endmodule
