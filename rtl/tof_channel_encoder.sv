// tof_channel_encoder: turns the asynchronous TOF timing inputs into one
// synchronous hit with a channel identification number.
//
// Each input clocks a toggle flip-flop of its own, so a pulse shorter than a
// clock period (the module's pulses are about 10 ns at a 20 ns clock) is never
// lost. The toggle passes a two-flop synchronizer into the clock domain and a
// third flop finds its change, so each pulse counts once. The toggle needs no
// reset: for the first three clocks after reset the encoder reports nothing,
// which hides whatever value it powered up with. Two pulses on one channel
// less than about two clocks apart may count as none or one; this lies inside
// the dead time.
//
// When edges of several channels are found on the same clock, the
// lowest-numbered channel wins and the others are dropped, because the section
// has a single time vernier and records one pulse at a time. The original design says
// that each pulse gets a channel number; the synchronizer and the priority rule
// are this design's choices.
//
// Timing: for an input edge between clock edges k-1 and k, `hit` is high in the
// cycle after edge k+1, i.e. edge k+1 is the "following clock pulse plus one"
// at which the vernier stops. `chid` is valid with `hit`.
module tof_channel_encoder #(
  parameter int unsigned NCH    = 16,
  parameter int unsigned CHID_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCH-1:0]    pulse_in,
  output logic              hit,
  output logic [CHID_W-1:0] chid
);

  logic [NCH-1:0] tgl, s1, s2, s3, rise;
  logic [2:0]     primed;

  // one toggle flip-flop per input, clocked by the input pulse
  for (genvar i = 0; i < NCH; i++) begin : g_capture
    logic t;
    always_ff @(posedge pulse_in[i]) t <= ~t;
    always_comb tgl[i] = t;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      primed <= '0;
    end else begin
      s1 <= tgl; s2 <= s1; s3 <= s2;
      primed <= {primed[1:0], 1'b1};
    end
  end

  always_comb begin
    rise = (s2 ^ s3) & {NCH{primed[2]}};
    hit  = |rise;
    chid = '0;
    for (int i = NCH - 1; i >= 0; i--)
      if (rise[i]) chid = CHID_W'(i);
  end

endmodule
