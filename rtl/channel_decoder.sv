// channel_decoder: the 1-to-16 decoder at the Time Master output.
//
// The pulse coming back from the programmable delay (the Time Master vernier)
// is steered to the one output channel named by the channel identification
// word read from CHID MEM. Identification numbers at or above NCH select no
// output, so the 8-bit number can address up to 256 channels while NCH are
// built. The pulse is gated combinationally, so its fine timing is kept.
//
// Timing: combinational from `pulse` to `out`; `chid` must be stable while the
// pulse is high (the sequencer holds it for the whole dead time).
module channel_decoder #(
  parameter int unsigned NCH    = 16,
  parameter int unsigned CHID_W = 8
) (
  input  logic              pulse,
  input  logic [CHID_W-1:0] chid,
  output logic [NCH-1:0]    out
);

  always_comb begin
    for (int i = 0; i < NCH; i++)
      out[i] = pulse && (chid == CHID_W'(i));
  end

endmodule
