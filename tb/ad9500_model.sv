// ad9500_model: behavioural model of the Time Master vernier, a digitally
// programmable delay line (AD9500 class). Simulation only.
//
// On each rising edge of `trig` it emits a pulse of PULSE_NS on `pulse` after
// OFFSET_NS plus code/256 of the clock period, so the full scale equals one
// clock period as in the module. The code is sampled with the trigger.
`timescale 1ns/1ps
module ad9500_model #(
  parameter real T_CLK_NS  = 20.0,
  parameter real OFFSET_NS = 2.0,
  parameter real PULSE_NS  = 10.0
) (
  input  logic       trig,
  input  logic [7:0] code,
  output logic       pulse
);
  initial pulse = 1'b0;

  always @(posedge trig) begin
    automatic real d = OFFSET_NS + real'(code) * T_CLK_NS / 256.0;
    fork
      begin
        #(d) pulse = 1'b1;
        #(PULSE_NS) pulse = 1'b0;
      end
    join_none
  end
endmodule
