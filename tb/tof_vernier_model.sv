// tof_vernier_model: behavioural model of the TOF vernier, a time-to-amplitude
// converter started by a timing pulse and stopped by the second following
// clock edge, read by an 8-bit flash ADC (AD9012 class, 10 ns conversion).
// Simulation only; the converter is ideal and linear.
//
// When `arm` is high and it is not busy, the first rising edge on any input
// starts it. At the second rising clock edge after the pulse it converts the
// interval beyond one clock period into v = floor(256 * (t - T) / T) and puts v
// on `adc` CONV_NS later. It then accepts the next pulse.
`timescale 1ns/1ps
module tof_vernier_model #(
  parameter int  NCH      = 16,
  parameter real T_CLK_NS = 20.0,
  parameter real CONV_NS  = 10.0
) (
  input  logic           clk,
  input  logic           arm,
  input  logic [NCH-1:0] pulse_in,
  output logic [7:0]     adc
);
  logic any;
  bit   busy = 0;
  real  t_hit, t_stop, x;
  int   v;

  initial adc = 8'd0;
  assign any = |pulse_in;

  always @(posedge any) begin
    if (arm && !busy) begin
      busy  = 1;
      t_hit = $realtime;
      @(posedge clk);
      @(posedge clk);
      t_stop = $realtime;
      x = (t_stop - t_hit - T_CLK_NS) * 256.0 / T_CLK_NS;
      v = int'($floor(x));
      if (v < 0)   v = 0;
      if (v > 255) v = 255;
      #(CONV_NS) adc = 8'(v);
      busy = 0;
    end
  end
endmodule
