// tb_tof_channel_encoder: asynchronous pulses on random channels must give one
// hit each, with the right channel number, in the cycle after the second clock
// edge that follows the pulse; simultaneous pulses give the lowest channel.
`timescale 1ns/1ps
module tb_tof_channel_encoder;
  logic clk = 0, rst_n = 0;
  logic [15:0] pulse_in = 0;
  logic hit;
  logic [7:0] chid;
  int checks = 0, failures = 0, nhits = 0;
  int exp_ch;

  always #10 clk = ~clk;

  tof_channel_encoder u_dut (.clk, .rst_n, .pulse_in, .hit, .chid);

  always @(posedge clk) if (hit) nhits++;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      automatic int c = int'($urandom_range(0, 15));
      automatic int c2 = int'($urandom_range(0, 15));
      automatic bit two = (i % 4 == 0);
      @(posedge clk); #(1 + $urandom_range(0, 17));   // between edge k-1 and k
      pulse_in[c] = 1;
      if (two) pulse_in[c2] = 1;
      exp_ch = two ? ((c < c2) ? c : c2) : c;
      @(posedge clk);          // edge k
      #1; checks++;
      if (hit) begin failures++; $display("hit too early"); end
      @(posedge clk);          // edge k+1
      #1; checks++;
      if (!hit || chid !== 8'(exp_ch)) begin
        failures++; $display("hit=%b chid=%0d exp=%0d", hit, chid, exp_ch);
      end
      #(5 + $urandom_range(0, 40)) pulse_in = '0;
      repeat (4) @(posedge clk);
    end
    checks++;
    if (nhits != 200) begin failures++; $display("hits %0d", nhits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
