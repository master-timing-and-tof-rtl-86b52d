// tb_channel_decoder: every channel number, in and out of range, with the
// pulse high and low; exactly the named output may follow the pulse.
`timescale 1ns/1ps
module tb_channel_decoder;
  logic pulse;
  logic [7:0] chid;
  logic [15:0] out;
  int checks = 0, failures = 0;

  channel_decoder u_dut (.pulse, .chid, .out);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      for (int p = 0; p < 2; p++) begin
        chid = 8'(c); pulse = p[0];
        #1; checks++;
        if (out !== ((p == 1 && c < 16) ? (16'd1 << c) : 16'd0)) begin
          failures++; $display("chid=%0d pulse=%0d out=%h", c, p, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
