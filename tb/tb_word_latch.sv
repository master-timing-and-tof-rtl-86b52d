// tb_word_latch: checks that the pattern latch holds its word while load is
// low and takes a new one when load is high.
`timescale 1ns/1ps
module tb_word_latch;
  logic clk = 0, rst_n = 0, load = 0;
  logic [39:0] d = 0, q, expq;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  word_latch #(.WIDTH(40)) u_dut (.clk, .rst_n, .load, .d, .q);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    expq = '0;
    @(negedge clk); checks++;
    if (q !== '0) begin failures++; $display("reset value %h", q); end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) == 0);
      d = {8'($urandom), 32'($urandom)};
      if (load) expq = d;
      @(negedge clk);
      load = 0; d = ~d;
      checks++;
      if (q !== expq) begin failures++; $display("q=%h exp=%h", q, expq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
