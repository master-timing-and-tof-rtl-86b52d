// tb_clock_counter: checks the 24-bit clock counter against a reference count,
// including clear by start, and the wrap-around on a 4-bit copy.
`timescale 1ns/1ps
module tb_clock_counter;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [23:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;
  int unsigned ref24, ref4;

  always #10 clk = ~clk;

  clock_counter                u_dut  (.clk, .rst_n, .clear, .count);
  clock_counter #(.WIDTH(4))   u_dut4 (.clk, .rst_n, .clear, .count(count4));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check();
    checks++;
    if (count !== 24'(ref24) || count4 !== 4'(ref4)) begin
      failures++;
      $display("mismatch: count=%0d exp=%0d count4=%0d exp=%0d", count, 24'(ref24), count4, 4'(ref4));
    end
  endtask

  initial begin
    ref24 = 0; ref4 = 0;
    repeat (2) @(posedge clk);
    #1 check();
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      ref24++; ref4++;
      check();
      if (i == 150) begin
        clear = 1; @(posedge clk); #1 clear = 0;
        ref24 = 0; ref4 = 0; check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
