// tb_mem_add_reg: checks clear, increment, wrap of the 15-bit address and the
// last-word flag against a reference model.
`timescale 1ns/1ps
module tb_mem_add_reg;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [15:0] len = 0;
  logic [14:0] addr;
  logic last;
  int checks = 0, failures = 0;
  int unsigned ref_addr;

  always #10 clk = ~clk;

  mem_add_reg u_dut (.clk, .rst_n, .clear, .inc, .len, .addr, .last);

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check();
    checks++;
    if (addr !== 15'(ref_addr) || last !== ((ref_addr % 32768) + 1 >= len)) begin
      failures++;
      $display("addr=%0d exp=%0d last=%b len=%0d", addr, ref_addr % 32768, last, len);
    end
  endtask

  initial begin
    ref_addr = 0;
    @(negedge clk); rst_n = 1; len = 16'd10; #1;
    check();
    for (int i = 0; i < 2000; i++) begin
      clear = ($urandom_range(0, 99) == 0);
      inc   = ($urandom_range(0, 1) == 1);
      if (i % 100 == 0) len = 16'($urandom_range(0, 32768));
      @(negedge clk);
      if (clear) ref_addr = 0; else if (inc) ref_addr++;
      clear = 0; inc = 0;
      check();
    end
    // every short pattern length: clear, then step past the end
    for (int l = 1; l <= 24; l++) begin
      len = 16'(l);
      clear = 1; @(negedge clk); clear = 0; ref_addr = 0; check();
      inc = 1;
      repeat (l + 2) begin @(negedge clk); ref_addr++; check(); end
      inc = 0;
    end
    // run through the whole memory and wrap
    len = 16'd32768;
    inc = 1;
    repeat (40000) begin
      @(negedge clk); ref_addr++;
      if (ref_addr % 997 == 0 || ref_addr % 32768 < 3 || ref_addr % 32768 > 32765) check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
