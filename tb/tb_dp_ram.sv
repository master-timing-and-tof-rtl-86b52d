// tb_dp_ram: writes random words to random addresses of a full-size 24 x 32K
// memory and reads them back against a reference array, including the
// read-before-write case.
`timescale 1ns/1ps
module tb_dp_ram;
  logic clk = 0, we = 0;
  logic [14:0] waddr = 0, raddr = 0;
  logic [23:0] wdata = 0, rdata;
  logic [23:0] ref_mem [int];
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  dp_ram u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a;
    // write a set of addresses, including both ends
    for (int i = 0; i < 3000; i++) begin
      a = (i == 0) ? 0 : (i == 1) ? 32767 : int'($urandom_range(0, 32767));
      @(negedge clk);
      we = 1; waddr = 15'(a); wdata = 24'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk) we = 0;
    // read every written address back
    foreach (ref_mem[k]) begin
      @(negedge clk) raddr = 15'(k);
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[k]) begin
        failures++; $display("addr %0d: got %h exp %h", k, rdata, ref_mem[k]);
      end
    end
    // read and write the same word in one cycle: old contents come out
    @(negedge clk); we = 1; waddr = 15'd0; raddr = 15'd0; wdata = ~ref_mem[0];
    @(negedge clk); we = 0; checks++;
    if (rdata !== ref_mem[0]) begin failures++; $display("read-during-write"); end
    @(negedge clk); checks++;
    if (rdata !== ~ref_mem[0]) begin failures++; $display("write lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
