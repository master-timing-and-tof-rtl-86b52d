// tb_start_control: a keyboard command starts at once; an external pulse,
// long or short, starts exactly once, two to three clocks later.
`timescale 1ns/1ps
module tb_start_control;
  logic clk = 0, rst_n = 0, cmd_start = 0, ext_start = 0, start;
  int checks = 0, failures = 0, nstart = 0;

  always #10 clk = ~clk;

  start_control u_dut (.clk, .rst_n, .cmd_start, .ext_start, .start);

  always @(posedge clk) if (start) nstart++;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++; if (nstart != 0) begin failures++; $display("spurious start"); end
    // keyboard command
    cmd_start = 1; #1; checks++;
    if (!start) begin failures++; $display("command start missing"); end
    @(negedge clk) cmd_start = 0;
    checks++; if (nstart != 1) begin failures++; $display("command count %0d", nstart); end
    // long external pulse, asynchronous to the clock
    #3.7 ext_start = 1;
    repeat (2) @(posedge clk);
    #1; checks++;
    if (!start) begin failures++; $display("external start not after 2 clocks"); end
    repeat (10) @(posedge clk);
    ext_start = 0;
    repeat (5) @(posedge clk);
    #1; checks++; if (nstart != 2) begin failures++; $display("external count %0d", nstart); end
    // short pulses
    for (int i = 0; i < 5; i++) begin
      #(7 + i) ext_start = 1; #25 ext_start = 0;
      repeat (6) @(posedge clk);
    end
    #1; checks++; if (nstart != 7) begin failures++; $display("short pulse count %0d", nstart); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
