// tb_bin2gray: checks the Gray converter with known codes, with the one-bit
// change between successive counts, and by decoding back to binary.
`timescale 1ns/1ps
module tb_bin2gray;
  logic [23:0] bin, gray, prev_gray;
  int checks = 0, failures = 0;

  bin2gray u_dut (.bin, .gray);

  function automatic logic [23:0] decode(logic [23:0] g);
    logic [23:0] b;
    b[23] = g[23];
    for (int i = 22; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic logic [23:0] known [5] = '{24'h0, 24'h1, 24'h3, 24'h2, 24'h6};
    for (int i = 0; i < 5; i++) begin
      bin = 24'(i); #1; checks++;
      if (gray !== known[i]) begin failures++; $display("gray(%0d)=%h", i, gray); end
    end
    bin = 24'hffffff; #1; checks++;
    if (gray !== 24'h800000) begin failures++; $display("gray(max)=%h", gray); end
    for (int i = 0; i < 2000; i++) begin
      bin = (i < 1000) ? 24'($urandom) : 24'(i);
      #1; prev_gray = gray;
      checks++;
      if (decode(gray) !== bin) begin failures++; $display("decode mismatch %h", bin); end
      bin = bin + 1'b1; #1;
      checks++;
      if ($countones(gray ^ prev_gray) != 1) begin failures++; $display("step at %h", bin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
