// tb_word_comparator: equal and unequal 24-bit words, with and without enable,
// including words that differ in a single bit.
`timescale 1ns/1ps
module tb_word_comparator;
  logic en;
  logic [23:0] a, b;
  logic match;
  int checks = 0, failures = 0;

  word_comparator u_dut (.en, .clock_gray(a), .pattern_gray(b), .match);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      en = (i % 7 != 0);
      a  = 24'($urandom);
      case (i % 3)
        0: b = a;
        1: b = a ^ (24'd1 << ((i / 3) % 24));
        default: b = 24'($urandom);
      endcase
      #1; checks++;
      if (match !== (en && (i % 3 == 0 || (i % 3 == 2 && a == b)))) begin
        failures++; $display("a=%h b=%h en=%b match=%b", a, b, en, match);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
