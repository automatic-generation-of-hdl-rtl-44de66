// Testbench for nfa_decoder: applies all 256 symbols and checks that exactly
// one line is high and that it is the line numbered by the symbol.
`timescale 1ns/1ps
module tb_nfa_decoder;
  import regex_nfa_pkg::*;

  sym_t       data;
  sym_lines_t lines;
  int         checks = 0, failures = 0;

  nfa_decoder dut (.data, .lines);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int ones;
      data = sym_t'(v);
      #1;
      ones = 0;
      for (int c = 0; c < 256; c++) if (lines[c]) ones++;
      checks++;
      if (ones != 1 || lines[v] !== 1'b1) begin
        failures++;
        $display("FAIL symbol %0d: %0d lines high, own line %0b", v, ones, lines[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
