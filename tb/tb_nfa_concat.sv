// Testbench for nfa_concat: applies every combination of its inputs and compares
// the outputs with the brick's equations, written out here independently:
// r1 gets the activation, r2 is activated by r1's completion, hit = b_hit.
`timescale 1ns/1ps
module tb_nfa_concat;
  logic hit, en, a_en, a_hit, b_en, b_hit;
  int checks = 0, failures = 0;

  nfa_concat dut (.hit, .en, .a_en, .a_hit, .b_en, .b_hit);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {en, a_hit, b_hit} = 3'(v);
      #1;
      checks++;
      if (a_en !== en || b_en !== a_hit || hit !== b_hit) begin
        failures++;
        $display("FAIL en=%0b a_hit=%0b b_hit=%0b: hit=%0b a_en=%0b b_en=%0b", en, a_hit, b_hit, hit, a_en, b_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
