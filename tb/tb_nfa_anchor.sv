// Testbench for nfa_anchor: applies every combination of its inputs and compares
// the outputs with the brick's equations, written out here independently:
// the anchored literal gets the activation, hit = sub_hit AND mark.
`timescale 1ns/1ps
module tb_nfa_anchor;
  logic hit, en, sub_en, sub_hit, mark;
  int checks = 0, failures = 0;

  nfa_anchor dut (.hit, .en, .sub_en, .sub_hit, .mark);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {en, sub_hit, mark} = 3'(v);
      #1;
      checks++;
      if (sub_en !== en || hit !== (sub_hit && mark)) begin
        failures++;
        $display("FAIL en=%0b sub_hit=%0b mark=%0b: hit=%0b sub_en=%0b", en, sub_hit, mark, hit, sub_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
