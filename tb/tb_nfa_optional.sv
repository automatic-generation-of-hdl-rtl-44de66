// Testbench for nfa_optional: applies every combination of its inputs and compares
// the outputs with the brick's equations, written out here independently:
// the operand is activated only by the activation, hit = en OR sub_hit.
`timescale 1ns/1ps
module tb_nfa_optional;
  logic hit, en, sub_en, sub_hit;
  int checks = 0, failures = 0;

  nfa_optional dut (.hit, .en, .sub_en, .sub_hit);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {en, sub_hit} = 2'(v);
      #1;
      checks++;
      if (sub_en !== en || hit !== (en || sub_hit)) begin
        failures++;
        $display("FAIL en=%0b sub_hit=%0b: hit=%0b sub_en=%0b", en, sub_hit, hit, sub_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
