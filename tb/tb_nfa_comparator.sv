// Testbench for nfa_comparator: drives random activations and symbols (half
// of them the comparator's character) and checks every cycle that `hit` is
// the previous cycle's activation ANDed with (symbol == CHAR), and that the
// state is cleared by reset.
`timescale 1ns/1ps
module tb_nfa_comparator;
  import regex_nfa_pkg::*;

  localparam sym_t CHAR = "q";

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, hit;
  sym_t data = '0;
  int   checks = 0, failures = 0, hits_seen = 0;
  bit   prev_en;

  nfa_comparator #(.CHAR(CHAR)) dut (.clk, .rst_n, .data, .en, .hit);

  always #5 clk = ~clk;

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; data = CHAR;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(hit, 1'b0, "hit under reset");
    rst_n = 1'b1;
    prev_en = en;  // loaded by the first edge after reset
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      data = ($urandom_range(1) == 1) ? CHAR : sym_t'($urandom);
      // A new activation is applied before the check: the state must
      // show the previous one, not this one.
      en = 1'(($urandom_range(3)) != 0);
      #1;
      check(hit, prev_en && (data == CHAR), "hit");
      if (hit) hits_seen++;
      @(posedge clk);
      prev_en = en;
    end
    check(hits_seen > 100, 1'b1, "enough hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
