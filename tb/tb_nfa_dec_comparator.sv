// Testbench for nfa_dec_comparator: random activation and decoder line;
// `hit` must equal the previous cycle's activation ANDed with the line, and
// be 0 under reset.
`timescale 1ns/1ps
module tb_nfa_dec_comparator;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, sym_line = 1'b1, hit;
  int   checks = 0, failures = 0, hits_seen = 0;
  bit   prev_en;

  nfa_dec_comparator dut (.clk, .rst_n, .sym_line, .en, .hit);

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
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(hit, 1'b0, "hit under reset");
    rst_n = 1'b1;
    prev_en = en;  // loaded by the first edge after reset
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sym_line = 1'($urandom);
      // A new activation is applied before the check: the state must
      // show the previous one, not this one.
      en = 1'($urandom);
      #1;
      check(hit, prev_en && sym_line, "hit");
      if (hit) hits_seen++;
      @(posedge clk);
      prev_en = en;
    end
    check(hits_seen > 100, 1'b1, "enough hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
