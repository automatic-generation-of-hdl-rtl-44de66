// Testbench for nfa_dot: random activations; `hit` must equal the previous
// cycle's activation whatever the symbol, and be 0 under reset.
`timescale 1ns/1ps
module tb_nfa_dot;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, hit;
  int   checks = 0, failures = 0, hits_seen = 0;
  bit   prev_en;

  nfa_dot dut (.clk, .rst_n, .en, .hit);

  always #5 clk = ~clk;

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
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL hit under reset"); end
    rst_n = 1'b1;
    prev_en = en;  // loaded by the first edge after reset
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      // A new activation is applied before the check: the state must
      // show the previous one, not this one.
      en = 1'($urandom);
      #1;
      checks++;
      if (hit !== prev_en) begin
        failures++;
        $display("FAIL cycle %0d: hit=%0b expected %0b", i, hit, prev_en);
      end
      if (hit) hits_seen++;
      @(posedge clk);
      prev_en = en;
    end
    checks++;
    if (hits_seen < 100) begin failures++; $display("FAIL too few hits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
