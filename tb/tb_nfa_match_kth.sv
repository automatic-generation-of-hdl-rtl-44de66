// Testbench for nfa_match_kth at the smallest and largest sizes of the
// evaluation, K = 8 and K = 28 (the default).
//
// The stream is mostly random a/b with an occasional other symbol, so that
// long a/b runs exist and get broken. In every cycle each output is compared
// with a reference that looks K symbols back for an 'a' followed only by
// a/b. One symbol per clock, match in the cycle of the last symbol.
`timescale 1ns/1ps
module tb_nfa_match_kth;
  import regex_nfa_pkg::*;
  import tb_regex_ref_pkg::*;

  localparam int N = 6000;

  logic clk = 1'b0, rst_n = 1'b0;
  sym_t data = "x";
  logic match8, match28;
  int   checks = 0, failures = 0, hits8 = 0, hits28 = 0, misses28 = 0;
  sym_t h[$];

  nfa_match_kth #(.K(8)) dut8  (.clk, .rst_n, .data, .match(match8));
  nfa_match_kth          dut28 (.clk, .rst_n, .data, .match(match28));

  always #5 clk = ~clk;

  initial begin
    #(N * 10 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      bit e8, e28;
      @(negedge clk);
      // Runs are broken rarely, and the 'a' ratio varies by block so that
      // both outcomes occur for K = 28.
      if ($urandom_range(59) == 0) data = pick("cx");
      else if ((t / 500) % 2 == 0) data = pick("ab");
      else data = pick("aaaab");
      h.push_back(data);
      #1;
      e8  = kth_ends(h, t, 8);
      e28 = kth_ends(h, t, 28);
      checks += 2;
      if (match8 !== e8 || match28 !== e28) begin
        failures++;
        $display("FAIL t=%0d: K8 %0b/%0b K28 %0b/%0b", t, match8, e8, match28, e28);
      end
      hits8  += int'(e8);
      hits28 += int'(e28);
      if (kth_near_miss(h, t, 28)) misses28++;
    end
    $display("K=8 matches %0d, K=28 matches %0d, K=28 b-at-position misses %0d", hits8, hits28, misses28);
    checks++;
    if (hits8 < 100 || hits28 < 20 || misses28 < 20) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
