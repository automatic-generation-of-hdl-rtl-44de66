// Workload testbench: the (a|b)*a(a|b)^k family at every size of the
// evaluation, k = 8..19 and 28, one nfa_match_kth instance per size.
//
// All instances read the same random a/b text (with a rare other symbol to
// break runs), one symbol per clock, so that every instance both matches
// and misses many times. Each output is compared every cycle with a
// reference that looks k symbols back; each size must match and miss.
`timescale 1ns/1ps
module tb_kth_workload;
  import regex_nfa_pkg::*;
  import tb_regex_ref_pkg::*;

  localparam int NK = 13;
  localparam int KS [NK] = '{8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18, 19, 28};
  localparam int N  = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  sym_t data = "x";
  logic [NK-1:0] m;
  int   checks = 0, failures = 0;
  int   hits[NK], misses[NK];
  sym_t h[$];

  for (genvar g = 0; g < NK; g++) begin : g_k
    nfa_match_kth #(.K(KS[g])) dut (.clk, .rst_n, .data, .match(m[g]));
  end

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
      @(negedge clk);
      data = ($urandom_range(199) == 0) ? sym_t'("c") : pick("ab");
      h.push_back(data);
      #1;
      for (int g = 0; g < NK; g++) begin
        bit e;
        e = kth_ends(h, t, KS[g]);
        checks++;
        if (m[g] !== e) begin
          failures++;
          $display("FAIL t=%0d k=%0d: got %0b expected %0b", t, KS[g], m[g], e);
        end
        if (e) hits[g]++;
        if (kth_near_miss(h, t, KS[g])) misses[g]++;
      end
    end
    for (int g = 0; g < NK; g++) begin
      $display("k=%0d: %0d matches, %0d misses by a 'b' at the decisive position", KS[g], hits[g], misses[g]);
      checks++;
      if (hits[g] == 0 || misses[g] == 0) begin failures++; $display("FAIL coverage k=%0d", KS[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
