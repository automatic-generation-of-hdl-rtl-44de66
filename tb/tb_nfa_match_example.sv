// Testbench for nfa_match_example, both comparator styles side by side.
//
// A random stream over {a..g, x}, with many inserted "c[de]f*g" snippets
// (0 to 4 f's, some of them spoiled), is fed one symbol per clock. In every
// cycle both outputs are compared with a reference that scans the history
// for c[de]f*g ending at the current symbol. The match must appear in the
// cycle of the final 'g' (no latency beyond the symbol itself). Coverage:
// n_match with no 'f' and with two or more (the f* loop taken repeatedly).
`timescale 1ns/1ps
module tb_nfa_match_example;
  import regex_nfa_pkg::*;
  import tb_regex_ref_pkg::*;

  localparam int N = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  sym_t data = "x";
  logic match_cmp, match_dec;
  int   checks = 0, failures = 0, n_match = 0, loop_matches = 0, empty_f = 0;
  sym_t h[$];
  sym_t plan[$];

  nfa_match_example #(.USE_DECODER(1'b0)) dut_cmp (.clk, .rst_n, .data, .match(match_cmp));
  nfa_match_example #(.USE_DECODER(1'b1)) dut_dec (.clk, .rst_n, .data, .match(match_dec));

  always #5 clk = ~clk;

  initial begin
    #(N * 10 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Build the stimulus.
    while (plan.size() < N) begin
      if ($urandom_range(2) == 0) begin
        int nf;
        nf = $urandom_range(4);
        plan.push_back("c");
        plan.push_back(pick("de"));
        repeat (nf) plan.push_back("f");
        plan.push_back(($urandom_range(5) == 0) ? pick("abcx") : sym_t'("g"));
      end else begin
        plan.push_back(pick("abcdefgx"));
      end
    end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      bit exp;
      @(negedge clk);
      data = plan[t];
      h.push_back(data);
      #1;
      exp = example_ends(h, t);
      checks += 2;
      if (match_cmp !== exp || match_dec !== exp) begin
        failures++;
        $display("FAIL t=%0d sym=%s: cmp=%0b dec=%0b expected %0b", t, data, match_cmp, match_dec, exp);
      end
      if (exp) begin
        n_match++;
        if (example_fcount(h, t) >= 2) loop_matches++;
        if (example_fcount(h, t) == 0) empty_f++;
      end
    end
    $display("n_match=%0d with f-loop=%0d without f=%0d", n_match, loop_matches, empty_f);
    checks++;
    if (n_match < 50 || loop_matches < 10 || empty_f < 10) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
