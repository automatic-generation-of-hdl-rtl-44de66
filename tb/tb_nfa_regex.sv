// Testbench for nfa_regex, the matcher built at elaboration from a pattern
// string. Seven instances, one per pattern, share one symbol stream:
//
//   (a|b)*c(d|e)f*g       comparator style and decoder style
//   ^d[^eE]e?.f$          anchors, negated class, option, dot
//   (a|b)*a(a|b){8}       the scaling workload for k = 8 (counted repetition)
//   x[0-9]+y              range class and one-or-more
//   \*+\.                 escaped metacharacters
//   (ab)+c                one-or-more over a group (subtree copy)
//
// The stream is a sequence of strings (sof/eof marked), each a snippet aimed
// at one of the patterns, sometimes spoiled, or random symbols. Every cycle
// each output is compared with a reference function that scans the history.
// Every pattern must match at least 20 times.
`timescale 1ns/1ps
module tb_nfa_regex;
  import regex_nfa_pkg::*;
  import tb_regex_ref_pkg::*;

  localparam int NP   = 7;
  localparam int NSTR = 1500;

  logic clk = 1'b0, rst_n = 1'b0, sof = 1'b0, eof = 1'b0;
  sym_t data = "x";
  logic [NP-1:0] m;
  int   checks = 0, failures = 0;
  int   seen[NP];
  sym_t h[$], ps[$];
  bit   hs[$], he[$], psof[$], peof[$];

  nfa_regex #(.PATTERN("(a|b)*c(d|e)f*g"))                   u0 (.clk, .rst_n, .data, .sof, .eof, .match(m[0]));
  nfa_regex #(.PATTERN("(a|b)*c(d|e)f*g"), .USE_DECODER(1'b1)) u1 (.clk, .rst_n, .data, .sof, .eof, .match(m[1]));
  nfa_regex #(.PATTERN("^d[^eE]e?.f$"))                      u2 (.clk, .rst_n, .data, .sof, .eof, .match(m[2]));
  nfa_regex #(.PATTERN("(a|b)*a(a|b){8}"))
                                                             u3 (.clk, .rst_n, .data, .sof, .eof, .match(m[3]));
  nfa_regex #(.PATTERN("x[0-9]+y"))                          u4 (.clk, .rst_n, .data, .sof, .eof, .match(m[4]));
  nfa_regex #(.PATTERN("\\*+\\."))                           u5 (.clk, .rst_n, .data, .sof, .eof, .match(m[5]));
  nfa_regex #(.PATTERN("(ab)+c"))                            u6 (.clk, .rst_n, .data, .sof, .eof, .match(m[6]));

  always #5 clk = ~clk;

  initial begin
    #(NSTR * 300 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_string(input sym_t s[$]);
    foreach (s[i]) begin
      ps.push_back(s[i]);
      psof.push_back(i == 0);
      peof.push_back(i == s.size() - 1);
    end
  endtask

  initial begin
    for (int n = 0; n < NSTR; n++) begin
      sym_t s[$];
      int len;
      len = $urandom_range(4);
      case ($urandom_range(7))
        0: begin
          s = '{"c", pick("de")};
          repeat (len) s.push_back("f");
          s.push_back(pick("gggx"));
        end
        1: s = '{"d", pick("dfxaeE"), pick("deE"), pick("defxE"), "f"};
        2: s = '{"d", pick("dfxa"), pick("defxE"), "f"};
        3: repeat (8 + 2 * len) s.push_back(pick("aab"));
        4: begin
          s = '{"x"};
          repeat (len) s.push_back(pick("0123456789"));
          s.push_back(pick("yyyz"));
        end
        5: begin
          repeat (len) s.push_back("*");
          s.push_back(pick("..x"));
        end
        6: begin
          repeat (len) begin s.push_back("a"); s.push_back(pick("bbbx")); end
          s.push_back("c");
        end
        default: repeat (1 + len) s.push_back(pick("abcdefgxy0*.E"));
      endcase
      if (s.size() == 0) s.push_back("x");
      add_string(s);
    end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < ps.size(); t++) begin
      logic [NP-1:0] e;
      @(negedge clk);
      data = ps[t]; sof = psof[t]; eof = peof[t];
      h.push_back(data); hs.push_back(sof); he.push_back(eof);
      #1;
      e[0] = example_ends(h, t);
      e[1] = e[0];
      e[2] = ext_ends(h, hs, he, t) != 0;
      e[3] = kth_ends(h, t, 8);
      e[4] = digits_ends(h, t);
      e[5] = stardot_ends(h, t);
      e[6] = abc_ends(h, t);
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (m[p] !== e[p]) begin
          failures++;
          $display("FAIL t=%0d sym=%s pattern %0d: got %0b expected %0b", t, data, p, m[p], e[p]);
        end
        if (e[p]) seen[p]++;
      end
    end
    for (int p = 0; p < NP; p++) begin
      $display("pattern %0d: %0d matches", p, seen[p]);
      checks++;
      if (seen[p] < 20) begin failures++; $display("FAIL coverage of pattern %0d", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
