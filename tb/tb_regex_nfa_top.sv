// End-to-end testbench for regex_nfa_top at its default parameters
// (K = 28), so it is also the full-size test.
//
// One symbol stream drives all matchers. It is a sequence of strings, each
// marked with sof/eof, of three families: short strings for the anchored
// pattern (matching with and without the optional 'e', and rejected by the
// negated class, the start anchor and the end anchor), "c[de]f*g" snippets
// for the (a|b)*c(d|e)f*g matchers, and a/b runs of 20 to 45 symbols for the
// K = 28 matchers (hand-built, and built at elaboration from the default
// pattern (a|b)*a(a|b){28}). Every cycle, every output is compared with a reference that
// scans the stream history. Each mechanism is counted and must occur at
// least once: a match of each matcher, the f* loop taken twice or more, a
// K-matcher miss caused by a 'b' at the decisive position, the optional 'e'
// taken and skipped, and a rejection by the negated class, by '^' and by '$'.
`timescale 1ns/1ps
module tb_regex_nfa_top;
  import regex_nfa_pkg::*;
  import tb_regex_ref_pkg::*;

  localparam int K    = 28;   // the top's default
  localparam int NSTR = 1200;

  logic clk = 1'b0, rst_n = 1'b0, sof = 1'b0, eof = 1'b0;
  sym_t data = "x";
  logic match_example, match_example_dec, match_kth, match_ext, match_regex;
  int   checks = 0, failures = 0;
  sym_t h[$], ps[$];
  bit   hs[$], he[$], psof[$], peof[$];

  // Mechanism counters.
  int n_example = 0, n_floop = 0, n_kth = 0, n_kth_miss = 0;
  int n_opt_skip = 0, n_opt_take = 0, n_excl_rej = 0, n_start_rej = 0, n_end_rej = 0;

  regex_nfa_top dut (
    .clk, .rst_n, .data, .sof, .eof,
    .match_example, .match_example_dec, .match_kth, .match_ext, .match_regex
  );

  always #5 clk = ~clk;

  initial begin
    #(NSTR * 400 + 10000);
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

  task automatic check(input bit got, input bit exp, input string what, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0d %s: got %0b expected %0b", t, what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < NSTR; n++) begin
      sym_t s[$];
      int kind, len;
      kind = $urandom_range(7);
      case (kind)
        0: s = '{"d", pick("dfxa"), pick("defxE"), "f"};
        1: s = '{"d", pick("dfxa"), "e", pick("defxE"), "f"};
        2: begin s = '{"d", pick("eE"), pick("defxE"), "f"}; n_excl_rej++; end
        3: begin s = '{"x", "d", pick("dfxa"), pick("defx"), "f"}; n_start_rej++; end
        4: begin s = '{"d", pick("dfxa"), pick("defxE"), "f", "x"}; n_end_rej++; end
        5: begin
          s = '{"c", pick("de")};
          len = $urandom_range(3);
          repeat (len) s.push_back("f");
          s.push_back("g");
        end
        default: begin
          len = $urandom_range(20, 45);
          repeat (len) s.push_back(($urandom_range(3) == 0) ? sym_t'("b") : sym_t'("a"));
        end
      endcase
      add_string(s);
    end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < ps.size(); t++) begin
      bit e_fig, e_kth;
      int e_ext;
      @(negedge clk);
      data = ps[t]; sof = psof[t]; eof = peof[t];
      h.push_back(data); hs.push_back(sof); he.push_back(eof);
      #1;
      e_fig = example_ends(h, t);
      e_kth = kth_ends(h, t, K);
      e_ext = ext_ends(h, hs, he, t);
      check(match_example,     e_fig,        "match_example", t);
      check(match_example_dec, e_fig,        "match_example_dec", t);
      check(match_kth,       e_kth,        "match_kth", t);
      check(match_regex,     e_kth,        "match_regex", t);
      check(match_ext,       e_ext != 0,   "match_ext", t);
      if (e_fig) begin
        n_example++;
        if (example_fcount(h, t) >= 2) n_floop++;
      end
      if (e_kth) n_kth++;
      if (kth_near_miss(h, t, K)) n_kth_miss++;
      if (e_ext == 4) n_opt_skip++;
      if (e_ext == 5) n_opt_take++;
    end

    $display("symbols=%0d example=%0d f-loop=%0d kth=%0d kth-miss=%0d opt-skip=%0d opt-take=%0d excl-rej=%0d start-rej=%0d end-rej=%0d",
             ps.size(), n_example, n_floop, n_kth, n_kth_miss, n_opt_skip, n_opt_take,
             n_excl_rej, n_start_rej, n_end_rej);
    check(n_example > 0,     1'b1, "example match seen", -1);
    check(n_floop > 0,     1'b1, "f* loop seen", -1);
    check(n_kth > 0,       1'b1, "K match seen", -1);
    check(n_kth_miss > 0,  1'b1, "K miss seen", -1);
    check(n_opt_skip > 0,  1'b1, "optional skipped seen", -1);
    check(n_opt_take > 0,  1'b1, "optional taken seen", -1);
    check(n_excl_rej > 0,  1'b1, "class rejection seen", -1);
    check(n_start_rej > 0, 1'b1, "start-anchor rejection seen", -1);
    check(n_end_rej > 0,   1'b1, "end-anchor rejection seen", -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
