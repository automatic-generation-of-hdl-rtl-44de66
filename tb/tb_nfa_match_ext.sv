// Testbench for nfa_match_ext (^d[^eE]e?.f$).
//
// The stream is a sequence of strings, each marked with sof on its first
// symbol and eof on its last. String kinds: matching with the optional 'e'
// absent (length 4) and present (length 5), rejected by the negated class
// (second symbol e or E), rejected by the start anchor (a symbol before the
// 'd'), rejected by the end anchor (a symbol after the 'f'), and random.
// In every cycle `match` is compared with a reference that checks the whole
// string ending at an eof directly. Each kind must occur.
`timescale 1ns/1ps
module tb_nfa_match_ext;
  import regex_nfa_pkg::*;
  import tb_regex_ref_pkg::*;

  localparam int NSTR = 1500;

  logic clk = 1'b0, rst_n = 1'b0, sof = 1'b0, eof = 1'b0, match;
  sym_t data = "x";
  int   checks = 0, failures = 0;
  int   kind_seen[6];
  int   len4 = 0, len5 = 0;
  sym_t h[$], ps[$];
  bit   hs[$], he[$], psof[$], peof[$];

  nfa_match_ext dut (.clk, .rst_n, .data, .sof, .eof, .match);

  always #5 clk = ~clk;

  initial begin
    #(NSTR * 80 + 10000);
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
      int kind;
      kind = $urandom_range(5);
      kind_seen[kind]++;
      case (kind)
        0: s = '{"d", pick("dfxa"), pick("defxE"), "f"};
        1: s = '{"d", pick("dfxa"), "e", pick("defxE"), "f"};
        2: s = '{"d", pick("eE"), pick("defxE"), "f"};
        3: s = '{pick("xd"), "d", pick("dfxa"), pick("defx"), "f"};
        4: s = '{"d", pick("dfxa"), pick("defxE"), "f", pick("fx")};
        default: begin
          int len;
          len = $urandom_range(1, 7);
          repeat (len) s.push_back(pick("deEfx"));
        end
      endcase
      add_string(s);
    end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < ps.size(); t++) begin
      int r;
      @(negedge clk);
      data = ps[t]; sof = psof[t]; eof = peof[t];
      h.push_back(data); hs.push_back(sof); he.push_back(eof);
      #1;
      r = ext_ends(h, hs, he, t);
      checks++;
      if (match !== (r != 0)) begin
        failures++;
        $display("FAIL t=%0d sym=%s sof=%0b eof=%0b: match=%0b expected %0b", t, data, sof, eof, match, r != 0);
      end
      if (r == 4) len4++;
      if (r == 5) len5++;
    end
    $display("matches of length 4: %0d, of length 5: %0d", len4, len5);
    checks++;
    if (len4 < 50 || len5 < 50 || kind_seen[2] < 50 || kind_seen[3] < 50 || kind_seen[4] < 50) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
