// regex_nfa_top: the example regular-expression matchers side by side.
//
// All matchers read the same symbol stream, one 8-bit symbol per clock, and
// flag a match combinationally in the cycle of the symbol that ends it:
//
//   match_example      (a|b)*c(d|e)f*g, one 8-bit comparator per literal state
//   match_example_dec  the same pattern, literal states fed by one shared
//                    8-to-256 decoder (the ASIC-oriented style)
//   match_kth        (a|b)*a(a|b)^K, the scaling workload
//   match_ext        ^d[^eE]e?.f$, anchors, negated class, '?' and '.'
//   match_regex      PATTERN, built at elaboration by nfa_regex; by default
//                    (a|b)*a(a|b){28}, the same language as match_kth at
//                    K = 28, so the two outputs must agree
//
// `sof` and `eof` are the start and finish pulses the anchored pattern
// needs: high with the first and with the last symbol of a string. The
// unanchored patterns search the stream as one text. After reset, the first
// symbol is taken in the cycle after the first rising clock edge.
module regex_nfa_top
  import regex_nfa_pkg::*;
#(
  parameter int unsigned K       = 28,                  // trailing (a|b) count of match_kth
  parameter string       PATTERN = "(a|b)*a(a|b){28}"   // pattern of match_regex
) (
  input  logic clk,
  input  logic rst_n,
  input  sym_t data,            // input symbol, one per clock
  input  logic sof,             // first symbol of a string
  input  logic eof,             // last symbol of a string
  output logic match_example,
  output logic match_example_dec,
  output logic match_kth,
  output logic match_ext,
  output logic match_regex
);

  nfa_match_example #(.USE_DECODER(1'b0)) u_example (
    .clk, .rst_n, .data, .match(match_example)
  );

  nfa_match_example #(.USE_DECODER(1'b1)) u_example_dec (
    .clk, .rst_n, .data, .match(match_example_dec)
  );

  nfa_match_kth #(.K(K), .USE_DECODER(1'b0)) u_kth (
    .clk, .rst_n, .data, .match(match_kth)
  );

  nfa_match_ext u_ext (
    .clk, .rst_n, .data, .sof, .eof, .match(match_ext)
  );

  nfa_regex #(.PATTERN(PATTERN)) u_regex (
    .clk, .rst_n, .data, .sof, .eof, .match(match_regex)
  );

endmodule
