// nfa_match_ext: matcher for ^d[^eE]e?.f$ , the example that exercises the
// extended metacharacters: start anchor '^', negated class [^...], option
// '?', any-symbol '.', and end anchor '$'.
//
// Construction, with bricks numbered in the order the postfix form is read
// (after the anchor has been moved behind the literal it guards, "^d" -> d^,
// and the class rewritten as a union under an exclusion):
//
//   1 'd'   2 anchor^(1)   3 'e'   4 'E'   5 union(3,4)   6 exclusion(5)
//   7 'e'   8 optional(7)   9 dot   10 'f'   11 anchor$(10)
//   12 concat(9,11)  13 concat(8,12)  14 concat(6,13)  15 concat(2,14)
//
// Interface: one 8-bit symbol on `data` per clock. `sof` is high with the
// first symbol of a string and `eof` with its last. `match` is 1,
// combinationally, in the `eof` cycle of a string that matches as a whole:
// a 'd' first, then a symbol other than 'e' or 'E', an optional 'e', any
// symbol, and an 'f' last. The first symbol after reset is taken in the
// cycle after the first rising edge after reset.
//
// The pattern is this library's own example, built only from bricks and
// transformations of the source design.
module nfa_match_ext
  import regex_nfa_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  sym_t data,    // input symbol, one per clock
  input  logic sof,     // start pulse s: first symbol of the string
  input  logic eof,     // finish pulse f: last symbol of the string
  output logic match    // the string ending with this symbol matches
);

  logic en_1, en_2, en_3, en_4, en_5, en_6, en_7, en_8, en_9, en_10, en_11,
        en_12, en_13, en_14, en_15;
  logic hit_1, hit_2, hit_3, hit_4, hit_5, hit_6, hit_7, hit_8, hit_9, hit_10,
        hit_11, hit_12, hit_13, hit_14, hit_15;

  // 1: 'd', 2: ^ on it.
  nfa_comparator #(.CHAR("d")) comparator1 (.clk, .rst_n, .data, .en(en_1), .hit(hit_1));
  nfa_anchor anchor2 (.hit(hit_2), .en(en_2), .sub_en(en_1), .sub_hit(hit_1), .mark(sof));

  // 3..6: [^eE] = exclusion of (e|E).
  nfa_comparator #(.CHAR("e")) comparator3 (.clk, .rst_n, .data, .en(en_3), .hit(hit_3));
  nfa_comparator #(.CHAR("E")) comparator4 (.clk, .rst_n, .data, .en(en_4), .hit(hit_4));
  nfa_union union5 (.hit(hit_5), .en(en_5),
                    .a_en(en_3), .a_hit(hit_3), .b_en(en_4), .b_hit(hit_4));
  nfa_exclusion exclusion6 (.clk, .rst_n, .hit(hit_6), .en(en_6),
                            .sub_en(en_5), .sub_hit(hit_5));

  // 7, 8: e?
  nfa_comparator #(.CHAR("e")) comparator7 (.clk, .rst_n, .data, .en(en_7), .hit(hit_7));
  nfa_optional optional8 (.hit(hit_8), .en(en_8), .sub_en(en_7), .sub_hit(hit_7));

  // 9: .
  nfa_dot dot9 (.clk, .rst_n, .en(en_9), .hit(hit_9));

  // 10: 'f', 11: $ on it.
  nfa_comparator #(.CHAR("f")) comparator10 (.clk, .rst_n, .data, .en(en_10), .hit(hit_10));
  nfa_anchor anchor11 (.hit(hit_11), .en(en_11), .sub_en(en_10), .sub_hit(hit_10), .mark(eof));

  // 12..15: concatenations, right-nested.
  nfa_concat concatenation12 (.hit(hit_12), .en(en_12),
                              .a_en(en_9), .a_hit(hit_9), .b_en(en_11), .b_hit(hit_11));
  nfa_concat concatenation13 (.hit(hit_13), .en(en_13),
                              .a_en(en_8), .a_hit(hit_8), .b_en(en_12), .b_hit(hit_12));
  nfa_concat concatenation14 (.hit(hit_14), .en(en_14),
                              .a_en(en_6), .a_hit(hit_6), .b_en(en_13), .b_hit(hit_13));
  nfa_concat concatenation15 (.hit(hit_15), .en(en_15),
                              .a_en(en_2), .a_hit(hit_2), .b_en(en_14), .b_hit(hit_14));

  assign en_15 = 1'b1;
  assign match = hit_15;

endmodule
