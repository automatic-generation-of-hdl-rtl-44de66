// nfa_match_example: matcher for the regular expression (a|b)*c(d|e)f*g.
//
// This is the worked example of the generator: the expression is turned
// into the postfix form  a b | * c d e | f * g , read left to right, and one
// brick is placed per symbol, numbered in reading order; the four
// concatenations that join the remaining stack entries are placed at the
// end, and the final one is driven by a constant 1 (the pattern may start at
// any position of the text). The numbering below is that order:
//
//   1 'a'   2 'b'   3 union(1,2)   4 closure(3)   5 'c'
//   6 'd'   7 'e'   8 union(6,7)   9 'f'   10 closure(9)   11 'g'
//   12 concat(10,11)  13 concat(8,12)  14 concat(5,13)  15 concat(4,14)
//
// Interface: one 8-bit symbol on `data` per clock. `match` is 1 in the cycle
// whose symbol ends a substring of the text matched by the expression (the
// 'g'), combinationally; the rate is one symbol per clock. After reset is
// released, the first rising edge loads the start activation, so the first
// symbol is taken in the cycle after that edge.
//
// USE_DECODER selects the comparator style: 0 gives each literal state its
// own 8-bit comparator, 1 feeds all of them from one shared 8-to-256
// decoder. The structure follows the source design; the reset and the
// parameter are this library's.
module nfa_match_example
  import regex_nfa_pkg::*;
#(
  parameter bit USE_DECODER = 1'b0  // 1: literal states share one decoder
) (
  input  logic clk,
  input  logic rst_n,
  input  sym_t data,    // input symbol, one per clock
  output logic match    // a match ends with the current symbol
);

  sym_lines_t lines;

  if (USE_DECODER) begin : g_dec
    nfa_decoder u_decoder (.data, .lines);
  end else begin : g_nodec
    assign lines = '0;
  end

  // Activation (en_N) and completion (hit_N) of brick N; a_en_N / b_en_N
  // are the activations a union or concatenation hands to its first and
  // second operand, sub_en_N the one a closure hands to its operand.
  logic en_1, en_2, en_3, en_4, en_5, en_6, en_7, en_8, en_9, en_10, en_11,
        en_12, en_13, en_14, en_15;
  logic hit_1, hit_2, hit_3, hit_4, hit_5, hit_6, hit_7, hit_8, hit_9, hit_10,
        hit_11, hit_12, hit_13, hit_14, hit_15;

  // Literal states 1, 2, 5, 6, 7, 9, 11.
  nfa_literal #(.CHAR("a"), .USE_DECODER(USE_DECODER)) comparator1  (.clk, .rst_n, .data, .lines, .en(en_1),  .hit(hit_1));
  nfa_literal #(.CHAR("b"), .USE_DECODER(USE_DECODER)) comparator2  (.clk, .rst_n, .data, .lines, .en(en_2),  .hit(hit_2));
  nfa_literal #(.CHAR("c"), .USE_DECODER(USE_DECODER)) comparator5  (.clk, .rst_n, .data, .lines, .en(en_5),  .hit(hit_5));
  nfa_literal #(.CHAR("d"), .USE_DECODER(USE_DECODER)) comparator6  (.clk, .rst_n, .data, .lines, .en(en_6),  .hit(hit_6));
  nfa_literal #(.CHAR("e"), .USE_DECODER(USE_DECODER)) comparator7  (.clk, .rst_n, .data, .lines, .en(en_7),  .hit(hit_7));
  nfa_literal #(.CHAR("f"), .USE_DECODER(USE_DECODER)) comparator9  (.clk, .rst_n, .data, .lines, .en(en_9),  .hit(hit_9));
  nfa_literal #(.CHAR("g"), .USE_DECODER(USE_DECODER)) comparator11 (.clk, .rst_n, .data, .lines, .en(en_11), .hit(hit_11));

  // 3: a | b
  nfa_union union3 (.hit(hit_3), .en(en_3),
                    .a_en(en_1), .a_hit(hit_1), .b_en(en_2), .b_hit(hit_2));

  // 4: (a|b)*
  nfa_closure closure4 (.hit(hit_4), .en(en_4), .sub_en(en_3), .sub_hit(hit_3));

  // 8: d | e
  nfa_union union8 (.hit(hit_8), .en(en_8),
                    .a_en(en_6), .a_hit(hit_6), .b_en(en_7), .b_hit(hit_7));

  // 10: f*
  nfa_closure closure10 (.hit(hit_10), .en(en_10), .sub_en(en_9), .sub_hit(hit_9));

  // 12: f* g
  nfa_concat concatenation12 (.hit(hit_12), .en(en_12),
                              .a_en(en_10), .a_hit(hit_10), .b_en(en_11), .b_hit(hit_11));

  // 13: (d|e) f* g
  nfa_concat concatenation13 (.hit(hit_13), .en(en_13),
                              .a_en(en_8), .a_hit(hit_8), .b_en(en_12), .b_hit(hit_12));

  // 14: c (d|e) f* g
  nfa_concat concatenation14 (.hit(hit_14), .en(en_14),
                              .a_en(en_5), .a_hit(hit_5), .b_en(en_13), .b_hit(hit_13));

  // 15: (a|b)* c (d|e) f* g
  nfa_concat concatenation15 (.hit(hit_15), .en(en_15),
                              .a_en(en_4), .a_hit(hit_4), .b_en(en_14), .b_hit(hit_14));

  // I/O: the outermost brick is always active; its completion is the output.
  assign en_15 = 1'b1;
  assign match = hit_15;

endmodule
