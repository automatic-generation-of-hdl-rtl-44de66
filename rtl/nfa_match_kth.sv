// nfa_match_kth: matcher for (a|b)*a(a|b)^K, the "(K+1)-th symbol from the
// end is an a" language used to compare NFA circuits with DFA software.
//
// Before the circuit is built, a leading closure is dropped: the matcher
// looks for the pattern starting at every position of the text, so
// (a|b)* in front adds nothing, and the circuit is that of a(a|b)^K. It is a
// chain of K+1 states: stage 0 is a comparator for 'a', stages 1..K are each
// the union of an 'a' and a 'b' comparator. The stages are joined by K
// right-nested concatenations, as the postfix construction produces them,
// and the outermost concatenation is always active. The number of states,
// and so of flip-flops, grows linearly with K (the two comparators of a
// union capture the same activation, so synthesis can merge their
// flip-flops into one per stage).
//
// Interface: one 8-bit symbol on `data` per clock; `match` is 1,
// combinationally, in the cycle whose symbol is the last of K+1 consecutive
// symbols from {a, b} of which the first is an 'a'. The first symbol is
// taken in the cycle after the first rising edge after reset.
//
// USE_DECODER selects the comparator style, as in nfa_match_example. K's
// default is the largest value of the source design's evaluation (8 to 28).
module nfa_match_kth
  import regex_nfa_pkg::*;
#(
  parameter int unsigned K           = 28,   // number of trailing (a|b)
  parameter bit          USE_DECODER = 1'b0  // 1: literal states share one decoder
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

  // Stage i: activation st_en[i], completion st_hit[i].
  logic [K:0] st_en, st_hit;
  // Concatenation i joins stage i with everything after it:
  // activation cat_en[i], completion cat_hit[i]; cat_en[K] and cat_hit[K]
  // are stage K itself.
  logic [K:0] cat_en, cat_hit;

  // Stage 0: 'a'.
  nfa_literal #(.CHAR("a"), .USE_DECODER(USE_DECODER)) u_first (
    .clk, .rst_n, .data, .lines, .en(st_en[0]), .hit(st_hit[0])
  );

  // Stages 1..K: (a|b).
  for (genvar i = 1; i <= K; i++) begin : g_stage
    logic en_a, en_b, hit_a, hit_b;
    nfa_literal #(.CHAR("a"), .USE_DECODER(USE_DECODER)) u_a (
      .clk, .rst_n, .data, .lines, .en(en_a), .hit(hit_a)
    );
    nfa_literal #(.CHAR("b"), .USE_DECODER(USE_DECODER)) u_b (
      .clk, .rst_n, .data, .lines, .en(en_b), .hit(hit_b)
    );
    nfa_union u_union (
      .hit(st_hit[i]), .en(st_en[i]),
      .a_en(en_a), .a_hit(hit_a), .b_en(en_b), .b_hit(hit_b)
    );
  end

  // Right-nested concatenations: cat i = stage i followed by cat i+1.
  for (genvar i = 0; i < K; i++) begin : g_cat
    nfa_concat u_concat (
      .hit(cat_hit[i]), .en(cat_en[i]),
      .a_en(st_en[i]),  .a_hit(st_hit[i]),
      .b_en(cat_en[i+1]), .b_hit(cat_hit[i+1])
    );
  end
  assign st_en[K]   = cat_en[K];
  assign cat_hit[K] = st_hit[K];

  // I/O: the outermost concatenation is always active.
  assign cat_en[0] = 1'b1;
  assign match     = cat_hit[0];

endmodule
