// nfa_dec_comparator: NFA state for one literal character, fed by a shared
// symbol decoder.
//
// This is the comparator variant meant for ASIC use: instead of each state
// comparing the 8-bit symbol with its own character, one 8-to-256 decoder
// (nfa_decoder) is shared by the whole matcher and each state only ANDs its
// flip-flop with the one decoder line of its character. Once a pattern has
// enough literal states, this costs less logic than one 8-bit comparator per
// state.
//
// Interface and timing are those of nfa_comparator, except that the symbol
// arrives as the single decoded line `sym_line` (1 when the current symbol is
// this state's character). The flip-flop captures `en` on each rising edge;
// `hit` is combinational in `sym_line`. The reset is this library's addition.
module nfa_dec_comparator (
  input  logic clk,
  input  logic rst_n,
  input  logic sym_line,  // decoder line of this state's character
  input  logic en,        // state is entered (w2)
  output logic hit        // character consumed in this cycle (w1)
);

  logic active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active_q <= 1'b0;
    else        active_q <= en;
  end

  assign hit = active_q & sym_line;

endmodule
