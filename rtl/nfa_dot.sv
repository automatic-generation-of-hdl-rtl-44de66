// nfa_dot: NFA state for the metacharacter '.', which matches any symbol.
//
// Like a comparator, a flip-flop holds the state (1 when the match has
// reached the point before this symbol); since every symbol matches, the
// output is the flip-flop itself: whatever symbol is on the input in that
// cycle is consumed. One input symbol is assumed to arrive on every clock.
//
// Interface: `en` is the activation (w2), `hit` the output (w1). Timing as
// nfa_comparator: `hit` rises one clock after `en`. The reset is this
// library's addition. The source design names a brick for '.' but its
// internal wiring is this library's own: a comparator whose compare is
// always true.
module nfa_dot (
  input  logic clk,
  input  logic rst_n,
  input  logic en,     // state is entered (w2)
  output logic hit     // any symbol consumed in this cycle (w1)
);

  logic active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active_q <= 1'b0;
    else        active_q <= en;
  end

  assign hit = active_q;

endmodule
