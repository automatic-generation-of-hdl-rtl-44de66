// nfa_exclusion: negated character class [^c1 c2 ... cn].
//
// The class is first rewritten as the union (c1|c2|...|cn), built from
// comparators, and this brick inverts it: it matches the current symbol
// when the state is active and none of the class's comparators hit. The
// brick keeps its own copy of the state flip-flop (it captures `en` on the
// same edge as the class's comparators do through `sub_en`), so that the
// inverted output is 1 only while the state is active.
//
// Ports, with the wire numbers of the source design's brick: hit = w1,
// en = w2, sub_en = w3, sub_hit = w4. Timing as a comparator: `hit` is
// combinational in the current symbol and rises one clock after `en`.
// An assertion checks that the class never reports a symbol while the state
// is inactive. The rewrite into a union and the inverter follow the source
// design; the flip-flop that qualifies the inverted output, and the reset,
// are this library's own.
module nfa_exclusion (
  input  logic clk,
  input  logic rst_n,
  output logic hit,      // w1: a symbol outside the class consumed
  input  logic en,       // w2: activation
  output logic sub_en,   // w3: activation of the class (c1|...|cn)
  input  logic sub_hit   // w4: the symbol is in the class
);

  logic active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active_q <= 1'b0;
    else        active_q <= en;
  end

  assign sub_en = en;
  assign hit    = active_q & ~sub_hit;

  // The class's comparators capture the same activation as active_q, so the
  // class can only report a symbol while this state is active.
  a_class_follows_state: assert property (
    @(posedge clk) disable iff (!rst_n) sub_hit |-> active_q
  );

endmodule
