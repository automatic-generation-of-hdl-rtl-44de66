// nfa_closure: Kleene closure r*.
//
// r* matches the empty string, so the activation `en` is itself a match, and
// every completion of r may be followed by another pass through r. Hence r is
// activated by `en` or by its own completion, and the closure's output is the
// OR of its activation and r's completion. Purely combinational; the feedback
// from `sub_hit` to `sub_en` is broken by the flip-flops of r's comparators,
// so r must contain at least one state (as every sub-circuit built from
// these bricks does, except another bare closure or option).
//
// Ports, with the wire numbers of the source design's brick: hit = w1,
// en = w2, sub_en = w3, sub_hit = w4. Port order follows the source design;
// the gate equations are this library's reading of the NFA construction for
// r* (new start state with epsilon edges into r, around r and back from r's
// end).
module nfa_closure (
  output logic hit,      // w1: r* has matched (possibly the empty string)
  input  logic en,       // w2: activation
  output logic sub_en,   // w3: activation of r
  input  logic sub_hit   // w4: r has matched
);

  assign sub_en = en | sub_hit;
  assign hit    = en | sub_hit;

endmodule
