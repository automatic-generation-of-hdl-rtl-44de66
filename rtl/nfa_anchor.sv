// nfa_anchor: start-of-string '^' or end-of-string '$' anchor.
//
// An anchor cannot be drawn as an NFA edge, so it is a gate on the
// completion of the sub-circuit it follows. The environment marks the string
// with a one-cycle pulse: `mark` is the start pulse `s` (high while the first
// symbol of the string is on the input) for '^', or the finish pulse `f`
// (high while the last symbol is on the input) for '$'. For '^' the pattern
// is rearranged so that the anchor follows the first literal: "^ben" becomes
// b^ e n, and b's completion only counts when b was the first symbol. For
// '$' the anchor follows the last literal, whose completion only counts on
// the last symbol.
//
// Ports, with the wire numbers of the source design's brick: hit = w1,
// en = w2, sub_en = w3, sub_hit = w4, and `mark` = its fifth port.
// Combinational. The s/f pulses and the rearrangement follow the source
// design; the AND gate is this library's reading of it.
module nfa_anchor (
  output logic hit,      // w1: anchored match
  input  logic en,       // w2: activation
  output logic sub_en,   // w3: activation of the anchored sub-circuit
  input  logic sub_hit,  // w4: sub-circuit has matched
  input  logic mark      // s (for '^') or f (for '$') pulse
);

  assign sub_en = en;
  assign hit    = sub_hit & mark;

endmodule
