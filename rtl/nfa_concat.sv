// nfa_concat: concatenation r1 r2.
//
// The activation `en` enters r1; every completion of r1 activates r2; the
// concatenation has matched when r2 has. Purely combinational: r1's output,
// which already includes a comparator's flip-flop, drives r2's activation
// directly, so r2's first state is entered one clock after r1 consumed its
// last character.
//
// Ports, with the wire numbers of the source design's brick: hit = w1,
// en = w2, a_en = w3 and a_hit = w4 to r1, b_en = w5 and b_hit = w6 to r2.
// Function and port order follow the source design.
module nfa_concat (
  output logic hit,    // w1: r1 r2 has matched
  input  logic en,     // w2: activation
  output logic a_en,   // w3: activation of r1
  input  logic a_hit,  // w4: r1 has matched
  output logic b_en,   // w5: activation of r2
  input  logic b_hit   // w6: r2 has matched
);

  assign a_en = en;
  assign b_en = a_hit;
  assign hit  = b_hit;

endmodule
