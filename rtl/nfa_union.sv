// nfa_union: alternation r1 | r2.
//
// The activation `en` is passed to both sub-circuits, and the union has
// matched when either of them has. Purely combinational: the only state is in
// the sub-circuits' comparators.
//
// Ports, with the wire numbers of the source design's brick (odd = output,
// even = input): hit = w1, en = w2, a_en = w3 and a_hit = w4 connect to the
// circuit for r1, b_en = w5 and b_hit = w6 to the circuit for r2. The
// function and the port order follow the source design.
module nfa_union (
  output logic hit,    // w1: r1 | r2 has matched
  input  logic en,     // w2: activation
  output logic a_en,   // w3: activation of r1
  input  logic a_hit,  // w4: r1 has matched
  output logic b_en,   // w5: activation of r2
  input  logic b_hit   // w6: r2 has matched
);

  assign a_en = en;
  assign b_en = en;
  assign hit  = a_hit | b_hit;

endmodule
