// nfa_optional: zero or one occurrence, r?.
//
// r? matches the empty string or one match of r: r is activated by `en`
// only (no loop back), and the output is the OR of the activation and r's
// completion. Purely combinational.
//
// Ports, with the wire numbers of the source design's brick: hit = w1,
// en = w2, sub_en = w3, sub_hit = w4. Port order follows the source design
// (its module for '?' is called "repetition"); the gate equations are this
// library's reading of the NFA for r? (r* without the loop back).
module nfa_optional (
  output logic hit,      // w1: r? has matched
  input  logic en,       // w2: activation
  output logic sub_en,   // w3: activation of r
  input  logic sub_hit   // w4: r has matched
);

  assign sub_en = en;
  assign hit    = en | sub_hit;

endmodule
